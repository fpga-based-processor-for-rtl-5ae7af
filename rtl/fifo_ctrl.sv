// fifo_ctrl: fill/drain control of the sample FIFO.
//
// The FIFO is run in two phases, as the published description of the
// reconstruction buffer puts it: an empty FIFO is written, a full FIFO is
// read. In FILL every incoming reconstructed sample is written until `full`
// rises; the block then switches to DRAIN and reads one word per clock until
// `empty` rises, and switches back to FILL. With an 8-deep FIFO every drain
// therefore delivers 8 consecutive samples, one FFT frame. Samples that arrive
// while the FIFO is full or draining are not written; `dropped` pulses for
// each of them. Dropping them (rather than writing during the drain) keeps
// every frame made of consecutive samples; that is this design's choice.
//
// Interface: `in_valid` marks a new sample from the reconstruction adder;
// `writeen`/`readen` go to the FIFO; `draining` shows the phase.
// Timing: Moore phase register; `writeen`, `readen` and `dropped` are
// combinational from the phase, the FIFO flags and `in_valid`.
module fifo_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic empty,
  input  logic full,
  output logic writeen,
  output logic readen,
  output logic dropped,
  output logic draining
);

  typedef enum logic {FILL = 1'b0, DRAIN = 1'b1} phase_e;
  phase_e phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= FILL;
    else begin
      case (phase)
        FILL:  if (full)  phase <= DRAIN;
        DRAIN: if (empty) phase <= FILL;
        default: phase <= FILL;
      endcase
    end
  end

  always_comb begin
    writeen  = (phase == FILL) && !full && in_valid;
    readen   = (phase == DRAIN) && !empty;
    dropped  = in_valid && !writeen;
    draining = (phase == DRAIN);
  end

endmodule
