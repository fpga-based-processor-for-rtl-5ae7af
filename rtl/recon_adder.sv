// recon_adder: signal reconstruction adder.
//
// The eight ADC channels sample copies of the same echo that were delayed by
// 0..7 ns. On every `load` strobe this block adds the eight 14-bit channel
// samples of that sampling instant into one 17-bit reconstructed sample (14
// bits + 3 bits of growth, so it never overflows). The sum of eight samples and
// the 17-bit width follow the published reconstruction waveforms, where a
// constant input sample s yields a sum of 8*s. The balanced adder tree and the
// single register stage are this design's choice.
//
// Interface: `ch` holds the 8 unsigned channel samples, qualified by `load`.
// Timing: `sum`/`sum_valid` are registered, one clock after `load`; a new set
// of samples can be accepted every clock.
module recon_adder
  import uwb_pkg::*;
#(
  parameter int unsigned NCH = N_CH,
  parameter int unsigned IW  = ADC_W,
  parameter int unsigned OW  = IW + $clog2(NCH)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [NCH-1:0][IW-1:0] ch,
  output logic [OW-1:0]       sum,
  output logic                sum_valid
);

  logic [OW-1:0] tree_sum;

  always_comb begin
    tree_sum = '0;
    for (int i = 0; i < int'(NCH); i++) tree_sum += OW'(ch[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum       <= '0;
      sum_valid <= 1'b0;
    end else begin
      sum_valid <= load;
      if (load) sum <= tree_sum;
    end
  end

endmodule
