// sync_fifo: single-clock first-in first-out buffer with full and empty flags.
//
// Holds reconstructed samples between the reconstruction adder and the frame
// buffer. Data leave in the order they were written. `empty` and `full` are
// the two status flags the published design uses; the depth of 8 (one FFT
// frame) and the registered read port are this design's choices.
//
// Interface: `writeen` stores `din` unless the FIFO is full (the word is then
// lost and `overflow` pulses); `readen` pops the oldest word unless the FIFO is
// empty (`underflow` pulses). A simultaneous read and write on a full FIFO
// is allowed; on an empty one only the write takes effect.
// Timing: the popped word appears on `dataout` with `rd_valid` one clock after
// `readen`. `full`/`empty` are registered and reflect the state after the
// last clock edge.
module sync_fifo #(
  parameter int unsigned WIDTH = 17,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             writeen,
  input  logic [WIDTH-1:0] din,
  input  logic             readen,
  output logic [WIDTH-1:0] dataout,
  output logic             rd_valid,
  output logic             empty,
  output logic             full,
  output logic             overflow,
  output logic             underflow
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [AW:0]      count;
  logic             do_wr, do_rd;

  assign do_rd = readen && !empty;
  assign do_wr = writeen && (!full || do_rd);

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr      <= '0;
      rptr      <= '0;
      count     <= '0;
      dataout   <= '0;
      rd_valid  <= 1'b0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else begin
      rd_valid  <= do_rd;
      overflow  <= writeen && !do_wr;
      underflow <= readen && !do_rd;
      if (do_rd) begin
        dataout <= mem[rptr];
        rptr    <= next_ptr(rptr);
      end
      if (do_wr) wptr <= next_ptr(wptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));

  // A full FIFO never grows and an empty one never shrinks.
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n)
    count <= (AW+1)'(DEPTH));

endmodule
