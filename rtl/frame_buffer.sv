// frame_buffer: collects N consecutive reconstructed samples into one frame.
//
// The FFT and the wavelet transform both work on a block of 8 reconstructed
// samples (in_x0..in_x7 of the published FFT). Each word read from the FIFO
// (`din` with `din_valid`) is written into the next slot of the frame; when the
// N-th word has arrived the complete frame is presented on `frame` and
// `frame_valid` pulses for one clock. The slot counter is this design's
// choice of how the frame is assembled.
//
// Timing: `frame_valid` rises in the clock after the N-th `din_valid`; `frame`
// stays stable until the next frame completes.
module frame_buffer #(
  parameter int unsigned WIDTH = 17,
  parameter int unsigned N     = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    din_valid,
  input  logic [WIDTH-1:0]        din,
  output logic [N-1:0][WIDTH-1:0] frame,
  output logic                    frame_valid
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0][WIDTH-1:0] fill;
  logic [IW-1:0]           idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill        <= '0;
      frame       <= '0;
      idx         <= '0;
      frame_valid <= 1'b0;
    end else begin
      frame_valid <= 1'b0;
      if (din_valid) begin
        fill[idx] <= din;
        if (idx == IW'(N - 1)) begin
          idx         <= '0;
          frame       <= fill;
          frame[N-1]  <= din;
          frame_valid <= 1'b1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

endmodule
