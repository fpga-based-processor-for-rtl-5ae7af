// dwt_haar: two-level discrete wavelet decomposition of an 8-sample frame.
//
// Each level convolves its input with a low-pass filter h and a high-pass
// filter g and keeps every second result (downsampling by 2); the low-pass
// branch of level 1 is decomposed again at level 2, as in the published
// decomposition tree. Level 1 yields the four approximation values sum0..sum3
// and the four detail values sub0..sub3; level 2 yields two approximation
// (a2) and two detail (d2) values. The filter coefficients are not published:
// this design uses the unnormalised Haar pair h = (1, 1), g = (1, -1), so
// sum_k = x[2k] + x[2k+1] and sub_k = x[2k] - x[2k+1], which needs no
// multiplier and cannot overflow the 20-bit signed outputs.
//
// Interface: `in_valid` with `in_x` (unsigned 17-bit samples); `out_valid`
// with all coefficients as 20-bit two's-complement numbers.
// Timing: one register per level; `out_valid` follows `in_valid` by 2 clocks,
// and a new frame can enter every clock.
module dwt_haar
  import uwb_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [7:0][SUM_W-1:0] in_x,
  output logic                  out_valid,
  output fft_t [3:0]            sum,   // level-1 approximation
  output fft_t [3:0]            sub,   // level-1 detail
  output fft_t [1:0]            a2,    // level-2 approximation
  output fft_t [1:0]            d2     // level-2 detail
);

  fft_t [3:0] l1_sum, l1_sub;
  logic       v1, v2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l1_sum <= '0; l1_sub <= '0;
      sum <= '0; sub <= '0; a2 <= '0; d2 <= '0;
      v1 <= 1'b0; v2 <= 1'b0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
      if (in_valid) begin
        for (int k = 0; k < 4; k++) begin
          l1_sum[k] <= fft_t'(in_x[2*k]) + fft_t'(in_x[2*k+1]);
          l1_sub[k] <= fft_t'(in_x[2*k]) - fft_t'(in_x[2*k+1]);
        end
      end
      if (v1) begin
        sum <= l1_sum;
        sub <= l1_sub;
        for (int m = 0; m < 2; m++) begin
          a2[m] <= l1_sum[2*m] + l1_sum[2*m+1];
          d2[m] <= l1_sum[2*m] - l1_sum[2*m+1];
        end
      end
    end
  end

  assign out_valid = v2;

endmodule
