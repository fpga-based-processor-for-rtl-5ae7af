// fft8_dif: 8-point radix-2 decimation-in-frequency FFT, three pipelined stages.
//
// Computes X[k] = sum_n x[n] * W^(nk), W = exp(-j*2*pi/8), of a frame of 8
// real, unsigned 17-bit reconstructed samples. The structure is the published
// DIF butterfly graph: stage 1 forms x[n] + x[n+4] and (x[n] - x[n+4]) * W^n
// for n = 0..3, stage 2 repeats this on each half with W^0 and W^2, stage 3
// forms the final 2-point sums and differences, whose outputs come in
// bit-reversed order (X0, X4, X2, X6, X1, X5, X3, X7) and are put back into
// natural order here. Inputs are 17 bits and outputs 20 bits, as published.
//
// Number format (this design's choice): every internal value is a 20-bit
// two's-complement number and all additions wrap modulo 2^20, so X[0], which
// can reach 8 * (2^17 - 1), is exact when read as unsigned. W^2 = -j is a
// swap and negation. W^1 and W^3 use cos(pi/4) = 181/256 with round-half-up
// ((p + 128) >>> 8), which reproduces the published result vector to within
// one LSB.
//
// Interface: `in_valid` with `in_x`; `out_valid` with `out` (re, im per bin).
// Timing: three register stages; `out_valid` follows `in_valid` by 3 clocks and
// a new frame can enter every clock.
module fft8_dif
  import uwb_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [7:0][SUM_W-1:0] in_x,
  output logic                  out_valid,
  output cpx_t [7:0]            out
);

  localparam int unsigned PW = FFT_W + TW_FRAC + 2;  // product width

  function automatic fft_t rnd_shift(input logic signed [PW-1:0] p);
    // the bits above FFT_W are a sign extension of the result
    return fft_t'((p + $signed(PW'(1 << (TW_FRAC - 1)))) >>> TW_FRAC);
  endfunction

  // Multiply by W^k, k = 0..3.
  function automatic cpx_t twiddle(input cpx_t a, input int unsigned k);
    cpx_t r;
    logic signed [PW-1:0] s, d;
    s = ($signed(PW'(a.re)) + $signed(PW'(a.im))) * $signed(PW'(TW_C));   // c*(re+im)
    d = ($signed(PW'(a.im)) - $signed(PW'(a.re))) * $signed(PW'(TW_C));   // c*(im-re)
    case (k)
      0: r = a;
      1: begin r.re = rnd_shift(s);  r.im = rnd_shift(d);  end  // (c - jc)
      2: begin r.re = a.im;          r.im = -a.re;         end  // -j
      default: begin r.re = rnd_shift(d); r.im = rnd_shift(-s); end  // (-c - jc)
    endcase
    return r;
  endfunction

  function automatic cpx_t cadd(input cpx_t a, input cpx_t b);
    cpx_t r;
    r.re = a.re + b.re;
    r.im = a.im + b.im;
    return r;
  endfunction

  function automatic cpx_t csub(input cpx_t a, input cpx_t b);
    cpx_t r;
    r.re = a.re - b.re;
    r.im = a.im - b.im;
    return r;
  endfunction

  cpx_t [7:0] x, s1_d, s1_q, s2_d, s2_q, s3_d, s3_q;
  logic       v1, v2, v3;

  always_comb begin
    for (int n = 0; n < 8; n++) begin
      x[n].re = fft_t'(in_x[n]);
      x[n].im = '0;
    end
    // Stage 1: span 4, twiddles W^0..W^3
    for (int n = 0; n < 4; n++) begin
      s1_d[n]   = cadd(x[n], x[n+4]);
      s1_d[n+4] = twiddle(csub(x[n], x[n+4]), n);
    end
    // Stage 2: span 2 within each half, twiddles W^0, W^2
    for (int h = 0; h < 8; h += 4) begin
      for (int n = 0; n < 2; n++) begin
        s2_d[h+n]   = cadd(s1_q[h+n], s1_q[h+n+2]);
        s2_d[h+n+2] = twiddle(csub(s1_q[h+n], s1_q[h+n+2]), 2 * n);
      end
    end
    // Stage 3: span 1
    for (int p = 0; p < 8; p += 2) begin
      s3_d[p]   = cadd(s2_q[p], s2_q[p+1]);
      s3_d[p+1] = csub(s2_q[p], s2_q[p+1]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q <= '0; s2_q <= '0; s3_q <= '0;
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0;
    end else begin
      v1 <= in_valid; v2 <= v1; v3 <= v2;
      if (in_valid) s1_q <= s1_d;
      if (v1)       s2_q <= s2_d;
      if (v2)       s3_q <= s3_d;
    end
  end

  // Undo the bit-reversed output order of the DIF graph.
  always_comb begin
    for (int i = 0; i < 8; i++) out[{i[0], i[1], i[2]}] = s3_q[i];
  end
  assign out_valid = v3;

endmodule
