// tb_fft8_dif: self-checking test of the 8-point DIF FFT.
// Reference: a direct floating-point DFT, X[k] = sum x[n]*exp(-j*2*pi*n*k/8),
// with cos(pi/4) = sin(pi/4) taken as 181/256, compared modulo 2^20. Bins 0,
// 2, 4, 6 involve no twiddle rounding and must match exactly; bins 1, 3, 5, 7
// may differ by the rounding of two twiddle products, at most 2 LSB. Also
// checks the published result vector (to within 2 LSB), the 3-clock
// latency, and one result per clock for back-to-back frames.
`timescale 1ns/1ps
module tb_fft8_dif;
  import uwb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [7:0][SUM_W-1:0] in_x = '0;
  logic out_valid;
  cpx_t [7:0] out;
  int checks = 0, failures = 0;

  fft8_dif dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // difference a - b of two 20-bit words, folded into -2^19 .. 2^19-1
  function automatic int wdiff(input logic [FFT_W-1:0] a, input longint b);
    logic [FFT_W-1:0] d;
    d = a - FFT_W'(b);
    return int'($signed(d));
  endfunction

  function automatic longint rnd(input real r);
    return longint'($floor(r + 0.5));
  endfunction

  // queue of frames in flight, checked when they come out
  typedef logic [7:0][SUM_W-1:0] frame_t;
  frame_t inflight[$];
  int     issue_t[$];
  int     cyc = 0;
  int     n_out = 0;

  always @(posedge clk) cyc++;

  // cos and sin of 2*pi*m/8 with sqrt(1/2) replaced by the 8-bit twiddle
  // constant 181/256 that the FFT uses
  function automatic real qcos(input int m);
    real c = 181.0 / 256.0;
    case (m)
      0: return 1.0;  1: return c;  2: return 0.0;  3: return -c;
      4: return -1.0; 5: return -c; 6: return 0.0;  default: return c;
    endcase
  endfunction
  function automatic real qsin(input int m);
    return qcos((m + 6) % 8);
  endfunction

  task automatic check_bins(input frame_t x, input cpx_t [7:0] y);
    real pi, re, im;
    int tol;
    pi = 3.14159265358979323846;
    for (int k = 0; k < 8; k++) begin
      re = 0.0; im = 0.0;
      for (int n = 0; n < 8; n++) begin
        re += real'(x[n]) * qcos((n * k) % 8);
        im -= real'(x[n]) * qsin((n * k) % 8);
      end
      tol = (k % 2 == 0) ? 0 : 2;
      check(wdiff(y[k].re, rnd(re)) <= tol && wdiff(y[k].re, rnd(re)) >= -tol,
            $sformatf("bin %0d re %h ref %f", k, y[k].re, re));
      check(wdiff(y[k].im, rnd(im)) <= tol && wdiff(y[k].im, rnd(im)) >= -tol,
            $sformatf("bin %0d im %h ref %f", k, y[k].im, im));
    end
  endtask

  always @(negedge clk) begin
    if (out_valid) begin
      frame_t f;
      int t0;
      f = inflight.pop_front();
      t0 = issue_t.pop_front();
      check(cyc - t0 == 3, $sformatf("latency %0d", cyc - t0));
      check_bins(f, out);
      n_out++;
    end
  end

  task automatic send(input frame_t f);
    @(negedge clk);
    in_x = f; in_valid = 1'b1;
    inflight.push_back(f);
    issue_t.push_back(cyc);
  endtask

  initial begin
    frame_t f;
    // Published vector (reconstructed samples in_x0..in_x7) and FFT result
    logic [FFT_W-1:0] pub_re [8] = '{20'hc2eed, 20'h013da, 20'h0ab20, 20'h141a7,
                                     20'hfcf93, 20'h141a6, 20'h0ab20, 20'h013da};
    logic [FFT_W-1:0] pub_im [8] = '{20'h0, 20'h09b6c, 20'hf2a53, 20'h098ec,
                                     20'h0, 20'hf6715, 20'h0d5ad, 20'hf6495};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    f = {17'h157a8, 17'h155a8, 17'h22d35, 17'h15538, 17'h15558, 17'h15468, 17'h15578, 17'h1fff8};
    send(f);
    @(negedge clk); in_valid = 1'b0;
    wait (n_out == 1);
    @(negedge clk);
    for (int k = 0; k < 8; k++) begin
      int dr, di;
      // the published outputs correspond to x5 = 22d35, one bit wider than the
      // 17-bit input; remove that extra 2^17 * W^(5k) before comparing
      dr = wdiff(out[k].re, longint'(pub_re[k]) - rnd(131072.0 * qcos((5 * k) % 8)));
      di = wdiff(out[k].im, longint'(pub_im[k]) + rnd(131072.0 * qsin((5 * k) % 8)));
      check(dr >= -2 && dr <= 2, $sformatf("published bin %0d re %h vs %h", k, out[k].re, pub_re[k]));
      check(di >= -2 && di <= 2, $sformatf("published bin %0d im %h vs %h", k, out[k].im, pub_im[k]));
    end
    // corner frames
    send('0);
    send({8{17'h1ffff}});
    send({17'h0, 17'h1ffff, 17'h0, 17'h1ffff, 17'h0, 17'h1ffff, 17'h0, 17'h1ffff});
    send({17'h1ffff, 17'h0, 17'h0, 17'h0, 17'h0, 17'h0, 17'h0, 17'h1ffff});
    // random frames, back to back and with gaps
    for (int t = 0; t < 400; t++) begin
      for (int n = 0; n < 8; n++) f[n] = SUM_W'($urandom);
      send(f);
      if (t % 7 == 3) begin
        @(negedge clk); in_valid = 1'b0;
      end
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (6) @(negedge clk);
    check(n_out == 405 && inflight.size() == 0, $sformatf("all %0d frames came out", n_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
