// tb_dwt_haar: self-checking test of the two-level Haar decomposition.
// Each random or corner-case frame is compared with coefficients computed in
// the testbench as integer sums and differences of sample pairs (level 1) and
// of level-1 approximation pairs (level 2); checks the 2-clock latency and
// back-to-back frames.
`timescale 1ns/1ps
module tb_dwt_haar;
  import uwb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [7:0][SUM_W-1:0] in_x = '0;
  logic out_valid;
  fft_t [3:0] sum, sub;
  fft_t [1:0] a2, d2;
  int checks = 0, failures = 0;

  dwt_haar dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  typedef logic [7:0][SUM_W-1:0] frame_t;
  frame_t inflight[$];
  int     issue_t[$];
  int     cyc = 0, n_out = 0;
  always @(posedge clk) cyc++;

  always @(negedge clk) begin
    if (out_valid) begin
      frame_t f;
      int x[8], s[4];
      f = inflight.pop_front();
      check(cyc - issue_t.pop_front() == 2, "latency 2");
      for (int n = 0; n < 8; n++) x[n] = int'(f[n]);
      for (int k = 0; k < 4; k++) begin
        s[k] = x[2*k] + x[2*k+1];
        check(int'(sum[k]) == s[k], $sformatf("sum%0d %0d exp %0d", k, sum[k], s[k]));
        check(int'(sub[k]) == x[2*k] - x[2*k+1], $sformatf("sub%0d", k));
      end
      for (int m = 0; m < 2; m++) begin
        check(int'(a2[m]) == s[2*m] + s[2*m+1], $sformatf("a2_%0d", m));
        check(int'(d2[m]) == s[2*m] - s[2*m+1], $sformatf("d2_%0d", m));
      end
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
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    send({8{17'h1ffff}});
    send({17'h0, 17'h1ffff, 17'h0, 17'h1ffff, 17'h0, 17'h1ffff, 17'h0, 17'h1ffff});
    for (int t = 0; t < 300; t++) begin
      for (int n = 0; n < 8; n++) f[n] = SUM_W'($urandom);
      send(f);
      if (t % 5 == 0) begin @(negedge clk); in_valid = 1'b0; end
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (5) @(negedge clk);
    check(n_out == 302, "all frames came out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
