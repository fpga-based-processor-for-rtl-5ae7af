// tb_recon_adder: self-checking test of the reconstruction adder.
// Drives random and corner-case sets of 8 channel samples, some back to back
// and some with gaps, and compares each `sum` with a reference sum taken one
// clock later (the specified latency). Includes the published cases where all
// 8 channels carry the same sample (3fff -> 1fff8, 2aaf -> 15578).
`timescale 1ns/1ps
module tb_recon_adder;
  import uwb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [N_CH-1:0][ADC_W-1:0] ch;
  logic [SUM_W-1:0] sum;
  logic sum_valid;
  int checks = 0, failures = 0;

  recon_adder dut (.clk, .rst_n, .load, .ch, .sum, .sum_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int unsigned ref_sum(input logic [N_CH-1:0][ADC_W-1:0] c);
    int unsigned s = 0;
    for (int i = 0; i < int'(N_CH); i++) s += c[i];
    return s;
  endfunction

  task automatic apply(input logic [N_CH-1:0][ADC_W-1:0] c, input int gap);
    int unsigned exp;
    exp = ref_sum(c);
    @(negedge clk);
    ch = c; load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    ch = '0;
    check(sum_valid === 1'b1, "sum_valid one clock after load");
    check(sum == SUM_W'(exp), $sformatf("sum %h expected %h", sum, exp));
    @(negedge clk);
    check(sum_valid === 1'b0, "sum_valid is a single pulse");
    repeat (gap) @(negedge clk);
  endtask

  initial begin
    logic [N_CH-1:0][ADC_W-1:0] c;
    ch = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // published corner cases
    apply({N_CH{14'h3fff}}, 0);
    apply({N_CH{14'h2aaf}}, 1);
    check(ref_sum({N_CH{14'h3fff}}) == 32'h1fff8, "reference 3fff x 8");
    apply('0, 0);
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < int'(N_CH); i++) c[i] = ADC_W'($urandom);
      apply(c, t % 3);
    end
    // back-to-back loads: one result per clock
    for (int t = 0; t < 50; t++) begin
      for (int i = 0; i < int'(N_CH); i++) c[i] = ADC_W'($urandom);
      @(negedge clk);
      ch = c; load = 1'b1;
      @(posedge clk); #1;
      check(sum == SUM_W'(ref_sum(c)) && sum_valid, "back-to-back sum");
    end
    @(negedge clk); load = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
