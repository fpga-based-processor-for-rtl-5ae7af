// tb_sync_fifo: self-checking test of the FIFO against a queue model.
// Random writes and reads, including writes to a full FIFO and reads from an
// empty one, with full/empty, overflow/underflow and the one-clock read
// latency compared each clock with the model.
`timescale 1ns/1ps
module tb_sync_fifo;
  localparam int W = 17, D = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic writeen = 1'b0, readen = 1'b0;
  logic [W-1:0] din = '0, dataout;
  logic rd_valid, empty, full, overflow, underflow;
  int checks = 0, failures = 0;
  int n_full = 0, n_empty_rd = 0, n_ovf = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

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

  logic [W-1:0] q[$];
  logic         exp_rv, exp_ovf, exp_udf;
  logic [W-1:0] exp_data;

  initial begin
    int mode;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    exp_rv = 0; exp_ovf = 0; exp_udf = 0; exp_data = '0;
    for (int t = 0; t < 4000; t++) begin
      mode = (t / 200) % 3;   // phases: write-heavy, read-heavy, balanced
      @(negedge clk);
      // compare outputs produced by the previous edge
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == D), "full flag");
      check(rd_valid == exp_rv, "rd_valid");
      if (exp_rv) check(dataout == exp_data, $sformatf("dataout %h exp %h", dataout, exp_data));
      check(overflow == exp_ovf, "overflow");
      check(underflow == exp_udf, "underflow");
      if (full) n_full++;
      // new stimulus
      writeen = (mode == 0) ? ($urandom % 4 != 0) : (mode == 1) ? ($urandom % 4 == 0) : $urandom % 2;
      readen  = (mode == 1) ? ($urandom % 4 != 0) : (mode == 0) ? ($urandom % 4 == 0) : $urandom % 2;
      din     = W'($urandom);
      // model the coming edge
      begin
        bit do_rd, do_wr;
        do_rd = readen && q.size() > 0;
        do_wr = writeen && (q.size() < D || do_rd);
        exp_rv = do_rd; exp_ovf = writeen && !do_wr; exp_udf = readen && !do_rd;
        if (do_rd) exp_data = q.pop_front();
        if (do_wr) q.push_back(din);
        if (exp_ovf) n_ovf++;
        if (exp_udf) n_empty_rd++;
      end
    end
    check(n_full > 0 && n_ovf > 0 && n_empty_rd > 0, "full, overflow and empty read all exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
