// tb_fifo_ctrl: self-checking test of the fill/drain controller.
// A counter in the testbench stands for the FIFO occupancy. Each clock checks
// that writes happen only while filling and not full, that every sample
// arriving while filling a non-full FIFO is written, that reads happen only
// while draining a non-empty FIFO, that the phase turns to drain after full
// and back to fill after empty, that `dropped` marks exactly the unwritten
// samples, and that every drain reads exactly DEPTH words.
`timescale 1ns/1ps
module tb_fifo_ctrl;
  localparam int D = 8;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic empty, full, writeen, readen, dropped, draining;
  int count = 0, checks = 0, failures = 0;
  int n_drains = 0, n_drops = 0, reads_this_drain = 0;

  fifo_ctrl dut (.*);

  assign empty = (count == 0);
  assign full  = (count == D);

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

  initial begin
    logic prev_drain, prev_full, prev_empty;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    prev_drain = 0; prev_full = 0; prev_empty = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid = (t % 500 < 250) ? ($urandom % 3 != 0) : ($urandom % 5 == 0);
      #1;
      // phase transitions seen at this clock
      if (!prev_drain && prev_full)  check(draining, "fill -> drain after full");
      if (prev_drain && prev_empty)  check(!draining, "drain -> fill after empty");
      if (!prev_drain && !prev_full) check(!draining, "stays in fill while not full");
      if (prev_drain && !prev_empty) check(draining, "stays in drain while not empty");
      check(!writeen || (!draining && !full), "write only while filling and not full");
      check(!readen || (draining && !empty), "read only while draining and not empty");
      check(writeen == (in_valid && !draining && !full), "every possible write taken");
      check(readen == (draining && !empty), "drain reads every clock");
      check(dropped == (in_valid && !writeen), "dropped marks unwritten samples");
      if (dropped) n_drops++;
      if (readen) reads_this_drain++;
      if (prev_drain && !draining) begin
        check(reads_this_drain == D, $sformatf("drain read %0d words", reads_this_drain));
        reads_this_drain = 0;
        n_drains++;
      end
      @(posedge clk);
      count += int'(writeen) - int'(readen);
      prev_drain = draining; prev_full = (count == D); prev_empty = (count == 0);
    end
    check(n_drains > 10 && n_drops > 0, "several fill/drain rounds with drops");
    $display("drains=%0d drops=%0d", n_drains, n_drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
