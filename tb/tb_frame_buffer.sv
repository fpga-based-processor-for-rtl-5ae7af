// tb_frame_buffer: self-checking test of the frame assembler.
// Sends a numbered stream of random words with random gaps and checks that
// each `frame_valid` pulse, one clock after every 8th word, presents exactly
// the last 8 words in order.
`timescale 1ns/1ps
module tb_frame_buffer;
  localparam int W = 17, N = 8;
  logic clk = 1'b0, rst_n = 1'b0, din_valid = 1'b0;
  logic [W-1:0] din = '0;
  logic [N-1:0][W-1:0] frame;
  logic frame_valid;
  int checks = 0, failures = 0;

  frame_buffer #(.WIDTH(W), .N(N)) dut (.*);

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
    logic [W-1:0] sent[$];
    int nwords = 0, nframes = 0;
    logic expect_frame = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      check(frame_valid == expect_frame, "frame_valid timing");
      if (expect_frame) begin
        for (int i = 0; i < N; i++)
          check(frame[i] == sent[sent.size() - N + i], $sformatf("frame word %0d", i));
        nframes++;
      end
      din_valid = (t % 300 < 150) ? 1'b1 : ($urandom % 3 == 0);
      din = W'($urandom);
      if (din_valid) begin
        sent.push_back(din);
        nwords++;
      end
      expect_frame = din_valid && (nwords % N == 0);
    end
    check(nframes == nwords / N || nframes == nwords / N - 1, "frame count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
