// tb_deinterleave_zp: self-checking test of the de-interleaver.
// For random frames, checks that with en = 0 the frame is unchanged and with
// en = 1 the output holds x[0], x[2], x[4], x[6] followed by four zeros.
`timescale 1ns/1ps
module tb_deinterleave_zp;
  localparam int W = 17, N = 8;
  logic en = 1'b0;
  logic [N-1:0][W-1:0] in_x = '0, out_x;
  int checks = 0, failures = 0;

  deinterleave_zp #(.WIDTH(W), .N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < N; i++) in_x[i] = W'($urandom);
      en = t[0];
      #1;
      for (int i = 0; i < N; i++) begin
        if (!en) check(out_x[i] == in_x[i], $sformatf("pass-through %0d", i));
        else if (i < 4) check(out_x[i] == in_x[2*i], $sformatf("even sample %0d", i));
        else check(out_x[i] == '0, $sformatf("zero pad %0d", i));
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
