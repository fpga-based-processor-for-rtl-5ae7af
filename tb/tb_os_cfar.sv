// tb_os_cfar: self-checking test of the OS-CFAR detector.
// Reference: each group of four is ordered by magnitude with a stable
// insertion sort in the testbench (descending for sort_dir = 0, ascending for
// 1), and each value's detect bit is |x| > threshold. Checks all 8 sorted
// values, the detect vector, mux_out/greater for every sel, the 5-clock
// latency and the ready handshake. Includes the published first group
// (c2eed, 013da, 0ab20, 141a7 -> c2eed, 141a7, 0ab20, 013da).
`timescale 1ns/1ps
module tb_os_cfar;
  import uwb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, sort_dir = 1'b0;
  fft_t [7:0] num_in = '0;
  logic [FFT_W-1:0] threshold = '0;
  logic [2:0] sel = '0;
  logic ready, out_valid, greater;
  fft_t [7:0] x_sorted;
  logic [7:0] detect;
  fft_t mux_out;
  int checks = 0, failures = 0;
  int n_greater = 0, n_not_greater = 0;

  os_cfar dut (.*);

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

  function automatic longint absv(input fft_t v);
    longint s = longint'(v);
    return s < 0 ? -s : s;
  endfunction

  task automatic run(input fft_t [7:0] v, input logic dir, input logic [FFT_W-1:0] thr);
    fft_t e[8];
    int lat;
    // reference ordering
    for (int g = 0; g < 8; g += 4) begin
      fft_t grp[4];
      for (int i = 0; i < 4; i++) grp[i] = v[g+i];
      for (int i = 1; i < 4; i++) begin
        fft_t key = grp[i];
        int j = i - 1;
        while (j >= 0 && (dir ? absv(grp[j]) > absv(key) : absv(grp[j]) < absv(key))) begin
          grp[j+1] = grp[j];
          j--;
        end
        grp[j+1] = key;
      end
      for (int i = 0; i < 4; i++) e[g+i] = grp[i];
    end
    @(negedge clk);
    check(ready, "ready before load");
    num_in = v; sort_dir = dir; threshold = thr; in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    num_in = '0; sort_dir = ~dir;  // must have been latched
    lat = 1;
    while (!out_valid && lat < 20) begin
      check(!ready, "busy while sorting");
      @(negedge clk); lat++;
    end
    check(lat == 5, $sformatf("latency %0d", lat));
    for (int i = 0; i < 8; i++) begin
      check(x_sorted[i] == e[i], $sformatf("sorted[%0d] %h exp %h", i, x_sorted[i], e[i]));
      check(detect[i] == (absv(e[i]) > longint'(thr)), $sformatf("detect[%0d]", i));
    end
    for (int s = 0; s < 8; s++) begin
      sel = 3'(s);
      #1;
      check(mux_out == e[s] && greater == (absv(e[s]) > longint'(thr)), $sformatf("mux sel %0d", s));
      if (greater) n_greater++; else n_not_greater++;
    end
  endtask

  initial begin
    fft_t [7:0] v;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // published FFT real parts: group 1 = bins 0..3, group 2 = bins 4..7
    v = {20'h013da, 20'h0ab20, 20'h141a6, 20'hfcf93, 20'h141a7, 20'h0ab20, 20'h013da, 20'hc2eed};
    run(v, 1'b0, 20'd50000);
    check(x_sorted[0] == 20'hc2eed && x_sorted[1] == 20'h141a7 &&
          x_sorted[2] == 20'h0ab20 && x_sorted[3] == 20'h013da, "published group 1 order");
    run(v, 1'b1, 20'd50000);
    // ties in magnitude with opposite signs
    v = {20'd5, -20'sd5, 20'd5, -20'sd7, 20'd7, -20'sd7, 20'd0, 20'd7};
    run(v, 1'b0, 20'd5);
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 8; i++) v[i] = fft_t'($urandom);
      if (t % 4 == 0) v[t % 8] = fft_t'(20'h80000);  // most negative value
      run(v, 1'($urandom), FFT_W'($urandom));
    end
    check(n_greater > 0 && n_not_greater > 0, "threshold exercised both ways");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
