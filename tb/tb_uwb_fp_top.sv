// tb_uwb_fp_top: end-to-end test of the UWB processing chain at its default
// (full) size.
//
// Stimulus: sets of 8 ADC channel samples, in phases separated by quiet gaps:
// the published sample sequence (all channels equal), sparse random loads, and
// bursts of back-to-back loads that overrun the FIFO while it drains. Between
// phases the testbench changes the FFT de-interleaving mode, the CFAR source,
// sort direction, threshold and select.
//
// Checks, all against models in this file: every frame is 8 consecutive
// reconstructed samples (sum of the 8 channels) of the input stream; the
// published sequence gives the published reconstructed values; the FFT of each
// frame (or of its even samples zero-padded, when de-interleaving) matches a
// direct DFT (twiddle 181/256, at most 2 LSB rounding
// difference); the wavelet coefficients match pairwise sums and differences;
// the CFAR output matches a stable sort by magnitude of the selected source
// and the threshold comparison; loads are all accounted for as framed,
// dropped or still buffered. Each mechanism (FIFO full, drain, dropped sample,
// both FFT input modes, both CFAR sources, both sort directions, detection above and below
// threshold) must occur at least once.
`timescale 1ns/1ps
module tb_uwb_fp_top;
  import uwb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic adc_load = 1'b0;
  logic [N_CH-1:0][ADC_W-1:0] adc_ch = '0;
  logic [FFT_W-1:0] threshold = '0;
  logic sort_dir = 1'b0;
  logic [2:0] sel = '0;
  cfar_src_e cfar_src = CFAR_SRC_FFT;
  logic deint_en = 1'b0;
  logic fifo_full, fifo_empty, fifo_draining, sample_dropped;
  logic frame_valid;
  logic [N_PT-1:0][SUM_W-1:0] frame;
  logic fft_valid;
  cpx_t [7:0] fft_out;
  logic dwt_valid;
  fft_t [3:0] dwt_sum, dwt_sub;
  fft_t [1:0] dwt_a2, dwt_d2;
  logic cfar_valid;
  fft_t [7:0] cfar_sorted;
  logic [7:0] cfar_detect;
  fft_t mux_out;
  logic greater;

  uwb_fp_top dut (.*);

  always #2 clk = ~clk;   // 250 MHz, the ADC sample clock

  int checks = 0, failures = 0;
  int n_full = 0, n_drain = 0, n_drop = 0, n_frames = 0, n_fft = 0, n_dwt = 0;
  int n_src_fft = 0, n_src_dwt = 0, n_dir0 = 0, n_dir1 = 0, n_gt = 0, n_le = 0;
  int n_loads = 0, n_published = 0, n_deint = 0, n_full_frame = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------- reference helpers ----------------
  typedef logic [7:0][SUM_W-1:0] frame_t;

  function automatic real qcos(input int m);
    real c = 181.0 / 256.0;
    case (m)
      0: return 1.0;  1: return c;  2: return 0.0;  3: return -c;
      4: return -1.0; 5: return -c; 6: return 0.0;  default: return c;
    endcase
  endfunction

  function automatic int wdiff(input logic [FFT_W-1:0] a, input longint b);
    logic [FFT_W-1:0] d;
    d = a - FFT_W'(b);
    return int'($signed(d));
  endfunction

  function automatic longint absv(input fft_t v);
    longint s = longint'(v);
    return s < 0 ? -s : s;
  endfunction

  // ---------------- stream bookkeeping ----------------
  logic [SUM_W-1:0] sums[$];      // every reconstructed sample, in load order
  int               ptr = 0;      // first sample not yet seen in a frame
  int               skipped = 0;
  frame_t           fft_q[$], dwt_q[$];
  cfar_src_e        src_at_frame[$];
  logic             deint_at_frame[$];
  fft_t [7:0]       cfar_expect_in[$];
  logic             dir_q[$];
  frame_t           last_frame;

  // ---------------- monitors ----------------
  always @(negedge clk) if (rst_n) begin
    if (fifo_full && !fifo_draining) n_full++;
    if (sample_dropped) n_drop++;
    if (frame_valid) begin
      automatic int p;
      automatic bit found = 0;
      // locate the frame in the stream: it must be 8 consecutive samples
      for (p = ptr; p + 8 <= sums.size(); p++) begin
        automatic bit m = 1;
        for (int i = 0; i < 8; i++) if (sums[p+i] != frame[i]) m = 0;
        if (m) begin found = 1; break; end
      end
      check(found, "frame is 8 consecutive reconstructed samples");
      if (found) begin
        skipped += p - ptr;
        ptr = p + 8;
      end
      n_frames++;
      last_frame = frame;
      fft_q.push_back(frame);
      dwt_q.push_back(frame);
      src_at_frame.push_back(cfar_src);
      deint_at_frame.push_back(deint_en);
    end
    if (dwt_valid) begin
      automatic frame_t f = dwt_q.pop_front();
      automatic int s[4];
      for (int k = 0; k < 4; k++) begin
        s[k] = int'(f[2*k]) + int'(f[2*k+1]);
        check(int'(dwt_sum[k]) == s[k] && int'(dwt_sub[k]) == int'(f[2*k]) - int'(f[2*k+1]),
              $sformatf("dwt level 1 coefficient %0d", k));
      end
      for (int m = 0; m < 2; m++)
        check(int'(dwt_a2[m]) == s[2*m] + s[2*m+1] && int'(dwt_d2[m]) == s[2*m] - s[2*m+1],
              $sformatf("dwt level 2 coefficient %0d", m));
      n_dwt++;
    end
    if (fft_valid) begin
      automatic frame_t f = fft_q.pop_front();
      automatic cfar_src_e src = src_at_frame.pop_front();
      automatic logic deint = deint_at_frame.pop_front();
      automatic frame_t fx = f;
      automatic fft_t [7:0] cin;
      // de-interleaved and zero-padded FFT input
      if (deint) begin
        for (int i = 0; i < 8; i++) fx[i] = (i < 4) ? f[2*i] : '0;
        n_deint++;
      end else n_full_frame++;
      for (int k = 0; k < 8; k++) begin
        automatic real re = 0.0, im = 0.0;
        automatic int tol = (k % 2 == 0) ? 0 : 2;
        automatic int dr, di;
        for (int n = 0; n < 8; n++) begin
          re += real'(fx[n]) * qcos((n * k) % 8);
          im -= real'(fx[n]) * qcos((n * k + 6) % 8);
        end
        dr = wdiff(fft_out[k].re, longint'($floor(re + 0.5)));
        di = wdiff(fft_out[k].im, longint'($floor(im + 0.5)));
        check(dr >= -tol && dr <= tol && di >= -tol && di <= tol, $sformatf("fft bin %0d", k));
      end
      n_fft++;
      // CFAR input expected from the selected source
      for (int i = 0; i < 8; i++) begin
        if (src == CFAR_SRC_DWT)
          cin[i] = (i < 4) ? fft_t'(int'(f[2*i]) + int'(f[2*i+1]))
                           : fft_t'(int'(f[2*(i-4)]) - int'(f[2*(i-4)+1]));
        else
          cin[i] = fft_out[i].re;
      end
      if (src == CFAR_SRC_DWT) n_src_dwt++; else n_src_fft++;
      cfar_expect_in.push_back(cin);
      dir_q.push_back(sort_dir);
    end
    if (cfar_valid) begin
      automatic fft_t [7:0] v = cfar_expect_in.pop_front();
      automatic logic dir = dir_q.pop_front();
      automatic fft_t e[8];
      for (int g = 0; g < 8; g += 4) begin
        automatic fft_t grp[4];
        for (int i = 0; i < 4; i++) grp[i] = v[g+i];
        for (int i = 1; i < 4; i++) begin
          automatic fft_t key = grp[i];
          automatic int j = i - 1;
          while (j >= 0 && (dir ? absv(grp[j]) > absv(key) : absv(grp[j]) < absv(key))) begin
            grp[j+1] = grp[j];
            j--;
          end
          grp[j+1] = key;
        end
        for (int i = 0; i < 4; i++) e[g+i] = grp[i];
      end
      for (int i = 0; i < 8; i++) begin
        check(cfar_sorted[i] == e[i], $sformatf("cfar sorted[%0d]", i));
        check(cfar_detect[i] == (absv(e[i]) > longint'(threshold)), $sformatf("cfar detect[%0d]", i));
      end
      check(mux_out == e[sel] && greater == (absv(e[sel]) > longint'(threshold)), "mux_out/greater");
      if (greater) n_gt++; else n_le++;
      if (dir) n_dir1++; else n_dir0++;
    end
  end

  always @(posedge clk) if (rst_n && fifo_draining && fifo_full) n_drain++;

  // ---------------- stimulus ----------------
  task automatic load_set(input logic [N_CH-1:0][ADC_W-1:0] c);
    int unsigned s = 0;
    @(negedge clk);
    adc_ch = c;
    adc_load = 1'b1;
    for (int i = 0; i < int'(N_CH); i++) s += c[i];
    sums.push_back(SUM_W'(s));
    n_loads++;
  endtask

  task automatic idle(input int n);
    @(negedge clk);
    adc_load = 1'b0;
    repeat (n) @(negedge clk);
  endtask

  task automatic random_set();
    logic [N_CH-1:0][ADC_W-1:0] c;
    for (int i = 0; i < int'(N_CH); i++) c[i] = ADC_W'($urandom);
    load_set(c);
  endtask

  initial begin
    // published sample sequence; each value on all 8 channels
    logic [ADC_W-1:0] pub_in [8] = '{14'h3fff, 14'h2aaf, 14'h2a8d, 14'h2aab,
                                     14'h2aa7, 14'h0aa7, 14'h2ab5, 14'h2af5};
    logic [SUM_W-1:0] pub_sum [8] = '{17'h1fff8, 17'h15578, 17'h15468, 17'h15558,
                                      17'h15538, 17'h05538, 17'h155a8, 17'h157a8};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    threshold = 20'd100000;
    // phase 1: published sequence, one sample every 10 clocks
    for (int t = 0; t < 8; t++) begin
      load_set({N_CH{pub_in[t]}});
      idle(9);
    end
    idle(30);
    check(n_frames == 1, "published sequence gives one frame");
    for (int i = 0; i < 8; i++) check(last_frame[i] == pub_sum[i], $sformatf("published sum %0d", i));
    n_published++;
    // phases 2..: alternate sources, directions, thresholds and load patterns
    for (int ph = 0; ph < 12; ph++) begin
      cfar_src  = (ph % 2) ? CFAR_SRC_DWT : CFAR_SRC_FFT;
      sort_dir  = ph[1];
      threshold = FFT_W'((ph % 3 == 0) ? 20000 : (ph % 3 == 1) ? 150000 : 400000);
      sel       = 3'($urandom);
      deint_en  = (ph % 5 == 1 || ph % 5 == 4);
      for (int t = 0; t < 120; t++) begin
        if (ph % 3 == 2 || $urandom % 3 == 0) random_set();   // burst or sparse
        else idle(0);
      end
      idle(40);
    end
    idle(40);
    // accounting: every load is framed, dropped or still waiting in the FIFO
    check(n_frames * 8 + n_drop <= n_loads && n_loads - n_frames * 8 - n_drop < 8,
          $sformatf("loads %0d frames %0d drops %0d", n_loads, n_frames, n_drop));
    check(skipped <= n_drop, "skipped samples were dropped ones");
    check(fft_q.size() == 0 && dwt_q.size() == 0 && cfar_expect_in.size() == 0, "all results came out");
    check(n_fft == n_frames && n_dwt == n_frames, "one FFT and one DWT result per frame");
    $display("mechanisms: full=%0d drain=%0d dropped=%0d frames=%0d src_fft=%0d src_dwt=%0d dir0=%0d dir1=%0d greater=%0d not_greater=%0d published=%0d",
             n_full, n_drain, n_drop, n_frames, n_src_fft, n_src_dwt, n_dir0, n_dir1, n_gt, n_le, n_published);
    $display("            deinterleaved=%0d full_frames=%0d", n_deint, n_full_frame);
    check(n_full > 0,    "FIFO full reached");
    check(n_drain > 0,   "FIFO drained");
    check(n_drop > 0,    "sample dropped while draining");
    check(n_src_fft > 0, "CFAR fed from FFT");
    check(n_src_dwt > 0, "CFAR fed from DWT");
    check(n_dir0 > 0,    "descending sort");
    check(n_dir1 > 0,    "ascending sort");
    check(n_gt > 0,      "detection above threshold");
    check(n_le > 0,      "no detection below threshold");
    check(n_deint > 0,   "de-interleaved FFT frames");
    check(n_full_frame > 0, "full FFT frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
