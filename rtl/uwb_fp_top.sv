// uwb_fp_top: FPGA processing chain of an ultra-wide-band radar receiver.
//
// An echo is split into 8 copies that are delayed by 0..7 ns and sampled by 8
// ADC channels (14 bit, 250 MSPS) outside the FPGA. Inside, the chain is:
//
//   ADC channels -> recon_adder -> sync_fifo (fifo_ctrl) -> frame_buffer
//        frame_buffer -> deinterleave_zp -> fft8_dif  --+
//        frame_buffer -> dwt_haar  ---------------------+-> (cfar_src) -> os_cfar
//
// recon_adder sums the 8 channel samples of each sampling instant into one
// 17-bit reconstructed sample. fifo_ctrl fills the 8-deep FIFO from empty and
// drains it once full, so each drain is a frame of 8 consecutive samples that
// frame_buffer hands to the FFT and the wavelet transform, which run side by
// side. With `deint_en` high the FFT sees only the even samples of the frame,
// zero-padded back to 8 points (de-interleaving for near targets); the
// wavelet transform always sees the whole frame. The CFAR sorts and thresholds either the 8 FFT real parts (as in the
// published CFAR results) or the 8 level-1 wavelet coefficients (the published
// block diagram feeds the CFAR from both transforms); `cfar_src` chooses, and
// is sampled with each frame. The analog front end, the ADC card, the host
// processor and the display are outside this module: their signals are the
// ports.
//
// Timing: `frame_valid` rises 10 clocks after `fifo_full` (1 clock to switch
// to drain, 8 reads, 1 clock of read latency); wavelet results follow the
// frame by 2 clocks, FFT results by 3, CFAR results the FFT by 5. Frames are
// at least 18 clocks apart.
module uwb_fp_top
  import uwb_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  // ADC card (8 channels)
  input  logic                       adc_load,
  input  logic [N_CH-1:0][ADC_W-1:0] adc_ch,
  // control (from the host processor)
  input  logic [FFT_W-1:0]           threshold,
  input  logic                       sort_dir,
  input  logic [2:0]                 sel,
  input  cfar_src_e                  cfar_src,
  input  logic                       deint_en,
  // reconstruction / FIFO status
  output logic                       fifo_full,
  output logic                       fifo_empty,
  output logic                       fifo_draining,
  output logic                       sample_dropped,
  // frame, FFT and wavelet results (to the host processor)
  output logic                       frame_valid,
  output logic [N_PT-1:0][SUM_W-1:0] frame,
  output logic                       fft_valid,
  output cpx_t [7:0]                 fft_out,
  output logic                       dwt_valid,
  output fft_t [3:0]                 dwt_sum,
  output fft_t [3:0]                 dwt_sub,
  output fft_t [1:0]                 dwt_a2,
  output fft_t [1:0]                 dwt_d2,
  // CFAR results
  output logic                       cfar_valid,
  output fft_t [7:0]                 cfar_sorted,
  output logic [7:0]                 cfar_detect,
  output fft_t                       mux_out,
  output logic                       greater
);

  // ---------------- reconstruction and FIFO ----------------
  logic [SUM_W-1:0] sum, dataout;
  logic             sum_valid, writeen, readen, rd_valid;
  logic             ovf_unused, udf_unused;

  recon_adder #(.NCH(N_CH), .IW(ADC_W), .OW(SUM_W)) u_recon (
    .clk, .rst_n, .load(adc_load), .ch(adc_ch), .sum, .sum_valid
  );

  fifo_ctrl u_ctrl (
    .clk, .rst_n, .in_valid(sum_valid), .empty(fifo_empty), .full(fifo_full),
    .writeen, .readen, .dropped(sample_dropped), .draining(fifo_draining)
  );

  sync_fifo #(.WIDTH(SUM_W), .DEPTH(N_PT)) u_fifo (
    .clk, .rst_n, .writeen, .din(sum), .readen, .dataout, .rd_valid,
    .empty(fifo_empty), .full(fifo_full), .overflow(ovf_unused), .underflow(udf_unused)
  );

  frame_buffer #(.WIDTH(SUM_W), .N(N_PT)) u_frame (
    .clk, .rst_n, .din_valid(rd_valid), .din(dataout), .frame, .frame_valid
  );

  // ---------------- FFT and DWT in parallel ----------------
  logic [N_PT-1:0][SUM_W-1:0] fft_in;

  deinterleave_zp #(.WIDTH(SUM_W), .N(N_PT)) u_deint (
    .en(deint_en), .in_x(frame), .out_x(fft_in)
  );

  fft8_dif u_fft (
    .clk, .rst_n, .in_valid(frame_valid), .in_x(fft_in), .out_valid(fft_valid), .out(fft_out)
  );

  dwt_haar u_dwt (
    .clk, .rst_n, .in_valid(frame_valid), .in_x(frame), .out_valid(dwt_valid),
    .sum(dwt_sum), .sub(dwt_sub), .a2(dwt_a2), .d2(dwt_d2)
  );

  // ---------------- CFAR source selection ----------------
  cfar_src_e  src_q [3];   // cfar_src as sampled with each frame, aligned to the FFT latency
  logic       cfar_in_valid, cfar_ready;
  fft_t [7:0] cfar_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_q <= '{default: CFAR_SRC_FFT};
    end else begin
      src_q[0] <= frame_valid ? cfar_src : src_q[0];
      src_q[1] <= src_q[0];
      src_q[2] <= src_q[1];
    end
  end

  // The wavelet result is ready one clock before the FFT result; both are held
  // until the next frame, so both sources are taken when the FFT is valid.
  always_comb begin
    cfar_in_valid = fft_valid;
    for (int i = 0; i < 8; i++) begin
      if (src_q[2] == CFAR_SRC_DWT) cfar_in[i] = (i < 4) ? dwt_sum[i % 4] : dwt_sub[i % 4];
      else                          cfar_in[i] = fft_out[i].re;
    end
  end

  os_cfar u_cfar (
    .clk, .rst_n, .in_valid(cfar_in_valid), .num_in(cfar_in), .threshold, .sort_dir, .sel,
    .ready(cfar_ready), .out_valid(cfar_valid), .x_sorted(cfar_sorted), .detect(cfar_detect),
    .mux_out, .greater
  );

  // Frames are at least 18 clocks apart (8 writes, 8 reads, 2 switch clocks); the CFAR needs 5.
  a_cfar_ready: assert property (@(posedge clk) disable iff (!rst_n)
    cfar_in_valid |-> cfar_ready);

endmodule
