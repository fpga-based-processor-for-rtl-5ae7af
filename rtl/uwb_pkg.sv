// uwb_pkg: widths and constants shared by the UWB radar feature-detection chain.
//
// The receiver splits one radar echo into 8 copies, delays them by 0..7 ns and
// digitises each with its own 14-bit ADC channel. The FPGA adds the 8 channel
// samples of one sampling instant (14 + 3 = 17 bits), buffers them in a FIFO,
// takes frames of 8 such samples through an 8-point FFT (20-bit results) and a
// Haar wavelet decomposition, and runs an ordered-statistic CFAR on the result.
// The 8 channels, 14-bit samples, 17-bit sums and 20-bit FFT words are the
// published numbers; the twiddle precision is this design's choice, picked so
// that the published FFT result vector is reproduced to within 1 LSB.
package uwb_pkg;

  localparam int unsigned N_CH    = 8;   // ADC channels (one per delay tap)
  localparam int unsigned ADC_W   = 14;  // ADC resolution
  localparam int unsigned SUM_W   = 17;  // reconstructed sample: ADC_W + log2(N_CH)
  localparam int unsigned N_PT    = 8;   // FFT / frame length
  localparam int unsigned FFT_W   = 20;  // FFT output word: SUM_W + log2(N_PT), two's complement
  localparam int unsigned GROUP   = 4;   // CFAR sort group size

  // cos(pi/4) = sin(pi/4) in unsigned fixed point with TW_FRAC fraction bits.
  localparam int unsigned TW_FRAC = 8;
  localparam int unsigned TW_C    = 181; // round(0.70711 * 256)

  typedef logic [ADC_W-1:0]        adc_t;
  typedef logic [SUM_W-1:0]        sum_t;   // unsigned reconstructed sample
  typedef logic signed [FFT_W-1:0] fft_t;   // FFT / CFAR word

  typedef struct packed {
    fft_t re;
    fft_t im;
  } cpx_t;

  // Source of the 8 values that the CFAR sorts (Fig. "signal processing":
  // both the FFT and the wavelet transform feed the CFAR).
  typedef enum logic {
    CFAR_SRC_FFT = 1'b0,  // real parts of the 8 FFT bins
    CFAR_SRC_DWT = 1'b1   // 4 approximation + 4 detail coefficients of DWT level 1
  } cfar_src_e;

endpackage
