// deinterleave_zp: optional de-interleaving with zero padding ahead of the FFT.
//
// For near targets the FFT path can work on half the samples: the frame is
// de-interleaved (only the even-indexed samples x[0], x[2], ... are kept) and
// the missing half is filled with zeros, so the FFT length, and with it the
// bin spacing, stays the same. That technique, with an unchanged number of
// FFT points, is the published one; applying it inside one 8-sample frame
// (4 kept samples followed by 4 zeros) and switching it with `en` are this
// design's choices. With `en` low the frame passes unchanged. The wavelet
// path always sees the full frame.
//
// Interface and timing: purely combinational; `out_x` follows `in_x` and `en`
// in the same clock.
module deinterleave_zp #(
  parameter int unsigned WIDTH = 17,
  parameter int unsigned N     = 8
) (
  input  logic                    en,
  input  logic [N-1:0][WIDTH-1:0] in_x,
  output logic [N-1:0][WIDTH-1:0] out_x
);

  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      if (!en)              out_x[i] = in_x[i];
      else if (i < N / 2)   out_x[i] = in_x[2 * i];
      else                  out_x[i] = '0;
    end
  end

endmodule
