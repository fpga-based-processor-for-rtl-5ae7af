// os_cfar: ordered-statistic CFAR detector for one frame of 8 values.
//
// The 8 input values (the real parts of the FFT bins, or the level-1 wavelet
// coefficients) are split into two groups of four, num0..num3 and num4..num7.
// Each group is bubble-sorted by magnitude, descending when `sort_dir` = 0 and
// ascending when `sort_dir` = 1. Every sorted value is then compared with the
// preset `threshold`: its `detect` bit is 1 when its magnitude is above the
// threshold, 0 otherwise. A multiplexer driven by `sel` presents one of the
// eight sorted values on `mux_out` with its comparison result on `greater`.
// Groups of four, bubble sort, the threshold comparison and the names
// sort_dir, sel, mux_out and greater follow the published design. The
// magnitude as sort key (|x| of the two's-complement word), the sequential
// sorter that performs one full bubble pass over both groups per clock, and
// the meaning of sort_dir = 1 are this design's choices.
//
// Interface: `in_valid` loads `num_in` and `sort_dir` when `ready` is high.
// Timing: load, then 3 bubble passes (one per clock), then the compare
// register: `out_valid` pulses 5 clocks after `in_valid` was sampled, and
// `ready` is low for the 4 clocks in between. `x_sorted` and `detect` hold
// until the next result; `mux_out`/`greater` follow `sel` combinationally.
module os_cfar
  import uwb_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  fft_t [7:0]        num_in,
  input  logic [FFT_W-1:0]  threshold,  // unsigned magnitude threshold
  input  logic              sort_dir,   // 0: descending, 1: ascending
  input  logic [2:0]        sel,
  output logic              ready,
  output logic              out_valid,
  output fft_t [7:0]        x_sorted,
  output logic [7:0]        detect,
  output fft_t              mux_out,
  output logic              greater
);

  typedef enum logic [1:0] {S_IDLE, S_SORT, S_CMP} state_e;

  state_e     state;
  logic [1:0] pass;
  logic       dir;
  fft_t [7:0] work, work_next;

  function automatic logic [FFT_W-1:0] mag(input fft_t v);
    return v[FFT_W-1] ? FFT_W'(-v) : FFT_W'(v);
  endfunction

  // One bubble pass: compare-exchange (0,1), (1,2), (2,3) in turn in each group.
  always_comb begin
    fft_t tmp;
    tmp = '0;
    work_next = work;
    for (int g = 0; g < 8; g += GROUP) begin
      for (int i = 0; i < int'(GROUP) - 1; i++) begin
        if (dir ? (mag(work_next[g+i]) > mag(work_next[g+i+1]))
                : (mag(work_next[g+i]) < mag(work_next[g+i+1]))) begin
          tmp              = work_next[g+i];
          work_next[g+i]   = work_next[g+i+1];
          work_next[g+i+1] = tmp;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      pass      <= '0;
      dir       <= 1'b0;
      work      <= '0;
      x_sorted  <= '0;
      detect    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      case (state)
        S_IDLE: if (in_valid) begin
          work  <= num_in;
          dir   <= sort_dir;
          pass  <= '0;
          state <= S_SORT;
        end
        S_SORT: begin
          work <= work_next;
          pass <= pass + 1'b1;
          if (pass == 2'd2) state <= S_CMP;
        end
        S_CMP: begin
          x_sorted <= work;
          for (int i = 0; i < 8; i++) detect[i] <= mag(work[i]) > threshold;
          out_valid <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ready   = (state == S_IDLE);
  assign mux_out = x_sorted[sel];
  assign greater = detect[sel];

  a_no_load_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> ready);

endmodule
