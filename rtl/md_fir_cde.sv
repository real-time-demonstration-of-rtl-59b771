// md_fir_cde: multiplierless distributive FIR chromatic dispersion equalizer.
//
// The block filters a complex sample stream with the NTAPS-tap time-domain
// dispersion compensating filter, LANES samples per clock. Each tap's real
// and imaginary parts are quantized to one of four levels {-3,-1,+1,+3}
// (see cde_pkg). Because many taps share a level, the filter is evaluated in
// the distributive form
//   y[n] = sum_l v_l * (A_l[n] + j*B_l[n]),
//   A_l[n] = sum of x[n-m] over taps m whose real part has level l,
//   B_l[n] = sum of x[n-m] over taps m whose imaginary part has level l,
// so every output sample needs only additions into 2*4 complex bins and
// then four level scalings. The levels are +-1 and +-3, so each scaling is
// a negation or a shift-and-add: the datapath contains no multiplier.
//
// The taps are fixed at elaboration from the dispersion constant DISP_K.
// A delay line keeps the last ceil((NTAPS-1)/LANES) input words next to the
// current one; lane p of a word holds the later sample p of that word
// (lane 0 is the earliest in time) and the same ordering holds at the output.
//
// Pipeline: the input word is taken into the delay line on the clock edge
// where in_valid is high, the level bins are registered on the next edge and
// the equalized word on the edge after that, so out_valid rises three
// clock edges after the word was offered. Gaps in in_valid pass through as
// gaps in out_valid. The output is kept at full precision (no rounding); the
// common filter gain sqrt(1/K) is dropped. Synchronous active-low reset
// clears the delay line.
//
// From the demonstration: 83 taps, 4 levels, 16 lanes, 8-bit samples, the
// distributive and multiplierless evaluation. This design's own: the level
// values, the pipeline cut, the word ordering and the output width.
module md_fir_cde #(
  parameter int unsigned LANES  = cde_pkg::LANES,
  parameter int unsigned NTAPS  = cde_pkg::NTAPS,
  parameter int unsigned IN_W   = cde_pkg::ADC_W,
  parameter real         DISP_K = cde_pkg::CD_K,
  localparam int unsigned BIN_W = IN_W + $clog2(NTAPS),
  localparam int unsigned OUT_W = BIN_W + 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_re  [LANES],
  input  logic signed [IN_W-1:0]  in_im  [LANES],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_re [LANES],
  output logic signed [OUT_W-1:0] out_im [LANES]
);
  import cde_pkg::*;

  localparam int unsigned HIST = (NTAPS - 1 + LANES - 1) / LANES;  // past words kept
  localparam int unsigned WIN  = (HIST + 1) * LANES;               // samples in window
  localparam int          CTR  = (int'(NTAPS) - 1) / 2;            // centre tap

  if (NTAPS % 2 == 0) begin : g_bad_ntaps
    $error("md_fir_cde: NTAPS must be odd");
  end

  typedef tap_code_t [NTAPS-1:0] code_arr_t;

  function automatic code_arr_t make_codes();
    code_arr_t c;
    for (int m = 0; m < int'(NTAPS); m++) c[m] = cd_tap_code(m - CTR, DISP_K);
    return c;
  endfunction

  localparam code_arr_t CODES = make_codes();

  typedef logic signed [BIN_W-1:0] bin_t;
  typedef logic signed [OUT_W-1:0] out_t;

  // Level value (2*i - 3) times x, by negation and shift-and-add only.
  function automatic out_t scale_level(level_t l, out_t xe);
    out_t x3;
    x3 = (xe <<< 1) + xe;
    case (l)
      2'd3:    return x3;
      2'd2:    return xe;
      2'd1:    return -xe;
      default: return -x3;
    endcase
  endfunction

  // ---- delay line ------------------------------------------------------
  // win[WIN-LANES+p] is lane p of the newest word; lower indices are older.
  logic signed [IN_W-1:0] win_re [WIN];
  logic signed [IN_W-1:0] win_im [WIN];
  logic                   v_win;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(WIN); i++) begin
        win_re[i] <= '0;
        win_im[i] <= '0;
      end
      v_win <= 1'b0;
    end else begin
      v_win <= in_valid;
      if (in_valid) begin
        for (int i = 0; i < int'(WIN - LANES); i++) begin
          win_re[i] <= win_re[i + LANES];
          win_im[i] <= win_im[i + LANES];
        end
        for (int p = 0; p < int'(LANES); p++) begin
          win_re[WIN - LANES + p] <= in_re[p];
          win_im[WIN - LANES + p] <= in_im[p];
        end
      end
    end
  end

  // ---- level bins (distributive sums) ------------------------------------
  bin_t a_re_c [LANES][NLEVELS], a_im_c [LANES][NLEVELS];
  bin_t b_re_c [LANES][NLEVELS], b_im_c [LANES][NLEVELS];
  bin_t a_re_q [LANES][NLEVELS], a_im_q [LANES][NLEVELS];
  bin_t b_re_q [LANES][NLEVELS], b_im_q [LANES][NLEVELS];
  logic v_bin;

  always_comb begin
    for (int p = 0; p < int'(LANES); p++) begin
      for (int l = 0; l < int'(NLEVELS); l++) begin
        a_re_c[p][l] = '0;
        a_im_c[p][l] = '0;
        b_re_c[p][l] = '0;
        b_im_c[p][l] = '0;
      end
      for (int m = 0; m < int'(NTAPS); m++) begin
        a_re_c[p][CODES[m].re] += bin_t'(win_re[int'(WIN - LANES) + p - m]);
        a_im_c[p][CODES[m].re] += bin_t'(win_im[int'(WIN - LANES) + p - m]);
        b_re_c[p][CODES[m].im] += bin_t'(win_re[int'(WIN - LANES) + p - m]);
        b_im_c[p][CODES[m].im] += bin_t'(win_im[int'(WIN - LANES) + p - m]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_bin <= 1'b0;
    end else begin
      v_bin <= v_win;
    end
    a_re_q <= a_re_c;
    a_im_q <= a_im_c;
    b_re_q <= b_re_c;
    b_im_q <= b_im_c;
  end

  // ---- level scaling and combination --------------------------------------
  // (A + jB) * x: real = A.re - B.im, imag = A.im + B.re, per level.
  out_t y_re_c [LANES], y_im_c [LANES];

  always_comb begin
    for (int p = 0; p < int'(LANES); p++) begin
      y_re_c[p] = '0;
      y_im_c[p] = '0;
      for (int l = 0; l < int'(NLEVELS); l++) begin
        y_re_c[p] += scale_level(level_t'(l), out_t'(a_re_q[p][l]) - out_t'(b_im_q[p][l]));
        y_im_c[p] += scale_level(level_t'(l), out_t'(a_im_q[p][l]) + out_t'(b_re_q[p][l]));
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= v_bin;
    end
    out_re <= y_re_c;
    out_im <= y_im_c;
  end

endmodule
