// cde_top: receiver DSP of the real-time chromatic dispersion equalization
// demonstrator.
//
// The coherent receiver delivers the in-phase (I) and quadrature (Q) signal
// through two converter channels, each made of two time-interleaved ADC
// cores. Per channel an adc_interleave block builds a word of LANES samples
// per clock (16 samples at 156.25 MHz = 2.5 GSa/s). The I and Q words form a
// complex stream that the multiplierless distributive FIR equalizer
// (md_fir_cde) compensates for the dispersion of the link; its output is
// brought out on eq_* for downstream processing.
//
// Two capture units (I and Q) record a window of CAP_DEPTH words for
// readout. The source of a capture is chosen when it is armed: with
// mode_raw low the equalized samples are stored, with mode_raw high the
// unprocessed converter samples (sign-extended to the same width), which is
// how a reference equalizer run outside the device is fed from the same
// hardware. Both units share the arm and read controls, so they fill and
// empty in step; the read side returns the I and Q word of the same
// instants together.
//
// Timing: equalized words appear on eq_* 4 clocks after the converter words
// (1 for the interleaving, 3 in the equalizer). In raw mode the converter
// samples reach the capture units 1 clock after entry.
//
// From the demonstration: the converter-to-equalizer-to-capture chain, 16
// lanes, 83 taps, 4 levels, captures of 2^15 samples and the raw-sample
// capture used as the reference path. This design's own: the shared clock,
// the mode latch at arm time and the readout port.
module cde_top #(
  parameter int unsigned LANES     = cde_pkg::LANES,
  parameter int unsigned NTAPS     = cde_pkg::NTAPS,
  parameter int unsigned ADC_W     = cde_pkg::ADC_W,
  parameter int unsigned CAP_DEPTH = (1 << 15) / LANES,
  localparam int unsigned EQ_W     = ADC_W + $clog2(NTAPS) + 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // converter cores: even (a) and odd (b) samples of I and Q, offset binary
  input  logic                    adc_valid,
  input  logic [ADC_W-1:0]        adc_i_a [LANES/2],
  input  logic [ADC_W-1:0]        adc_i_b [LANES/2],
  input  logic [ADC_W-1:0]        adc_q_a [LANES/2],
  input  logic [ADC_W-1:0]        adc_q_b [LANES/2],
  // equalized stream
  output logic                    eq_valid,
  output logic signed [EQ_W-1:0]  eq_re [LANES],
  output logic signed [EQ_W-1:0]  eq_im [LANES],
  // capture control and readout
  input  logic                    mode_raw,
  input  logic                    cap_arm,
  input  logic                    cap_rd_en,
  output logic                    cap_rd_valid,
  output logic [LANES*EQ_W-1:0]   cap_rd_i,
  output logic [LANES*EQ_W-1:0]   cap_rd_q,
  output logic                    cap_capturing,
  output logic                    cap_done,
  output logic                    cap_empty
);

  logic                    x_valid, xq_valid;
  logic signed [ADC_W-1:0] x_i [LANES];
  logic signed [ADC_W-1:0] x_q [LANES];

  adc_interleave #(.LANES(LANES), .IN_W(ADC_W)) u_adc_i (
    .clk, .rst_n, .in_valid(adc_valid), .core_a(adc_i_a), .core_b(adc_i_b),
    .out_valid(x_valid), .out_s(x_i)
  );

  adc_interleave #(.LANES(LANES), .IN_W(ADC_W)) u_adc_q (
    .clk, .rst_n, .in_valid(adc_valid), .core_a(adc_q_a), .core_b(adc_q_b),
    .out_valid(xq_valid), .out_s(x_q)
  );

  md_fir_cde #(.LANES(LANES), .NTAPS(NTAPS), .IN_W(ADC_W)) u_cde (
    .clk, .rst_n, .in_valid(x_valid), .in_re(x_i), .in_im(x_q),
    .out_valid(eq_valid), .out_re(eq_re), .out_im(eq_im)
  );

  // Capture source, latched when a capture is armed.
  logic                  raw_q;
  logic                  cap_valid;
  logic [LANES*EQ_W-1:0] cap_i, cap_q;

  always_ff @(posedge clk) begin
    if (!rst_n)                        raw_q <= 1'b0;
    else if (cap_arm && !cap_capturing) raw_q <= mode_raw;
  end

  always_comb begin
    for (int p = 0; p < int'(LANES); p++) begin
      cap_i[p*EQ_W +: EQ_W] = raw_q ? EQ_W'(x_i[p]) : eq_re[p];
      cap_q[p*EQ_W +: EQ_W] = raw_q ? EQ_W'(x_q[p]) : eq_im[p];
    end
    cap_valid = raw_q ? x_valid : eq_valid;
  end

  logic q_capturing, q_done, q_empty, q_rd_valid;
  logic [$clog2(CAP_DEPTH):0] i_level, q_level;

  capture_fifo #(.LANES(LANES), .W(EQ_W), .DEPTH(CAP_DEPTH)) u_cap_i (
    .clk, .rst_n, .arm(cap_arm), .wr_valid(cap_valid), .wr_data(cap_i),
    .rd_en(cap_rd_en), .rd_valid(cap_rd_valid), .rd_data(cap_rd_i),
    .capturing(cap_capturing), .done(cap_done), .empty(cap_empty), .level(i_level)
  );

  capture_fifo #(.LANES(LANES), .W(EQ_W), .DEPTH(CAP_DEPTH)) u_cap_q (
    .clk, .rst_n, .arm(cap_arm), .wr_valid(cap_valid), .wr_data(cap_q),
    .rd_en(cap_rd_en), .rd_valid(q_rd_valid), .rd_data(cap_rd_q),
    .capturing(q_capturing), .done(q_done), .empty(q_empty), .level(q_level)
  );

  // The I and Q units run in lock step.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (x_valid == xq_valid && q_capturing == cap_capturing && q_done == cap_done &&
              q_empty == cap_empty && q_rd_valid == cap_rd_valid && q_level == i_level)
        else $error("cde_top: I and Q paths out of step");
    end
  end

endmodule
