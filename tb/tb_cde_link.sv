// tb_cde_link: link-level workload for the receiver DSP at its default size.
//
// The testbench plays the whole measurement: a 2^15-1 PRBS (x^15 + x^14 + 1)
// is mapped onto QPSK symbols at 1.25 GBd, sent at 2 samples per symbol
// (rectangular pulses), and smeared by 1.6 us/nm of chromatic dispersion at
// 1549.32 nm. The dispersion is applied as the conjugate of the ideal
// 83-tap time-domain compensating filter. The result is quantized to the
// 8-bit offset-binary codes of the two interleaved converter cores of each
// channel and streamed into cde_top.
//
// Twelve windows of 2^15 equalized samples (2^15 bits each) are captured
// and read back, and one window of raw converter samples. Per window the
// testbench makes sign decisions on one sample per symbol and counts bit
// errors against the PRBS. The equalizer's centre tap delays the signal by
// 41 samples. Expected outcome: every equalized window stays below a BER of
// 1e-3, while the raw window, without equalization, shows the dispersion as
// a high error ratio (above 5 %).
module tb_cde_link;
  localparam int    LANES  = 16;
  localparam int    NTAPS  = 83;
  localparam int    EQ_W   = 8 + $clog2(NTAPS) + 3;
  localparam int    DEPTH  = (1 << 15) / LANES;
  localparam int    NWIN   = 12;
  localparam int    CTR    = NTAPS / 2;
  localparam int    PRBS_N = (1 << 15) - 1;
  localparam real   PI     = 3.14159265358979;
  localparam real   SCALE  = 36.0;   // ADC codes per unit of signal

  logic clk = 1'b0, rst_n = 1'b0;
  logic                   adc_valid = 1'b0;
  logic [7:0]             adc_i_a [LANES/2], adc_i_b [LANES/2];
  logic [7:0]             adc_q_a [LANES/2], adc_q_b [LANES/2];
  logic                   eq_valid;
  logic signed [EQ_W-1:0] eq_re [LANES], eq_im [LANES];
  logic                   mode_raw = 1'b0, cap_arm = 1'b0, cap_rd_en = 1'b0;
  logic                   cap_rd_valid;
  logic [LANES*EQ_W-1:0]  cap_rd_i, cap_rd_q;
  logic                   cap_capturing, cap_done, cap_empty;

  cde_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- transmitter and channel model ---------------------------------------
  bit  prbs [PRBS_N];
  real hd_re [NTAPS], hd_im [NTAPS];

  function automatic bit tx_bit(int b);
    return prbs[b % PRBS_N];
  endfunction

  // QPSK component of sample n: bit 0 -> +1, bit 1 -> -1
  function automatic real tx(int n, bit q);
    if (n < 0) return 0.0;
    return tx_bit(2 * (n / 2) + int'(q)) ? -1.0 : 1.0;
  endfunction

  function automatic logic [7:0] adc_code(real v);
    int c;
    c = int'(v * SCALE);
    if (c > 127) c = 127;
    if (c < -128) c = -128;
    return 8'(c + 128);
  endfunction

  // received sample n (dispersed), as offset-binary codes
  task automatic rx(int n, output logic [7:0] ci, output logic [7:0] cq);
    real ri = 0.0, rq = 0.0, si, sq;
    for (int k = -CTR; k <= CTR; k++) begin
      si = tx(n - k, 1'b0);
      sq = tx(n - k, 1'b1);
      ri += hd_re[k + CTR] * si - hd_im[k + CTR] * sq;
      rq += hd_re[k + CTR] * sq + hd_im[k + CTR] * si;
    end
    ci = adc_code(ri);
    cq = adc_code(rq);
  endtask

  // ---- stream bookkeeping -----------------------------------------------
  int  in_words = 0, eq_words = 0;
  bit  raw_d_valid = 0;
  int  raw_d_idx = 0;
  bit  mode_q = 0;
  int  cap_idx [$];                 // stream word index of each captured word

  always @(posedge clk) begin
    if (rst_n) begin
      if (cap_capturing) begin
        if (!mode_q && eq_valid) cap_idx.push_back(eq_words);
        if (mode_q && raw_d_valid) cap_idx.push_back(raw_d_idx);
      end else if (cap_arm) begin
        mode_q = mode_raw;
      end
      if (eq_valid) eq_words++;
      raw_d_valid = adc_valid;
      raw_d_idx   = in_words;
      if (adc_valid) in_words++;
    end
  end

  // converter driver: one word per clock
  bit run = 1;
  initial begin
    logic [7:0] ci, cq;
    int w = 0;
    for (int i = 0; i < LANES / 2; i++) begin
      adc_i_a[i] = 8'h80; adc_i_b[i] = 8'h80; adc_q_a[i] = 8'h80; adc_q_b[i] = 8'h80;
    end
    @(posedge rst_n);
    while (run) begin
      @(posedge clk);
      #1;
      adc_valid = 1'b1;
      for (int i = 0; i < LANES / 2; i++) begin
        rx(w * LANES + 2 * i, ci, cq);
        adc_i_a[i] = ci;
        adc_q_a[i] = cq;
        rx(w * LANES + 2 * i + 1, ci, cq);
        adc_i_b[i] = ci;
        adc_q_b[i] = cq;
      end
      w++;
    end
  end

  // ---- one capture window and its bit errors ---------------------------------
  int errors, bits;
  task automatic window(bit raw, int delay);
    int j, n, s;
    logic signed [EQ_W-1:0] vi, vq;
    errors = 0;
    bits   = 0;
    @(posedge clk);
    #2 mode_raw = raw;
    cap_arm = 1'b1;
    @(posedge clk);
    #2 cap_arm = 1'b0;
    while (!cap_done) @(posedge clk);
    #2 cap_rd_en = 1'b1;
    forever begin
      @(posedge clk);
      if (cap_rd_valid) begin
        j = cap_idx.pop_front();
        for (int p = 0; p < LANES; p++) begin
          n = j * LANES + p - delay;
          if (n >= 0 && n % 2 == 0) begin
            s  = n / 2;
            vi = $signed(cap_rd_i[p*EQ_W +: EQ_W]);
            vq = $signed(cap_rd_q[p*EQ_W +: EQ_W]);
            errors += int'((vi < 0) != tx_bit(2 * s));
            errors += int'((vq < 0) != tx_bit(2 * s + 1));
            bits   += 2;
          end
        end
      end
      if (cap_empty && !cap_rd_valid) break;
      #2 cap_rd_en = !cap_empty;
    end
    #2 cap_rd_en = 1'b0;
  endtask

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real kd, ph;
    bit [14:0] lfsr;
    int total_err = 0, total_bits = 0;
    // PRBS 2^15-1, x^15 + x^14 + 1
    lfsr = '1;
    for (int i = 0; i < PRBS_N; i++) begin
      prbs[i] = lfsr[14];
      lfsr = {lfsr[13:0], lfsr[14] ^ lfsr[13]};
    end
    // dispersion: conjugate of the ideal compensating filter
    kd = (1.6e-6 / 1.0e-9) * 1549.32e-9 * 1549.32e-9 / (299792458.0 * 0.4e-9 * 0.4e-9);
    for (int k = -CTR; k <= CTR; k++) begin
      ph = -PI / 4.0 + PI * real'(k * k) / kd;
      hd_re[k + CTR] = $cos(ph) / $sqrt(kd);
      hd_im[k + CTR] = $sin(ph) / $sqrt(kd);
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (20) @(posedge clk);

    window(1'b1, 0);
    $display("raw window: %0d errors in %0d bits (BER %e)", errors, bits,
             real'(errors) / real'(bits));
    check(bits == (1 << 15), "raw window holds 2^15 bits");
    check(real'(errors) / real'(bits) > 0.05, "dispersion closes the eye without equalization");

    for (int wi = 0; wi < NWIN; wi++) begin
      window(1'b0, CTR);
      $display("equalized window %0d: %0d errors in %0d bits", wi, errors, bits);
      check(bits >= (1 << 15) - 64, $sformatf("window %0d bit count %0d", wi, bits));
      check(real'(errors) / real'(bits) < 1.0e-3, $sformatf("window %0d BER below 1e-3", wi));
      total_err  += errors;
      total_bits += bits;
    end
    $display("equalized total: %0d errors in %0d bits (BER %e)", total_err, total_bits,
             real'(total_err) / real'(total_bits));
    run = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
