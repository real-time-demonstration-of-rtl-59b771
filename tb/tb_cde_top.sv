// tb_cde_top: end-to-end, full-size testbench of the receiver DSP (16
// lanes, 83 taps, 2^15-sample capture windows, default parameters).
//
// A driver offers random offset-binary converter words on both I and Q
// channels (even samples on core a, odd samples on core b) with random
// gaps. The reference is computed here independently: the interleaving and
// code conversion by hand, the taps from cos/sin of the dispersion filter
// phase quantized to {-3,-1,+1,+3}, and the equalizer output as a direct
// convolution. Every equalized word on eq_* is checked, including its
// 4-clock latency. Three capture windows are then taken and read back in
// full: equalized samples, raw converter samples (mode switch) and
// equalized samples again with reading overlapping the capture. Each
// mechanism (input gap, equalized capture, raw capture, mode switch,
// window closing by itself, read during capture, arm ignored during a
// window) is counted, and one that never happened counts as a failure.
module tb_cde_top;
  localparam int LANES = 16;
  localparam int NTAPS = 83;
  localparam int ADC_W = 8;
  localparam int EQ_W  = ADC_W + $clog2(NTAPS) + 3;
  localparam int DEPTH = (1 << 15) / LANES;
  localparam int LAT   = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic                   adc_valid = 1'b0;
  logic [ADC_W-1:0]       adc_i_a [LANES/2], adc_i_b [LANES/2];
  logic [ADC_W-1:0]       adc_q_a [LANES/2], adc_q_b [LANES/2];
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
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---- reference taps --------------------------------------------------------
  int cre [NTAPS], cim [NTAPS];
  function automatic int quant(real v);
    if (v >= 0.5)       return 3;
    else if (v >= 0.0)  return 1;
    else if (v > -0.5)  return -1;
    else                return -3;
  endfunction

  // ---- stream bookkeeping ------------------------------------------------------
  int xs_i [$], xs_q [$];          // two's complement samples, time ordered
  int in_edge [$];                 // edge of each accepted converter word
  int edge_cnt = 0;
  int eq_words = 0;                // equalized words seen
  logic [LANES*EQ_W-1:0] eq_pi [$], eq_pq [$];   // packed eq words, by index
  logic [LANES*EQ_W-1:0] cap_exp_i [$], cap_exp_q [$];
  bit   raw_d_valid = 0;           // converter word on the interleaver output
  int   raw_d_idx;
  bit   mode_q = 0;                // capture source latched at arm

  int n_gap = 0, n_eq_cap = 0, n_raw_cap = 0, n_switch = 0, n_close = 0;
  int n_overlap = 0, n_arm_ignored = 0;

  function automatic logic [LANES*EQ_W-1:0] raw_word(int idx, bit q);
    logic [LANES*EQ_W-1:0] w;
    for (int p = 0; p < LANES; p++)
      w[p*EQ_W +: EQ_W] = EQ_W'(q ? xs_q[idx*LANES + p] : xs_i[idx*LANES + p]);
    return w;
  endfunction

  always @(posedge clk) begin
    edge_cnt++;
    if (rst_n) begin
      // capture model (uses the values before this edge)
      if (cap_capturing) begin
        if (!mode_q && eq_valid) begin
          logic [LANES*EQ_W-1:0] wi, wq;
          for (int p = 0; p < LANES; p++) begin
            wi[p*EQ_W +: EQ_W] = eq_re[p];
            wq[p*EQ_W +: EQ_W] = eq_im[p];
          end
          cap_exp_i.push_back(wi);
          cap_exp_q.push_back(wq);
          n_eq_cap++;
        end
        if (mode_q && raw_d_valid) begin
          cap_exp_i.push_back(raw_word(raw_d_idx, 1'b0));
          cap_exp_q.push_back(raw_word(raw_d_idx, 1'b1));
          n_raw_cap++;
        end
        if (cap_arm) n_arm_ignored++;
        if (cap_rd_en && !cap_empty) n_overlap++;
      end else if (cap_arm) begin
        if (mode_q != mode_raw) n_switch++;
        mode_q = mode_raw;
      end
      // converter word accepted at this edge
      raw_d_valid = adc_valid;
      if (adc_valid) begin
        raw_d_idx = in_edge.size();
        in_edge.push_back(edge_cnt);
        for (int i = 0; i < LANES / 2; i++) begin
          xs_i.push_back(int'(adc_i_a[i]) - 128);
          xs_i.push_back(int'(adc_i_b[i]) - 128);
        end
        for (int i = 0; i < LANES / 2; i++) begin
          xs_q.push_back(int'(adc_q_a[i]) - 128);
          xs_q.push_back(int'(adc_q_b[i]) - 128);
        end
      end else begin
        n_gap++;
      end
    end
  end

  // equalized stream check
  always @(negedge clk) begin
    if (rst_n && eq_valid) begin
      automatic int b = eq_words * LANES;
      check(eq_words < in_edge.size() && edge_cnt - in_edge[eq_words] + 1 == LAT,
            $sformatf("eq word %0d latency", eq_words));
      for (int p = 0; p < LANES; p++) begin
        automatic longint yr = 0, yi = 0;
        for (int m = 0; m < NTAPS; m++) begin
          automatic int n = b + p - m;
          if (n >= 0) begin
            yr += cre[m] * xs_i[n] - cim[m] * xs_q[n];
            yi += cre[m] * xs_q[n] + cim[m] * xs_i[n];
          end
        end
        check(longint'(eq_re[p]) == yr && longint'(eq_im[p]) == yi,
              $sformatf("eq word %0d lane %0d: got (%0d,%0d) exp (%0d,%0d)",
                        eq_words, p, eq_re[p], eq_im[p], yr, yi));
      end
      eq_words++;
    end
  end

  // readout check
  int read_cnt = 0;
  always @(posedge clk) begin
    if (rst_n && cap_rd_valid) begin
      if (cap_exp_i.size() == 0) begin
        check(0, "read without a captured word");
      end else begin
        automatic logic [LANES*EQ_W-1:0] ei = cap_exp_i.pop_front();
        automatic logic [LANES*EQ_W-1:0] eq = cap_exp_q.pop_front();
        check(cap_rd_i == ei && cap_rd_q == eq, $sformatf("captured word %0d", read_cnt));
      end
      read_cnt++;
    end
  end

  // converter driver: random words, about one gap in five clocks
  bit run = 1;
  initial begin
    for (int i = 0; i < LANES / 2; i++) begin
      adc_i_a[i] = '0; adc_i_b[i] = '0; adc_q_a[i] = '0; adc_q_b[i] = '0;
    end
    @(posedge rst_n);
    while (run) begin
      @(posedge clk);
      #1;
      adc_valid = ($urandom % 5) != 0;
      for (int i = 0; i < LANES / 2; i++) begin
        adc_i_a[i] = ADC_W'($urandom);
        adc_i_b[i] = ADC_W'($urandom);
        adc_q_a[i] = ADC_W'($urandom);
        adc_q_b[i] = ADC_W'($urandom);
      end
    end
  end

  task automatic capture(bit raw, bit overlap);
    int start;
    @(posedge clk);
    #2;
    mode_raw = raw;
    cap_arm  = 1'b1;
    @(posedge clk);
    #2;
    cap_arm  = 1'b0;
    mode_raw = ~raw;   // changing the selector during a window has no effect
    start = read_cnt;
    repeat (100) @(posedge clk);
    #2 cap_arm = 1'b1;  // ignored, window open
    @(posedge clk);
    #2 cap_arm = 1'b0;
    while (!cap_done) begin
      @(posedge clk);
      #2 cap_rd_en = overlap && (($urandom % 3) == 0);
    end
    n_close++;
    while (!cap_empty) begin
      @(posedge clk);
      #2 cap_rd_en = ($urandom % 4) != 0;
    end
    cap_rd_en = 1'b0;
    repeat (3) @(posedge clk);
    check(read_cnt - start == DEPTH, $sformatf("window read %0d words", read_cnt - start));
    check(cap_exp_i.size() == 0, "every captured word read back");
  endtask

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real kd, ph;
    kd = (1.6e-6 / 1.0e-9) * 1549.32e-9 * 1549.32e-9 / (299792458.0 * 0.4e-9 * 0.4e-9);
    for (int m = 0; m < NTAPS; m++) begin
      ph = 3.14159265358979 / 4.0
         - 3.14159265358979 * real'((m - NTAPS / 2) * (m - NTAPS / 2)) / kd;
      cre[m] = quant($cos(ph));
      cim[m] = quant($sin(ph));
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (20) @(posedge clk);
    capture(1'b0, 1'b0);   // equalized window
    capture(1'b1, 1'b0);   // raw converter window
    capture(1'b0, 1'b1);   // equalized again, reading during the capture
    run = 0;
    repeat (10) @(posedge clk);
    $display("mechanisms: gaps=%0d eq_cap=%0d raw_cap=%0d switches=%0d closes=%0d overlap_reads=%0d arm_ignored=%0d",
             n_gap, n_eq_cap, n_raw_cap, n_switch, n_close, n_overlap, n_arm_ignored);
    check(n_gap > 0, "input gap happened");
    check(n_eq_cap > 0, "equalized capture happened");
    check(n_raw_cap > 0, "raw capture happened");
    check(n_switch >= 2, "mode switch happened");
    check(n_close == 3, "windows closed by themselves");
    check(n_overlap > 0, "read during capture happened");
    check(n_arm_ignored > 0, "arm during a window happened");
    check(eq_words > 3 * DEPTH, "equalized words checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
