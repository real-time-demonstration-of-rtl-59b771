// tb_md_fir_cde: self-checking testbench of the multiplierless distributive
// FIR dispersion equalizer at its full size (16 lanes, 83 taps).
//
// The reference is worked out here independently of the block: the tap
// values come from cos/sin of the dispersion filter phase and a direct
// quantization of those values to {-3,-1,+1,+3}, and every output sample is
// a plain complex convolution sum over all 83 taps. Stimuli: an impulse
// (the output must reproduce the quantized taps), random full-scale words
// with random gaps in in_valid, and constant extreme words. Every output
// word is compared lane by lane, and the latency from offer to out_valid is
// checked to be 3 clock edges.
module tb_md_fir_cde;
  localparam int LANES = 16;
  localparam int NTAPS = 83;
  localparam int IN_W  = 8;
  localparam int OUT_W = IN_W + $clog2(NTAPS) + 3;
  localparam int LAT   = 3;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [IN_W-1:0]  in_re [LANES], in_im [LANES];
  logic                    out_valid;
  logic signed [OUT_W-1:0] out_re [LANES], out_im [LANES];

  md_fir_cde dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int edge_cnt = 0;

  // independent tap model
  int cre [NTAPS], cim [NTAPS];

  function automatic int quant(real v);
    if (v >= 0.5)       return 3;
    else if (v >= 0.0)  return 1;
    else if (v > -0.5)  return -1;
    else                return -3;
  endfunction

  // every sample ever offered, time ordered
  int xs_re [$], xs_im [$];
  // expected words: edge count at capture and first sample index
  int exp_edge [$], exp_base [$];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    edge_cnt++;
    if (rst_n && in_valid) begin
      exp_edge.push_back(edge_cnt);
      exp_base.push_back(xs_re.size());
      for (int p = 0; p < LANES; p++) begin
        xs_re.push_back(int'(in_re[p]));
        xs_im.push_back(int'(in_im[p]));
      end
    end
  end

  int words_out = 0;
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      automatic int e, b;
      if (exp_edge.size() == 0) begin
        check(0, "out_valid without a pending word");
      end else begin
        e = exp_edge.pop_front();
        b = exp_base.pop_front();
        check(edge_cnt - e + 1 == LAT, $sformatf("latency %0d", edge_cnt - e + 1));
        for (int p = 0; p < LANES; p++) begin
          automatic longint yr = 0, yi = 0;
          for (int m = 0; m < NTAPS; m++) begin
            automatic int n = b + p - m;
            if (n >= 0) begin
              yr += cre[m] * xs_re[n] - cim[m] * xs_im[n];
              yi += cre[m] * xs_im[n] + cim[m] * xs_re[n];
            end
          end
          check(longint'(out_re[p]) == yr && longint'(out_im[p]) == yi,
                $sformatf("word %0d lane %0d: got (%0d,%0d) exp (%0d,%0d)",
                          words_out, p, out_re[p], out_im[p], yr, yi));
        end
        words_out++;
      end
    end
  end

  task automatic put(bit v);
    @(posedge clk);
    #1;
    in_valid = v;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real kd, ph;
    int hist [7];
    kd = (1.6e-6 / 1.0e-9) * 1549.32e-9 * 1549.32e-9 / (299792458.0 * 0.4e-9 * 0.4e-9);
    foreach (hist[i]) hist[i] = 0;
    for (int m = 0; m < NTAPS; m++) begin
      ph = 3.14159265358979 / 4.0
         - 3.14159265358979 * real'((m - NTAPS / 2) * (m - NTAPS / 2)) / kd;
      cre[m] = quant($cos(ph));
      cim[m] = quant($sin(ph));
      hist[cre[m] + 3]++;
    end
    // the real parts use all four levels
    check(hist[0] > 0 && hist[2] > 0 && hist[4] > 0 && hist[6] > 0, "four levels in use");

    for (int p = 0; p < LANES; p++) begin
      in_re[p] = '0;
      in_im[p] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // impulse on lane 5 followed by zeros
    put(1'b1);
    in_re[5] = 8'sd1;
    put(1'b1);
    in_re[5] = 8'sd0;
    repeat (7) put(1'b1);

    // random full-scale samples, random gaps
    for (int w = 0; w < 400; w++) begin
      put(($urandom % 4) != 0);
      for (int p = 0; p < LANES; p++) begin
        in_re[p] = IN_W'($urandom);
        in_im[p] = IN_W'($urandom);
      end
    end

    // constant extremes
    for (int w = 0; w < 16; w++) begin
      put(1'b1);
      for (int p = 0; p < LANES; p++) begin
        in_re[p] = (w < 8) ? -8'sd128 : 8'sd127;
        in_im[p] = (w < 8) ? -8'sd128 : -8'sd128;
      end
    end
    put(1'b0);
    repeat (10) @(posedge clk);
    check(exp_edge.size() == 0, "all words came out");
    check(words_out > 300, "enough words checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
