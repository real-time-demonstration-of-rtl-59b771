// tb_adc_interleave: self-checking testbench of the two-core ADC interleaver.
//
// Random offset-binary codes are offered on both cores with random gaps in
// in_valid. Each output word must hold core A's samples in the even lanes
// and core B's in the odd lanes, converted to two's complement (code - 128),
// one clock after the offer; during gaps the output must hold its value.
module tb_adc_interleave;
  localparam int LANES = 16;
  localparam int IN_W  = 8;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [IN_W-1:0]        core_a [LANES/2], core_b [LANES/2];
  logic                   out_valid;
  logic signed [IN_W-1:0] out_s  [LANES];

  adc_interleave dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int exp_s [LANES];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit v;
    for (int i = 0; i < LANES / 2; i++) begin
      core_a[i] = '0;
      core_b[i] = '0;
    end
    foreach (exp_s[p]) exp_s[p] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check(out_valid == 1'b0, "out_valid low after reset");
    for (int w = 0; w < 1000; w++) begin
      v = (w < 4) || (($urandom % 3) != 0);
      in_valid = v;
      for (int i = 0; i < LANES / 2; i++) begin
        core_a[i] = (w == 1) ? 8'h00 : (w == 2) ? 8'hFF : IN_W'($urandom);
        core_b[i] = (w == 1) ? 8'h80 : (w == 2) ? 8'h7F : IN_W'($urandom);
        if (v) begin
          exp_s[2 * i]     = int'(core_a[i]) - 128;
          exp_s[2 * i + 1] = int'(core_b[i]) - 128;
        end
      end
      @(posedge clk);
      #1;
      check(out_valid == v, $sformatf("word %0d valid", w));
      for (int p = 0; p < LANES; p++)
        check(int'(out_s[p]) == exp_s[p],
              $sformatf("word %0d lane %0d: got %0d exp %0d", w, p, out_s[p], exp_s[p]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
