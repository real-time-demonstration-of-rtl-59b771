// tb_capture_fifo: self-checking testbench of the one-shot capture memory at
// its full size (2048 words of 16 x 18-bit samples, 2^15 samples).
//
// A window is armed and fed random words with random gaps while the reader
// already drains part of it. The test checks that the window closes by
// itself after exactly DEPTH words (done set, later words ignored), that a
// second arm during the window is ignored, that every word comes back in
// order one clock after rd_en, that the queue reports empty at the end and
// that re-arming discards old contents.
module tb_capture_fifo;
  localparam int LANES = 16;
  localparam int W     = 18;
  localparam int DEPTH = 2048;
  localparam int AW    = 11;

  logic clk = 1'b0, rst_n = 1'b0;
  logic arm = 1'b0, wr_valid = 1'b0, rd_en = 1'b0;
  logic [LANES*W-1:0] wr_data;
  logic               rd_valid;
  logic [LANES*W-1:0] rd_data;
  logic               capturing, done, empty;
  logic [AW:0]        level;

  capture_fifo dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [LANES*W-1:0] model [$];
  int written = 0, read_cnt = 0, rd_pending = 0;
  logic [LANES*W-1:0] rd_expect;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [LANES*W-1:0] rand_word();
    logic [LANES*W-1:0] w;
    for (int i = 0; i < LANES * W; i += 32) w[i +: 32] = $urandom;
    return w;
  endfunction

  // Reference model, updated at each edge from the inputs the block sees.
  bit model_cap = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (rd_pending) begin
        check(rd_valid && rd_data == rd_expect, $sformatf("read word %0d", read_cnt));
        read_cnt++;
      end else begin
        check(!rd_valid, "rd_valid without a read");
      end
      rd_pending = 0;
      if (arm && !model_cap) begin
        model_cap = 1;
        written = 0;
        model.delete();
      end else begin
        if (rd_en && model.size() > 0) begin
          rd_expect = model.pop_front();
          rd_pending = 1;
        end
        if (wr_valid && model_cap) begin
          model.push_back(wr_data);
          written++;
          if (written == DEPTH) model_cap = 0;
        end
      end
    end
  end

  task automatic step();
    @(posedge clk);
    #1;
    check(capturing == model_cap, "capturing flag");
    check(level == (AW + 1)'(model.size()), $sformatf("level %0d exp %0d", level, model.size()));
    check(empty == (model.size() == 0), "empty flag");
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    step();
    check(empty && !capturing && !done, "idle after reset");
    // words before arming are ignored
    wr_valid = 1'b1;
    wr_data  = rand_word();
    step();
    check(empty, "no write outside a window");
    // open a window
    arm = 1'b1;
    step();
    arm = 1'b0;
    for (int c = 0; c < 3 * DEPTH; c++) begin
      wr_valid = ($urandom % 4) != 0;
      wr_data  = rand_word();
      rd_en    = (c > 200 && c < 600) ? (($urandom % 2) != 0) : 1'b0;
      arm      = (c == 50);   // ignored: window open
      step();
      if (done) break;
    end
    arm = 1'b0;
    rd_en = 1'b0;
    check(done && !capturing, "window closed after DEPTH words");
    check(written == DEPTH, "exactly DEPTH words written");
    // further words are ignored
    wr_valid = 1'b1;
    repeat (20) begin
      wr_data = rand_word();
      step();
    end
    wr_valid = 1'b0;
    // drain
    rd_en = 1'b1;
    while (!empty) step();
    rd_en = 1'b0;
    step();
    check(read_cnt == DEPTH, $sformatf("read %0d words", read_cnt));
    // re-arm with data left behind: contents discarded
    arm = 1'b1;
    step();
    arm = 1'b0;
    wr_valid = 1'b1;
    repeat (10) begin
      wr_data = rand_word();
      step();
    end
    arm = 1'b0;
    wr_valid = 1'b0;
    check(capturing && !done && level == 10, "second window open");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
