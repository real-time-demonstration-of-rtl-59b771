// capture_fifo: one-shot capture memory for a window of sample words.
//
// A pulse on arm discards what the memory holds and opens a capture window.
// While the window is open every valid input word (LANES samples of W bits)
// is written; after DEPTH words the window closes by itself and done is set,
// so the memory then holds DEPTH*LANES consecutive samples (2^15 by default)
// for a host to read out. Reading works like a first-in first-out queue and
// may overlap the capture: rd_en with the memory not empty returns the
// oldest word on rd_data one clock later, flagged by rd_valid. A capture
// never writes more than DEPTH words, so the queue cannot overflow; words
// offered outside a window are ignored. arm is ignored while a window is
// open.
//
// The memory is a plain array with a registered read, which maps onto block
// RAM. Synchronous active-low reset closes the window and empties the queue.
//
// From the demonstration: capture units with a length of 2^15 samples. This
// design's own: the arm/done control, the readout port and the word layout
// (lane p of a word in bits [p*W +: W]).
module capture_fifo #(
  parameter int unsigned LANES = cde_pkg::LANES,
  parameter int unsigned W     = 18,
  parameter int unsigned DEPTH = (1 << 15) / LANES,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  arm,
  input  logic                  wr_valid,
  input  logic [LANES*W-1:0]    wr_data,
  input  logic                  rd_en,
  output logic                  rd_valid,
  output logic [LANES*W-1:0]    rd_data,
  output logic                  capturing,
  output logic                  done,
  output logic                  empty,
  output logic [AW:0]           level
);

  logic [LANES*W-1:0] mem [DEPTH];
  logic [AW:0]        written;   // words written in this window
  logic [AW-1:0]      wptr, rptr;
  logic               do_wr, do_rd;

  assign do_wr = capturing && wr_valid;
  assign do_rd = rd_en && !empty;
  assign empty = (level == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      capturing <= 1'b0;
      done      <= 1'b0;
      written   <= '0;
      wptr      <= '0;
      rptr      <= '0;
      level     <= '0;
      rd_valid  <= 1'b0;
    end else begin
      rd_valid <= do_rd;
      if (arm && !capturing) begin
        capturing <= 1'b1;
        done      <= 1'b0;
        written   <= '0;
        wptr      <= '0;
        rptr      <= '0;
        level     <= '0;
      end else begin
        if (do_wr) begin
          wptr    <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
          written <= written + 1'b1;
          if (written == (AW + 1)'(DEPTH - 1)) begin
            capturing <= 1'b0;
            done      <= 1'b1;
          end
        end
        if (do_rd) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
        level <= level + (AW + 1)'(do_wr) - (AW + 1)'(do_rd);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
    if (do_rd) rd_data <= mem[rptr];
  end

  // The window never outgrows the memory.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (level <= (AW + 1)'(DEPTH))
        else $error("capture_fifo: occupancy above DEPTH");
      assert (!(do_rd && empty))
        else $error("capture_fifo: read from empty queue");
    end
  end

endmodule
