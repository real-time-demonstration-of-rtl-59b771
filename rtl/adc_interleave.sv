// adc_interleave: builds one 2.5 GSa/s sample word out of two time-interleaved
// 1.25 GSa/s ADC cores.
//
// In interleaving mode the two cores sample the same signal on alternate
// sample instants, so core A delivers the even-numbered and core B the
// odd-numbered samples of the channel. Each clock both cores hand over
// LANES/2 samples (index 0 earliest); the block interleaves them into a word
// of LANES samples, lane 0 earliest: out[2i] = A[i], out[2i+1] = B[i].
// ADC codes are offset binary (0 = most negative) when OFFSET_BINARY is set
// and are turned into two's complement by inverting the sign bit.
//
// Timing: one register stage; out_valid follows in_valid one clock later.
// Synchronous active-low reset clears the output.
//
// From the demonstration: two 8-bit 1.25 GSa/s converters in interleaving
// mode feeding a 16-lane datapath at 156.25 MHz. This design's own: the
// even/odd assignment of the cores, the offset-binary input coding and the
// single register stage (the converters and the FPGA share one clock here).
module adc_interleave #(
  parameter int unsigned LANES         = cde_pkg::LANES,
  parameter int unsigned IN_W          = cde_pkg::ADC_W,
  parameter bit          OFFSET_BINARY = 1'b1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [IN_W-1:0]        core_a [LANES/2],
  input  logic [IN_W-1:0]        core_b [LANES/2],
  output logic                   out_valid,
  output logic signed [IN_W-1:0] out_s  [LANES]
);

  if (LANES % 2 != 0) begin : g_bad_lanes
    $error("adc_interleave: LANES must be even");
  end

  function automatic logic signed [IN_W-1:0] to_signed(logic [IN_W-1:0] code);
    if (OFFSET_BINARY) return {~code[IN_W-1], code[IN_W-2:0]};
    else               return code;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int p = 0; p < int'(LANES); p++) out_s[p] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int i = 0; i < int'(LANES / 2); i++) begin
          out_s[2 * i]     <= to_signed(core_a[i]);
          out_s[2 * i + 1] <= to_signed(core_b[i]);
        end
      end
    end
  end

endmodule
