// clock_gen: divides the board clock down to the keypad scan clock.
//
// A counter runs on clk_in and toggles the output register every
// HALF = CLK_IN_HZ / (2 * CLK_OUT_HZ) input cycles, so clk_out is a 50 %-duty
// square wave of exactly CLK_OUT_HZ when CLK_IN_HZ divides evenly (50 MHz to
// 2 kHz: HALF = 12,500, period 25,000 input cycles). clk_out comes straight from
// a flip-flop, so it is free of glitches and can clock other logic.
//
// Interface: clk_in, synchronous active-high reset (clears counter and output),
// clk_out. The first rising edge of clk_out comes HALF cycles after reset is
// released. The counter compares with >= so it also recovers from any
// power-up value without a reset.
//
// The 50 MHz and 2 kHz figures are the lab's; it reuses a generator from an
// earlier exercise, and this plain counter divider is this design's choice.
module clock_gen #(
  parameter int unsigned CLK_IN_HZ  = 50_000_000,
  parameter int unsigned CLK_OUT_HZ = 2_000
) (
  input  logic clk_in,
  input  logic reset,
  output logic clk_out
);

  localparam int unsigned HALF = CLK_IN_HZ / (2 * CLK_OUT_HZ);
  localparam int unsigned CW   = (HALF > 1) ? $clog2(HALF) : 1;

  if (HALF < 1) begin : g_bad_ratio
    $error("clock_gen: CLK_IN_HZ must be at least 2 * CLK_OUT_HZ");
  end

  logic [CW-1:0] count_q;
  logic          clk_q;

  always_ff @(posedge clk_in) begin
    if (reset) begin
      count_q <= '0;
      clk_q   <= 1'b0;
    end else if (count_q >= CW'(HALF - 1)) begin
      count_q <= '0;
      clk_q   <= ~clk_q;
    end else begin
      count_q <= count_q + 1'b1;
    end
  end

  assign clk_out = clk_q;

endmodule
