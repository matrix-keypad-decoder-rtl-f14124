// keypad_decoder: scans a 4x4 matrix keypad and shows the pressed digit on the
// rightmost digit of a 4-digit 7-segment display.
//
// clock_gen divides the 50 MHz board clock to the 2 kHz scan clock. On that
// clock row_sequencer drives one keypad row low at a time in the selected
// order and stops on the row where a column reads low, that is where a key is
// pressed; it resumes scanning once the key is released. digit_lut turns the
// low row and low column into the segments of the key's digit (blank for
// letter keys, * and #, and when nothing is pressed). The display's digit
// enables are fixed at 4'b1110, lighting only the rightmost digit.
//
// Ports: clk_50m; reset (active high; clears all registers to zero as at
// FPGA power-up, hold it for at least one scan period for a clean start);
// col[3:0] from the keypad, pulled up, col[3] leftmost; row[3:0] to the
// keypad, row[0] bottom; seg = {a..g}, active low by default; en[3:0];
// clk_scan, the 2 kHz clock, for an on-chip logic analyser.
//
// Timing: one row is tested per scan period (500 us at 2 kHz). A key is found
// within four scan periods of being pressed, and the display follows
// combinationally from then on.
//
// The block structure, clock rates, scan orders and the fixed 4'b1110 enable
// are the lab's; the reset port, segment polarity and keypad layout are this
// design's choices.
module keypad_decoder
  import keypad_pkg::*;
#(
  parameter int unsigned CLK_IN_HZ      = 50_000_000,
  parameter int unsigned SCAN_HZ        = 2_000,
  parameter int unsigned ID_LAST_DIGIT  = 0,
  parameter bit          SEG_ACTIVE_LOW = 1'b1
) (
  input  logic   clk_50m,
  input  logic   reset,
  input  lines_t col,
  output lines_t row,
  output seg_t   seg,
  output lines_t en,
  output logic   clk_scan
);

  clock_gen #(
    .CLK_IN_HZ (CLK_IN_HZ),
    .CLK_OUT_HZ(SCAN_HZ)
  ) u_clock_gen (
    .clk_in (clk_50m),
    .reset  (reset),
    .clk_out(clk_scan)
  );

  row_sequencer #(
    .ID_LAST_DIGIT(ID_LAST_DIGIT)
  ) u_row_sequencer (
    .clk  (clk_scan),
    .reset(reset),
    .col  (col),
    .row  (row)
  );

  digit_lut #(
    .SEG_ACTIVE_LOW(SEG_ACTIVE_LOW)
  ) u_digit_lut (
    .row(row),
    .col(col),
    .seg(seg)
  );

  assign en = 4'b1110;

endmodule
