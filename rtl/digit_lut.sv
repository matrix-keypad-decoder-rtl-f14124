// digit_lut: combinational lookup from the tested row and the low column to the
// 7-segment pattern of the pressed digit.
//
// When exactly one row line and exactly one column line are low, the key at
// their crossing is looked up (keypad_pkg::keymap) and, if it is a digit 0-9,
// its segment pattern is driven. Letter keys, * and #, no low column and more
// than one low column all blank the digit.
//
// Interface: row and col are the active-low keypad lines; seg is {a,b,c,d,e,f,g}
// with a in bit 6, active low by default (SEG_ACTIVE_LOW = 1, a common-anode
// display, matching the display's active-low digit enables). No clock: the
// output follows the inputs combinationally and is steady while the row
// sequencer holds on a pressed key.
//
// Showing the pressed digit is the lab's; blanking the other keys, the segment
// polarity and the digit shapes are this design's choices.
module digit_lut
  import keypad_pkg::*;
#(
  parameter bit SEG_ACTIVE_LOW = 1'b1
) (
  input  lines_t row,
  input  lines_t col,
  output seg_t   seg
);

  // Index of the single low line of v; ok is false unless exactly one is low.
  function automatic void decode_one_low(input lines_t v, output logic ok,
                                         output logic [1:0] idx);
    int unsigned lows;
    lows = 0;
    idx  = 2'd0;
    for (int unsigned k = 0; k < 4; k++) begin
      if (!v[k]) begin
        lows++;
        idx = 2'(k);
      end
    end
    ok = (lows == 1);
  endfunction

  // Segments lit (1 = on) for a digit, {a,b,c,d,e,f,g}.
  function automatic seg_t digit_segments(input key_t k);
    case (k)
      KEY_0:   return 7'b1111110;
      KEY_1:   return 7'b0110000;
      KEY_2:   return 7'b1101101;
      KEY_3:   return 7'b1111001;
      KEY_4:   return 7'b0110011;
      KEY_5:   return 7'b1011011;
      KEY_6:   return 7'b1011111;
      KEY_7:   return 7'b1110000;
      KEY_8:   return 7'b1111111;
      KEY_9:   return 7'b1111011;
      default: return 7'b0000000;
    endcase
  endfunction

  logic       row_ok, col_ok;
  logic [1:0] row_idx, col_idx;
  seg_t       lit;

  always_comb begin
    decode_one_low(row, row_ok, row_idx);
    decode_one_low(col, col_ok, col_idx);
    lit = (row_ok && col_ok) ? digit_segments(keymap(row_idx, col_idx)) : 7'b0000000;
    seg = SEG_ACTIVE_LOW ? ~lit : lit;
  end

endmodule
