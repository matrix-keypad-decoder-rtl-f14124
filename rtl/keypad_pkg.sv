// keypad_pkg: types and constants shared by the keypad decoder modules.
//
// The keypad is a 4x4 switch matrix. Rows are driven by the decoder, one at a
// time, low; columns are read back through pull-ups and are low where a key on
// the driven row is pressed. Row 0 is the bottom row and column 3 the leftmost
// column, so the key at (row r, column c) is keymap(r, c) below.
//
// The order in which rows are tested is selected by the last digit of a student
// ID (0-9), as four fixed orders:
//   digit 0,1,2 : 3, 2, 1, 0
//   digit 3,4,5 : 3, 1, 2, 0
//   digit 6,7   : 3, 0, 2, 1
//   digit 8,9   : 3, 2, 0, 1
// The orders come from the lab this design implements; the keypad layout
// (the common telephone-style 1 2 3 A / 4 5 6 B / 7 8 9 C / * 0 # D) is this
// design's assumption, chosen because it places 0 at the bottom row, second
// column from the left, as the lab's example requires.
package keypad_pkg;

  // Active-low row or column bundle; bit k belongs to row/column k.
  typedef logic [3:0] lines_t;

  // Segment lines {a,b,c,d,e,f,g}: a is bit 6, g is bit 0.
  typedef logic [6:0] seg_t;

  // A key of the keypad. Digits take their own value.
  typedef enum logic [3:0] {
    KEY_0 = 4'd0, KEY_1 = 4'd1, KEY_2 = 4'd2, KEY_3 = 4'd3, KEY_4 = 4'd4,
    KEY_5 = 4'd5, KEY_6 = 4'd6, KEY_7 = 4'd7, KEY_8 = 4'd8, KEY_9 = 4'd9,
    KEY_A = 4'd10, KEY_B = 4'd11, KEY_C = 4'd12, KEY_D = 4'd13,
    KEY_STAR = 4'd14, KEY_HASH = 4'd15
  } key_t;

  localparam lines_t ALL_HIGH = 4'b1111;

  // Row index tested at position `step` (0..3) of the scan order for an ID
  // whose last digit is `id_digit`.
  function automatic logic [1:0] scan_row(input int unsigned id_digit,
                                          input logic [1:0]  step);
    logic [3:0][1:0] order;  // order[i] is the row tested i-th
    case (id_digit)
      0, 1, 2: order = {2'd0, 2'd1, 2'd2, 2'd3};  // 3,2,1,0
      3, 4, 5: order = {2'd0, 2'd2, 2'd1, 2'd3};  // 3,1,2,0
      6, 7:    order = {2'd1, 2'd2, 2'd0, 2'd3};  // 3,0,2,1
      default: order = {2'd1, 2'd0, 2'd2, 2'd3};  // 3,2,0,1 (8,9)
    endcase
    return order[step];
  endfunction

  // Line bundle with only line `idx` low.
  function automatic lines_t one_low(input logic [1:0] idx);
    lines_t v;
    v = ALL_HIGH;
    v[idx] = 1'b0;
    return v;
  endfunction

  // Key at row r (0 = bottom) and column c (3 = leftmost).
  function automatic key_t keymap(input logic [1:0] r, input logic [1:0] c);
    case ({r, c})
      {2'd3, 2'd3}: return KEY_1;
      {2'd3, 2'd2}: return KEY_2;
      {2'd3, 2'd1}: return KEY_3;
      {2'd3, 2'd0}: return KEY_A;
      {2'd2, 2'd3}: return KEY_4;
      {2'd2, 2'd2}: return KEY_5;
      {2'd2, 2'd1}: return KEY_6;
      {2'd2, 2'd0}: return KEY_B;
      {2'd1, 2'd3}: return KEY_7;
      {2'd1, 2'd2}: return KEY_8;
      {2'd1, 2'd1}: return KEY_9;
      {2'd1, 2'd0}: return KEY_C;
      {2'd0, 2'd3}: return KEY_STAR;
      {2'd0, 2'd2}: return KEY_0;
      {2'd0, 2'd1}: return KEY_HASH;
      default:      return KEY_D;
    endcase
  endfunction

endpackage
