// keypad_model: behavioural model of a 4x4 matrix keypad with pull-ups on the
// column lines, for testbenches only.
//
// pressed[4*r + c] closes the switch between row line r and column line c.
// A column reads low when a closed switch connects it to a row that is driven
// low, and high otherwise (pull-up). Row 0 is the bottom row, column 3 the
// leftmost. The model is combinational and has no bounce.
module keypad_model (
  input  logic [3:0]  row,
  input  logic [15:0] pressed,
  output logic [3:0]  col
);
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      col[c] = 1'b1;
      for (int r = 0; r < 4; r++)
        if (pressed[4*r + c] && !row[r]) col[c] = 1'b0;
    end
  end
endmodule
