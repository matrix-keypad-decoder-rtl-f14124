// tb_digit_lut: exhaustive check of the digit lookup table.
//
// All 256 combinations of row and column lines are applied to an active-low
// and an active-high instance. The reference is built here from the keypad
// drawn as text (top row first, leftmost key first) and from each digit's lit
// segments named by letter, so it shares nothing with the module's tables.
module tb_digit_lut;
  logic [3:0] row, col;
  logic [6:0] seg_lo, seg_hi;
  int checks = 0, failures = 0;

  digit_lut                      u_lo (.row(row), .col(col), .seg(seg_lo));
  digit_lut #(.SEG_ACTIVE_LOW(0)) u_hi (.row(row), .col(col), .seg(seg_hi));

  string layout [4] = '{"123A", "456B", "789C", "*0#D"};
  string shapes [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                         "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};

  // Lit segments {a..g} (a in bit 6) for a key character; 0 for non-digits.
  function automatic logic [6:0] ref_lit(input byte ch);
    logic [6:0] v;
    string s;
    v = '0;
    if (ch >= "0" && ch <= "9") begin
      s = shapes[int'(ch - "0")];
      for (int i = 0; i < s.len(); i++) v[6 - (s[i] - "a")] = 1'b1;
    end
    return v;
  endfunction

  function automatic int zeros(input logic [3:0] v);
    int n;
    n = 0;
    for (int i = 0; i < 4; i++) if (!v[i]) n++;
    return n;
  endfunction

  int  digits_seen = 0;
  int  r, c;
  byte ch;

  initial begin
    for (int rv = 0; rv < 16; rv++) begin
      for (int cv = 0; cv < 16; cv++) begin
        logic [6:0] exp_lit;
        row = 4'(rv);
        col = 4'(cv);
        #1;
        exp_lit = '0;
        if (zeros(row) == 1 && zeros(col) == 1) begin
          for (int i = 0; i < 4; i++) begin
            if (!row[i]) r = i;
            if (!col[i]) c = i;
          end
          ch = layout[3 - r][3 - c];
          exp_lit = ref_lit(ch);
          if (ch >= "0" && ch <= "9") digits_seen++;
        end
        checks += 2;
        if (seg_hi !== exp_lit) begin
          failures++;
          $display("FAIL: row %b col %b active-high seg %b expected %b", row, col, seg_hi, exp_lit);
        end
        if (seg_lo !== ~exp_lit) begin
          failures++;
          $display("FAIL: row %b col %b active-low seg %b expected %b", row, col, seg_lo, ~exp_lit);
        end
      end
    end
    checks++;
    if (digits_seen != 10) begin
      failures++;
      $display("FAIL: %0d digit keys covered", digits_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
