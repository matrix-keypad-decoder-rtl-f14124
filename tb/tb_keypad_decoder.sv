// tb_keypad_decoder: end-to-end test of the keypad decoder at its default
// parameters (50 MHz clock, 2 kHz scan, scan order 3,2,1,0, active-low
// segments), with a behavioural keypad on the row and column lines.
//
// Sequence: hold reset for more than a scan period (rows all low, as at power
// up), release it and see the machine leave the all-zero state for row 3; let
// it scan freely for two rounds; then press each of the 16 keys in turn at a
// random point of a scan period, check that the scan stops on the key's row
// within four scan periods, that the display shows the key's digit (blank for
// A-D, * and #), that the scan stays put while the key is held, and that it
// resumes on release. The scan period must be 25,000 clock cycles and the
// digit enables 4'b1110 throughout. Each mechanism (scan step, wrap-around,
// hold, resume, recovery from the all-zero state) is counted and must occur.
module tb_keypad_decoder;
  localparam int PERIOD_CYC = 25_000;  // 50 MHz / 2 kHz

  logic        clk = 1'b0;
  logic        reset = 1'b0;  // raised at 1 ns: the sequencer's reset is edge-triggered
  logic [3:0]  row, col, en;
  logic [6:0]  seg;
  logic        clk_scan;
  logic [15:0] pressed = '0;
  int          checks = 0, failures = 0;
  longint      cyc = 0;

  int n_step = 0, n_wrap = 0, n_hold = 0, n_resume = 0, n_recover = 0;

  keypad_decoder dut (
    .clk_50m(clk), .reset(reset), .col(col), .row(row),
    .seg(seg), .en(en), .clk_scan(clk_scan)
  );
  keypad_model u_keys (.row(row), .pressed(pressed), .col(col));

  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  string layout [4] = '{"123A", "456B", "789C", "*0#D"};
  string shapes [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                         "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};
  int    order [4] = '{3, 2, 1, 0};

  function automatic logic [3:0] low(input int r);
    return 4'b1111 & ~(4'b0001 << r);
  endfunction

  // Expected pins (active low) for the key at row r, column c.
  function automatic logic [6:0] exp_seg(input int r, input int c);
    logic [6:0] v;
    byte ch;
    string s;
    v  = '0;
    ch = layout[3 - r][3 - c];
    if (ch >= "0" && ch <= "9") begin
      s = shapes[int'(ch) - 48];
      for (int i = 0; i < s.len(); i++) v[6 - (int'(s[i]) - 97)] = 1'b1;
    end
    return ~v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Classifies every scan-clock edge.
  logic [3:0] prev_row, prev_col;
  always @(posedge clk_scan) begin
    prev_row = row;
    prev_col = col;
    #1;
    if (!reset) begin
      if (prev_row == 4'b0000) begin
        n_recover++;
        check(row == low(order[0]), $sformatf("recovery to %b", row));
      end else if (prev_col != 4'b1111) begin
        n_hold++;
        check(row == prev_row, $sformatf("scan moved from %b with a key down", prev_row));
      end else begin
        int p;
        p = -1;
        for (int i = 0; i < 4; i++) if (prev_row == low(order[i])) p = i;
        check(p >= 0 && row == low(order[(p + 1) % 4]),
              $sformatf("scan step %b -> %b", prev_row, row));
        n_step++;
        if (p == 3) n_wrap++;
      end
    end
  end

  // Scan period and digit enables.
  longint last_rise = -1;
  int     n_period = 0;
  always @(posedge clk_scan) begin
    if (last_rise >= 0) begin
      check(cyc - last_rise == longint'(PERIOD_CYC), $sformatf("scan period %0d cycles", cyc - last_rise));
      n_period++;
    end
    last_rise = cyc;
    check(en == 4'b1110, $sformatf("digit enables %b", en));
  end

  initial begin
    #1 reset = 1'b1;
    repeat (PERIOD_CYC + 5000) @(posedge clk);
    check(row == 4'b0000, $sformatf("row %b in reset", row));
    @(negedge clk) reset = 1'b0;
    @(posedge clk_scan);
    #2;
    check(row == low(order[0]), "first state after reset");
    repeat (8) @(posedge clk_scan);
    #2;
    check(seg == 7'h7F, "display blank while no key is pressed");

    for (int k = 0; k < 16; k++) begin
      int r, c, edges, holds0;
      r = k / 4;
      c = k % 4;
      repeat ($urandom_range(PERIOD_CYC - 1)) @(posedge clk);
      pressed = 16'(1) << k;
      edges = 0;
      while (row != low(r) && edges < 6) begin
        @(posedge clk_scan);
        #2;
        edges++;
      end
      check(row == low(r), $sformatf("key r%0d c%0d: row %b never tested", r, c, row));
      check(edges <= 4, $sformatf("key r%0d c%0d: found after %0d scan periods", r, c, edges));
      #2;
      check(seg == exp_seg(r, c), $sformatf("key r%0d c%0d: seg %b expected %b", r, c, seg, exp_seg(r, c)));
      holds0 = n_hold;
      repeat (3) @(posedge clk_scan);
      #2;
      check(n_hold - holds0 == 3 && row == low(r), $sformatf("key r%0d c%0d: not held", r, c));
      check(seg == exp_seg(r, c), $sformatf("key r%0d c%0d: display changed while held", r, c));
      repeat ($urandom_range(PERIOD_CYC - 1)) @(posedge clk);
      pressed = '0;
      #1;
      check(seg == 7'h7F, $sformatf("key r%0d c%0d: display not blank on release", r, c));
      @(posedge clk_scan);
      #2;
      if (row != low(r)) n_resume++;
      check(row != low(r), $sformatf("key r%0d c%0d: scan did not resume", r, c));
    end

    check(n_step > 0, "no scan step");
    check(n_wrap > 0, "no wrap-around");
    check(n_hold > 0, "no hold on a pressed key");
    check(n_resume > 0, "no resume after release");
    check(n_recover > 0, "no recovery from the all-zero state");
    check(n_period > 0, "no scan period measured");
    $display("steps=%0d wraps=%0d holds=%0d resumes=%0d recoveries=%0d periods=%0d",
             n_step, n_wrap, n_hold, n_resume, n_recover, n_period);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * PERIOD_CYC) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
