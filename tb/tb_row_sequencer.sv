// tb_row_sequencer: checks the row-scanning state machine for every value of
// the ID digit (ten instances side by side, one clock).
//
// For each instance: reset loads the all-zero state and the first clock leaves
// it for row 3; with no key the rows are tested in the instance's order,
// wrapping round; a pressed key is found within four clocks, stops the scan
// for as long as it is held, and releasing it resumes the scan at the next row
// of the order. The expected orders are written out here from the lab's table.
module tb_row_sequencer;
  localparam int N = 10;

  logic              clk = 1'b0;
  logic              reset = 1'b1;
  logic [15:0]       pressed [N];
  logic [3:0]        row [N];
  logic [3:0]        col [N];
  int                checks = 0, failures = 0;

  // order_tab[d][i]: row tested i-th for ID digit d.
  int order_tab [N][4] = '{
    '{3, 2, 1, 0}, '{3, 2, 1, 0}, '{3, 2, 1, 0},
    '{3, 1, 2, 0}, '{3, 1, 2, 0}, '{3, 1, 2, 0},
    '{3, 0, 2, 1}, '{3, 0, 2, 1},
    '{3, 2, 0, 1}, '{3, 2, 0, 1}};

  for (genvar d = 0; d < N; d++) begin : g_dut
    row_sequencer #(.ID_LAST_DIGIT(d)) u_dut (.clk(clk), .reset(reset), .col(col[d]), .row(row[d]));
    keypad_model u_keys (.row(row[d]), .pressed(pressed[d]), .col(col[d]));
  end

  function automatic logic [3:0] low(input int r);
    return 4'b1111 & ~(4'b0001 << r);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic tick();
    #5 clk = 1'b1;
    #5 clk = 1'b0;
  endtask

  // Position of row r in digit d's order.
  function automatic int pos_of(input int d, input int r);
    for (int i = 0; i < 4; i++) if (order_tab[d][i] == r) return i;
    return -1;
  endfunction

  initial begin
    for (int d = 0; d < N; d++) pressed[d] = '0;
    tick();
    for (int d = 0; d < N; d++) check(row[d] == 4'b0000, $sformatf("d%0d: reset state %b", d, row[d]));
    reset = 1'b0;
    tick();
    for (int d = 0; d < N; d++) check(row[d] == low(3), $sformatf("d%0d: recovery to %b", d, row[d]));
    // Free scan: two full rounds.
    for (int s = 1; s <= 8; s++) begin
      tick();
      for (int d = 0; d < N; d++)
        check(row[d] == low(order_tab[d][s % 4]),
              $sformatf("d%0d step %0d: row %b expected %b", d, s, row[d], low(order_tab[d][s % 4])));
    end
    // Now every instance tests position 0 (row 3). Press each key in turn.
    for (int k = 0; k < 16; k++) begin
      int r, waited;
      r = k / 4;
      for (int d = 0; d < N; d++) pressed[d] = 16'(1) << k;
      for (int d = 0; d < N; d++) begin
        // Clocks until row r is tested, from the instance's current position.
        int cur;
        cur = -1;
        for (int i = 0; i < 4; i++) if (row[d] == low(order_tab[d][i])) cur = i;
        check(cur >= 0, $sformatf("d%0d: invalid state %b before key %0d", d, row[d], k));
      end
      waited = 0;
      while (waited < 6 && row[0] != low(r)) begin
        tick();
        waited++;
      end
      check(waited <= 3, $sformatf("key %0d found after %0d clocks", k, waited));
      // Give every instance up to four clocks to land on row r.
      repeat (4) tick();
      for (int d = 0; d < N; d++)
        check(row[d] == low(r), $sformatf("d%0d key %0d: held row %b expected %b", d, k, row[d], low(r)));
      repeat (5) tick();
      for (int d = 0; d < N; d++)
        check(row[d] == low(r), $sformatf("d%0d key %0d: scan did not stay", d, k));
      for (int d = 0; d < N; d++) pressed[d] = '0;
      tick();
      for (int d = 0; d < N; d++)
        check(row[d] == low(order_tab[d][(pos_of(d, r) + 1) % 4]),
              $sformatf("d%0d key %0d: resume row %b", d, k, row[d]));
    end
    // Two keys in different rows: the scan stops at the first one reached.
    for (int d = 0; d < N; d++) pressed[d] = '0;
    reset = 1'b1;
    tick();
    reset = 1'b0;
    tick();  // every instance tests row 3 now
    for (int d = 0; d < N; d++) pressed[d] = (16'(1) << (4 * order_tab[d][2] + 1)) | (16'(1) << (4 * order_tab[d][3] + 2));
    repeat (6) tick();
    for (int d = 0; d < N; d++)
      check(row[d] == low(order_tab[d][2]), $sformatf("d%0d: two keys, stopped at %b", d, row[d]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
