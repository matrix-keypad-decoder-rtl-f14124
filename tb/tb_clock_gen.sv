// tb_clock_gen: checks the scan clock divider.
//
// The default instance (50 MHz to 2 kHz) must give its first rising edge 12,500
// input cycles after reset and then a period of 25,000 input cycles with
// 12,500 high, over several periods. A second instance with an uneven ratio
// (30 Hz to 4 Hz, half period rounded down to 3) checks the rounding.
module tb_clock_gen;
  logic clk = 1'b0;
  logic reset = 1'b1;
  logic out_full, out_small;
  int   checks = 0, failures = 0;
  longint cyc = 0;

  clock_gen u_full (.clk_in(clk), .reset(reset), .clk_out(out_full));
  clock_gen #(.CLK_IN_HZ(30), .CLK_OUT_HZ(4)) u_small (.clk_in(clk), .reset(reset), .clk_out(out_small));

  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Measures edges of one divided clock; expects half period `half`.
  task automatic measure(ref logic sig, input longint half, input int periods);
    longint t_rel, t_rise, t_fall;
    t_rel = cyc;
    @(posedge sig);
    check(cyc - t_rel == half, $sformatf("first rise after %0d cycles, expected %0d", cyc - t_rel, half));
    for (int p = 0; p < periods; p++) begin
      t_rise = cyc;
      @(negedge sig);
      t_fall = cyc;
      check(t_fall - t_rise == half, $sformatf("high time %0d, expected %0d", t_fall - t_rise, half));
      @(posedge sig);
      check(cyc - t_rise == 2 * half, $sformatf("period %0d, expected %0d", cyc - t_rise, 2 * half));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    check(out_full == 1'b0 && out_small == 1'b0, "outputs low in reset");
    @(negedge clk) reset = 1'b0;
    fork
      measure(out_full, 12_500, 4);
      measure(out_small, 3, 20);
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
