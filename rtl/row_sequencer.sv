// row_sequencer: the keypad row-scanning state machine.
//
// The state register is the row output itself: in each valid state exactly one
// row line is low (0111 tests row 3, 1011 row 2, 1101 row 1, 1110 row 0). On each
// scan clock the machine
//   - moves to the next row of the scan order when no column is low
//     (col == 4'b1111, no key pressed on the tested row),
//   - stays where it is while any column is low, so the pressed key's row stays
//     driven and the display stays steady,
//   - goes to the first state of the order (row 3 low) from any invalid state,
//     such as the all-zero state an FPGA powers up in.
// The scan order is one of four, chosen by ID_LAST_DIGIT as tabulated in
// keypad_pkg; the default, 3,2,1,0, gives the state sequence
// 0111 -> 1011 -> 1101 -> 1110 -> 0111.
//
// Interface: clk is the 2 kHz scan clock; reset is asynchronous and active
// high and loads 4'b0000, reproducing the power-up state, from which the first
// clock edge recovers. col is sampled on the rising clock edge; row changes
// right after it.
//
// The states, the order table, the stop-and-resume rule and the recovery from
// invalid states are the lab's. An asynchronous reset (so it works while the
// scan clock is held) and the choice of the first state as recovery target are
// this design's.
module row_sequencer
  import keypad_pkg::*;
#(
  parameter int unsigned ID_LAST_DIGIT = 0
) (
  input  logic   clk,
  input  logic   reset,
  input  lines_t col,
  output lines_t row
);

  if (ID_LAST_DIGIT > 9) begin : g_bad_digit
    $error("row_sequencer: ID_LAST_DIGIT must be 0..9");
  end

  // The four states in scan order.
  localparam lines_t S0 = one_low(scan_row(ID_LAST_DIGIT, 2'd0));
  localparam lines_t S1 = one_low(scan_row(ID_LAST_DIGIT, 2'd1));
  localparam lines_t S2 = one_low(scan_row(ID_LAST_DIGIT, 2'd2));
  localparam lines_t S3 = one_low(scan_row(ID_LAST_DIGIT, 2'd3));

  lines_t state_q, state_d;
  logic   state_valid;

  always_comb begin
    state_valid = 1'b0;
    state_d     = S0;
    case (state_q)
      S0:      begin state_valid = 1'b1; state_d = (col == ALL_HIGH) ? S1 : S0; end
      S1:      begin state_valid = 1'b1; state_d = (col == ALL_HIGH) ? S2 : S1; end
      S2:      begin state_valid = 1'b1; state_d = (col == ALL_HIGH) ? S3 : S2; end
      S3:      begin state_valid = 1'b1; state_d = (col == ALL_HIGH) ? S0 : S3; end
      default: begin state_valid = 1'b0; state_d = S0; end
    endcase
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) state_q <= '0;
    else       state_q <= state_d;
  end

  assign row = state_q;

  // After any clock edge taken out of reset the state is one of the four.
  a_valid_state: assert property (@(posedge clk) disable iff (reset)
    1'b1 |=> (state_q == S0 || state_q == S1 || state_q == S2 || state_q == S3));

  // A key pressed on the tested row holds the scan.
  a_hold: assert property (@(posedge clk) disable iff (reset)
    (state_valid && col != ALL_HIGH) |=> $stable(state_q));

endmodule
