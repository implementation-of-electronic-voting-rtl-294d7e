// ballot_unit: logic of the voter's ballot panel.
//
// The panel has one push-to-on button per candidate (sw[0] for candidate 1
// and so on), a Ready LED, and a red LED and buzzer beside every button.
// Buttons are active high and asynchronous: each goes through a two-stage
// synchroniser. A press is reported as a one-cycle `press` with the 1-based
// candidate number `press_cand` when the buttons go from all released to
// exactly one held; pressing two or more at once reports nothing, and a
// button must be released before the next press can be reported. The unit
// does not judge the press: the control unit does, and answers with the
// one-cycle `vote_ok` and the candidate `vote_cand` when the vote has been
// registered. The unit then lights that candidate's LED and buzzer for
// CONFIRM_CYCLES clock cycles (default half a second at 10 MHz); a new
// confirmation replaces the old one. A candidate number of 0 or beyond
// NUM_SW lights nothing. `ready_led` lights while the control
// unit has enabled the ballot (`enable`).
//
// From the original design: the buttons, Ready LED, per-candidate LED and
// buzzer, the "high signal" sent on a press, and confirmation only for a
// registered vote. NUM_SW defaults to the 20 buttons sw0-sw19 of its panel;
// the complete machine uses one button per candidate. Chosen here: the
// synchroniser, the rule for simultaneous presses, no debouncing beyond
// the release requirement, and the confirmation time.
module ballot_unit #(
  parameter int unsigned NUM_SW         = 20,
  parameter int unsigned CONFIRM_CYCLES = 5_000_000,
  localparam int unsigned CAND_W        = $clog2(NUM_SW + 1),
  localparam int unsigned TMR_W         = (CONFIRM_CYCLES > 1) ? $clog2(CONFIRM_CYCLES + 1) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [NUM_SW-1:0] sw,          // candidate buttons, asynchronous
  input  logic              enable,      // ballot enabled by the officer
  input  logic              vote_ok,     // vote registered (one cycle)
  input  logic [CAND_W-1:0] vote_cand,   // candidate whose vote was registered
  output logic              press,       // new press (one cycle)
  output logic [CAND_W-1:0] press_cand,  // pressed candidate, 1-based
  output logic              ready_led,
  output logic [NUM_SW-1:0] led,         // red confirmation LEDs
  output logic [NUM_SW-1:0] buz          // confirmation buzzers
);

  logic [NUM_SW-1:0] sync1_q, sync2_q, prev_q;
  logic              one_held;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync1_q <= '0;
      sync2_q <= '0;
      prev_q  <= '0;
    end else begin
      sync1_q <= sw;
      sync2_q <= sync1_q;
      prev_q  <= sync2_q;
    end
  end

  assign one_held = (sync2_q != '0) && ((sync2_q & (sync2_q - 1'b1)) == '0);

  // Encode the single held button; only meaningful while one_held.
  always_comb begin
    press_cand = '0;
    for (int i = 0; i < NUM_SW; i++)
      if (sync2_q[i]) press_cand = CAND_W'(i + 1);
  end

  assign press = one_held && (prev_q == '0);

  // ---- Confirmation LED and buzzer ---------------------------------------
  logic [TMR_W-1:0]  tmr_q;
  logic [NUM_SW-1:0] which_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      tmr_q   <= '0;
      which_q <= '0;
    end else if (vote_ok) begin
      tmr_q   <= TMR_W'(CONFIRM_CYCLES);
      which_q <= NUM_SW'(1) << (vote_cand - 1'b1);
    end else if (tmr_q != '0) begin
      tmr_q <= tmr_q - 1'b1;
    end
  end

  assign led       = (tmr_q != '0) ? which_q : '0;
  assign buz       = led;
  assign ready_led = enable;

endmodule
