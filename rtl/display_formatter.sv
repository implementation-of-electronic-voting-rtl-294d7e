// display_formatter: decides what the six-digit LED module shows.
//
// Three modes, picked by the officer's Result and Total controls:
//  * Winners (neither control high): two digits per post, left to right
//    post 1, 2 and 3, each showing the number of the candidate with the most
//    votes in that post, or "EE" when the largest count is shared. A leading
//    zero of a candidate number is blanked (candidate 3 shows " 3").
//  * Result (result high; it wins over total): the left two digits show a
//    candidate's number and the right four its vote count. The display
//    starts at candidate 1 when Result goes high and steps to the next
//    candidate every RESULT_HOLD clock cycles, wrapping after the last one.
//  * Total (total high, result low): the left two digits are blank and the
//    right four show the total number of votes cast.
// Counts above 9999 are shown as 9999. The digit patterns `d` (d[0] is the
// leftmost digit) follow combinationally from the inputs and from the
// registered candidate pointer of Result mode; `rst` resets that pointer.
//
// The winner display and its "EE" tie mark follow the original design, as
// do the 2 + 4 digit layout of Result mode and the existence of Total.
// The stepping through candidates, its rate, the priority of Result over
// Total and the blanking are choices made here. RESULT_HOLD defaults to
// one second at a 10 MHz clock.
module display_formatter
  import evm_pkg::*;
#(
  parameter int unsigned NUM_GROUPS  = evm_pkg::DEF_NUM_GROUPS,
  parameter int unsigned GROUP_SIZE  = evm_pkg::DEF_GROUP_SIZE,
  parameter int unsigned CNT_W       = evm_pkg::DEF_CNT_W,
  parameter int unsigned TOT_W       = evm_pkg::DEF_TOT_W,
  parameter int unsigned RESULT_HOLD = 10_000_000,
  localparam int unsigned NUM_CAND   = NUM_GROUPS * GROUP_SIZE,
  localparam int unsigned IDX_W      = (GROUP_SIZE > 1) ? $clog2(GROUP_SIZE) : 1,
  localparam int unsigned SEL_W      = (NUM_CAND > 1) ? $clog2(NUM_CAND) : 1,
  localparam int unsigned HOLD_W     = (RESULT_HOLD > 1) ? $clog2(RESULT_HOLD) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              result,
  input  logic              total,
  input  logic [CNT_W-1:0]  cd [NUM_CAND],
  input  logic [TOT_W-1:0]  tot,
  input  logic [IDX_W-1:0]  win_idx [NUM_GROUPS],
  input  logic              tie [NUM_GROUPS],
  output disp_mode_t        mode,
  output logic [SEL_W-1:0]  shown,                // Result mode: candidate shown - 1
  output glyph_t            glyph [NUM_DIGITS],
  output seg_t              d [NUM_DIGITS]
);

  // ---- Result-mode candidate pointer ------------------------------------
  logic [HOLD_W-1:0] hold_q;
  logic [SEL_W-1:0]  sel_q;

  always_ff @(posedge clk) begin
    if (rst || !result) begin
      hold_q <= '0;
      sel_q  <= '0;
    end else if (hold_q == HOLD_W'(RESULT_HOLD - 1)) begin
      hold_q <= '0;
      sel_q  <= (sel_q == SEL_W'(NUM_CAND - 1)) ? '0 : sel_q + 1'b1;
    end else begin
      hold_q <= hold_q + 1'b1;
    end
  end

  assign shown = sel_q;
  assign mode  = result ? DISP_RESULT : (total ? DISP_TOTAL : DISP_WINNERS);

  // ---- Decimal conversion of the shown count -----------------------------
  localparam int unsigned VAL_W = (CNT_W > TOT_W) ? CNT_W : TOT_W;
  logic [VAL_W-1:0] value;
  logic [3:0]       vdig [4];

  assign value = result ? VAL_W'(cd[sel_q]) : VAL_W'(tot);

  bin2bcd #(.BIN_W(VAL_W), .DIGITS(4)) u_bcd (.bin(value), .bcd(vdig));

  // Two glyphs for a candidate number 1..99, tens digit blanked when 0.
  function automatic void cand_glyphs(input int unsigned num,
                                      output glyph_t tens, output glyph_t units);
    tens  = (num / 10 == 0) ? GLYPH_BLANK : glyph_t'(num / 10);
    units = glyph_t'(num % 10);
  endfunction

  always_comb begin
    for (int k = 0; k < NUM_DIGITS; k++) glyph[k] = GLYPH_BLANK;
    unique case (mode)
      DISP_RESULT: begin
        cand_glyphs(int'(sel_q) + 1, glyph[0], glyph[1]);
        for (int k = 0; k < 4; k++) glyph[2 + k] = vdig[3 - k];
      end
      DISP_TOTAL: begin
        for (int k = 0; k < 4; k++) glyph[2 + k] = vdig[3 - k];
      end
      default: begin
        for (int g = 0; g < NUM_GROUPS && g < NUM_DIGITS / 2; g++) begin
          if (tie[g]) begin
            glyph[2*g]     = GLYPH_E;
            glyph[2*g + 1] = GLYPH_E;
          end else begin
            cand_glyphs(g * GROUP_SIZE + int'(win_idx[g]) + 1, glyph[2*g], glyph[2*g + 1]);
          end
        end
      end
    endcase
  end

  for (genvar k = 0; k < NUM_DIGITS; k++) begin : g_seg
    seven_segment_encoder u_enc (.glyph(glyph[k]), .seg(d[k]));
  end

endmodule
