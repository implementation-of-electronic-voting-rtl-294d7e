// evm_top: programmable electronic voting machine.
//
// One machine serves elections in which each voter votes for one, two or
// three posts. The 15 candidates are split into three posts of five
// (candidates 1-5, 6-10, 11-15). The presiding officer sets how many posts a
// voter votes for (`nvotes`) and, for every voter, presses Ballot; the voter
// then presses one button per post, in post order, and the machine counts
// each vote, lights the chosen candidate's LED and sounds its buzzer. Votes
// for a candidate outside the post being voted for are ignored, so no
// invalid vote can be cast.
//
// Data flow: ballot_unit (buttons -> one-cycle press) -> control_unit (voter
// session, decides which press is a vote and for which post n) ->
// vote_counter_bank (15 counters, total) -> three max_comparator (leader of
// each post, tie detection) -> display_formatter (six digits: winners,
// per-candidate result, or total) -> display_mux (multiplexed LED module).
// The six digit patterns are also available in parallel on `d`.
//
// Controls, all synchronous to `clk` and active high: `clr` (Clear) resets
// every count and the whole machine; `cls` (Close) closes the poll;
// `ballot` is the officer's Ballot button; `result` and `total` select what
// the display shows. A vote shows on `cd` after the fourth clock edge that
// follows the button closing: two synchroniser stages, the registered vote
// of the control unit, then the counter itself. The confirming LED and
// buzzer come on at that same edge.
//
// Follows the original design in its units, sizes (15 counters of 10 bits,
// 3 posts of 5, 6 digits) and controls. Chosen here: a single clock and
// synchronous clear for all units, one button per candidate, the timing
// parameters (given for an assumed 10 MHz clock) and the interfaces
// between the units.
module evm_top
  import evm_pkg::*;
#(
  parameter int unsigned NUM_GROUPS     = evm_pkg::DEF_NUM_GROUPS,
  parameter int unsigned GROUP_SIZE     = evm_pkg::DEF_GROUP_SIZE,
  parameter int unsigned CNT_W          = evm_pkg::DEF_CNT_W,
  parameter int unsigned TOT_W          = evm_pkg::DEF_TOT_W,
  parameter int unsigned CONFIRM_CYCLES = 5_000_000,
  parameter int unsigned RESULT_HOLD    = 10_000_000,
  parameter int unsigned SCAN_DIV       = 10_000,
  localparam int unsigned NUM_CAND      = NUM_GROUPS * GROUP_SIZE,
  localparam int unsigned CAND_W        = $clog2(NUM_CAND + 1),
  localparam int unsigned GRP_W         = $clog2(NUM_GROUPS + 1),
  localparam int unsigned IDX_W         = (GROUP_SIZE > 1) ? $clog2(GROUP_SIZE) : 1,
  localparam int unsigned SEL_W         = (NUM_CAND > 1) ? $clog2(NUM_CAND) : 1
) (
  input  logic                clk,
  input  logic                clr,        // Clear
  input  logic                cls,        // Close
  input  logic                ballot,     // Ballot button
  input  logic                result,     // Result
  input  logic                total,      // Total
  input  logic [GRP_W-1:0]    nvotes,     // votes per voter
  input  logic [NUM_CAND-1:0] sw,         // candidate buttons, sw[i] = candidate i+1
  // ballot panel
  output logic                ready_led,
  output logic [NUM_CAND-1:0] led,
  output logic [NUM_CAND-1:0] buz,
  // state, for observation
  output logic [GRP_W-1:0]    cur_grp,    // post the voter votes for next, 0 = none
  output logic [CNT_W-1:0]    cd [NUM_CAND],
  output logic [TOT_W-1:0]    tot,
  output logic [CNT_W-1:0]    max_val [NUM_GROUPS],
  output disp_mode_t          mode,
  output logic [SEL_W-1:0]    shown,
  // six-digit LED module
  output seg_t                d [NUM_DIGITS],
  output seg_t                seg,
  output logic [NUM_DIGITS-1:0] an
);

  logic              press, vote, vote_counted, ballot_en;
  logic [CAND_W-1:0] press_cand, vote_cand;
  logic [GRP_W-1:0]  vote_grp;
  logic [IDX_W-1:0]  win_idx [NUM_GROUPS];
  logic              tie [NUM_GROUPS];

  ballot_unit #(
    .NUM_SW         (NUM_CAND),
    .CONFIRM_CYCLES (CONFIRM_CYCLES)
  ) u_ballot (
    .clk        (clk),
    .rst        (clr),
    .sw         (sw),
    .enable     (ballot_en),
    .vote_ok    (vote_counted),
    .vote_cand  (vote_cand),
    .press      (press),
    .press_cand (press_cand),
    .ready_led  (ready_led),
    .led        (led),
    .buz        (buz)
  );

  control_unit #(
    .NUM_GROUPS (NUM_GROUPS),
    .GROUP_SIZE (GROUP_SIZE)
  ) u_ctrl (
    .clk        (clk),
    .clr        (clr),
    .cls        (cls),
    .ballot     (ballot),
    .nvotes     (nvotes),
    .press      (press),
    .press_cand (press_cand),
    .ballot_en  (ballot_en),
    .cur_grp    (cur_grp),
    .vote       (vote),
    .vote_cand  (vote_cand),
    .vote_grp   (vote_grp)
  );

  vote_counter_bank #(
    .NUM_GROUPS (NUM_GROUPS),
    .GROUP_SIZE (GROUP_SIZE),
    .CNT_W      (CNT_W),
    .TOT_W      (TOT_W)
  ) u_counters (
    .clk     (clk),
    .clr     (clr),
    .cls     (cls),
    .vote    (vote),
    .n       (vote_grp),
    .count   (vote_cand),
    .counted (vote_counted),
    .cd      (cd),
    .total   (tot)
  );

  for (genvar g = 0; g < NUM_GROUPS; g++) begin : g_post
    logic [CNT_W-1:0] post_cnt [GROUP_SIZE];
    for (genvar i = 0; i < GROUP_SIZE; i++) begin : g_cnt
      assign post_cnt[i] = cd[g * GROUP_SIZE + i];
    end
    max_comparator #(
      .GROUP_SIZE (GROUP_SIZE),
      .CNT_W      (CNT_W)
    ) u_cmp (
      .cnt     (post_cnt),
      .max_val (max_val[g]),
      .win_idx (win_idx[g]),
      .tie     (tie[g])
    );
  end

  display_formatter #(
    .NUM_GROUPS  (NUM_GROUPS),
    .GROUP_SIZE  (GROUP_SIZE),
    .CNT_W       (CNT_W),
    .TOT_W       (TOT_W),
    .RESULT_HOLD (RESULT_HOLD)
  ) u_fmt (
    .clk     (clk),
    .rst     (clr),
    .result  (result),
    .total   (total),
    .cd      (cd),
    .tot     (tot),
    .win_idx (win_idx),
    .tie     (tie),
    .mode    (mode),
    .shown   (shown),
    .glyph   (),
    .d       (d)
  );

  display_mux #(
    .DIGITS   (NUM_DIGITS),
    .SCAN_DIV (SCAN_DIV)
  ) u_mux (
    .clk (clk),
    .rst (clr),
    .d   (d),
    .seg (seg),
    .an  (an)
  );

endmodule
