// Testbench for control_unit. Random officer and voter activity (Ballot
// presses, nvotes 0..3 including out-of-range settings, candidate presses
// from every post, Close and Clear) is applied every cycle and compared
// with a reference session model kept here: after a Ballot press the voter
// may vote for posts 1..nvotes in order, and only a press of a candidate
// of the expected post becomes a vote.
module tb_control_unit;
  localparam int NG = 3, GS = 5;

  int checks = 0, failures = 0;
  int n_vote = 0, n_wrong = 0, n_session_end = 0, n_close_cut = 0, n_ignored_ballot = 0;
  logic clk = 0, clr, cls, ballot, press;
  logic [1:0] nvotes, cur_grp, vote_grp;
  logic [3:0] press_cand, vote_cand;
  logic ballot_en, vote;

  control_unit #(.NUM_GROUPS(NG), .GROUP_SIZE(GS)) dut (
    .clk(clk), .clr(clr), .cls(cls), .ballot(ballot), .nvotes(nvotes), .press(press),
    .press_cand(press_cand), .ballot_en(ballot_en), .cur_grp(cur_grp), .vote(vote),
    .vote_cand(vote_cand), .vote_grp(vote_grp));

  always #5 clk = ~clk;

  // Reference state.
  bit r_voting = 0, r_ballot_prev = 0, r_vote = 0;
  int r_grp = 0, r_last = 0, r_vc = 0, r_vg = 0;

  function automatic bit in_post(int c, int p);
    return p >= 1 && c >= (p - 1) * GS + 1 && c <= p * GS;
  endfunction

  always @(posedge clk) begin
    automatic bit rise = ballot && !r_ballot_prev;
    r_vote <= 0;
    if (clr) begin
      r_voting <= 0; r_grp <= 0; r_last <= 0; r_ballot_prev <= 0;
      r_vc <= 0; r_vg <= 0;
    end else begin
      r_ballot_prev <= ballot;
      if (!r_voting) begin
        if (rise && !cls && nvotes != 0) begin
          r_voting <= 1; r_grp <= 1; r_last <= (int'(nvotes) > NG) ? NG : int'(nvotes);
        end else if (rise) n_ignored_ballot++;
      end else if (cls) begin
        r_voting <= 0; r_grp <= 0; n_close_cut++;
      end else if (press && in_post(int'(press_cand), r_grp)) begin
        r_vote <= 1; r_vc <= int'(press_cand); r_vg <= r_grp; n_vote++;
        if (r_grp == r_last) begin
          r_voting <= 0; r_grp <= 0; n_session_end++;
        end else r_grp <= r_grp + 1;
      end else if (press) n_wrong++;
    end
  end

  always @(negedge clk) if (!clr) begin
    checks++;
    if (ballot_en !== r_voting || int'(cur_grp) != r_grp || vote !== r_vote ||
        (r_vote && (int'(vote_cand) != r_vc || int'(vote_grp) != r_vg))) begin
      failures++;
      $display("FAIL t=%0t en=%0d grp=%0d vote=%0d cand=%0d post=%0d, expected %0d %0d %0d %0d %0d",
               $time, ballot_en, cur_grp, vote, vote_cand, vote_grp,
               r_voting, r_grp, r_vote, r_vc, r_vg);
    end
  end

  initial begin
    clr = 1; cls = 0; ballot = 0; press = 0; press_cand = 0; nvotes = 2;
    repeat (2) @(posedge clk);
    #1 clr = 0;
    for (int t = 0; t < 20000; t++) begin
      @(posedge clk);
      #1;
      clr    = $urandom_range(999) == 0;
      cls    = $urandom_range(99) == 0;
      ballot = $urandom_range(7) == 0;
      if ($urandom_range(49) == 0) nvotes = 2'($urandom_range(3));
      press  = $urandom_range(2) == 0;
      press_cand = 4'($urandom_range(15));
    end
    if (n_vote == 0 || n_wrong == 0 || n_session_end == 0 || n_close_cut == 0 ||
        n_ignored_ballot == 0) begin
      failures++;
      $display("FAIL coverage vote=%0d wrong=%0d end=%0d close=%0d ignored=%0d",
               n_vote, n_wrong, n_session_end, n_close_cut, n_ignored_ballot);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
