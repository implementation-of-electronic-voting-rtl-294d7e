// End-to-end testbench for evm_top, with short confirmation, result-step and
// scan times. It runs an election of random voters: the officer sets nvotes
// (1, 2 or 3 posts) and presses Ballot, the voter presses candidates, some
// from the wrong post, some two buttons at once. The poll is closed and
// reopened along the way, once in the middle of a voter. A reference tally
// kept here is compared with the counters, the winners view (leaders and
// "EE" ties), the result view for every candidate, the total view, the
// multiplexed display outputs and the confirmation LEDs; Clear must empty
// everything. Each mechanism is counted and must have happened.
module tb_evm_top;
  import evm_pkg::*;
  localparam int NG = 3, GS = 5, NC = 15, CONF = 20, HOLD = 16, DIV = 4;

  int checks = 0, failures = 0;
  // mechanism counters
  int m_vote = 0, m_wrong_post = 0, m_double = 0, m_end [4] = '{0, 0, 0, 0};
  int m_close_cut = 0, m_closed_ballot = 0, m_tie = 0, m_unique = 0;
  int m_result = 0, m_total = 0, m_clear = 0, m_confirm = 0, m_scan = 0;

  logic clk = 0, clr, cls, ballot, result, total;
  logic [1:0] nvotes, cur_grp;
  logic [NC-1:0] sw, led, buz;
  logic ready_led;
  logic [9:0]  cd [NC];
  logic [13:0] tot;
  logic [9:0]  max_val [NG];
  disp_mode_t  mode;
  logic [3:0]  shown;
  seg_t        d [6];
  seg_t        seg;
  logic [5:0]  an;

  evm_top #(.CONFIRM_CYCLES(CONF), .RESULT_HOLD(HOLD), .SCAN_DIV(DIV)) dut (
    .clk(clk), .clr(clr), .cls(cls), .ballot(ballot), .result(result), .total(total),
    .nvotes(nvotes), .sw(sw), .ready_led(ready_led), .led(led), .buz(buz),
    .cur_grp(cur_grp), .cd(cd), .tot(tot), .max_val(max_val), .mode(mode),
    .shown(shown), .d(d), .seg(seg), .an(an));

  always #5 clk = ~clk;

  int ref_cd [NC];
  int ref_tot = 0;

  // Segment pattern of a character, from the segments it lights.
  function automatic seg_t pat(int ch);   // ch: 0-9, 14 = E, 15 = blank
    string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg",
                        "abc", "abcdefg", "abcdfg", "", "", "", "", "adefg", ""};
    seg_t r = '0;
    for (int i = 0; i < lit[ch].len(); i++) r[6 - (lit[ch][i] - "a")] = 1'b1;
    return r;
  endfunction

  function automatic int tens(int v); return (v / 10 == 0) ? 15 : (v / 10) % 10; endfunction

  task automatic expect_digits(int ch [6], string what);
    checks++;
    for (int k = 0; k < 6; k++)
      if (d[k] !== pat(ch[k])) begin
        failures++;
        $display("FAIL %s digit %0d: %b expected %b (char %0d)", what, k, d[k], pat(ch[k]), ch[k]);
        break;
      end
  endtask

  task automatic check_counts(string what);
    checks++;
    for (int i = 0; i < NC; i++)
      if (int'(cd[i]) != ref_cd[i]) begin
        failures++;
        $display("FAIL %s: cd%0d=%0d expected %0d", what, i + 1, cd[i], ref_cd[i]);
        break;
      end
    checks++;
    if (int'(tot) != ref_tot) begin
      failures++;
      $display("FAIL %s: total=%0d expected %0d", what, tot, ref_tot);
    end
  endtask

  task automatic check_winners();
    int ch [6];
    for (int g = 0; g < NG; g++) begin
      int m = -1, holders = 0, first = 0;
      for (int i = 0; i < GS; i++) if (ref_cd[g*GS + i] > m) begin m = ref_cd[g*GS + i]; first = g*GS + i + 1; end
      for (int i = 0; i < GS; i++) if (ref_cd[g*GS + i] == m) holders++;
      checks++;
      if (int'(max_val[g]) != m) begin
        failures++;
        $display("FAIL post %0d max=%0d expected %0d", g + 1, max_val[g], m);
      end
      if (holders > 1) begin ch[2*g] = 14; ch[2*g + 1] = 14; m_tie++; end
      else begin ch[2*g] = tens(first); ch[2*g + 1] = first % 10; m_unique++; end
    end
    expect_digits(ch, "winners");
  endtask

  // Hold candidate button(s) long enough to be seen, then release.
  task automatic press_buttons(logic [NC-1:0] b);
    @(negedge clk) sw = b;
    repeat (5) @(negedge clk);
    sw = '0;
    repeat (4) @(negedge clk);
  endtask

  task automatic officer_ballot();
    @(negedge clk) ballot = 1;
    @(negedge clk) ballot = 0;
    @(negedge clk);
  endtask

  // One voter casting nv votes; wrong-post and double presses mixed in.
  task automatic voter(int nv, bit cut_short);
    nvotes = 2'(nv);
    officer_ballot();
    checks++;
    if (ready_led !== 1'b1 || cur_grp != 2'd1) begin
      failures++;
      $display("FAIL ballot not enabled (ready=%0d post=%0d)", ready_led, cur_grp);
    end
    for (int p = 1; p <= nv; p++) begin
      // candidates of this post are favoured towards the low numbers
      automatic int c = (p - 1) * GS + 1 + ($urandom_range(3) == 0 ? 4 : $urandom_range(3));
      if ($urandom_range(2) == 0) begin
        automatic int w = ((p % NG) * GS) + 1 + $urandom_range(GS - 1);   // another post
        press_buttons(NC'(1) << (w - 1));
        m_wrong_post++;
        check_counts("wrong post");
      end
      if ($urandom_range(3) == 0) begin
        press_buttons((NC'(1) << (c - 1)) | (NC'(1) << ((c % NC))));
        m_double++;
        check_counts("two buttons");
      end
      if (cut_short && p == 2) begin
        @(negedge clk) cls = 1;
        @(negedge clk);
        checks++;
        if (ready_led !== 1'b0) begin failures++; $display("FAIL close did not end the voter"); end
        press_buttons(NC'(1) << (c - 1));
        check_counts("closed");
        cls = 0;
        m_close_cut++;
        return;
      end
      @(negedge clk) sw = NC'(1) << (c - 1);
      repeat (5) @(negedge clk);
      sw = '0;
      ref_cd[c - 1]++;
      ref_tot++;
      m_vote++;
      checks++;
      if (led !== NC'(1) << (c - 1) || buz !== led) begin
        failures++;
        $display("FAIL confirm LED for %0d: led=%b", c, led);
      end else m_confirm++;
      repeat (4) @(negedge clk);
      check_counts("vote");
    end
    checks++;
    if (ready_led !== 1'b0 || cur_grp != 0) begin
      failures++;
      $display("FAIL ballot still enabled after %0d votes", nv);
    end else m_end[nv]++;
  endtask

  // Scan check: whichever digit is enabled shows the pattern it had at the
  // last clock edge (the multiplexer registers its outputs).
  seg_t d_q [6];
  always @(posedge clk) d_q <= d;
  always @(negedge clk) if (!clr && an != 0) begin
    for (int k = 0; k < 6; k++) if (an[k]) begin
      checks++;
      if (seg !== d_q[k]) begin
        failures++;
        $display("FAIL scan digit %0d: seg=%b expected %b", k, seg, d_q[k]);
      end
      if (k == 5 && $past(an) == 6'b010000) m_scan++;
    end
  end

  initial begin
    clr = 1; cls = 0; ballot = 0; result = 0; total = 0; nvotes = 1; sw = '0;
    foreach (ref_cd[i]) ref_cd[i] = 0;
    repeat (3) @(negedge clk);
    clr = 0;
    @(negedge clk);
    check_winners();     // all zero: every post is a tie

    for (int v = 0; v < 60; v++) begin
      voter((v % 3) + 1, v == 20);
      if (v == 30) begin
        // Poll closed: Ballot is ignored.
        @(negedge clk) cls = 1;
        officer_ballot();
        checks++;
        if (ready_led !== 1'b0) begin failures++; $display("FAIL ballot while closed"); end
        else m_closed_ballot++;
        cls = 0;
      end
      @(negedge clk);
      check_winners();
    end

    // Result view: every candidate in turn.
    @(negedge clk) result = 1;
    for (int c = 1; c <= NC; c++) begin
      automatic int v = ref_cd[c - 1];
      automatic int ch [6] = '{tens(c), c % 10, (v / 1000) % 10, (v / 100) % 10, (v / 10) % 10, v % 10};
      #1;
      checks++;
      if (mode != DISP_RESULT || int'(shown) != c - 1) begin
        failures++;
        $display("FAIL result shows %0d expected %0d", shown + 1, c);
      end
      expect_digits(ch, "result");
      m_result++;
      repeat (HOLD) @(negedge clk);
    end
    result = 0;

    // Total view.
    @(negedge clk) total = 1;
    #1;
    begin
      automatic int ch [6] = '{15, 15, (ref_tot / 1000) % 10, (ref_tot / 100) % 10,
                               (ref_tot / 10) % 10, ref_tot % 10};
      expect_digits(ch, "total");
      m_total++;
    end
    total = 0;

    // Clear.
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    foreach (ref_cd[i]) ref_cd[i] = 0;
    ref_tot = 0;
    check_counts("clear");
    check_winners();
    m_clear++;

    if (m_vote == 0 || m_wrong_post == 0 || m_double == 0 || m_end[1] == 0 || m_end[2] == 0 ||
        m_end[3] == 0 || m_close_cut == 0 || m_closed_ballot == 0 || m_tie == 0 ||
        m_unique == 0 || m_result == 0 || m_total == 0 || m_clear == 0 || m_confirm == 0 ||
        m_scan == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("votes=%0d wrong_post=%0d double=%0d ends=%0d/%0d/%0d close_cut=%0d closed_ballot=%0d",
             m_vote, m_wrong_post, m_double, m_end[1], m_end[2], m_end[3], m_close_cut,
             m_closed_ballot);
    $display("tie_views=%0d unique_views=%0d result=%0d total=%0d clear=%0d confirm=%0d scans=%0d",
             m_tie, m_unique, m_result, m_total, m_clear, m_confirm, m_scan);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
