// Testbench for display_formatter with RESULT_HOLD = 4. It checks the
// winners view (unique leaders, ties shown as EE, blanked tens digit), the
// result view stepping through all 15 candidates with their counts in
// four decimal digits, and the total view, including clamping to 9999.
// Expected glyphs are built here from the numbers with / and %.
module tb_display_formatter;
  import evm_pkg::*;
  localparam int NG = 3, GS = 5, NC = 15, W = 10, TW = 14, HOLD = 4;

  int checks = 0, failures = 0;
  logic clk = 0, rst, result, total;
  logic [W-1:0]  cd [NC];
  logic [TW-1:0] tot;
  logic [2:0]    win_idx [NG];
  logic          tie [NG];
  disp_mode_t    mode;
  logic [3:0]    shown;
  glyph_t        glyph [6];
  seg_t          d [6];
  seg_t          seg_ref [6];
  glyph_t        g_in [6];

  display_formatter #(.NUM_GROUPS(NG), .GROUP_SIZE(GS), .CNT_W(W), .TOT_W(TW),
                      .RESULT_HOLD(HOLD)) dut (
    .clk(clk), .rst(rst), .result(result), .total(total), .cd(cd), .tot(tot),
    .win_idx(win_idx), .tie(tie), .mode(mode), .shown(shown), .glyph(glyph), .d(d));

  // Reference segment patterns come from the encoder, which has its own test.
  for (genvar k = 0; k < 6; k++) begin : g_ref
    seven_segment_encoder u_ref (.glyph(g_in[k]), .seg(seg_ref[k]));
  end

  always #5 clk = ~clk;

  localparam glyph_t B = GLYPH_BLANK;

  function automatic glyph_t dig(int v, int place, bit blank_zero);
    int q = (v / place) % 10;
    return (blank_zero && v / place == 0) ? B : glyph_t'(q);
  endfunction

  task automatic expect_glyphs(glyph_t e [6], string what);
    checks++;
    g_in = e;
    #1;
    for (int k = 0; k < 6; k++) begin
      if (glyph[k] !== e[k] || d[k] !== seg_ref[k]) begin
        failures++;
        $display("FAIL %s digit %0d: glyph=%h seg=%b expected %h %b", what, k, glyph[k], d[k],
                 e[k], seg_ref[k]);
        break;
      end
    end
  endtask

  initial begin
    glyph_t e [6];
    rst = 1; result = 0; total = 0; tot = 0;
    foreach (cd[i]) cd[i] = W'(i * 67 % 1000 + 3);
    foreach (tie[i]) tie[i] = 0;
    foreach (win_idx[i]) win_idx[i] = 0;
    @(posedge clk); #1 rst = 0;

    // Winners view.
    for (int t = 0; t < 200; t++) begin
      for (int g = 0; g < NG; g++) begin
        tie[g] = $urandom_range(3) == 0;
        win_idx[g] = 3'($urandom_range(GS - 1));
      end
      #1;
      for (int g = 0; g < NG; g++) begin
        automatic int c = g * GS + int'(win_idx[g]) + 1;
        e[2*g]     = tie[g] ? GLYPH_E : dig(c, 10, 1);
        e[2*g + 1] = tie[g] ? GLYPH_E : dig(c, 1, 0);
      end
      checks++;
      if (mode != DISP_WINNERS) begin failures++; $display("FAIL mode %0d", mode); end
      expect_glyphs(e, "winners");
    end

    // Result view: steps through every candidate, HOLD cycles each.
    @(negedge clk) result = 1;
    for (int c = 1; c <= NC + 2; c++) begin
      automatic int cc = (c - 1) % NC + 1;
      for (int h = 0; h < HOLD; h++) begin
        automatic int v = int'(cd[cc - 1]);
        e = '{dig(cc, 10, 1), dig(cc, 1, 0), dig(v, 1000, 0), dig(v, 100, 0),
              dig(v, 10, 0), dig(v, 1, 0)};
        expect_glyphs(e, "result");
        checks++;
        if (mode != DISP_RESULT || int'(shown) != cc - 1) begin
          failures++;
          $display("FAIL result: mode=%0d shown=%0d expected %0d", mode, shown, cc - 1);
        end
        @(negedge clk);
      end
    end
    // Total wins over nothing while result is high; result restarts at 1.
    total = 1;
    #1;
    checks++;
    if (mode != DISP_RESULT) begin failures++; $display("FAIL result must win over total"); end
    result = 0;
    @(negedge clk) result = 1;
    #1;
    checks++;
    if (shown != 0) begin failures++; $display("FAIL result did not restart at 1"); end
    result = 0;

    // Total view.
    foreach (e[i]) e[i] = B;
    for (int t = 0; t < 100; t++) begin
      automatic int v = (t == 0) ? 16383 : (t == 1) ? 9999 : (t == 2) ? 10000 : $urandom_range(16383);
      automatic int sv = (v > 9999) ? 9999 : v;
      tot = TW'(v);
      #1;
      e = '{B, B, dig(sv, 1000, 0), dig(sv, 100, 0), dig(sv, 10, 0), dig(sv, 1, 0)};
      checks++;
      if (mode != DISP_TOTAL) begin failures++; $display("FAIL total mode"); end
      expect_glyphs(e, "total");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
