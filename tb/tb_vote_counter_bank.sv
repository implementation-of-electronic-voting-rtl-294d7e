// Testbench for vote_counter_bank: random vote strobes with random post and
// candidate numbers (many outside the post), random Close and rare Clear,
// against a reference count kept here. A final run of 1030 votes for one
// candidate checks that its 10-bit counter wraps.
module tb_vote_counter_bank;
  localparam int NG = 3, GS = 5, NC = NG * GS, W = 10, TW = 14;

  int checks = 0, failures = 0;
  int n_counted = 0, n_wrong_post = 0, n_closed = 0, n_clear = 0;
  logic clk = 0, clr, cls, vote, counted;
  logic [1:0] n;
  logic [3:0] count;
  logic [W-1:0]  cd [NC];
  logic [TW-1:0] total;
  int ref_cd [NC];
  int ref_tot;

  vote_counter_bank #(.NUM_GROUPS(NG), .GROUP_SIZE(GS), .CNT_W(W), .TOT_W(TW)) dut (
    .clk(clk), .clr(clr), .cls(cls), .vote(vote), .n(n), .count(count),
    .counted(counted), .cd(cd), .total(total));

  always #5 clk = ~clk;

  function automatic bit in_post(int c, int p);
    return p >= 1 && p <= NG && c >= (p - 1) * GS + 1 && c <= p * GS;
  endfunction

  task automatic compare();
    checks++;
    for (int i = 0; i < NC; i++)
      if (int'(cd[i]) != ref_cd[i]) begin
        failures++;
        $display("FAIL t=%0t cd[%0d]=%0d expected %0d", $time, i + 1, cd[i], ref_cd[i]);
        break;
      end
    checks++;
    if (int'(total) != ref_tot) begin
      failures++;
      $display("FAIL t=%0t total=%0d expected %0d", $time, total, ref_tot);
    end
  endtask

  task automatic step(bit c, bit s, bit v, int p, int k);
    bit exp;
    clr = c; cls = s; vote = v; n = 2'(p); count = 4'(k);
    #1;
    exp = v && !c && !s && in_post(k, p);
    checks++;
    if (counted !== exp) begin
      failures++;
      $display("FAIL counted=%0d expected %0d (p=%0d k=%0d cls=%0d)", counted, exp, p, k, s);
    end
    @(posedge clk);
    if (c) begin
      foreach (ref_cd[i]) ref_cd[i] = 0;
      ref_tot = 0;
      n_clear++;
    end else if (exp) begin
      ref_cd[k - 1] = (ref_cd[k - 1] + 1) % (1 << W);
      ref_tot++;
      n_counted++;
    end else if (v && s) n_closed++;
    else if (v) n_wrong_post++;
    #1 compare();
  endtask

  initial begin
    step(1, 0, 0, 0, 0);
    for (int t = 0; t < 5000; t++)
      step($urandom_range(199) == 0, $urandom_range(9) == 0, $urandom_range(1),
           $urandom_range(3), $urandom_range(15));
    step(1, 0, 0, 0, 0);
    for (int t = 0; t < 1030; t++) step(0, 0, 1, 3, 12);
    checks++;
    if (cd[11] != 10'd6 || ref_cd[11] != 6) begin
      failures++;
      $display("FAIL wrap: cd12=%0d", cd[11]);
    end
    if (n_counted == 0 || n_wrong_post == 0 || n_closed == 0 || n_clear < 2) begin
      failures++;
      $display("FAIL coverage counted=%0d wrong=%0d closed=%0d clear=%0d",
               n_counted, n_wrong_post, n_closed, n_clear);
    end
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
