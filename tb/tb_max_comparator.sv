// Testbench for max_comparator: random counts, drawn from a small range so
// that ties are frequent, plus fixed corner cases. The reference finds the
// largest count, how many candidates hold it and the first that does.
module tb_max_comparator;
  localparam int GS = 5;
  localparam int W  = 10;

  int checks = 0, failures = 0;
  int n_tie = 0, n_unique = 0;
  logic [W-1:0] cnt [GS];
  logic [W-1:0] max_val;
  logic [2:0]   win_idx;
  logic         tie;

  max_comparator #(.GROUP_SIZE(GS), .CNT_W(W)) dut (
    .cnt(cnt), .max_val(max_val), .win_idx(win_idx), .tie(tie));

  task automatic check_now();
    int m = 0, holders = 0, first = -1;
    for (int i = 0; i < GS; i++) if (int'(cnt[i]) > m) m = int'(cnt[i]);
    for (int i = 0; i < GS; i++)
      if (int'(cnt[i]) == m) begin
        holders++;
        if (first < 0) first = i;
      end
    #1;
    checks++;
    if (int'(max_val) != m || tie != (holders > 1) ||
        (holders == 1 && int'(win_idx) != first)) begin
      failures++;
      $display("FAIL cnt=%p: max=%0d idx=%0d tie=%0d, expected max=%0d idx=%0d tie=%0d",
               cnt, max_val, win_idx, tie, m, first, holders > 1);
    end
    if (holders > 1) n_tie++; else n_unique++;
  endtask

  initial begin
    cnt = '{0, 0, 0, 0, 0};        check_now();   // all zero: a tie
    cnt = '{1023, 0, 0, 0, 1022};  check_now();
    cnt = '{3, 3, 5, 1, 0};        check_now();   // early tie, later leader
    cnt = '{5, 3, 5, 1, 0};        check_now();
    cnt = '{0, 0, 0, 0, 7};        check_now();
    for (int t = 0; t < 2000; t++) begin
      automatic int range = (t % 2 == 0) ? 4 : 1024;
      for (int i = 0; i < GS; i++) cnt[i] = W'($urandom_range(range - 1));
      check_now();
    end
    if (n_tie == 0 || n_unique == 0) begin
      failures++;
      $display("FAIL coverage: ties=%0d unique=%0d", n_tie, n_unique);
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
