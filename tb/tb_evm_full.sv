// Full-size testbench for evm_top at its default parameters (10 MHz clock
// assumed: half-second confirmation, one second per candidate in the result
// view, 1 ms per display digit). One voter casts three votes, one per post;
// the counts, the confirmation LED time, the winners view, the first two
// steps of the result view, the total view and the digit scan period are
// checked.
module tb_evm_full;
  import evm_pkg::*;
  localparam longint CONF = 5_000_000, HOLD = 10_000_000, DIV = 10_000;

  int checks = 0, failures = 0;
  logic clk = 0, clr, cls, ballot, result, total;
  logic [1:0] nvotes, cur_grp;
  logic [14:0] sw, led, buz;
  logic ready_led;
  logic [9:0]  cd [15];
  logic [13:0] tot;
  logic [9:0]  max_val [3];
  disp_mode_t  mode;
  logic [3:0]  shown;
  seg_t        d [6];
  seg_t        seg;
  logic [5:0]  an;

  evm_top dut (
    .clk(clk), .clr(clr), .cls(cls), .ballot(ballot), .result(result), .total(total),
    .nvotes(nvotes), .sw(sw), .ready_led(ready_led), .led(led), .buz(buz),
    .cur_grp(cur_grp), .cd(cd), .tot(tot), .max_val(max_val), .mode(mode),
    .shown(shown), .d(d), .seg(seg), .an(an));

  always #5 clk = ~clk;

  // Segment patterns written out from the segments each character lights.
  localparam seg_t S0 = 7'b1111110, S1 = 7'b0110000, S2 = 7'b1101101, S3 = 7'b1111001,
                   S7 = 7'b1110000, SE = 7'b1001111, SB = 7'b0000000;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic vote_for(int c);
    @(negedge clk) sw = 15'(1) << (c - 1);
    repeat (5) @(negedge clk);
    sw = '0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    clr = 1; cls = 0; ballot = 0; result = 0; total = 0; nvotes = 3; sw = '0;
    repeat (3) @(negedge clk);
    clr = 0;
    @(negedge clk);
    check(d[0] == SE && d[1] == SE && d[4] == SE && d[5] == SE, "empty poll shows EE");

    @(negedge clk) ballot = 1;
    @(negedge clk) ballot = 0;
    @(negedge clk);
    check(ready_led && cur_grp == 1, "ballot enabled for post 1");
    vote_for(3);
    check(led == 15'(1) << 2 && buz == led, "candidate 3 confirmed");
    vote_for(7);
    vote_for(12);
    check(!ready_led && cur_grp == 0, "ballot disabled after three votes");
    check(cd[2] == 1 && cd[6] == 1 && cd[11] == 1 && tot == 3, "three votes counted");

    // Candidate 12's confirmation lasts CONF cycles from its vote.
    begin
      automatic longint start = longint'($time / 10);
      wait (led == 0);
      if (!(longint'($time / 10) - start > CONF - 10 && longint'($time / 10) - start <= CONF))
        $display("confirmation lasted %0d cycles after the vote", longint'($time / 10) - start);
      check(longint'($time / 10) - start > CONF - 10 && longint'($time / 10) - start <= CONF,
            "confirmation time");
    end
    @(negedge clk);
    check(d[0] == SB && d[1] == S3 && d[2] == SB && d[3] == S7 && d[4] == S1 && d[5] == S2,
          "winners 3, 7, 12");

    // Digit scan: the enabled digit changes every DIV cycles.
    begin
      logic [5:0] a0;
      longint t1;
      @(negedge clk) a0 = an;
      wait (an != a0);
      t1 = longint'($time / 10);
      a0 = an;
      wait (an != a0);
      check(longint'($time / 10) - t1 == DIV, "scan period");
    end

    // Result view: candidate 1 for HOLD cycles, then candidate 2.
    @(negedge clk) result = 1;
    #1;
    check(d[0] == SB && d[1] == S1 && d[2] == S0 && d[3] == S0 && d[4] == S0 && d[5] == S0,
          "result candidate 1");
    repeat (HOLD - 1) @(negedge clk);
    check(shown == 0, "candidate 1 held");
    @(negedge clk);
    check(shown == 1 && d[1] == S2, "candidate 2 after one hold time");
    result = 0;

    @(negedge clk) total = 1;
    #1;
    check(d[0] == SB && d[1] == SB && d[2] == S0 && d[3] == S0 && d[4] == S0 && d[5] == S3,
          "total 0003");
    total = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
