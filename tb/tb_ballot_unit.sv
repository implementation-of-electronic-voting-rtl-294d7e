// Testbench for ballot_unit with the 20-button panel and a confirmation
// time of 7 cycles. It checks: one press pulse, with the right candidate,
// two clock edges after a single button closes; none while it is held or when
// two buttons close together; none until all buttons are released; the
// confirming LED and buzzer for exactly CONFIRM cycles after vote_ok; and
// the Ready LED following enable.
module tb_ballot_unit;
  localparam int NSW = 20, CONF = 7;

  int checks = 0, failures = 0;
  int n_single = 0, n_double = 0, n_confirm = 0;
  logic clk = 0, rst, enable, vote_ok, press, ready_led;
  logic [NSW-1:0] sw, led, buz;
  logic [4:0] vote_cand, press_cand;
  int presses_seen = 0;
  int last_cand = 0;

  ballot_unit #(.NUM_SW(NSW), .CONFIRM_CYCLES(CONF)) dut (
    .clk(clk), .rst(rst), .sw(sw), .enable(enable), .vote_ok(vote_ok),
    .vote_cand(vote_cand), .press(press), .press_cand(press_cand),
    .ready_led(ready_led), .led(led), .buz(buz));

  always #5 clk = ~clk;

  always @(posedge clk) if (!rst && press) begin
    presses_seen++;
    last_cand = int'(press_cand);
  end

  task automatic expect_press(int n_exp, int cand, string what);
    checks++;
    if (presses_seen != n_exp || (n_exp > 0 && last_cand != cand)) begin
      failures++;
      $display("FAIL %s: %0d presses (cand %0d), expected %0d (cand %0d)",
               what, presses_seen, last_cand, n_exp, cand);
    end
    presses_seen = 0;
  endtask

  initial begin
    rst = 1; sw = '0; enable = 0; vote_ok = 0; vote_cand = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 60; t++) begin
      automatic int k = $urandom_range(NSW - 1);
      automatic bit two = $urandom_range(3) == 0;
      automatic int k2 = (k + 1 + $urandom_range(NSW - 2)) % NSW;
      enable = $urandom_range(1);
      @(negedge clk);
      sw[k] = 1'b1;
      if (two) sw[k2] = 1'b1;
      // A press shows after the second clock edge and lasts one cycle.
      @(posedge clk);
      #1;
      checks++;
      if (press) begin failures++; $display("FAIL press too early"); end
      @(posedge clk); #1;
      checks++;
      if (press !== !two || (!two && int'(press_cand) != k + 1)) begin
        failures++;
        $display("FAIL press=%0d cand=%0d for k=%0d two=%0d", press, press_cand, k + 1, two);
      end
      checks++;
      if (ready_led !== enable) begin failures++; $display("FAIL ready led"); end
      repeat (5) @(posedge clk);
      // While still held, a second button adds no new press.
      if (!two) sw[k2] = 1'b1;
      repeat (5) @(posedge clk);
      sw[k2] = 1'b0;
      repeat (5) @(posedge clk);
      expect_press(two ? 0 : 1, k + 1, "hold");
      if (two) n_double++; else n_single++;
      sw = '0;
      repeat (4) @(posedge clk);
      expect_press(0, 0, "release");

      // Confirmation of a registered vote.
      if (!two) begin
        @(negedge clk);
        vote_ok = 1; vote_cand = 5'(k + 1);
        @(negedge clk);
        vote_ok = 0; vote_cand = '0;
        for (int c = 0; c < CONF + 3; c++) begin
          automatic logic [NSW-1:0] e = (c < CONF) ? NSW'(1) << k : '0;
          checks++;
          if (led !== e || buz !== e) begin
            failures++;
            $display("FAIL confirm cycle %0d: led=%b expected %b", c, led, e);
          end
          @(negedge clk);
        end
        n_confirm++;
      end
    end
    if (n_single == 0 || n_double == 0 || n_confirm == 0) begin
      failures++;
      $display("FAIL coverage single=%0d double=%0d confirm=%0d", n_single, n_double, n_confirm);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
