// Testbench for display_mux: six random digit patterns, a scan divider of 3.
// The reference tracks which digit should be lit from the number of clock
// cycles since reset; every cycle the segment bus and the one-hot enables
// are compared with it. The patterns change part-way through, and a second
// reset must restart the scan at the leftmost digit.
module tb_display_mux;
  import evm_pkg::*;
  localparam int DG = 6, DIV = 3;

  int checks = 0, failures = 0, wraps = 0;
  logic clk = 0, rst;
  seg_t d [DG];
  seg_t seg;
  logic [DG-1:0] an;

  display_mux #(.DIGITS(DG), .SCAN_DIV(DIV)) dut (
    .clk(clk), .rst(rst), .d(d), .seg(seg), .an(an));

  always #5 clk = ~clk;

  task automatic run(int cycles);
    // cycle k after reset (k = 1 at the first edge with rst low) shows the
    // digit selected during cycle k-1.
    for (int k = 1; k <= cycles; k++) begin
      int sel = ((k - 1) / DIV) % DG;
      if (k > 1 && sel == 0 && (k - 1) % (DIV * DG) == 0) wraps++;
      @(posedge clk);
      #1;
      checks++;
      if (an !== DG'(1 << sel) || seg !== d[sel]) begin
        failures++;
        $display("FAIL cycle %0d: an=%b seg=%b expected an=%b seg=%b",
                 k, an, seg, DG'(1 << sel), d[sel]);
      end
      if (k == cycles / 2) foreach (d[i]) d[i] = seg_t'($urandom);
    end
  endtask

  initial begin
    foreach (d[i]) d[i] = seg_t'($urandom);
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    checks++;
    if (an !== '0) begin failures++; $display("FAIL: digits lit during reset"); end
    run(100);
    rst = 1;
    @(posedge clk);
    #1 rst = 0;
    run(40);
    if (wraps == 0) begin failures++; $display("FAIL: scan never wrapped"); end
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
