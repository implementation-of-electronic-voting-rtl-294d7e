// display_mux: drives a multiplexed seven-segment LED module.
//
// The DIGITS segment patterns arrive in parallel (d[0] is the leftmost
// digit). One digit at a time is placed on the shared segment bus `seg`
// while its enable in the one-hot `an` is high; the module moves to the
// next digit every SCAN_DIV clock cycles and wraps from the rightmost back
// to the leftmost. At a 10 MHz clock the default gives 1 ms per digit, a
// 6 ms refresh. `seg` and `an` are registered, so they change together one
// cycle after the scan counter rolls over. `rst` restarts the scan at the
// leftmost digit.
//
// A multiplexed display follows the original design; the scan rate, the
// active-high enables and the digit order are choices made here.
module display_mux
  import evm_pkg::*;
#(
  parameter int unsigned DIGITS   = evm_pkg::NUM_DIGITS,
  parameter int unsigned SCAN_DIV = 10_000,
  localparam int unsigned DIV_W   = (SCAN_DIV > 1) ? $clog2(SCAN_DIV) : 1,
  localparam int unsigned SEL_W   = (DIGITS > 1) ? $clog2(DIGITS) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  seg_t              d [DIGITS],
  output seg_t              seg,
  output logic [DIGITS-1:0] an
);

  logic [DIV_W-1:0] div_q;
  logic [SEL_W-1:0] sel_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      div_q <= '0;
      sel_q <= '0;
    end else if (div_q == DIV_W'(SCAN_DIV - 1)) begin
      div_q <= '0;
      sel_q <= (sel_q == SEL_W'(DIGITS - 1)) ? '0 : sel_q + 1'b1;
    end else begin
      div_q <= div_q + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      seg <= '0;
      an  <= '0;
    end else begin
      seg <= d[sel_q];
      an  <= DIGITS'(1) << sel_q;
    end
  end

  // Exactly one digit is lit once the scan is running.
  a_onehot : assert property (@(posedge clk) disable iff (rst) $past(!rst) |-> $onehot(an));

endmodule
