// max_comparator: finds the leading candidate of one post.
//
// The counters of the GROUP_SIZE candidates of a post are scanned in order,
// as in the original design: the running maximum starts at the first
// candidate's count; each later candidate with a larger count becomes the
// leader, and one with a count equal to the running maximum marks a tie.
// A later, larger count clears an earlier tie. The outputs are the largest
// count `max_val`, the 0-based position `win_idx` of the leader within the
// post, and `tie`, set when two or more candidates share the largest count
// (the display then shows "EE"). With all counts equal, including all zero,
// `tie` is set. Purely combinational: four "equal" and four "less than"
// comparisons per post at the default size.
module max_comparator
  import evm_pkg::*;
#(
  parameter int unsigned GROUP_SIZE = evm_pkg::DEF_GROUP_SIZE,
  parameter int unsigned CNT_W      = evm_pkg::DEF_CNT_W,
  localparam int unsigned IDX_W     = (GROUP_SIZE > 1) ? $clog2(GROUP_SIZE) : 1
) (
  input  logic [CNT_W-1:0] cnt [GROUP_SIZE],
  output logic [CNT_W-1:0] max_val,
  output logic [IDX_W-1:0] win_idx,
  output logic             tie
);

  always_comb begin
    max_val = cnt[0];
    win_idx = '0;
    tie     = 1'b0;
    for (int i = 1; i < GROUP_SIZE; i++) begin
      if (max_val < cnt[i]) begin
        max_val = cnt[i];
        win_idx = IDX_W'(i);
        tie     = 1'b0;
      end else if (max_val == cnt[i]) begin
        tie = 1'b1;
      end
    end
  end

endmodule
