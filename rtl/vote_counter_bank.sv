// vote_counter_bank: one vote counter per candidate, plus the total of
// votes cast.
//
// Candidates are numbered from 1 and grouped into NUM_GROUPS posts of
// GROUP_SIZE candidates each (post 1 = candidates 1-5, post 2 = 6-10,
// post 3 = 11-15 at the defaults). A vote is presented as a one-cycle
// strobe `vote` together with the candidate number `count` and the post
// number `n` the voter is currently voting for. On the rising clock edge
// the candidate's counter increments only if the poll is open (cls = 0) and
// the candidate belongs to post n; any other vote is ignored. `counted`
// tells, in the same cycle, whether the strobe will be counted.
//
// `clr` is a synchronous clear of every counter and has priority over a
// vote in the same cycle. Candidate counters are CNT_W bits wide and wrap
// around on overflow, as the original 10-bit counters do. The total counter
// saturates at its largest value.
//
// Follows the original design: 15 counters of 10 bits, selection of the
// counted range by n (01, 10, 11) and count, clear, and counting only while
// the poll is not closed. Chosen here: the vote strobe (the original
// increments on every clock edge while count is held), clear priority, and
// the total counter.
module vote_counter_bank
  import evm_pkg::*;
#(
  parameter int unsigned NUM_GROUPS = evm_pkg::DEF_NUM_GROUPS,
  parameter int unsigned GROUP_SIZE = evm_pkg::DEF_GROUP_SIZE,
  parameter int unsigned CNT_W      = evm_pkg::DEF_CNT_W,
  parameter int unsigned TOT_W      = evm_pkg::DEF_TOT_W,
  localparam int unsigned NUM_CAND  = NUM_GROUPS * GROUP_SIZE,
  localparam int unsigned CAND_W    = $clog2(NUM_CAND + 1),
  localparam int unsigned GRP_W     = $clog2(NUM_GROUPS + 1)
) (
  input  logic              clk,
  input  logic              clr,                 // clear all counts
  input  logic              cls,                 // poll closed
  input  logic              vote,                // one-cycle vote strobe
  input  logic [GRP_W-1:0]  n,                   // post being voted for, 1-based
  input  logic [CAND_W-1:0] count,               // candidate number, 1-based
  output logic              counted,             // this strobe is counted
  output logic [CNT_W-1:0]  cd [NUM_CAND],       // cd[i] = votes of candidate i+1
  output logic [TOT_W-1:0]  total                // votes cast in all posts
);

  assign counted = vote && !clr && !cls &&
                   cand_in_group(int'(count), int'(n), GROUP_SIZE);

  always_ff @(posedge clk) begin
    if (clr) begin
      for (int i = 0; i < NUM_CAND; i++) cd[i] <= '0;
      total <= '0;
    end else if (counted) begin
      cd[count - 1'b1] <= cd[count - 1'b1] + 1'b1;
      if (total != '1) total <= total + 1'b1;
    end
  end

endmodule
