// control_unit: the presiding officer's side of the machine, which lets one
// voter at a time cast a programmable number of votes.
//
// Before the poll the officer sets `nvotes`, the number of votes each voter
// may cast: one per post, posts taken in order. For every voter the officer
// presses Ballot (`ballot`, rising edge detected here). The unit then enables
// the ballot unit (`ballot_en`, lighting its Ready LED) and expects a vote
// for post 1, i.e. a press of one of the candidates 1..GROUP_SIZE. A press of
// a candidate of the expected post is passed on as a one-cycle `vote` with
// the candidate `vote_cand` and the post `vote_grp` (the counter bank's n);
// the unit then expects the next post, or, after the nvotes-th vote,
// disables the ballot until the next Ballot press. Presses of candidates of
// other posts are ignored, so a voter cannot cast an invalid vote. The post
// currently expected is `cur_grp` (0 while the ballot is disabled).
//
// `cls` (Close) ends the poll: a voter in progress is cut off and Ballot is
// ignored while it is high. `clr` (Clear) resets the unit synchronously.
// nvotes = 0 keeps the ballot disabled; values above NUM_GROUPS act as
// NUM_GROUPS. nvotes is sampled at each Ballot press. `vote`, `vote_cand`
// and `vote_grp` are registered: they appear the cycle after `press`.
//
// From the original design: Ballot, Nvotes, Close and Clear, the post
// numbering n = 1, 2, 3 with candidates 1-5, 6-10 and 11-15, and the rule
// that only candidates of post n are counted. Chosen here: that n is the
// number of the vote a voter is casting, advanced by this unit, and the
// session handshake itself.
module control_unit
  import evm_pkg::*;
#(
  parameter int unsigned NUM_GROUPS = evm_pkg::DEF_NUM_GROUPS,
  parameter int unsigned GROUP_SIZE = evm_pkg::DEF_GROUP_SIZE,
  localparam int unsigned NUM_CAND  = NUM_GROUPS * GROUP_SIZE,
  localparam int unsigned CAND_W    = $clog2(NUM_CAND + 1),
  localparam int unsigned GRP_W     = $clog2(NUM_GROUPS + 1)
) (
  input  logic              clk,
  input  logic              clr,
  input  logic              cls,
  input  logic              ballot,
  input  logic [GRP_W-1:0]  nvotes,
  input  logic              press,
  input  logic [CAND_W-1:0] press_cand,
  output logic              ballot_en,
  output logic [GRP_W-1:0]  cur_grp,
  output logic              vote,
  output logic [CAND_W-1:0] vote_cand,
  output logic [GRP_W-1:0]  vote_grp
);

  typedef enum logic {IDLE, VOTING} state_t;

  state_t           state_q;
  logic             ballot_q;
  logic [GRP_W-1:0] grp_q;      // post expected next, 1-based
  logic [GRP_W-1:0] last_q;     // last post this voter may vote for
  logic             accept;

  assign accept = (state_q == VOTING) && !cls && press &&
                  cand_in_group(int'(press_cand), int'(grp_q), GROUP_SIZE);

  always_ff @(posedge clk) begin
    if (clr) begin
      state_q   <= IDLE;
      ballot_q  <= 1'b0;
      grp_q     <= '0;
      last_q    <= '0;
      vote      <= 1'b0;
      vote_cand <= '0;
      vote_grp  <= '0;
    end else begin
      ballot_q <= ballot;
      vote     <= 1'b0;
      unique case (state_q)
        IDLE: begin
          if (ballot && !ballot_q && !cls && nvotes != '0) begin
            state_q <= VOTING;
            grp_q   <= GRP_W'(1);
            last_q  <= (32'(nvotes) > NUM_GROUPS) ? GRP_W'(NUM_GROUPS) : nvotes;
          end
        end
        VOTING: begin
          if (cls) begin
            state_q <= IDLE;
            grp_q   <= '0;
          end else if (accept) begin
            vote      <= 1'b1;
            vote_cand <= press_cand;
            vote_grp  <= grp_q;
            if (grp_q == last_q) begin
              state_q <= IDLE;
              grp_q   <= '0;
            end else begin
              grp_q <= grp_q + 1'b1;
            end
          end
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  assign ballot_en = (state_q == VOTING);
  assign cur_grp   = grp_q;

  // A vote is only ever issued for the post it belongs to.
  a_vote_in_post : assert property (@(posedge clk) disable iff (clr)
    vote |-> cand_in_group(int'(vote_cand), int'(vote_grp), GROUP_SIZE));

endmodule
