// evm_pkg: sizes, glyph codes and small helper functions shared by the
// electronic voting machine.
//
// The machine counts votes for 15 candidates split into three posts
// (groups) of five: post 1 holds candidates 1-5, post 2 candidates 6-10 and
// post 3 candidates 11-15. Those sizes and the 10-bit vote counters follow
// the original design; the glyph encoding and the display modes are choices
// of this implementation.
package evm_pkg;

  // Default organisation of the ballot.
  localparam int unsigned DEF_NUM_GROUPS = 3;   // posts a voter can vote for
  localparam int unsigned DEF_GROUP_SIZE = 5;   // candidates per post
  localparam int unsigned DEF_CNT_W      = 10;  // bits per candidate counter
  localparam int unsigned DEF_TOT_W      = 14;  // bits of the total-votes counter
  localparam int unsigned NUM_DIGITS = 6;   // digits of the LED module

  // One display character: 0-9 are the decimal digits, then two symbols.
  typedef logic [3:0] glyph_t;
  localparam glyph_t GLYPH_E     = 4'hE;    // shown twice ("EE") for a tie
  localparam glyph_t GLYPH_BLANK = 4'hF;    // all segments off

  // Segment pattern, bit 6 = segment a ... bit 0 = segment g, 1 = lit.
  typedef logic [6:0] seg_t;

  // What the six-digit LED module shows.
  typedef enum logic [1:0] {
    DISP_WINNERS = 2'd0,   // winner of each post, two digits per post
    DISP_RESULT  = 2'd1,   // candidate number + its vote count
    DISP_TOTAL   = 2'd2    // total number of votes cast
  } disp_mode_t;

  // True when 1-based candidate number `cand` belongs to 1-based post `grp`
  // of a ballot with `gsize` candidates per post.
  function automatic logic cand_in_group(int unsigned cand, int unsigned grp,
                                         int unsigned gsize);
    return (grp != 0) && (cand > (grp - 1) * gsize) && (cand <= grp * gsize);
  endfunction

endpackage
