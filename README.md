# Programmable electronic voting machine

Most electronic voting machines accept exactly one vote per voter. That fits
a parliamentary or assembly election. It does not fit a village council or
a co-operative society, where each voter elects several office holders on
one ballot. This design is a voting machine whose presiding officer sets how
many votes each voter casts. The ballot is split into posts (offices), and
each voter votes for posts 1, 2, ... in order, one candidate per post. The
machine accepts a button press only if the candidate stands for the post
the voter is voting for. An invalid ballot therefore cannot be cast.

At its default size the machine has 15 candidates in three posts of five,
a 10-bit counter per candidate, and a six-digit seven-segment display. By
default the display shows the current leader of each post. It can also step
through every candidate's count, or show the total number of votes cast.

## The ballot

| post (`n`) | candidates | buttons        |
|------------|------------|----------------|
| 1          | 1 – 5      | `sw[0]`–`sw[4]`   |
| 2          | 6 – 10     | `sw[5]`–`sw[9]`   |
| 3          | 11 – 15    | `sw[10]`–`sw[14]` |

Candidates are numbered from 1 everywhere in the interfaces, and post `p`
holds candidates `(p-1)*GROUP_SIZE+1 … p*GROUP_SIZE`. The helper
`evm_pkg::cand_in_group` states this rule once. Both the control unit and
the counter bank use it.

## How a poll runs

1. **Clear** (`clr` high for one or more cycles) sets every count to zero
   and resets the whole machine. `clr` is the only reset.
2. The officer sets **`nvotes`**. It gives the number of posts each voter
   votes for: 1, 2 or 3. A value of 0 keeps the ballot locked. Values above
   the number of posts are treated as that number.
3. For each voter the officer presses **Ballot** (`ballot`; the rising edge
   counts). The Ready LED lights, and the machine now expects a vote for
   post 1.
4. The voter presses a button. A press for a candidate of another post is
   ignored and the machine keeps waiting. A press for a candidate of the
   expected post is counted, and that candidate's LED and buzzer come on for
   half a second. The machine then expects the next post. After the
   `nvotes`-th vote, Ready goes out and every button is ignored until the
   next Ballot press.
5. **Close** (`cls` high) ends the poll. A voter in progress is cut off,
   nothing more is counted, and Ballot is ignored while Close is high.
6. **Result** (`result` high) shows each candidate's number and count in
   turn. **Total** (`total` high) shows the number of votes cast.

## The voter session (control_unit)

This is the part that makes the machine programmable. `control_unit` is a
two-state machine:

```
 IDLE --(Ballot rising edge, cls=0, nvotes!=0)--> VOTING, post := 1, last := min(nvotes, 3)
 VOTING --(cls)--> IDLE
 VOTING --(press of a candidate of `post`)--> vote strobe;
           post == last ? IDLE : post := post + 1
```

Every accepted press leaves the unit, one cycle after the press, as three
registered outputs:

- `vote`: a one-cycle strobe;
- `vote_cand`: the candidate;
- `vote_grp`: the post the vote was for.

The counter bank takes `vote_grp` as its `n` input. An assertion in the unit
checks that a vote always belongs to its post. `cur_grp` gives the post
expected next, and is 0 while the ballot is locked.

The counter bank checks the post again before it counts. It counts a strobe
only if the poll is open and the candidate belongs to post `n`. Because of
this second check the counter bank follows the counting rule of the original
design without depending on the control unit.

## Counting and the leader of each post

`vote_counter_bank` holds one `CNT_W`-bit counter per candidate and a
`TOT_W`-bit total.

- Candidate counters wrap at 1024 votes, as in the original 10-bit design.
- The total saturates at its maximum.
- Clear wins over a vote in the same cycle.

`max_comparator` is instantiated once per post. It scans the five counts in
order:

- The running maximum starts at the first candidate's count.
- A later, larger count becomes the new leader and clears the tie flag.
- A later count equal to the running maximum sets the tie flag.

At the end, `tie` is set exactly when two or more candidates share the
largest count. This includes an untouched post where every count is zero.
When `tie` is clear, `win_idx` gives the leader. Each post needs four
equality and four less-than comparisons.

## The six-digit display

`display_formatter` chooses what the six digits show. Digit 0 is the
leftmost.

| view    | selected by         | digits 0-1             | digits 2-3    | digits 4-5    |
|---------|---------------------|------------------------|---------------|---------------|
| winners | neither control     | leader of post 1       | leader of post 2 | leader of post 3 |
| result  | `result`            | candidate number       | its count, four decimal digits (2–5) | |
| total   | `total`, not result | blank                  | total votes cast, four decimal digits (2–5) | |

- In the winners view a shared lead shows as `EE`.
- A leading zero of a candidate number is blank, so candidate 3 shows as
  ` 3`.
- Values above 9999 show as 9999.
- In the result view the display starts at candidate 1 when `result` rises
  and moves on every `RESULT_HOLD` cycles. After the last candidate it wraps
  to the first.

Counts are converted to decimal with the shift-and-add-3 method in
`bin2bcd`.

`seven_segment_encoder` maps characters to segments: bit 6 is segment a,
bit 0 is segment g, and 1 lights the segment.

| char | pattern | char | pattern |
|------|---------|------|---------|
| 0 | 1111110 | 6 | 1011111 |
| 1 | 0110000 | 7 | 1110000 |
| 2 | 1101101 | 8 | 1111111 |
| 3 | 1111001 | 9 | 1111011 |
| 4 | 0110011 | E | 1001111 |
| 5 | 1011011 | blank | 0000000 |

The six patterns are available in parallel on `evm_top.d`. `display_mux`
also time-multiplexes them onto one segment bus `seg` with one-hot,
active-high digit enables `an`. It moves to the next digit every `SCAN_DIV`
cycles. Its outputs are registered, so `seg` shows the pattern each digit
had one cycle earlier.

## The ballot panel (ballot_unit)

There is one active-high push button per candidate. Each button passes
through a two-flip-flop synchroniser. A press is reported as a one-cycle
`press` with `press_cand`. It is reported when the buttons go from all
released to exactly one held.

- Two buttons pressed together report nothing.
- A button must be released before the next press can be seen.
- There is no further debounce filter, and none is needed for correct
  counting. A bounce that shows as a fresh press names a candidate of a
  post already voted for. The machine then waits for another post, or is
  locked, so it ignores that press, and an ignored press gets no LED or
  beep.

The control unit answers a counted vote with `vote_ok` / `vote_cand`. The
panel then lights that candidate's LED and buzzer for `CONFIRM_CYCLES`
cycles. `ready_led` is the control unit's `ballot_en`.

## Timing

The timing parameters assume a 10 MHz clock:

| parameter        | default    | meaning at 10 MHz            |
|------------------|------------|------------------------------|
| `CONFIRM_CYCLES` | 5 000 000  | LED and buzzer on for 0.5 s  |
| `RESULT_HOLD`    | 10 000 000 | 1 s per candidate in result view |
| `SCAN_DIV`       | 10 000     | 1 ms per digit, 6 ms refresh |

Latency from a button closing:

1. The press is seen after two clock edges.
2. The vote strobe follows one edge later.
3. The counter, the LED and the buzzer change at the fourth edge.
4. The winners view follows combinationally.

All controls are synchronous to `clk`. Drive `ballot`, `cls`, `clr`,
`result` and `total` from synchronised, debounced signals.

## Parameters of evm_top

| parameter    | default | notes |
|--------------|---------|-------|
| `NUM_GROUPS` | 3  | posts; also the largest useful `nvotes` |
| `GROUP_SIZE` | 5  | candidates per post |
| `CNT_W`      | 10 | bits per candidate counter |
| `TOT_W`      | 14 | bits of the total |

The display always has six digits. With more than three posts, only the
first three leaders appear in the winners view. With more than 99
candidates, candidate numbers no longer fit in two digits.

## Files

| file | contents |
|------|----------|
| `rtl/evm_pkg.sv` | default sizes, character codes, display-mode enum, `cand_in_group` |
| `rtl/evm_top.sv` | the machine |
| `rtl/ballot_unit.sv` | buttons, Ready LED, confirmation LED and buzzer |
| `rtl/control_unit.sv` | voter session |
| `rtl/vote_counter_bank.sv` | candidate counters and total |
| `rtl/max_comparator.sv` | leader and tie of one post |
| `rtl/display_formatter.sv` | winners / result / total views |
| `rtl/bin2bcd.sv` | binary to decimal digits |
| `rtl/seven_segment_encoder.sv` | character to segments |
| `rtl/display_mux.sv` | multiplexed digit scan |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_evm_full.sv` | one voter at the default sizes and timing |

## Simulating

Verilator 5 finds each module in `rtl/` from its file name. Run from the
project root:

```
verilator --binary --timing --assert -Irtl rtl/evm_pkg.sv tb/tb_evm_top.sv \
          --top-module tb_evm_top
./obj_dir/Vtb_evm_top
```

Replace `tb_evm_top` with any other testbench name. Each testbench prints
`TB_RESULT checks=N failures=M` and stops. A watchdog ends a run that
hangs.

- `tb_evm_top` runs an election of 60 random voters with short timing
  parameters. It mixes in wrong-post presses, two-button presses, a poll
  closed in the middle of a voter, and a Ballot press while closed. At every
  step it compares the counts, the leaders, the result and total views, the
  multiplexed outputs and the confirmation LEDs with a tally kept in the
  testbench. It also counts how often each mechanism occurred, and fails if
  one never did.
- `tb_evm_full` uses the default parameters: one voter with three votes,
  the 0.5 s confirmation, the 1 ms scan and the 1 s result step. It takes
  about 25 million cycles, roughly 15 s.
- The module testbenches use random stimulus against reference models, plus
  corner cases. These include the 10-bit counter wrap, ties, clamping at
  9999, and simultaneous button presses.

## Relation to the original design

This RTL follows a VHDL design of the same machine. The following come from
it:

- the 15 candidates in three posts of five;
- the 10-bit counters;
- counting only candidates of post `n`, and only while the poll is not
  closed;
- Clear;
- the leader search per post, with `EE` for a tie;
- the segment patterns;
- the six-digit display with a two-digit candidate number and a four-digit
  count;
- the officer's Ballot, Nvotes, Close, Result and Total controls;
- a panel with per-candidate LED and buzzer and a Ready LED.

The original panel has 20 buttons. `ballot_unit` keeps 20 as its default,
and the machine uses one button per candidate.

Choices made here, where the original does not specify, or where this RTL
departs from it:

- **Vote strobe instead of a held code.** The original counts on every
  clock edge while a candidate code is held. Here a button press produces a
  single strobe.
- **Meaning of `n`.** Here `n` is the number of the vote a voter is
  casting, advanced by the control unit after each vote. `nvotes` limits
  it. The whole session logic of `control_unit` is this design's own.
- **Tie rule.** The original comparison chain stops at the first candidate
  that equals or exceeds the running maximum, so a larger count further on
  can be missed. Here all candidates of a post are scanned.
- **Digit 0.** Candidate 10 shows as `10`. The original blanks the units
  digit.
- **Output timing.** The original registers its display outputs. Here the
  digit patterns are combinational from the counters.
- **Views and priority.** How the result view picks a candidate (automatic
  stepping), the total view layout, and Result taking priority over Total
  are this design's own.
- **Ballot panel.** The synchroniser, the single-press rule and all timing
  values are this design's own.
- **Clear and reset.** Clear wins over a vote in the same cycle, and it is
  the only reset.

Not included:

- **Non-volatile storage of the results.** Counts live in registers and
  are lost at power-off.
- **Weighted preferences.** There is no weighting of ranked preferences;
  every vote counts as one.
- **Elections with more posts than `NUM_GROUPS`.** For example, a
  co-operative society election in which each voter chooses nine office
  holders needs `NUM_GROUPS = 9`. That means 45 candidates at five per post,
  and a wider display for the winners view.
