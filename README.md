# SSg(comp) load value predictor with outcome-history confidence

A load that misses in the caches can hold up every instruction that depends on it for dozens
of cycles. About half of all dynamic loads in integer code fetch the same value they fetched
the previous time they executed, so a processor that supports speculation can guess that
value, carry on, and check the guess when the real value arrives. A wrong guess costs a
recovery, so the useful question is not "what is the value?" but "should we trust the guess
this time?".

This design answers that with a *prediction outcome history*. Each load instruction, through
the table line its PC maps to, keeps a short shift register that records whether the last
value guess would have been right on each of its most recent executions. The history is then
used as the address of a 1-bit-per-entry decision table. That table is filled in off-line
from profile runs: a history pattern gets a 1 when, in the profile, it was followed by a
correct guess at least as often as a chosen confidence threshold. The value predictor itself
is as simple as possible: it always predicts the last value. All of the intelligence sits in
the confidence estimator. The structure mirrors a two-level branch predictor with
per-address histories and a single global pattern table (the "SSg" organisation), where the
pattern table is programmed from profiles rather than by saturating counters.

## Structure

```
                 pc bits [IDX_BITS+1:2]
  pred_pc / upd_pc ─────────────┐
                                 ▼
                    ┌──────────────────────────────┐
                    │ lvp_table: 2^IDX_BITS lines   │
                    │   { history[HIST_BITS-1:0],   │
                    │     last value[VALUE_W-1:0] } │
                    └──────┬───────────────┬───────┘
                  history  │               │ last value
                           ▼               ▼
                 ┌─────────────────┐    pred_value
                 │ decision_rom    │
                 │ 2^HIST_BITS x 1 │──► pred_predict
                 └─────────────────┘
   update path:  history_update compares upd_value with the stored last value,
                 shifts the outcome into the history, and both are written back.
```

| file | what it is |
|---|---|
| `rtl/ssg_lvp_pkg.sv` | default sizes, the port-operation enum |
| `rtl/lvp_table.sv` | direct-mapped table of {history, last value}; index function; clearing after reset |
| `rtl/history_update.sv` | outcome compare and history shift |
| `rtl/decision_rom.sv` | the programmable 1-bit pattern table |
| `rtl/ssg_lvp.sv` | top: port arbitration, registered results |

Default sizes: 2048 lines (`IDX_BITS = 11`), 14-bit histories (`HIST_BITS = 14`), 64-bit values
(`VALUE_W = 64`), 64-bit PC (`PC_W = 64`, of which only bits 12..2 are used). That is
2048 × 78 = 159,744 table bits, 21.9% more than a bare last value table of the same
number of entries (12.5% more with 8-bit histories), plus a 16,384-bit decision table. Everything is parameterised; the other
sizes the predictor was studied at (128 to 8192 lines, 2- to 14-bit histories) are parameter
changes.

## The table line

* **Index.** `index = PC[IDX_BITS+1:2]`, i.e. PC div 4 mod 2^IDX_BITS. The two low bits are
  dropped because instructions are word aligned.
* **No tags, no valid bits.** Loads whose PCs share the index bits share a line, history and
  value alike. A predictor may be wrong occasionally without harm, and tags were found to
  buy almost nothing, so they are left out. This also means no associative lookup is needed.
* **History encoding.** Bit 0 is the newest outcome. Written MSB first, a history reads
  oldest to newest: `0001` means three wrong guesses followed by a right one. `1` = the
  value that came back equalled the stored last value.
* **Update rule.** When a load's true value is known: `correct = (true == stored)`,
  `history = {history[HIST_BITS-2:0], correct}`, `stored = true`. The update is applied for
  *every* load, whether or not a prediction was used for it. The history describes how a
  last value guess would have fared; if only used predictions were recorded, a line stuck
  at a low-confidence pattern could never climb out of it.
* **Clearing.** After reset every line is zeroed, one line per clock cycle. `ready` goes high
  after 2^IDX_BITS cycles (2048 by default), and no request is granted before then.

## Programming the decision table

The decision table holds one bit per history pattern, and it alone sets the trade-off
between *accuracy* (the fraction of predictions made that are right) and *coverage* (the
fraction of correctly predictable loads that are actually predicted). The procedure is:

1. Run representative programs with a last value predictor of the same geometry. For every
   history pattern, record how often the next guess was right.
2. Pick a threshold. Write a 1 for every pattern whose success rate reaches it, and a 0
   everywhere else.

Typical behaviour, measured over SPECint95 with 4-bit histories, is very lopsided. About 32%
of loads see `0000`, which is followed by a right guess only ~7% of the time. About 38% see
`1111`, which is followed by a right guess ~97% of the time. The fourteen mixed patterns
share the rest. With that profile:

| threshold | patterns that predict | loads predicted | expected accuracy |
|---|---|---|---|
| 96.6 % | `1111` | 38.3 % | 96.6 % |
| 86 % | `1111` | 38.3 % | 96.6 % |
| 65 % | `1010 1011 1111` | 42.1 % | 93.8 % |
| 50 % | `0111 1010 1011 1100 1101 1110 1111` | 50.0 % | 87.8 % |

The right threshold depends on the processor, not the program:

* With a **re-fetch** recovery, a wrong guess flushes everything after the load. The best
  14-bit setting was a threshold of about 86%, which selects about 150 of the 16,384
  patterns.
* With a **re-execute** recovery, only dependent instructions are replayed, so more guesses
  pay off. The best setting was about 65%, which selects about 2,500 patterns.

Because the selected patterns turned out to be nearly the same whichever programs were
profiled, the table is meant to be written once per processor design. Here it has a
one-bit write port (`rom_prog_we/addr/data`) so that one netlist can take any setting.
**It has no reset and no built-in contents: write all 2^HIST_BITS entries before you use
`pred_predict`.** A shorter history can be emulated by writing the same bit to every entry
that agrees in the low bits. For example, for an 8-bit setting, entry `h` gets the 8-bit
table's bit at `h[7:0]`.

## Interface and timing

All outputs are registered except the two grants and `pred_busy`. The clock is `clk`.
`rst_n` is asynchronous and active low.

**Lookup.** Hold `pred_req` with `pred_pc`. In the cycle where `pred_gnt` is high, the line
and its decision-table entry are both read: two table lookups back to back, in one cycle.
In the next cycle `pred_valid` is high with:

* `pred_value`: the guess;
* `pred_predict`: use it or not;
* `pred_hist` and `pred_index`: for debugging or statistics.

At most one lookup is made per cycle.

**Update.** Hold `upd_req` with `upd_pc` and `upd_value` (the value the load really
fetched). In the cycle where `upd_gnt` is high, the line is read and compared, and the new
history and value are written at the end of that cycle. In the next cycle `upd_done` is
high, and `upd_correct` gives the outcome that was shifted in.

**Sharing the port.** The table has a single port. An update occupies it for its cycle, so a
lookup in that cycle is refused (`pred_busy`) and must be retried. Updates always win over
lookups. Since only about one instruction in five is a load, free cycles for updates are
normally plentiful.

```
cycle        0          1          2          3
pred_req     1          1          1          0
upd_req      0          1          0          0
pred_gnt     1          0 (busy)   1          0
upd_gnt      0          1          0          0
pred_valid   0          1          0          1
upd_done     0          0          1          0
```

**Lines awaiting an update.** A lookup may hit a line whose previous load has not been
updated yet. It then uses whatever the line holds; lines are not locked. Loads rarely switch
between predictable and unpredictable, and the same line is typically revisited only after
dozens of other loads, so stale information is rarely wrong. (The other option would be to
mark lines "in use" and stall; it is not built.)

## What is outside this RTL

* **The processor.** This includes the pipeline that issues `pred_pc`, uses the guess
  speculatively, compares it with the real value, and recovers by re-fetch or re-execute. The
  predictor only needs the load PC at lookup time, and the PC and true value at update time.
  Because the PC is known from fetch onward, a lookup can be issued early, and the result
  can even be spread over the fetch and decode stages.
* **Profiling.** Working out the decision-table contents is a software step; see above.
* **Wider prediction.** Several lookups per cycle would need replicated predictors that are
  updated together. This is not built.

## Choices made here

The behaviour follows the predictor's published description: the direct-mapped tagless
table, the index function, the update rule and bit order, the 1-bit pattern table indexed
by the history, one prediction per cycle, the busy cycle taken by an update, clearing the
table before use, and using stale lines rather than stalling. The following are this
design's own choices:

* the request/grant handshake;
* one cycle from grant to result, with combinational reads of both tables in the grant
  cycle;
* update-over-lookup priority;
* clearing line by line after reset;
* the 64-bit PC width;
* the programming port of the decision table, and the fact that it has no reset.

## Verification

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|---|---|
| `tb/ssg_lvp_tb.sv` | Full default sizes. A reference model of the table and pattern table checks every lookup result and update outcome, as well as the contents of all 2048 lines at the end. The stream covers 48 load sites that are constant, rarely changing, alternating or random, with aliased PCs and updates arriving 1–8 cycles after their lookups. It checks that `ready` rises exactly 2048 cycles after reset, and that nothing is granted before. It also counts that every mechanism occurred: busy refusals, refusals during clearing, predictions made and withheld, both outcomes, lookups of lines awaiting an update, aliasing, and saturated all-ones histories. It prints the accuracy, coverage and potential of the stream. |
| `tb/ssg_lvp_table41_tb.sv` | 4-bit histories programmed from the profile above at the four thresholds. It steers one load through all 16 histories, checks every decision bit, and checks the pattern counts and the 38.3% coverage. |
| `tb/ssg_lvp_hist8_tb.sv` | The default 14-bit predictor, programmed to look only at the newest 8 outcomes, runs side by side with an 8-bit-history build on the same 20,000-load stream; decisions, values and update outcomes must agree throughout. |
| `tb/lvp_table_tb.sv` | Index function, aliasing, clearing timing and contents, ignored writes during clearing, read-after-write. |
| `tb/history_update_tb.sv` | The shift rule at 14 and 4 bits, and the bit order (`F,F,F,S` gives `0001`). |
| `tb/decision_rom_tb.sv` | Programs and reads back all 16,384 entries, three times. |

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl --top-module ssg_lvp_tb \
    rtl/ssg_lvp_pkg.sv rtl/lvp_table.sv rtl/history_update.sv \
    rtl/decision_rom.sv rtl/ssg_lvp.sv tb/ssg_lvp_tb.sv
./obj_dir/Vssg_lvp_tb
```

The full-size run takes well under a second. The testbenches use `$urandom` and need no
data files. Lint (`verilator --lint-only -Wall`) reports only unused bits: the PC bits
outside the index, and the oldest history bit, which is shifted out. It also reports the
assertions' synchronous use of the asynchronous reset.
