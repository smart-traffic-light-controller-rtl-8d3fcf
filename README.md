# Smart traffic light controller with flexible light period

A fixed-time traffic light gives every approach the same green time whatever
the queue. This controller runs the lights of two adjacent intersections from
one state machine and lets the green time of each group of movements follow
its congestion level: an empty approach gets no green at all, a jammed one up
to 60 s. Because both intersections share one cycle, movements that must flow
together turn green together.

The circuit is small: a 5-bit Moore state machine, one extra flag bit, and a
6-bit down counter that times the light periods. It is written in
synthesizable SystemVerilog and simulated with Verilator.

## Movements and phases

Eight traffic movements, L1 to L8, cross the two intersections. L3 and L7 are
minor roads; the others are main roads. Movements that can move at the same
time form a phase:

| Phase | Movements            | Green time set by | Green time            |
|-------|----------------------|-------------------|-----------------------|
| A     | L1, L5               | S1                | 0, 20, 40 or 60 s     |
| B     | L2, L4, L6, L8       | S2                | 0, 20, 40 or 60 s     |
| C     | L3, L7 (minor roads) | S3                | 15 s if S3 = 1, else none |

S1 and S2 are 2-bit congestion codes. Level 1 to level 4 are coded 00 to 11,
and code *c* gives 20·*c* seconds of green. S1 is the highest level among
L1 and L5. S2 is the highest level among L2, L4, L6 and L8. The top level
takes the six main-road levels as inputs and forms S1 and S2 itself. S3 is a
request bit from the minor roads. Where these levels come from (a traffic
estimator upstream) is outside this design.

The phases always run in the order A, B, C, A, ... Each green is followed by
3 s of yellow. A phase whose code is 00 is skipped: instead of green and
yellow it takes one all-red clock.

**L2 and L6 carry over into phase C.** L2 and L6 do not conflict with the
minor roads. When phase B has run and phase C follows, L2 and L6 stay green
through B's yellow and through the 15 s of C. Only L4 and L8 turn yellow and
then red. L2 and L6 then go yellow together with L3 and L7. When phase B was
skipped, phase C lights L3 and L7 alone.

**Each phase is decided when it starts.** The controller reads S1, S2 or S3
in the last clock before the phase begins. A change in congestion during a
phase does not shorten or stretch that phase. It takes effect the next time
that phase comes round. The flag that chooses between "phase C follows" and
"back to A" is taken from S3 in the last clock of B's green. Deciding it
then keeps B's yellow consistent with what comes after it.

## Lights

Each light is a 3-bit one-hot colour: `100` green, `010` yellow, `001` red.
The top's `lights` output is a packed array of eight such fields, with
`lights[0]` = L1 and `lights[7]` = L8. The enum `tl_pkg::movement_t` names
the indices.

## Timing: one clock is one second

The clock is the light-time base: one period equals one second. Drive `clk`
with a 1 Hz enable-derived clock, or divide a faster clock in front of it. A
period of T seconds lights its movements for exactly T clocks:

```
clock:   0      1      2     ...   T-2    T-1  | next phase
state:   LOAD   WAIT   WAIT  ...   WAIT   WAIT | LOAD ...
tEn:     1      0      0     ...   0      0    |
count:   x      T-1    T-2   ...   2      1    | 0
t_out:   0      0      0     ...   0      1    |
```

In the load clock the controller raises `tEn` and names the period on `tsel`.
The counter stores T−1, so the load clock counts as the first second. It
then counts down by one each clock. `t_out` is high in the clock where the
count is 1, the last second of the period. That same clock the controller
moves to the next phase's load step. The count stops at 0; it never wraps.

The counter selects its period from five constants: 60, 40, 20, 15 and 3 s.
They are the parameters `P_60 … P_3` of `tl_counter`, and each must be at
least 2. The `tsel` codes are 0 = 60 s, 1 = 40 s, 2 = 20 s, 3 = 15 s and
4 = 3 s. Any other code loads 3 s.

After reset the controller is in `ST_INIT` with all lights red. From there
one full cycle with every phase at 60 s and S3 set takes 1 + 60 + 3 + 60 +
3 + 15 + 3 = 145 clocks.

## State encoding

The 5-bit state code has two fields. Bits [4:3] give the phase: 00 = A,
01 = B, 10 = C, 11 = idle/skip. In phases A and B, bits [2:1] give the
period: 00 = 20 s, 01 = 40 s, 10 = 60 s, 11 = yellow. Bit 0 is 0 in the
one-clock load step and 1 in the wait step that follows.

In the table, `pp` is the period field of bits [2:1] (00, 01 or 10), and
`xx` in a state name is its period in seconds (for example `A_LD40` = 00010,
`A_G40` = 00011).

| Code  | State  | Lights lit                          |
|-------|--------|-------------------------------------|
| 11000 | ST_INIT| none (after reset)                  |
| 11001 | A_SKIP | none, S1 = 00                       |
| 11010 | B_SKIP | none, S2 = 00                       |
| 00pp0 / 00pp1 | A_LDxx / A_Gxx | L1, L5 green         |
| 00110 / 00111 | A_LDY / A_Y    | L1, L5 yellow        |
| 01pp0 / 01pp1 | B_LDxx / B_Gxx | L2, L4, L6, L8 green |
| 01110 / 01111 | B_LDY / B_Y    | L4, L8 yellow; L2, L6 yellow, or green if carried over |
| 10100 / 10101 | C_LD15 / C_G15 | L3, L7 green (+ L2, L6 if carried over) |
| 10110 / 10111 | C_LDY / C_Y    | L3, L7 yellow (+ L2, L6 if carried over) |

Any other code sends the machine back to `ST_INIT` on the next clock.

The colours depend on the state and on one more register bit, `b_into_c`.
This bit remembers whether L2 and L6 carry over. It is set from S3 at the
end of B's green. It is cleared when phase A starts or when B is skipped.

## Blocks

```
 lvl_l1,l5 ─┐                      ┌───────────────── tl_controller ───────────────┐
 lvl_l2,l4, ├─ tl_congestion_merge ┤ S1,S2 ─► tl_next_state ─► state reg ─► tl_output_logic ├─► lights[8]
 lvl_l6,l8 ─┘                      │ S3 ────►      ▲  (5 bit + b_into_c)  │      │ tEn, tsel
                                   └───────────────┼──────────────────────┘      │
                                          t_out    │         ┌────────────┐      │
                                                   └─────────┤ tl_counter │◄─────┘
                                                             └────────────┘
```

| File | Contents |
|------|----------|
| `rtl/tl_pkg.sv` | colour, level, `tsel` and state enums; movement indices |
| `rtl/tl_congestion_merge.sv` | S1 = max(L1, L5), S2 = max(L2, L4, L6, L8) |
| `rtl/tl_counter.sv` | five-way period selector, load selector, 6-bit down counter, `t_out` |
| `rtl/tl_next_state.sv` | combinational next-state logic and the `b_into_c` update |
| `rtl/tl_output_logic.sv` | combinational decode of state into lights, `tEn`, `tsel` |
| `rtl/tl_controller.sv` | state register around the two logic blocks; safety assertions |
| `rtl/smart_tlc.sv` | top level: merge, controller, counter |

The controller carries concurrent assertions for its safety rules:

- phase A is never lit (green or yellow) together with any movement of B or C;
- L3/L7 are never lit together with L4/L8;
- `tEn` is never high for two clocks in a row.

## Where this RTL departs from, or fills in, the original description

The phase grouping, the green times per code, the five periods, the
counter-plus-controller split, the 3-bit one-hot lights and the observed
state codes follow the original design. These points are this design's own
choices:

- **Red is `001`.** The original description gives red as `000`. Its
  simulation traces show `001`, and that value, which makes the code
  one-hot, is used here.
- **Level 1 (code 00) skips the phase in one all-red clock.** The original
  traces show a long all-red wait in the skip states `11001` and `11010`.
  Here the rule "0 s of green" is followed literally.
- **`tsel` is 3 bits wide,** since five periods need three bits. Some of the
  original drawings label this signal 2 bits. The numeric `tsel` encoding is
  this design's own.
- **Exact periods.** A phase of T seconds lasts exactly T clocks, including
  the load clock (see the timing diagram above).
- **The `b_into_c` flag** is added, so that L2/L6 can show two different
  colours in the same state code.
- **Yellow is 3 s** and phase C is 15 s, matching the two remaining periods
  of the counter.
- **Reset** is synchronous and active high.
- **Not modelled:** the traffic estimator that produces the levels, and the
  clock gating and scan chains inserted during synthesis. None of them
  changes the function.

## Verification

Each block has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M` at the end and has a watchdog.

| Testbench | What it checks |
|-----------|----------------|
| `tb_tl_congestion_merge` | all 4096 input combinations against a max search |
| `tb_tl_counter` | every period: count sequence, `t_out` in the last second only, rest at 0, mid-count reload |
| `tb_tl_output_logic` | all 32 codes × `b_into_c`, expected values derived from the code's bit fields |
| `tb_tl_next_state` | all 8192 combinations of state, flag, `t_out`, S1, S2, S3 |
| `tb_tl_controller` | the five reference cases below: state sequence, clocks per state, green seconds per movement, L2 carry-over of 20 + 3 + 15 s |
| `tb_smart_tlc` | whole design at default parameters (see below) |

`tb_tl_controller` replaces the counter with a small timer model.

The five reference cases are:

| Case | S1 | S2 | S3 | Expected |
|------|----|----|----|----------|
| 1 | 01 | 00 | 0 | L1/L5 green 20 s; everything else red |
| 2 | 00 | 10 | 0 | L2/L4/L6/L8 green 40 s |
| 3 | 11 | 01 | 0 | L1/L5 60 s, then L2/L4/L6/L8 20 s; L3/L7 red |
| 4 | 10 | 00 | 1 | L1/L5 40 s, then L3/L7 15 s; phase B red |
| 5 | 01 | 01 | 1 | L1/L5 20 s, L2/L4/L6/L8 20 s, then L2/L3/L6/L7 15 s |

`tb_smart_tlc` compares all eight lights, every clock, with a reference model
written at the level of phases and seconds. The model knows nothing of state
codes or the counter. The test has two parts:

1. The five reference cases, with a check on the first green time of each
   group.
2. 40 000 clocks with levels and S3 changing at random times.

The test counts each mechanism and fails if any never happened:

- each of the six green periods;
- both skip steps;
- phase C with and without the L2/L6 carry-over;
- phase C left out;
- a level change during a running phase.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/tl_pkg.sv rtl/*.sv \
          tb/tb_smart_tlc.sv --top-module tb_smart_tlc -Mdir obj_tb
./obj_tb/Vtb_smart_tlc
```

Put `tl_pkg.sv` first. For a block testbench, replace `tb_smart_tlc` with the
testbench's name. The full-design run takes well under a second.

To change a period, override the parameters of `tl_counter`, for example
`P_15` for the minor-road phase or `P_3` for yellow. The 20/40/60 s mapping
of the congestion codes lives in `tl_next_state` and `tl_output_logic`. The
`tsel` meaning lives in the `tsel_t` enum of `tl_pkg`.
