# Coin exchange machine: a datapath state machine (FSMD)

A machine takes in up to 100 coins of 1, 5, 10 and 20 NOK and gives their value back as
the largest bills possible (50, 100, 200, 500 NOK, in unlimited supply) plus the fewest
coins, using only coins it has taken in. Its state space is far too large for one
state table: the amount alone can take 2001 values, and each coin count 101. So the
design splits into a **control FSM with three states** and a **datapath** of registers
that do the arithmetic. The FSM reads the datapath's status (coin counts, amount) and
sends it commands (count, clear, pay one item). This FSM-plus-datapath split is the
main idea of the design.

Four small register examples sit next to the machine: a registered counter, an edge
detector that does not clock on the signal, an enable register, and a repeated-addition
state. Each is independent of the others.

All RTL is synthesizable SystemVerilog (IEEE 1800-2017), with one module or package per file.

## Structure of the exchange machine

```
            coin_sens, in01..in20                  ready, accept_coin, out01..out500
                   |                                            ^
                   v                                            |
           +----------------------------- control_fsm ----------------------------+
           |  idle -> count -> pay -> idle      coins = count01+count05+count10+count20 |
           +--------------------------------------------------------------------------+
              ^ count01..count20, amount             | accept_coin, outXX,
              |                                      v reset_counters, reset_amount
   +---------------------------------- datapath -------------------------------------+
   |  coin_counter x4 (counter01, counter05, counter10, counter20)                    |
   |  amount_calc: A <- A + coin value  |  A <- A - paid value  |  A <- 0              |
   +----------------------------------------------------------------------------------+
```

| Module | Role |
|---|---|
| `exchange_pkg` | Sizes (7-bit counters, 11-bit amount, 100-coin limit), state type, denomination values |
| `coin_counter` | Count of one coin type held. Up on `inc && accept`, down on `dec`, cleared on `zero`; one instance per coin type |
| `amount_calc` | Amount A owed to the customer. Adds the accepted coin, subtracts the dispensed item, clears on `zero` |
| `control_fsm` | The three-state controller. Also sums the four counts into the coin total |
| `exchange_machine` | Structural top that wires the above together |

Wiring. Each counter counts up on its own `inXX` while `accept_coin` is high. It counts
down on the matching `outXX`, because a paid coin leaves the machine. `reset_counters`
clears it. `amount_calc` sees every `inXX` and every `outXX`. `reset_amount` clears it.

The coin total is summed inside the FSM, not in the datapath. The FSM is the only
block that uses it, so this keeps the datapath modules to one purpose each.

## The control FSM

| State | Outputs (Mealy, from state and datapath status) | Leaves when |
|---|---|---|
| `idle` | `ready` (green LED), `reset_counters`, `reset_amount` | `coin_sens` → `count` |
| `count` | `accept_coin` while coins held < 100 | coins ≥ 100, or no `inXX` this cycle → `pay` |
| `pay` | exactly one `outXX` per clock (see below) | amount = 0 → `idle` |

In `pay`, the item dispensed this clock is the first rule that applies:

1. A ≥ 500 → `out500`; A ≥ 200 → `out200`; A ≥ 100 → `out100`; A ≥ 50 → `out50` (bills are always available)
2. A ≥ 20 and a 20 NOK coin is held → `out20`
3. A ≥ 10 and a 10 NOK coin is held → `out10`
4. A ≥ 5 and a 5 NOK coin is held → `out05`
5. A ≥ 1 → `out01`

On the same clock edge, the datapath subtracts the item's value from A and decrements
the matching coin counter. Each payout decision is therefore based on the up-to-date
amount and counts.

**Limitation, kept on purpose.** Rule 5 does not check that a 1 NOK coin is held.
Suppose a customer inserts three 20 NOK coins. The machine pays a 50 NOK bill, and
10 NOK is left. It holds no 10, 5 or 1 NOK coin, so it asks for ten 1 NOK coins, and
the 1 NOK counter wraps below zero. The amount still reaches zero, and the
transaction ends correctly in the controller. The original rules behave this way,
and this design keeps that behaviour. The 3 × 20 NOK case in the testbenches runs
into it. A real machine would need a coin float or a refusal path. Neither is
specified, so neither is built.

### Timing of one transaction

One coin arrives per clock. The coin sensor and coin type detector are outside the design.

| Clock | State | What happens |
|---|---|---|
| 1 | idle | `coin_sens` high → next state `count` |
| 1 per coin | count | one of `in01..in20` high; counted if `accept_coin` |
| 1 | count | no coin present (or limit reached) → `pay` |
| 1 per item | pay | one `outXX` high; A and the counter step down |
| 1 | pay | A = 0, no output → `idle` |

The total is 3 + (coins accepted) + (items paid) clocks. If a 101st coin is offered,
`accept_coin` is low in that cycle. The coin is refused, and the FSM goes to `pay` on
the same edge. Only coins presented while the FSM is in `count` are counted. The
amount is held at zero in `idle`.

Widths. 100 coins × 20 NOK = 2000 NOK, which fits in 11 bits. 100 coins fit in a 7-bit
counter. The coin total is computed 2 bits wider than a counter, so a sum of four
counters cannot overflow.

Assertions in `control_fsm` check two rules: at most one `outXX` is high per clock, and
`accept_coin` is only high in `count`.

### Ports of `exchange_machine`

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `reset` | in | clock; asynchronous active-high reset (to `idle`, counters and amount to 0) |
| `coin_sens` | in | a coin is at the intake |
| `in01`, `in05`, `in10`, `in20` | in | coin type detected this clock; at most one high |
| `ready` | out | green LED: machine idle, can take coins |
| `accept_coin` | out | intake actuator open |
| `out01` … `out500` | out | dispense one coin or bill of that value this clock |

## The small examples

**`reg_counter`**: `z <- z + 1`. An adder and a register in a loop, with an 8-bit
output that wraps. Without the register, the same loop would be a combinational
oscillator.

**`edge_detector`**: detects edges of `next_sig` without clocking on it. The signal is
registered into `sig` by the system clock and compared with that copy:
`my_edge = sig != next_sig`, `my_rising = !sig && next_sig`. The outputs are
combinational and valid in the cycle of the change, ready to be used at the next clock
edge.

**`my_reader`**: an 8-bit register. On a clock edge it stores `data_in` when `enable`
is high, and otherwise holds through a feedback multiplexer, so no latch is formed. Its
asynchronous reset has priority. The ports are called `data_in`/`data_out` because
`input`/`output` are keywords.

**`repeat_adder`**: an `op` state that does `r <- r + a` and counts `n` down. It decides
on `n_next = n - 1`, the value `n` is about to take, not on the register `n`, which is
one clock stale. So it leaves `op` right after the n-th addition, without a wait state.
The `idle` state and the `start`/`busy`/`done` handshake around `op` are this design's
own. A `start` pulse loads `a_in` and `n_in` (8 bits each) and clears `r` (16 bits). The
design then stays in `op` for n clocks, and `done` pulses with `r = a × n`. `n = 0`
finishes at once.

`fsmd_examples_top` puts all five designs side by side. They share only `clk` and
`reset`, and each has its own ports, prefixed `em_`, `cnt_`, `ed_`, `rd_` and `ra_`.

## What follows the source design and what was chosen here

These follow the source design:
- the three states and their transitions
- the payout priority
- the 100-coin limit
- the 7- and 11-bit widths
- the counter's priority (count up, then down, then clear)
- the split into modules and the wiring between them
- the edge detector equations
- the enable register with an asynchronous reset that has priority
- the `op` state of `repeat_adder`

Choices made here:
- All registers use an asynchronous active-high reset. For the counter, the amount and the FSM this matches the source. For `reg_counter` and `edge_detector` the reset is added.
- `amount_calc` gives 20 NOK priority if several coin inputs are high at once, and 500 NOK priority among payout inputs. In this design only one is ever high, so the order never matters.
- The coin total is 2 bits wider than a counter.
- The state encoding is 2 bits.
- The widths of `reg_counter` and `repeat_adder`, and the handshake of `repeat_adder`.
- The assertions.

Not built:
- The electromechanical parts: the coin sensor, the coin type detector, the intake actuator, and the bill and coin dispensers. Their signals are the top's ports.
- Generic FSMD drawings whose functions are not specified.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_coin_counter` | random inc/accept/dec/zero against a reference count, wrap at 128, async reset |
| `tb_amount_calc` | random fills of 1–100 coins and greedy pay-back against a reference amount; clear priority |
| `tb_control_fsm` | 20 000 cycles of random status; every output against the rules; every payout item seen |
| `tb_exchange_machine` | 307 whole transactions (up to 120 coins offered): item-by-item payout, exact cycle count; counts limit hits, "no more coins" exits, skipped coin types, each payout item |
| `tb_reg_counter`, `tb_edge_detector`, `tb_my_reader`, `tb_repeat_adder` | the small examples, including latency of `repeat_adder` (n clocks) |
| `tb_fsmd_examples_top` | the whole top at default sizes: 23 exchange transactions, including 101 × 20 NOK (limit), 388 NOK (one each of 200, 100, 50, 20, 10 and 5 NOK, then three 1 NOK) and 3 × 20 NOK (coin skip), while the other examples run concurrently; every mechanism must occur |

`tb/exchange_ref_pkg.sv` holds the payout rule as the testbenches model it. The
testbenches compute their expected values independently of the RTL.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/exchange_pkg.sv tb/exchange_ref_pkg.sv tb/tb_fsmd_examples_top.sv \
    --top-module tb_fsmd_examples_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Each one finishes in well under a second.
To lint a module: `verilator --lint-only -Wall -Irtl -y rtl rtl/exchange_pkg.sv rtl/<module>.sv`.
The lint reports two kinds of warning that are expected. `SYNCASYNCNET` appears because
`reset` is both an asynchronous register reset and the `disable iff` of the assertions.
`UNUSEDPARAM` appears for package constants that a given module does not use.

## Changing the design

- **Coin limit or widths.** Edit `EM_COIN_LIMIT`, `EM_COUNT_WIDTH` and `EM_AMOUNT_WIDTH`
  in `exchange_pkg`. Keep the amount width ≥ ceil(log2(limit × 20 + 1)) and the count width
  ≥ ceil(log2(limit + 1)).
- **Denominations.** Change the values in `exchange_pkg`, the selection in `amount_calc`
  and the payout chain in `control_fsm`. The testbenches model the same table in
  `exchange_ref_pkg`.
- **Refusing change the machine cannot give.** Add a check of `count01` to rule 5 in
  `control_fsm`, and decide what the machine should do instead.
