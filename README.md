# Smart-home appliance scheduler with discrete power levels

A group of homes shares one electricity tariff. The price of a period depends on the load the
whole community draws in that period. Each appliance task has four properties:

- a window of periods it may run in;
- two power levels it can use;
- a total energy it must receive.

Once a task has started, it runs without a break until it has received exactly that energy. It
can change between its two levels from one period to the next. The controller decides, for
every task, in which periods it runs and at which level, so that the community pays as little
as it can. It repeats this until no home could lower the bill by moving only its own task: a
Nash equilibrium of the scheduling game.

This RTL builds that controller as one chip-level design. The scheduling algorithm is a
hardware engine (`dp_scheduler`) rather than a program on a soft processor. Around it sits the
demonstration front end of a DE2-style board:

- push button KEY[0] selects a quarter hour;
- HEX3..HEX0 show that quarter hour as a clock time (`0000`, `0015`, … `2345`);
- each of the 18 red LEDs shows one task's power level in that period, by its PWM brightness.

## Data model

Both tables are defined in `sched_pkg`.

| record | fields | meaning |
|---|---|---|
| `task_t` | `start_p`, `end_p`, `level1`, `level2`, `total` | window of periods (inclusive), the two power levels, the exact energy to deliver |
| `price_t` | `threshold`, `rate_low`, `rate_high` | cost per unit in a period is `rate_low` while the community load is at or below `threshold`, `rate_high` above it |

The cost of a period is `rate × load`, where the load is the whole community's load in that
period (`period_cost`). All quantities are 32-bit unsigned. A "period" is whatever the tables
say it is. The defaults are 96 quarter hours and at most 200 tasks.

## The per-task dynamic program (the hard part)

The engine places one task at a time. All other tasks stay where they are. For the task being
placed:

1. **Take it out.** Its current placement is subtracted from the period loads and from the
   running community cost. The remaining cost is the cost of the "not started yet" path.
2. **Walk its window, one period at a time.** Each period `p` has a list of partial schedules.
   Each entry holds:
   - the energy delivered so far, `E`;
   - the community cost so far, `C`;
   - the level used in `p`;
   - a pointer to its parent entry in `p-1`;
   - the number of periods it has run, `len`.

   Period `p`'s list is built from two sources: the not-started path, and every entry in `p-1`
   with `E < total`. Each is extended by `level1` and by `level2`, provided `E + level ≤ total`.
   The added cost of running at level `l` in period `p` is
   `period_cost(load_p + l) − period_cost(load_p)`. This is what the tariff step is
   for: running in a period pushes the whole community over the threshold, or not.
3. **Prune (Pareto rule).** A candidate is compared with every entry already in the list:
   - If an entry has `E ≥` the candidate's energy and `C ≤` its cost, the candidate is
     dropped. That entry is at least as far along for no more money.
   - Otherwise the candidate removes every entry it beats in the same sense, and takes a slot.
   - Between an entry and a candidate with equal `E` and `C`, the one with the longer run stays.
4. **Complete placements.** A candidate with `E == total` is a finished schedule. It competes
   for the period's "winner" and is stored no further. The cheapest winner wins. Among equally
   cheap ones, the winner that spreads over more periods wins, because that flattens the load.
   A completion is also accepted in the first period of the window, for a task that fits in
   one period.
5. **Trace back and apply.** After the window's last period, the winner is followed back
   through the parent pointers. Its levels are written to the placement table `best[p][t]`
   and added to the period loads. Its cost becomes the new community total. If no exact
   placement exists, the task is left out and `n_unplaced` counts it. Examples: the total
   cannot be made from the two levels inside the window, a level is 0, or the window is
   invalid.

Because only entries that are better in energy or in cost survive, a list holds a small
staircase of trade-offs, not every combination of levels. The list is capped at `MAX_SOL`
entries per period. A candidate that finds the list full is lost, and `n_overflow` counts it.
At the default cap of 200, none of the example workloads overflow. The testbench shows the
effect of the cap with a 4-entry engine.

### Rounds and convergence

One round places every task once, in index order. Each task sees the latest placement of all
the others. Rounds repeat until one of these holds:

- the cost of a round improves on the previous round's by no more than `STOP_PERCENT` (1%) of
  it;
- the cost did not fall;
- `MAX_PASSES` (10) rounds have run.

`converged` tells which of these happened. `passes` gives the number of rounds.

### Updates during the day

Once the day is scheduled, tasks may be changed or added. Rescheduling everything would mean
clearing the tables and starting over. An **update run** instead keeps the period loads, the
placements and the total, and places only tasks `first_task … num_tasks−1` again, in rounds,
against everything else. Changed and added tasks therefore belong at the end of the table.

During an update, removing a task sweeps all periods, not just its current window. A task whose
window was narrowed or moved therefore leaves nothing behind. A task that is made invalid, for
example by giving it a level of 0, is removed and counted as unplaced. An update must follow a
complete run: only a complete run clears the tables.

### Storage

The memories are plain arrays with combinational reads:

- the task and price tables;
- the period loads;
- `best` (HOURS × MAX_TASKS levels);
- the solution lists (HOURS × MAX_SOL entries);
- the per-period list counts.

At the defaults this is about 2.8 Mbit, nearly all of it in the solution lists. Mapping these
arrays onto synchronous block RAM would need one more pipeline stage on every read.

## Engine interface and timing

- **Loading.** While idle, write one 32-bit field per clock:
  - tasks: `cfg_task_we`, `cfg_task_idx`, `cfg_task_field`;
  - prices: `cfg_price_we`, `cfg_price_idx`, `cfg_price_field`;
  - both use `cfg_data`.

  Set `num_tasks`.
- **Run.** Pulse `start` for one cycle. Hold `update` high in that cycle, with `first_task`
  set, for an update run. `busy` stays high while the engine works. `done` rises
  at the end and stays high until the next `start`. `cost_total`, `passes`, `converged`,
  `n_pruned`, `n_overflow` and `n_unplaced` are valid once `done` is high.
- **Read-back.** `rd_period`/`rd_task` → `rd_level` serves the display path.
  `mon_period`/`mon_task` → `mon_level`, `mon_power` is a second, independent port. Both ports
  are combinational.

Cycle counts:

- Clearing `best` at start: HOURS × MAX_TASKS cycles, i.e. 19,200 at the defaults.
- Removal and re-addition of a task: one cycle per window period each. In an update run, the
  removal takes HOURS cycles.
- Each candidate: two cycles plus one per list entry it is compared with.
- Trace-back: one cycle per period.

Measured at the default sizes:

| workload | tasks | rounds | cycles | at 50 MHz |
|---|---|---|---|---|
| 10 identical tasks, 7 periods | 10 | 2 | 25,056 | 0.5 ms |
| 8 household appliances, 96 quarter hours | 8 | 2 | 354,032 | 7 ms |
| 15 homes × 8 appliances, 96 quarter hours | 120 | 2 | 5,231,421 | 105 ms |
| update of the 8-appliance day: one changed, one added | 2 of 9 | 2 | 16,670 | 0.3 ms |

## Display path

`smart_home_top` connects:

- **KEY[1]** is the reset, active low. It passes through a two-flip-flop synchroniser and
  resets everything.
- **KEY[0] → `hours_display`.** The button is synchronised, and each press (falling edge) steps
  the selected period, wrapping after the last one. The top uses 96 periods and 7 bits. The
  stand-alone block's defaults are 24 periods and 5 bits, for a board that only steps hours.
- **`pio_bank`** is a small memory-mapped register file:
  - 18 four-bit LED output registers at `0x01803000 + 16·i`;
  - one input register for the selected period at `0x01803120`.
- **`led_refresher`** takes over the job of the processor's main loop once the schedule is done.
  It reads the selected period from the input register, then writes `best[period][0..17]` into
  the 18 LED registers. It repeats this forever: a sweep takes 19 cycles.
- **`simple_counter` + `brightness` ×18.** A free-running 4-bit counter is shared by all LEDs.
  LED *i* is lit while `counter < level`, so a level of *n* lights it for *n* of every 16
  clocks. Level 0 is dark and 15 is the brightest.
- **`time_display` → `hex_display` ×4.** The selected period becomes `hh:mm` (period / 4 hours;
  minutes 00, 15, 30 or 45). The four digits drive active-low seven-segment patterns (bit 0 =
  segment a, bit 6 = segment g) after one register stage.

## Results against the published figures

The reference numbers come from the original software implementation of the same method.

| workload | this design | published |
|---|---|---|
| 10 identical tasks, window 0..6, levels 1/2, total 4, rate 1 up to load 1 else 2 | cost 75 | an arrangement costing 67 |
| 18 tasks over 24 periods (8 of window 0..11, 8 of 12..22, two late ones), same tariff | cost 155, 2 rounds | no total given |
| 8 appliances, 96 quarter hours, winter tariff (6/12/10 cents, threshold 1260 units, +1 cent above) | 522,648 = 145.18 cents | $1.42 |
| 120 tasks of 15 homes | 7,158,978 = 1988.60 cents | 7,168,536 = 1991.26 cents |

The published arrangement for the first row is presented as an equilibrium of the game. This
design's answer is one too: an exhaustive search over every legal placement of every task
shows that no single task can lower the total by moving alone. The same holds for the second
row. A game like this has several equilibria, and which one a best-response method reaches
depends on:

- the task order;
- the tie rules;
- the details of pruning.

The published program differs from this design in the last two points (see below). The last
two rows land within 2.3% and 0.2% of the published totals.

## Where this design departs from the published method

- **Hardware, not software.** The original ran the algorithm in C on a Nios II processor. It
  read the tables from flash and drove the LEDs through vendor PIO cores. Here the engine is
  RTL. The tables arrive over a write port. A small sequencer replaces the processor's LED
  loop.
- **Tariff order.** The published text and its own program disagree about which rate applies
  above the threshold. This design follows the program and the example tariff: the lower rate
  applies at or below the threshold, the higher rate above it.
- **Pruning rule.** The rule is exactly the Pareto rule described above. The published
  program's comparison loop also drops some candidates that are lower in both energy and cost.
- **Ties.** Equal-cost completions go to the longer run, as the method's description says. The
  published program instead breaks ties by the load of the final period.
- **Stopping.** The 1% rule and the 10-round limit are both applied. The description uses the
  first, the program the second.
- **First-period completions** are accepted. The program skipped them.
- **LED duty.** The LED is lit for exactly `level` of 16 clocks, as described. The published
  Verilog comparison lit it one clock longer.
- **Selection width.** The period counter and its input register are 7 bits wide, for 96 quarter
  hours. The published board used a 5-bit, 24-hour counter.
- **Update selection.** The original only says that changed or added tasks are rescheduled
  on their own. Choosing them as the tail of the task table is this design's convention.
- **Not built:** the processor system, its memories and the SDRAM clock PLL. They only
  existed to run the software.

## Files

| file | contents |
|---|---|
| `rtl/sched_pkg.sv` | record types, field enums, `period_cost` |
| `rtl/dp_scheduler.sv` | the scheduling engine |
| `rtl/smart_home_top.sv` | top level: engine, KEY handling, register file, LED and clock display |
| `rtl/hours_display.sv` | push-button period selector |
| `rtl/pio_bank.sv` | LED/KEY register file |
| `rtl/led_refresher.sv` | copies the selected period's levels into the LED registers |
| `rtl/simple_counter.sv`, `rtl/brightness.sv` | PWM dimming |
| `rtl/time_display.sv`, `rtl/hex_display.sv` | period → `hh:mm` on seven-segment digits |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_smart_home_top.sv` | end to end at default sizes: the 10-task and 18-task examples through the LEDs and digits, the 8-appliance day, then an update run |
| `tb/tb_workload_community.sv` | the 120-task community day, checked period by period |

The testbenches compare against values worked out independently of the RTL. The expected
schedules were produced by a separate software model of the same algorithm and are stored as
constant arrays. The random tests in `tb_dp_scheduler` check the rules instead:

- every placed task runs continuously inside its window;
- it uses only its two levels;
- it delivers exactly its total;
- the reported cost equals the cost recomputed from the loads.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl +libext+.sv rtl/sched_pkg.sv \
          tb/tb_smart_home_top.sv --top-module tb_smart_home_top
./obj_dir/Vtb_smart_home_top
```

Replace the testbench name to run another one. The 120-task test (`tb_workload_community`)
takes a few seconds. All others finish in under a second.

To change sizes, override the parameters of `smart_home_top` or `dp_scheduler`:

- `HOURS`: at most 128, because windows are 7-bit.
- `MAX_TASKS`
- `MAX_SOL`
- `MAX_PASSES`
- `STOP_PERCENT` (engine only)

Memory grows as HOURS × (MAX_TASKS + MAX_SOL).
