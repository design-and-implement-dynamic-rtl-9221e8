// dp_scheduler: dynamic-programming scheduler for appliance tasks with two
// discrete power levels under a tiered time-of-use price.
//
// Problem. The day is split into HOURS periods. Task t may run only inside
// its window [start, end]; once started it runs in consecutive periods, in
// each at one of its two power levels, until the energy it has received equals
// its total exactly. A period's price depends on the whole community's load in
// it (see sched_pkg::period_cost). The scheduler places one task at a time on
// top of all the others and repeats the round over all tasks, so that each
// task ends up with its cheapest placement given everyone else's.
//
// Placing one task (the dynamic program). First the task's current placement
// is taken out of the period loads and the running total cost. Then, walking
// its window period by period, the engine keeps a list of partial schedules,
// each an (energy so far, total cost so far) pair with a back pointer to its
// parent in the previous period and the level used now. Besides the list there
// is always the "not started yet" path, whose cost is the unchanged total. A
// period's list is built from the previous period's: every entry that has not
// reached the task's total (and the not-started path) is extended by level 1
// and by level 2, as long as the energy does not pass the total. A candidate
// is dropped when an entry already in the list has at least its energy for at
// most its cost, and it removes every entry it beats in the same sense; of two
// entries with equal energy and cost the one that has run longer stays. A
// candidate that reaches the total is a complete placement; the cheapest one
// is kept, and among equally cheap ones the one spread over more periods.
// At the end of the window the winner is traced back through the parent
// pointers into the placement table 'best', added to the period loads, and its
// cost becomes the new total. A task with no exact placement is left out.
//
// Rounds. After every task has been placed once, the round is repeated until
// the total cost of a round improves on the previous round's by no more than
// STOP_PERCENT percent of it, or until MAX_PASSES rounds have run.
//
// Updates. During the day tasks may be changed or added. A start with
// 'update' high keeps the loads, placements and total of the previous run and
// places only tasks first_task..num_tasks-1 again, in rounds as above, against
// everything else. Their removal then sweeps the whole day, so a task whose
// window was changed leaves nothing behind. An update must follow a complete
// run, since only that clears the tables.
//
// Interface. The task and price tables are written through the cfg_* port
// (one 32-bit field per write) while the engine is idle. A one-cycle 'start'
// clears the loads and placements and begins; 'busy' is high while it works
// and 'done' rises when it finishes and stays high until the next start. The
// placement of a task in a period can be read at any time through the rd_*
// port, and the placement and the community load in a period through the
// mon_* port (both combinational). Counters report how often each mechanism fired.
//
// Timing. One period of the removal and of the final addition takes a cycle
// each; every candidate takes two cycles plus one per entry of the list it is
// compared with; the trace-back takes one cycle per period. Starting clears
// HOURS*MAX_TASKS placement entries, one per cycle. The three read ports into
// the solution lists (source, scan, trace-back) each use only the fields their
// state needs, so lint reports the other bits of those ports as unused.
//
// What follows the report: the task and price records, the cost rule, the
// extension by two levels with continuous running and an exact total, pruning
// of lower-energy-higher-cost partial schedules, rescheduling every task
// against the others, the 1% stopping rule, the limit of 10 rounds, the
// preference for placements spread over more periods, the defaults of 96 periods and 200 tasks,
// and solution lists of up to 200 entries per period. This design's own
// choices: the separate not-started path, that a candidate replaces only what
// it beats, that a complete placement is also accepted in the window's first
// period, the storage as on-chip arrays with combinational reads, and the
// handshake. The update mode follows the report's remark that changed or added
// tasks are rescheduled on their own; how they are selected is this design's.
module dp_scheduler
  import sched_pkg::*;
#(
  parameter int unsigned HOURS        = 96,
  parameter int unsigned MAX_TASKS    = 200,
  parameter int unsigned MAX_SOL      = 200,
  parameter int unsigned MAX_PASSES   = 10,
  parameter int unsigned STOP_PERCENT = 1,
  localparam int unsigned PW = (HOURS > 1) ? $clog2(HOURS) : 1,
  localparam int unsigned TW = (MAX_TASKS > 1) ? $clog2(MAX_TASKS) : 1,
  localparam int unsigned SW = $clog2(MAX_SOL + 1)
) (
  input  logic          clk,
  input  logic          rst,
  // table loading
  input  logic          cfg_task_we,
  input  logic [TW-1:0] cfg_task_idx,
  input  task_field_e   cfg_task_field,
  input  logic          cfg_price_we,
  input  logic [PW-1:0] cfg_price_idx,
  input  price_field_e  cfg_price_field,
  input  logic [31:0]   cfg_data,
  input  logic [TW:0]   num_tasks,
  // control
  input  logic          start,
  input  logic          update,       // with start: keep the schedule, redo tasks first_task.. only
  input  logic [TW:0]   first_task,
  output logic          busy,
  output logic          done,
  // results
  input  logic [PW-1:0] rd_period,
  input  logic [TW-1:0] rd_task,
  output energy_t       rd_level,
  input  logic [PW-1:0] mon_period,
  input  logic [TW-1:0] mon_task,
  output energy_t       mon_level,
  output energy_t       mon_power,
  output cost_t         cost_total,
  output logic [7:0]    passes,
  output logic          converged,
  output logic [31:0]   n_pruned,
  output logic [31:0]   n_overflow,
  output logic [31:0]   n_unplaced
);

  initial begin
    assert (HOURS <= 128) else $fatal(1, "task_t holds 7-bit period numbers");
    assert (MAX_PASSES <= 255) else $fatal(1, "passes is an 8-bit counter");
  end

  // ---------------------------------------------------------------------------
  // Storage
  // ---------------------------------------------------------------------------
  typedef struct packed {
    logic          valid;
    energy_t       e;        // energy given to the task so far
    cost_t         c;        // community total cost with this partial schedule
    energy_t       lvl;      // level used in this period
    logic [SW-1:0] par;      // parent entry in the previous period, 0 = not started
    logic [PW:0]   len;      // periods the task has run so far
  } sol_t;

  localparam int unsigned NBEST = HOURS * MAX_TASKS;
  localparam int unsigned NSOL  = HOURS * MAX_SOL;
  localparam int unsigned BW    = $clog2(NBEST);
  localparam int unsigned LW    = $clog2(NSOL);

  task_t   tasks  [MAX_TASKS];
  price_t  prices [HOURS];
  energy_t power  [HOURS];
  energy_t best   [NBEST];
  sol_t    sol    [NSOL];
  logic [SW-1:0] cnt [HOURS];

  function automatic logic [BW-1:0] best_addr(logic [PW-1:0] h, logic [TW-1:0] t);
    return BW'(h * MAX_TASKS + t);
  endfunction

  function automatic logic [LW-1:0] sol_addr(logic [PW-1:0] h, logic [SW-1:0] k);
    // entries are numbered from 1; number 0 (the not-started path) maps to slot 0
    logic [LW-1:0] row, col;
    row = LW'(h * MAX_SOL);
    col = (k == '0) ? '0 : LW'(k - 1'b1);
    return row + col;
  endfunction

  // table writes
  always_ff @(posedge clk) begin
    if (cfg_task_we && !busy) begin
      unique case (cfg_task_field)
        F_START:  tasks[cfg_task_idx].start_p <= cfg_data[6:0];
        F_END:    tasks[cfg_task_idx].end_p   <= cfg_data[6:0];
        F_LEVEL1: tasks[cfg_task_idx].level1  <= cfg_data;
        F_LEVEL2: tasks[cfg_task_idx].level2  <= cfg_data;
        F_TOTAL:  tasks[cfg_task_idx].total   <= cfg_data;
        default:  ;
      endcase
    end
    if (cfg_price_we && !busy) begin
      unique case (cfg_price_field)
        F_THRESHOLD: prices[cfg_price_idx].threshold <= cfg_data;
        F_RATE_LOW:  prices[cfg_price_idx].rate_low  <= cfg_data;
        F_RATE_HIGH: prices[cfg_price_idx].rate_high <= cfg_data;
        default:     ;
      endcase
    end
  end

  assign rd_level = best[best_addr(rd_period, rd_task)];
  assign mon_level = best[best_addr(mon_period, mon_task)];
  assign mon_power = power[mon_period];

  // ---------------------------------------------------------------------------
  // Control
  // ---------------------------------------------------------------------------
  typedef enum logic [3:0] {
    S_IDLE, S_CLEAR, S_TASK, S_REMOVE, S_HOUR, S_CAND, S_SCAN, S_PLACE,
    S_NEXT, S_TRACE0, S_TRACE, S_APPLY, S_PASS, S_DONE
  } state_e;

  state_e        state;
  logic [BW-1:0] clr_idx;
  logic [TW:0]   t;                // task being placed
  logic [PW-1:0] h;                // period being worked on
  task_t         tk;               // record of task t
  cost_t         idle_cost;        // total cost with task t taken out
  cost_t         base_cost;        // cost of period h without task t
  cost_t         prev_total;       // total cost after the previous round
  logic [SW-1:0] src;              // source entry in period h-1, 0 = not started
  logic          lvl_sel;          // 0: level 1, 1: level 2
  // candidate
  energy_t       cand_e, cand_lvl;
  cost_t         cand_c;
  logic [PW:0]   cand_len;
  logic [SW-1:0] k, free_slot;
  // best complete placement of task t
  logic          found;
  cost_t         win_c;
  logic [PW:0]   win_len;
  logic [PW-1:0] win_hour;
  energy_t       win_lvl;
  logic [SW-1:0] win_par;
  // trace-back
  logic [PW-1:0] th;
  logic [SW-1:0] tidx;

  // combinational helpers
  sol_t    src_ent, scan_ent, trace_ent;
  energy_t src_e, lvl_now, c_e;
  cost_t   src_c;
  logic [PW:0] src_len;
  logic    src_ok;
  logic    task_ok;
  logic [BW-1:0] bidx;
  energy_t b_now, p_now;
  logic [SW-1:0] slot;
  logic    last_src;
  logic [63:0] gain_x100, stop_lim;
  logic [PW-1:0] hm1;               // period before h (0 for period 0)
  logic [PW-1:0] rm_last;           // last period the removal visits
  logic          upd;               // this run updates the existing schedule
  logic [TW:0]   t0;                // first task of every round

  assign task_ok = (tk.start_p <= tk.end_p) && (int'(tk.end_p) < HOURS)
                   && (tk.level1 != 0) && (tk.level2 != 0);
  assign bidx    = best_addr(h, t[TW-1:0]);
  assign b_now   = best[bidx];
  assign p_now   = power[h];

  assign hm1 = (h == '0) ? '0 : h - 1'b1;

  always_comb begin
    src_ent = sol[sol_addr(hm1, src)];
    if (src == '0) begin
      src_e = '0; src_c = idle_cost; src_len = '0; src_ok = 1'b1;
    end else begin
      src_e = src_ent.e; src_c = src_ent.c; src_len = src_ent.len;
      src_ok = src_ent.valid && (src_ent.e < tk.total);
    end
    lvl_now = lvl_sel ? tk.level2 : tk.level1;
    c_e     = src_e + lvl_now;
  end

  assign scan_ent  = sol[sol_addr(h, k)];
  assign trace_ent = sol[sol_addr(th, tidx)];
  assign slot      = (free_slot != '0) ? free_slot : SW'(cnt[h] + 1'b1);
  // the last source of period h has been used
  assign last_src  = (h == tk.start_p[PW-1:0]) || (src >= cnt[hm1]);
  assign gain_x100 = 64'(prev_total - cost_total) * 64'd100;
  assign stop_lim  = 64'(cost_total) * 64'(STOP_PERCENT);

  assign rm_last   = upd ? PW'(HOURS - 1) : tk.end_p[PW-1:0];

  assign busy = (state != S_IDLE) && (state != S_DONE);
  assign done = (state == S_DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      cost_total <= '0;
      passes     <= '0;
      converged  <= 1'b0;
      n_pruned   <= '0;
      n_overflow <= '0;
      n_unplaced <= '0;
      clr_idx    <= '0;
      t          <= '0;
      t0         <= '0;
      upd        <= 1'b0;
      h          <= '0;
      found      <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            upd        <= update;
            t0         <= update ? first_task : '0;
            t          <= update ? first_task : '0;
            state      <= update ? S_TASK : S_CLEAR;
            clr_idx    <= '0;
            if (!update) cost_total <= '0;
            passes     <= '0;
            converged  <= 1'b0;
            n_pruned   <= '0;
            n_overflow <= '0;
            n_unplaced <= '0;
          end
        end

        S_CLEAR: begin
          best[clr_idx] <= '0;
          if (int'(clr_idx) < HOURS) power[clr_idx[PW-1:0]] <= '0;
          if (int'(clr_idx) == NBEST - 1) begin
            state <= S_TASK;
          end
          clr_idx <= clr_idx + 1'b1;
        end

        S_TASK: begin
          if (t >= num_tasks || int'(t) >= MAX_TASKS) begin
            state <= S_PASS;
          end else begin
            tk    <= tasks[t[TW-1:0]];
            h     <= upd ? '0 : tasks[t[TW-1:0]].start_p[PW-1:0];
            found <= 1'b0;
            state <= S_REMOVE;
          end
        end

        // take task t out of the loads and the total, one period per cycle:
        // over its window, or over the whole day in update mode, where the
        // window may have changed since the task was placed
        S_REMOVE: begin
          if (!task_ok && !upd) begin
            n_unplaced <= n_unplaced + 1'b1;
            t          <= t + 1'b1;
            state      <= S_TASK;
          end else begin
            cost_total <= cost_total - period_cost(prices[h], p_now)
                                     + period_cost(prices[h], p_now - b_now);
            power[h]   <= p_now - b_now;
            best[bidx] <= '0;
            if (h == rm_last) begin
              if (task_ok) begin
                h     <= tk.start_p[PW-1:0];
                state <= S_HOUR;
              end else begin
                n_unplaced <= n_unplaced + 1'b1;
                t          <= t + 1'b1;
                state      <= S_TASK;
              end
            end else begin
              h <= h + 1'b1;
            end
          end
        end

        // open period h of the dynamic program
        S_HOUR: begin
          if (h == tk.start_p[PW-1:0]) idle_cost <= cost_total;
          base_cost <= period_cost(prices[h], p_now);
          cnt[h]    <= '0;
          src       <= '0;
          lvl_sel   <= 1'b0;
          state     <= S_CAND;
        end

        // form the candidate: source 'src' of period h-1 extended by one level
        S_CAND: begin
          if (src_ok && c_e <= tk.total) begin
            cand_e       <= c_e;
            cand_lvl     <= lvl_now;
            cand_c       <= src_c + period_cost(prices[h], p_now + lvl_now) - base_cost;
            cand_len     <= src_len + 1'b1;
            k            <= SW'(1);
            free_slot    <= '0;
            state        <= S_SCAN;
          end else begin
            state <= S_NEXT;
          end
        end

        // compare the candidate with every entry of period h
        S_SCAN: begin
          if (k > cnt[h]) begin
            state <= S_PLACE;
          end else if (scan_ent.valid && scan_ent.e >= cand_e && scan_ent.c <= cand_c &&
                       !(scan_ent.e == cand_e && scan_ent.c == cand_c && cand_len > scan_ent.len)) begin
            // an entry is at least as good: drop the candidate
            n_pruned     <= n_pruned + 1'b1;
            state        <= S_NEXT;
          end else begin
            if (scan_ent.valid && cand_e >= scan_ent.e && cand_c <= scan_ent.c) begin
              sol[sol_addr(h, k)].valid <= 1'b0;   // candidate beats this entry
              n_pruned <= n_pruned + 1'b1;
              if (free_slot == '0) free_slot <= k;
            end else if (!scan_ent.valid && free_slot == '0) begin
              free_slot <= k;
            end
            k <= k + 1'b1;
          end
        end

        // store the candidate and check it as a complete placement
        S_PLACE: begin
          if (free_slot != '0 || int'(cnt[h]) < MAX_SOL) begin
            sol[sol_addr(h, slot)] <= '{valid: 1'b1, e: cand_e, c: cand_c,
                                        lvl: cand_lvl, par: src, len: cand_len};
            if (free_slot == '0) cnt[h] <= cnt[h] + 1'b1;
          end else begin
            n_overflow <= n_overflow + 1'b1;
          end
          if (cand_e == tk.total &&
              (!found || cand_c < win_c || (cand_c == win_c && cand_len > win_len))) begin
            found    <= 1'b1;
            win_c    <= cand_c;
            win_len  <= cand_len;
            win_hour <= h;
            win_lvl  <= cand_lvl;
            win_par  <= src;
          end
          state <= S_NEXT;
        end

        S_NEXT: begin
          if (!lvl_sel) begin
            lvl_sel <= 1'b1;
            state   <= S_CAND;
          end else begin
            lvl_sel <= 1'b0;
            if (last_src) begin
              if (h == tk.end_p[PW-1:0]) begin
                state <= S_TRACE0;
              end else begin
                h     <= h + 1'b1;
                state <= S_HOUR;
              end
            end else begin
              src   <= src + 1'b1;
              state <= S_CAND;
            end
          end
        end

        S_TRACE0: begin
          if (!found) begin
            n_unplaced <= n_unplaced + 1'b1;
          end else begin
            best[best_addr(win_hour, t[TW-1:0])] <= win_lvl;
            th   <= win_hour - 1'b1;
            tidx <= win_par;
          end
          h     <= tk.start_p[PW-1:0];
          state <= found ? S_TRACE : S_APPLY;
        end

        // follow the parent pointers back to the first running period
        S_TRACE: begin
          if (tidx == '0) begin
            state <= S_APPLY;
          end else begin
            best[best_addr(th, t[TW-1:0])] <= trace_ent.lvl;
            tidx <= trace_ent.par;
            th   <= th - 1'b1;
          end
        end

        // add the new placement to the period loads
        S_APPLY: begin
          power[h] <= p_now + b_now;
          if (h == tk.end_p[PW-1:0]) begin
            if (found) cost_total <= win_c;
            t     <= t + 1'b1;
            state <= S_TASK;
          end else begin
            h <= h + 1'b1;
          end
        end

        // end of a round: stop on the round limit or on a small improvement
        S_PASS: begin
          passes     <= passes + 1'b1;
          prev_total <= cost_total;
          t          <= t0;
          if (passes != '0 && (cost_total >= prev_total || gain_x100 <= stop_lim)) begin
            converged <= 1'b1;
            state     <= S_DONE;
          end else if (int'(passes) + 1 >= MAX_PASSES) begin
            state <= S_DONE;
          end else begin
            state <= S_TASK;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
