// sched_pkg: types and the tiered price function shared by the scheduler
// and the top level.
//
// Every time period (one hour, or one quarter hour in the 96-period set-up)
// has a price record of three numbers: a threshold on the community's total
// power in that period, the unit rate that applies while the total is at or
// below the threshold, and the unit rate that applies above it. The cost of a
// period is the applicable rate times the whole total, not only the part above
// the threshold. Task records carry the five numbers of one appliance job:
// earliest period, latest period, the two allowed power levels and the energy
// the job must receive in total.
//
// All quantities are unsigned 32-bit integers, the width of the integers the
// algorithm was written for; products are kept to 32 bits.
package sched_pkg;

  typedef logic [31:0] energy_t;   // power level or accumulated energy
  typedef logic [31:0] cost_t;     // money in price units times energy units

  typedef struct packed {
    logic [6:0] start_p;           // first period the task may run in
    logic [6:0] end_p;             // last period the task may run in
    energy_t    level1;            // lower power level
    energy_t    level2;            // higher power level
    energy_t    total;             // energy the task needs in total
  } task_t;

  typedef struct packed {
    energy_t    threshold;         // community power threshold of the period
    cost_t      rate_low;          // unit rate when total <= threshold
    cost_t      rate_high;         // unit rate when total >  threshold
  } price_t;

  // Field selectors of the table write port.
  typedef enum logic [2:0] {
    F_START = 3'd0, F_END = 3'd1, F_LEVEL1 = 3'd2, F_LEVEL2 = 3'd3, F_TOTAL = 3'd4
  } task_field_e;

  typedef enum logic [1:0] {
    F_THRESHOLD = 2'd0, F_RATE_LOW = 2'd1, F_RATE_HIGH = 2'd2
  } price_field_e;

  // Cost of one period when the community draws 'load' in it.
  function automatic cost_t period_cost(price_t pr, energy_t load);
    if (load <= pr.threshold) return pr.rate_low * load;
    else                      return pr.rate_high * load;
  endfunction

endpackage
