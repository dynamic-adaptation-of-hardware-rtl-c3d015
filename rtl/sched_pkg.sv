// sched_pkg: types and constants shared by the run-time HW/SW scheduler.
//
// A task of the data-flow graph (DFG) is mapped on one of three processing
// units: the reconfigurable computing unit (RCU, "HW"), the master processor
// (MS) or the slave processor (SL). The fourth code marks an unused task slot,
// so that a scheduler built for N tasks can also schedule a smaller graph;
// that code is this design's own addition.
//
// Times (execution times, ASAP dates, urgencies, start/finish dates) are
// unsigned integers in the application's time unit (milliseconds in the
// original application); their width TW is this design's choice.
package sched_pkg;

  typedef enum logic [1:0] {
    IMPL_HW   = 2'd0,  // hardware task, one tile of the RCU
    IMPL_MS   = 2'd1,  // software task on the master processor
    IMPL_SL   = 2'd2,  // software task on the slave processor
    IMPL_NONE = 2'd3   // unused slot: no task
  } impl_e;

  // Default sizes: twenty tasks, as in the evaluated motion-detection DFG.
  localparam int unsigned N_TASKS_DEF = 20;
  localparam int unsigned TW_DEF      = 16;
  // Width of the scheduler cycle counter.
  localparam int unsigned CW          = 16;

endpackage
