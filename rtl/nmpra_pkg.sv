// nmpra_pkg: types and constants shared by the interrupt-handling part of
// the nMPRA hardware scheduler (nHSE).
//
// The event sources of one sCPU (semi-CPU, one per task) are listed in
// ev_idx_e. The interrupt and timer events are generated inside this design;
// watchdog, deadline, mutex and message events come from units outside it and
// enter through ports. The bit order is this design's own choice.
//
// cfg_req_t is the single-cycle register write bus used to program the
// INT_ID registers, the device enable/clear bits, the trap cells, the task
// control words and the task timers. Its address map (word addresses) is
// given by the CFG_* constants below and is this design's own choice.
package nmpra_pkg;

  typedef enum logic [2:0] {
    EV_INT      = 3'd0,  // IntEv_i: an interrupt attached to this sCPU
    EV_TIMER    = 3'd1,  // task timer near the end of the allocated time
    EV_WDOG     = 3'd2,  // watchdog timer (external unit)
    EV_DEADLINE = 3'd3,  // deadline (external unit)
    EV_MUTEX    = 3'd4,  // mutex (external unit)
    EV_MSG      = 3'd5   // message (external unit)
  } ev_idx_e;

  localparam int unsigned EV_NUM = 6;
  localparam int unsigned EV_EXT = 4;  // EV_WDOG .. EV_MSG

  localparam int unsigned CFG_AW = 12;
  localparam int unsigned CFG_DW = 32;

  typedef struct packed {
    logic              we;
    logic [CFG_AW-1:0] addr;
    logic [CFG_DW-1:0] data;
  } cfg_req_t;

  // Address regions (upper 4 bits of the word address); the lower 8 bits
  // select the interrupt or task.
  localparam logic [3:0] CFG_INT_ID   = 4'h0;  // INT_ID_k: task id of interrupt k
  localparam logic [3:0] CFG_DEV_CTRL = 4'h1;  // bit0 enable, bit1 clear flag
  localparam logic [3:0] CFG_TRAP     = 4'h2;  // trap cell k: handler address
  localparam logic [3:0] CFG_TASK     = 4'h3;  // bit0 task enable
  localparam logic [3:0] CFG_TMR_LOAD = 4'h4;  // timer budget (starts the timer)
  localparam logic [3:0] CFG_TMR_THR  = 4'h5;  // warning threshold
  localparam logic [3:0] CFG_TMR_CLR  = 4'h6;  // clear the timer event

endpackage
