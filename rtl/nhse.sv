// nhse: interrupt handling of the nMPRA hardware scheduler (nHSE).
//
// The nMPRA processor runs N tasks, each on its own sCPU (a private set of
// pipeline registers and general registers), under a scheduler built in
// hardware. There is no separate interrupt controller: each of the P system
// interrupts is attached to one task and is handled by that task, so
// interrupts inherit the priority of their task and share one priority space
// with the tasks. An interrupt can preempt only strictly lower-priority
// tasks, nests without saving any context, and never disturbs the pipeline
// of another sCPU.
//
// Datapath, in the order an interrupt travels:
//   int_dev_flags  device condition flag gated by its enable bit -> INT_k
//   int_assoc      INT_ID_k registers, demultiplexers, one OR per task
//   event_sync     falling-edge flip-flops -> IntEv_t (and the other events)
//   scpu_ready     per task: ready if enabled and not blocked in a wait, or
//                  one of the events its wait selected is present
//   hse_sched      highest-priority ready sCPU (sCPU_0 highest) -> run_id
//   int_prio_enc   per task: highest-priority interrupt attached to it
//   trap_table     4 * that number selects a trap cell -> handler address
//   task_timer     per task: event when the allocated time is nearly used
// An interrupt that appears just before a falling clock edge is running its
// task after the next rising edge: the response takes 0.5 to 1.5 clocks.
//
// Interface: dev_event pulses set the device flags; cfg writes the
// registers (map in nmpra_pkg); wait_exec/wait_mask come from the processor
// when task t executes a wait; ext_ev carries the watchdog, deadline, mutex
// and message events of each task from units outside this block; monitor is
// 1 while the kernel monitor runs, which blocks every switch; sched_en
// enables the static scheduler. Outputs: the running sCPU, a context switch
// pulse, and for the running task the number of its highest-priority pending
// interrupt, its trap cell address and handler address.
//
// Widths and the register map are this design's choices; the structure
// follows the nMPRA description.
module nhse
  import nmpra_pkg::*;
#(
  parameter int unsigned N         = 4,
  parameter int unsigned P         = 8,
  parameter int unsigned AW        = 32,
  parameter int unsigned TW        = 16,
  parameter logic [31:0] TRAP_BASE = 32'h0000_0100
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [P-1:0]         dev_event,
  input  cfg_req_t             cfg,
  input  logic                 sched_en,
  input  logic                 monitor,
  input  logic [N-1:0]         wait_exec,
  input  logic [EV_NUM-1:0]    wait_mask [N],
  input  logic [EV_EXT-1:0]    ext_ev    [N],
  output logic [$clog2(N)-1:0] run_id,
  output logic                 run_valid,
  output logic                 ctx_switch,
  output logic [N-1:0]         task_ready,
  output logic [N-1:0]         task_waiting,
  output logic [N-1:0]         int_ev,
  output logic [N-1:0]         tmr_ev,
  output logic [N-1:0]         tmr_expired,
  output logic [P-1:0]         int_flag,
  output logic [$clog2(P)-1:0] int_num,
  output logic                 int_valid,
  output logic [AW-1:0]        cell_addr,
  output logic [AW-1:0]        handler_addr,
  output logic                 handler_valid
);

  localparam int unsigned PW = $clog2(P);
  localparam int unsigned NW = $clog2(N);

  // ---------------- register write decode ----------------
  logic [7:0] cfg_idx;
  assign cfg_idx = cfg.addr[7:0];

  function automatic logic hit(input cfg_req_t c, input logic [3:0] region);
    return c.we && (c.addr[CFG_AW-1:8] == region);
  endfunction

  logic [N-1:0] task_en;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) task_en <= '0;
    else if (hit(cfg, CFG_TASK) && cfg_idx < 8'(N)) task_en[cfg_idx[NW-1:0]] <= cfg.data[0];
  end

  // ---------------- devices and association ----------------
  logic [P-1:0] dev_en, int_req;
  int_dev_flags #(.P(P)) u_dev (
    .clk, .rst_n, .dev_event,
    .ctrl_we (hit(cfg, CFG_DEV_CTRL) && cfg_idx < 8'(P)),
    .ctrl_idx(cfg_idx[PW-1:0]),
    .ctrl_en (cfg.data[0]),
    .ctrl_clr(cfg.data[1]),
    .flag    (int_flag),
    .enable  (dev_en),
    .int_req (int_req)
  );

  logic [NW-1:0] int_id   [P];
  logic [P-1:0]  int_mat  [N];
  logic [N-1:0]  int_task;
  int_assoc #(.N(N), .P(P)) u_assoc (
    .clk, .rst_n,
    .id_we  (hit(cfg, CFG_INT_ID) && cfg_idx < 8'(P)),
    .id_idx (cfg_idx[PW-1:0]),
    .id_data(cfg.data[NW-1:0]),
    .int_req,
    .int_id,
    .int_mat,
    .int_task
  );

  // ---------------- task timers ----------------
  logic [TW-1:0] tmr_count [N];
  for (genvar t = 0; t < N; t++) begin : g_tmr
    task_timer #(.W(TW)) u_tmr (
      .clk, .rst_n,
      .load_we (hit(cfg, CFG_TMR_LOAD) && cfg_idx == 8'(t)),
      .load_val(cfg.data[TW-1:0]),
      .thr_we  (hit(cfg, CFG_TMR_THR) && cfg_idx == 8'(t)),
      .thr_val (cfg.data[TW-1:0]),
      .clr     (hit(cfg, CFG_TMR_CLR) && cfg_idx == 8'(t)),
      .run     (run_valid && run_id == NW'(t)),
      .count   (tmr_count[t]),
      .ev      (tmr_ev[t]),
      .expired (tmr_expired[t])
    );
  end

  // ---------------- event synchronisation ----------------
  logic [N*EV_NUM-1:0] ev_raw, ev_sync;
  always_comb begin
    for (int unsigned t = 0; t < N; t++) begin
      ev_raw[t*EV_NUM + int'(EV_INT)]   = int_task[t];
      ev_raw[t*EV_NUM + int'(EV_TIMER)] = tmr_ev[t];
      ev_raw[t*EV_NUM + int'(EV_WDOG) +: EV_EXT] = ext_ev[t];
    end
  end

  event_sync #(.W(N*EV_NUM)) u_sync (.clk, .rst_n, .d(ev_raw), .q(ev_sync));

  // ---------------- per-sCPU ready logic ----------------
  logic [EV_NUM-1:0] ev_hit [N];
  for (genvar t = 0; t < N; t++) begin : g_scpu
    assign int_ev[t] = ev_sync[t*EV_NUM + int'(EV_INT)];
    scpu_ready #(.EVW(EV_NUM)) u_rdy (
      .clk, .rst_n,
      .task_en  (task_en[t]),
      .wait_exec(wait_exec[t]),
      .wait_mask(wait_mask[t]),
      .ev       (ev_sync[t*EV_NUM +: EV_NUM]),
      .ready    (task_ready[t]),
      .waiting  (task_waiting[t]),
      .ev_hit   (ev_hit[t])
    );
  end

  // ---------------- scheduler ----------------
  hse_sched #(.N(N)) u_sched (
    .clk, .rst_n, .sched_en, .monitor,
    .ready(task_ready),
    .run_id, .run_valid, .ctx_switch
  );

  // ---------------- hardware interrupt decision ----------------
  logic [PW-1:0] enc_num   [N];
  logic [N-1:0]  enc_valid;
  for (genvar t = 0; t < N; t++) begin : g_enc
    int_prio_enc #(.P(P)) u_enc (
      .req  (int_mat[t]),
      .num  (enc_num[t]),
      .valid(enc_valid[t])
    );
  end

  assign int_num   = enc_num[run_id];
  assign int_valid = run_valid && enc_valid[run_id];

  logic [AW-1:0] cell_off;
  trap_table #(.P(P), .AW(AW), .TRAP_BASE(TRAP_BASE)) u_trap (
    .clk, .rst_n,
    .wr_we        (hit(cfg, CFG_TRAP) && cfg_idx < 8'(P)),
    .wr_idx       (cfg_idx[PW-1:0]),
    .wr_data      (cfg.data[AW-1:0]),
    .rd_num       (int_num),
    .rd_valid     (int_valid),
    .cell_off     (cell_off),
    .cell_addr    (cell_addr),
    .handler_addr (handler_addr),
    .handler_valid(handler_valid)
  );

endmodule
