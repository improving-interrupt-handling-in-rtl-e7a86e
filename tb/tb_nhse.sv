// tb_nhse: end-to-end test of the nHSE interrupt handling, at the default
// size (4 sCPUs, 8 interrupts). The testbench plays the processor: it
// programs the registers, and for each task issues the wait instructions
// and clears device flags as the task's handler would.
//
// Set-up: interrupts 0,1,2 -> sCPU_1; 3,7 -> sCPU_2; 4,6 -> sCPU_3;
// 5 -> sCPU_0. Interrupt 7 stays disabled. sCPU_0..2 wait for their events;
// sCPU_3 is a background task that never waits.
// Mechanisms made to happen, each counted (a count of zero is a failure):
//   preempt    an interrupt task preempts a lower-priority running task
//   nest       an interrupt preempts a task already handling an interrupt,
//              which then resumes
//   multi      simultaneous interrupts of one task are handed out in
//              priority order through the encoder and trap cells
//   blocked    an interrupt of a lower-priority task does not preempt a
//              higher-priority one; it is served afterwards
//   disabled   an interrupt whose enable bit is 0 reaches no task
//   monitor    no switch while the kernel monitor runs
//   reattach   rewriting INT_ID moves an interrupt to another task
//   latency    an asynchronous event runs its task 0.5..1.5 clocks later
//   timer      the near-completion timer event of a running task
module tb_nhse;
  import nmpra_pkg::*;
  localparam int unsigned N = 4, P = 8, AW = 32;
  localparam logic [31:0] BASE = 32'h0000_0100;  // nhse default
  localparam time TCLK = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [P-1:0] dev_event;
  cfg_req_t cfg;
  logic sched_en, monitor;
  logic [N-1:0] wait_exec;
  logic [EV_NUM-1:0] wait_mask [N];
  logic [EV_EXT-1:0] ext_ev [N];
  logic [$clog2(N)-1:0] run_id;
  logic run_valid, ctx_switch;
  logic [N-1:0] task_ready, task_waiting, int_ev, tmr_ev, tmr_expired;
  logic [P-1:0] int_flag;
  logic [$clog2(P)-1:0] int_num;
  logic int_valid;
  logic [AW-1:0] cell_addr, handler_addr;
  logic handler_valid;

  int checks = 0, failures = 0;
  int n_preempt = 0, n_nest = 0, n_multi = 0, n_blocked = 0, n_disabled = 0;
  int n_monitor = 0, n_reattach = 0, n_latency = 0, n_timer = 0, n_switch = 0;

  nhse dut (.*);

  always #(TCLK / 2) clk = ~clk;

  always @(posedge clk) if (rst_n && ctx_switch) n_switch++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [AW-1:0] handler_of(int k);
    return 32'h0000_1000 + 32'(k) * 32'h40;
  endfunction

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s (run=%0d valid=%b num=%0d)", $time, msg, run_id, run_valid, int_num);
    end
  endtask

  task automatic cfg_write(logic [3:0] region, int idx, logic [31:0] data);
    @(negedge clk);
    cfg.we = 1'b1; cfg.addr = {region, 8'(idx)}; cfg.data = data;
    @(negedge clk);
    cfg.we = 1'b0;
  endtask

  task automatic do_wait(int t, logic [EV_NUM-1:0] mask);
    @(negedge clk);
    wait_exec[t] = 1'b1; wait_mask[t] = mask;
    @(negedge clk);
    wait_exec[t] = 1'b0;
  endtask

  task automatic fire(logic [P-1:0] ev);
    @(negedge clk);
    dev_event = ev;
    @(negedge clk);
    dev_event = '0;
  endtask

  task automatic clear_dev(int k);
    cfg_write(CFG_DEV_CTRL, k, (k == 7) ? 32'h2 : 32'h3);
  endtask

  // wait up to 'cycles' rising edges for sCPU t to run
  task automatic expect_run(int t, int cycles, string msg);
    int c = 0;
    while (!(run_valid && int'(run_id) == t) && c < cycles) begin
      @(posedge clk); #1; c++;
    end
    check(run_valid && int'(run_id) == t, msg);
  endtask

  task automatic expect_handler(int k, string msg);
    #1;
    check(int_valid && int'(int_num) == k && handler_valid
          && cell_addr == BASE + 32'(4 * k) && handler_addr == handler_of(k), msg);
  endtask

  localparam logic [EV_NUM-1:0] M_INT = EV_NUM'(1) << EV_INT;
  localparam logic [EV_NUM-1:0] M_TMR = EV_NUM'(1) << EV_TIMER;
  localparam logic [EV_NUM-1:0] M_MSG = EV_NUM'(1) << EV_MSG;

  initial begin
    time t_ev, t_run;
    automatic int ids [P] = '{1, 1, 1, 2, 3, 0, 3, 2};
    dev_event = '0; cfg = '0; sched_en = 1'b1; monitor = 1'b0; wait_exec = '0;
    for (int t = 0; t < int'(N); t++) begin wait_mask[t] = '0; ext_ev[t] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---------------- set-up ----------------
    for (int k = 0; k < int'(P); k++) begin
      cfg_write(CFG_INT_ID, k, 32'(ids[k]));
      cfg_write(CFG_TRAP, k, handler_of(k));
      cfg_write(CFG_DEV_CTRL, k, (k == 7) ? 32'h0 : 32'h1);
    end
    for (int t = 0; t < int'(N); t++) cfg_write(CFG_TASK, t, 32'h1);
    expect_run(0, 3, "sCPU_0 runs first");
    do_wait(0, M_INT | M_MSG);
    expect_run(1, 3, "sCPU_1 runs after sCPU_0 waits");
    do_wait(1, M_INT);
    do_wait(2, M_INT | M_TMR);
    expect_run(3, 3, "background sCPU_3 runs");

    // ---------------- preempt: interrupt 3 -> sCPU_2 ----------------
    @(negedge clk); dev_event = 8'h08;
    @(posedge clk); #1;
    check(int_flag[3], "device flag 3 set");
    t_ev = $time;
    @(negedge clk); dev_event = '0;
    expect_run(2, 3, "sCPU_2 preempts sCPU_3");
    t_run = $time;
    check(t_run - t_ev <= TCLK + 1, "interrupt served one clock after the flag");
    expect_handler(3, "handler of interrupt 3");
    if (run_id == 2) n_preempt++;

    // ---------------- nest + multi: 0,1,2 together -> sCPU_1 ----------------
    fire(8'h07);
    expect_run(1, 3, "sCPU_1 preempts sCPU_2 (nested)");
    for (int k = 0; k < 3; k++) begin
      expect_handler(k, $sformatf("simultaneous interrupts: number %0d next", k));
      check(run_id == 1, "sCPU_1 keeps running while handling");
      clear_dev(k);
    end
    #1;
    check(!int_valid, "all interrupts of sCPU_1 handled");
    if (failures == 0) n_multi++;
    do_wait(1, M_INT);
    expect_run(2, 3, "sCPU_2 resumes after the nested handler");
    expect_handler(3, "sCPU_2 still sees interrupt 3");
    if (run_id == 2) n_nest++;
    clear_dev(3);
    do_wait(2, M_INT | M_TMR);
    expect_run(3, 3, "back to background");

    // ---------------- blocked: lower-priority interrupt waits ----------------
    fire(8'h20);  // interrupt 5 -> sCPU_0
    expect_run(0, 3, "sCPU_0 runs for interrupt 5");
    expect_handler(5, "handler of interrupt 5");
    fire(8'h08);  // interrupt 3 -> sCPU_2, lower priority
    repeat (4) begin
      @(posedge clk); #1;
      check(run_id == 0, "sCPU_0 not preempted by sCPU_2's interrupt");
    end
    check(task_ready[2], "sCPU_2 ready meanwhile");
    if (run_id == 0 && task_ready[2]) n_blocked++;
    clear_dev(5);
    do_wait(0, M_INT | M_MSG);
    expect_run(2, 3, "sCPU_2 served after sCPU_0 waits");
    clear_dev(3);
    do_wait(2, M_INT | M_TMR);
    expect_run(3, 3, "back to background");

    // ---------------- disabled interrupt 7 ----------------
    fire(8'h80);
    repeat (4) begin
      @(posedge clk); #1;
      check(run_id == 3 && !int_ev[2], "disabled interrupt reaches no task");
    end
    check(int_flag[7], "flag of disabled device is set");
    if (run_id == 3 && int_flag[7]) n_disabled++;
    clear_dev(7);

    // ---------------- monitor ----------------
    @(negedge clk); monitor = 1'b1;
    fire(8'h01);
    repeat (4) begin
      @(posedge clk); #1;
      check(run_id == 3, "no switch while the monitor runs");
    end
    check(task_ready[1], "sCPU_1 ready during monitor");
    if (run_id == 3 && task_ready[1]) n_monitor++;
    @(negedge clk); monitor = 1'b0;
    expect_run(1, 2, "sCPU_1 runs once the monitor ends");
    expect_handler(0, "handler of interrupt 0");
    clear_dev(0);
    do_wait(1, M_INT);
    expect_run(3, 3, "back to background");

    // ---------------- reattach interrupt 4 from sCPU_3 to sCPU_1 ----------------
    cfg_write(CFG_INT_ID, 4, 32'd1);
    fire(8'h10);
    expect_run(1, 3, "interrupt 4 now runs sCPU_1");
    expect_handler(4, "handler of interrupt 4 via sCPU_1");
    if (run_id == 1) n_reattach++;
    clear_dev(4);
    do_wait(1, M_INT);
    expect_run(3, 3, "back to background");

    // ---------------- latency of an asynchronous event ----------------
    for (int i = 0; i < 20; i++) begin
      @(posedge clk);
      repeat ($urandom_range(1, 9)) #1;
      ext_ev[0][2'(EV_MSG - EV_WDOG)] = 1'b1;
      t_ev = $time;
      wait (run_valid && run_id == 0);
      t_run = $time;
      check(t_run - t_ev >= TCLK / 2 && t_run - t_ev <= TCLK * 3 / 2,
            $sformatf("event response %0t within 0.5..1.5 clocks", t_run - t_ev));
      n_latency++;
      @(negedge clk); ext_ev[0] = '0;
      do_wait(0, M_INT | M_MSG);
      expect_run(3, 3, "back to background");
    end

    // ---------------- timer of a running task ----------------
    fire(8'h08);  // wake sCPU_2
    expect_run(2, 3, "sCPU_2 runs");
    clear_dev(3);
    cfg_write(CFG_TMR_THR, 2, 32'd3);
    cfg_write(CFG_TMR_LOAD, 2, 32'd8);
    begin
      automatic int c = 0;
      while (!tmr_ev[2] && c < 20) begin @(posedge clk); #1; c++; end
      // count goes 8 -> 3 in 5 running clocks, the event follows one later;
      // the load write ends at a falling edge, so 6 edges are seen
      check(tmr_ev[2] && c == 6, $sformatf("timer event after %0d clocks", c));
      if (tmr_ev[2]) n_timer++;
    end
    cfg_write(CFG_TMR_CLR, 2, 32'd0);
    #1;
    check(!tmr_ev[2], "timer event cleared");
    do_wait(2, M_INT | M_TMR);
    expect_run(3, 3, "back to background");

    // ---------------- mechanism counts ----------------
    $display("preempt=%0d nest=%0d multi=%0d blocked=%0d disabled=%0d monitor=%0d reattach=%0d latency=%0d timer=%0d switches=%0d",
             n_preempt, n_nest, n_multi, n_blocked, n_disabled, n_monitor, n_reattach, n_latency, n_timer, n_switch);
    check(n_preempt > 0, "preemption happened");
    check(n_nest > 0, "nesting happened");
    check(n_multi > 0, "simultaneous interrupts happened");
    check(n_blocked > 0, "lower-priority interrupt held back");
    check(n_disabled > 0, "disabled interrupt seen");
    check(n_monitor > 0, "monitor lock happened");
    check(n_reattach > 0, "reattachment happened");
    check(n_latency > 0, "event latency measured");
    check(n_timer > 0, "timer event happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
