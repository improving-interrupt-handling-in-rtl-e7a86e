// tb_nhse_all_to_one: the worst case of the interrupt scheme, at the default
// size: every interrupt attached to the same sCPU, a random subset raised in
// the same cycle. Repeated for 40 rounds with a random owning task
// (sCPU_0..2; sCPU_3 is a background task that never waits).
// Checks per round:
//   - the owning task runs one clock after the flags are set;
//   - the handler serves the interrupts in priority order (lowest number
//     first), each through its trap cell BASE + 4*number and the handler
//     address written there;
//   - the hardware decision takes the same time for every interrupt: after
//     the flag of the served interrupt is cleared, the next number and
//     handler address are present at the very next check, zero extra clocks,
//     whatever the interrupt's position in the priority order;
//   - after the last one, the task waits and sCPU_3 runs again.
module tb_nhse_all_to_one;
  import nmpra_pkg::*;
  localparam int unsigned N = 4, P = 8, AW = 32;
  localparam logic [31:0] BASE = 32'h0000_0100;

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

  int checks = 0, failures = 0, served = 0;

  nhse dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [AW-1:0] handler_of(int k);
    return 32'h0000_8000 + 32'(k) * 32'h20;
  endfunction

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s (run=%0d num=%0d valid=%b)", $time, msg, run_id, int_num, int_valid);
    end
  endtask

  task automatic cfg_write(logic [3:0] region, int idx, logic [31:0] data);
    @(negedge clk);
    cfg.we = 1'b1; cfg.addr = {region, 8'(idx)}; cfg.data = data;
    @(negedge clk);
    cfg.we = 1'b0;
  endtask

  task automatic do_wait(int t);
    @(negedge clk);
    wait_exec[t] = 1'b1; wait_mask[t] = EV_NUM'(1) << EV_INT;
    @(negedge clk);
    wait_exec[t] = 1'b0;
  endtask

  initial begin
    dev_event = '0; cfg = '0; sched_en = 1'b1; monitor = 1'b0; wait_exec = '0;
    for (int t = 0; t < int'(N); t++) begin wait_mask[t] = '0; ext_ev[t] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < int'(P); k++) begin
      cfg_write(CFG_TRAP, k, handler_of(k));
      cfg_write(CFG_DEV_CTRL, k, 32'h1);
    end
    for (int t = 0; t < int'(N); t++) cfg_write(CFG_TASK, t, 32'h1);
    for (int t = 0; t < 3; t++) do_wait(t);
    @(posedge clk); #1;
    check(run_id == 3, "background task runs after set-up");

    for (int r = 0; r < 40; r++) begin
      int owner;
      logic [P-1:0] subset;
      owner  = $urandom_range(0, 2);
      subset = (r == 0) ? '1 : P'($urandom_range(1, (1 << P) - 1));
      for (int k = 0; k < int'(P); k++) cfg_write(CFG_INT_ID, k, 32'(owner));
      @(negedge clk); dev_event = subset;
      @(negedge clk); dev_event = '0;
      @(posedge clk); #1;
      check(run_valid && int'(run_id) == owner, $sformatf("round %0d: sCPU_%0d runs one clock after the flags", r, owner));
      for (int k = 0; k < int'(P); k++) begin
        if (subset[k]) begin
          // decision must be present now, without extra clocks
          check(int_valid && int'(int_num) == k && cell_addr == BASE + 32'(4 * k)
                && handler_addr == handler_of(k) && handler_valid,
                $sformatf("round %0d: interrupt %0d decided at once", r, k));
          check(int'(run_id) == owner, "owner keeps running while handling");
          served++;
          cfg_write(CFG_DEV_CTRL, k, 32'h3);
          #1;
        end
      end
      check(!int_valid, $sformatf("round %0d: all interrupts served", r));
      do_wait(owner);
      @(posedge clk); #1;
      check(run_id == 3, $sformatf("round %0d: back to the background task", r));
    end
    $display("interrupts served: %0d", served);
    check(served > 0, "interrupts were served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
