// tb_scpu_ready: random test of the ready-state logic of one sCPU against a
// reference model (enabled and (not waiting or a waited-for event present);
// the wait ends on the clock after such an event). Directed cases: a wait
// on the interrupt together with the message event, woken by either; an
// event that is present but not selected does not wake the task.
module tb_scpu_ready;
  import nmpra_pkg::*;
  localparam int unsigned EVW = EV_NUM;
  logic clk = 1'b0, rst_n = 1'b0;
  logic task_en, wait_exec;
  logic [EVW-1:0] wait_mask, ev, ev_hit;
  logic ready, waiting;
  logic m_wait;
  logic [EVW-1:0] m_mask;
  int checks = 0, failures = 0;

  scpu_ready #(.EVW(EVW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_comb(string tag);
    logic hit, exp_ready;
    hit = m_wait && |(ev & m_mask);
    exp_ready = task_en && (!m_wait || hit);
    checks++;
    if (ready !== exp_ready || waiting !== m_wait || ev_hit !== (m_wait ? (ev & m_mask) : '0)) begin
      failures++;
      if (failures < 10) $display("%s: ready=%b/%b waiting=%b/%b hit=%b", tag, ready, exp_ready, waiting, m_wait, ev_hit);
    end
  endtask

  task automatic step();
    logic hit;
    hit = m_wait && |(ev & m_mask);
    if (wait_exec) begin m_wait = 1; m_mask = wait_mask; end
    else if (hit) m_wait = 0;
    @(posedge clk); #1;
  endtask

  initial begin
    task_en = 0; wait_exec = 0; wait_mask = '0; ev = '0;
    m_wait = 0; m_mask = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // directed: wait on interrupt + message
    task_en = 1; wait_exec = 1;
    wait_mask = '0; wait_mask[EV_INT] = 1; wait_mask[EV_MSG] = 1;
    #1; check_comb("pre-wait"); step(); wait_exec = 0;
    ev = '0; ev[EV_TIMER] = 1; #1;
    check_comb("unselected event");
    checks++; if (ready) begin failures++; $display("woken by an unselected event"); end
    step();
    ev[EV_MSG] = 1; #1;
    check_comb("message");
    checks++; if (!ready) begin failures++; $display("not woken by message"); end
    step();
    checks++; if (waiting) begin failures++; $display("wait did not end"); end
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      task_en   = $urandom_range(0, 7) != 0;
      wait_exec = $urandom_range(0, 3) == 0;
      wait_mask = EVW'($urandom);
      ev        = ($urandom_range(0, 2) == 0) ? EVW'($urandom) : '0;
      #1;
      check_comb("random");
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
