// tb_hse_sched: checks the static-priority scheduler.
// Random ready vectors; after each rising edge run_id must be the lowest
// ready index (sCPU_0 highest priority), run_valid whether any is ready, and
// ctx_switch must flag each change. While monitor or !sched_en the selection
// must hold. Checks the one-clock decision latency: a task that becomes
// ready before a rising edge runs right after it.
module tb_hse_sched;
  localparam int unsigned N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sched_en, monitor;
  logic [N-1:0] ready;
  logic [$clog2(N)-1:0] run_id;
  logic run_valid, ctx_switch;
  int m_id; logic m_valid, m_sw;
  int checks = 0, failures = 0;

  hse_sched #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sched_en = 1; monitor = 0; ready = '0;
    m_id = 0; m_valid = 0; m_sw = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // latency: sCPU_3 running, sCPU_1 becomes ready -> runs after 1 edge
    @(negedge clk); ready = 4'b1000;
    @(posedge clk); #1;
    checks++; if (run_id !== 2'd3 || !run_valid) begin failures++; $display("sCPU_3 not running"); end
    @(negedge clk); ready = 4'b1010;
    @(posedge clk); #1;
    checks++; if (run_id !== 2'd1 || !ctx_switch) begin failures++; $display("preemption took more than one clock"); end
    m_id = 1; m_valid = 1;
    for (int i = 0; i < 2000; i++) begin
      int b; logic bv; logic hold;
      @(negedge clk);
      ready    = N'($urandom);
      monitor  = $urandom_range(0, 5) == 0;
      sched_en = $urandom_range(0, 9) != 0;
      b = 0; bv = 0;
      for (int t = int'(N) - 1; t >= 0; t--) if (ready[t]) begin b = t; bv = 1; end
      hold = monitor || !sched_en;
      if (hold) m_sw = 0;
      else begin
        m_sw = (bv != m_valid) || (bv && b != m_id);
        m_id = b; m_valid = bv;
      end
      @(posedge clk); #1;
      checks++;
      if (run_valid !== m_valid || (m_valid && int'(run_id) != m_id) || ctx_switch !== m_sw) begin
        failures++;
        if (failures < 10) $display("i=%0d ready=%b mon=%b run=%0d/%0d valid=%b/%b sw=%b/%b", i, ready, monitor, run_id, m_id, run_valid, m_valid, ctx_switch, m_sw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
