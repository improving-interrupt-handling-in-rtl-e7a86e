// tb_task_timer: loads budgets and thresholds, runs the task for random
// stretches, and checks the count (decrements only while running), the
// near-completion event (raised once, one clock after count <= threshold,
// held until cleared, not raised again after a clear) and expiry.
module tb_task_timer;
  localparam int unsigned W = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load_we, thr_we, clr, run;
  logic [W-1:0] load_val, thr_val, count;
  logic ev, expired;
  int m_count, m_thr; logic m_active, m_warned, m_ev;
  int n_ev = 0;
  int checks = 0, failures = 0;

  task_timer #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_we = 0; thr_we = 0; clr = 0; run = 0; load_val = '0; thr_val = '0;
    m_count = 0; m_thr = 0; m_active = 0; m_warned = 0; m_ev = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 8000; i++) begin
      @(negedge clk);
      load_we  = $urandom_range(0, 99) == 0;
      load_val = W'($urandom_range(5, 60));
      thr_we   = $urandom_range(0, 199) == 0;
      thr_val  = W'($urandom_range(0, 10));
      clr      = $urandom_range(0, 19) == 0;
      run      = $urandom_range(0, 2) != 0;
      // reference
      if (thr_we) m_thr = int'(thr_val);
      if (load_we) begin
        m_count = int'(load_val); m_active = 1; m_warned = 0; m_ev = 0;
      end else begin
        int c_old; c_old = m_count;
        if (m_active && run && m_count != 0) m_count--;
        if (m_active && !m_warned && c_old <= m_thr_prev()) begin
          m_warned = 1; m_ev = 1; n_ev++;
        end else if (clr) m_ev = 0;
      end
      @(posedge clk); #1;
      checks++;
      if (int'(count) != m_count || ev !== m_ev || expired !== (m_active && m_count == 0)) begin
        failures++;
        if (failures < 10) $display("i=%0d count=%0d/%0d ev=%b/%b exp=%b", i, count, m_count, ev, m_ev, expired);
      end
    end
    checks++;
    if (n_ev == 0) begin failures++; $display("timer event never raised"); end
    $display("timer events: %0d", n_ev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the threshold compared in a cycle is the one held before that cycle's write
  int thr_hold = 0;
  always @(posedge clk) thr_hold <= m_thr;
  function automatic int m_thr_prev();
    return thr_hold;
  endfunction
endmodule
