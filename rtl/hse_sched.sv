// hse_sched: static-priority selection of the running sCPU.
//
// Priorities of tasks and interrupts form one space: interrupts are handled
// by the tasks they are attached to, so choosing the task is choosing the
// interrupt handler. sCPU_0 has the highest priority and priority falls with
// the index. Every rising edge the scheduler picks the highest-priority
// ready sCPU; a ready task thus preempts any strictly lower-priority running
// task, and never one of higher priority. Switching is a change of run_id
// only, because each sCPU owns its pipeline registers and register file: no
// context is saved or restored, nothing is flushed, and preempted tasks
// resume where they stopped (interrupts nest).
//
// While monitor is 1 the real-time kernel (a monitor) runs and cannot be
// interrupted: the selection is held. sched_en enables the static
// scheduler; when it is 0 the selection is also held.
//
// Interface: ready (N) in; run_id/run_valid: running sCPU; ctx_switch: one
// cycle pulse with each change of run_id or run_valid. Timing: registered,
// one clock from ready to run_id. Reset: no task running.
module hse_sched #(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sched_en,
  input  logic                 monitor,
  input  logic [N-1:0]         ready,
  output logic [$clog2(N)-1:0] run_id,
  output logic                 run_valid,
  output logic                 ctx_switch
);

  logic [$clog2(N)-1:0] best_id;
  logic                 best_valid;

  always_comb begin
    best_id    = '0;
    best_valid = 1'b0;
    for (int t = int'(N) - 1; t >= 0; t--) begin
      if (ready[t]) begin
        best_id    = t[$clog2(N)-1:0];
        best_valid = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_id     <= '0;
      run_valid  <= 1'b0;
      ctx_switch <= 1'b0;
    end else if (sched_en && !monitor) begin
      run_id     <= best_id;
      run_valid  <= best_valid;
      ctx_switch <= (best_valid != run_valid) ||
                    (best_valid && best_id != run_id);
    end else begin
      ctx_switch <= 1'b0;
    end
  end

endmodule
