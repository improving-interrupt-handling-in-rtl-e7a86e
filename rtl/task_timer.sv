// task_timer: time budget of one task, with a near-completion event.
//
// Software loads the time allocated to the task (in clock cycles) and a
// warning threshold. The counter decrements in every cycle in which the task
// is running; when the remaining time first drops to the threshold or below,
// the timer event is raised so that the task can be told its time is nearly
// used. The event stays until cleared; expired is 1 once the budget is
// used up. Counting only while the task runs, and the threshold register,
// are this design's own choices.
//
// Interface: load_we/load_val start a new budget (and clear the event);
// thr_we/thr_val set the threshold; clr clears the event; run is 1 while the
// task is the running sCPU. Timing: the event rises one clock after the
// count reaches the threshold. Reset: idle, count and threshold 0.
module task_timer #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load_we,
  input  logic [W-1:0] load_val,
  input  logic         thr_we,
  input  logic [W-1:0] thr_val,
  input  logic         clr,
  input  logic         run,
  output logic [W-1:0] count,
  output logic         ev,
  output logic         expired
);

  logic [W-1:0] thr;
  logic         active;
  logic         warned;

  assign expired = active && (count == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count  <= '0;
      thr    <= '0;
      active <= 1'b0;
      warned <= 1'b0;
      ev     <= 1'b0;
    end else begin
      if (thr_we) thr <= thr_val;
      if (load_we) begin
        count  <= load_val;
        active <= 1'b1;
        warned <= 1'b0;
        ev     <= 1'b0;
      end else begin
        if (active && run && count != '0) count <= count - 1'b1;
        if (active && !warned && count <= thr) begin
          warned <= 1'b1;
          ev     <= 1'b1;
        end else if (clr) begin
          ev <= 1'b0;
        end
      end
    end
  end

endmodule
