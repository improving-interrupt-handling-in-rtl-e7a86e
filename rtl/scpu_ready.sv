// scpu_ready: ready-state logic of one sCPU (one task) in the nHSE.
//
// A task responds to an event only while it is blocked in a wait
// instruction whose operand selects (masks in) that event; one wait can
// select several events at once, for instance an interrupt together with a
// mutex and a message. The task is ready when it is enabled and either is
// not waiting or one of the events it waits for is present. When such an
// event is present the waiting state ends on the next rising edge, so the
// task resumes; the event itself stays until software treats and clears it
// at its source.
//
// Interface: task_en enables the task; wait_exec (one-cycle pulse) records
// that the task executed a wait with mask wait_mask; ev are the event lines
// (IntEv, timer, ...), already synchronised. ready goes to the scheduler;
// waiting and ev_hit (events that are present and waited for) are status.
// Timing: ready is combinational from ev, so an event captured on a falling
// edge is seen by the scheduler on the next rising edge. Reset: not waiting,
// empty mask. The register form is this design's own choice.
module scpu_ready
  import nmpra_pkg::*;
#(
  parameter int unsigned EVW = EV_NUM
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           task_en,
  input  logic           wait_exec,
  input  logic [EVW-1:0] wait_mask,
  input  logic [EVW-1:0] ev,
  output logic           ready,
  output logic           waiting,
  output logic [EVW-1:0] ev_hit
);

  logic [EVW-1:0] mask_q;

  assign ev_hit = waiting ? (ev & mask_q) : '0;
  assign ready  = task_en && (!waiting || (|ev_hit));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      waiting <= 1'b0;
      mask_q  <= '0;
    end else if (wait_exec) begin
      waiting <= 1'b1;
      mask_q  <= wait_mask;
    end else if (|ev_hit) begin
      waiting <= 1'b0;
    end
  end

endmodule
