// int_dev_flags: interrupt bits of the P interrupt-generating devices.
//
// Each device k has a condition flag, a validation (enable) bit and a clear
// bit, as the nMPRA interrupt scheme assumes of its devices. A one-cycle
// pulse on dev_event[k] sets the flag; the flag stays set until software
// writes the clear bit. INT_k (int_req[k]) is the flag gated by the enable
// bit, so an interrupt that is not enabled reaches no task.
//
// Interface: ctrl_we/ctrl_idx/ctrl_en/ctrl_clr write device ctrl_idx's
// enable bit and, when ctrl_clr is 1, clear its flag. A new event in the same
// cycle as a clear wins (the flag stays set), so no event is lost.
// Timing: int_req follows dev_event one clock later. Reset clears flags and
// enables. The register layout and the set-over-clear rule are this design's
// own choices.
module int_dev_flags #(
  parameter int unsigned P = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [P-1:0]         dev_event,
  input  logic                 ctrl_we,
  input  logic [$clog2(P)-1:0] ctrl_idx,
  input  logic                 ctrl_en,
  input  logic                 ctrl_clr,
  output logic [P-1:0]         flag,
  output logic [P-1:0]         enable,
  output logic [P-1:0]         int_req
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flag   <= '0;
      enable <= '0;
    end else begin
      for (int unsigned k = 0; k < P; k++) begin
        if (ctrl_we && ctrl_idx == k[$clog2(P)-1:0]) begin
          enable[k] <= ctrl_en;
          if (ctrl_clr) flag[k] <= 1'b0;
        end
        if (dev_event[k]) flag[k] <= 1'b1;
      end
    end
  end

  assign int_req = flag & enable;

endmodule
