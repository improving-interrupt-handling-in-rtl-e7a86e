// int_assoc: attaches each of the P system interrupts to one of the N sCPUs.
//
// For every interrupt k there is a global register INT_ID_k holding the id
// of the task the interrupt belongs to. The enabled interrupt INT_k drives a
// demultiplexer that raises exactly one of INT_k_0 .. INT_k_{N-1}, the one
// selected by INT_ID_k; per task t an OR gate collects INT_0_t .. INT_{P-1}_t
// into INT_t. A task may therefore own none, one, several or all interrupts,
// and an interrupt belongs to exactly one task. The structure follows the
// nMPRA interrupt association scheme.
//
// Interface: id_we/id_idx/id_data write INT_ID_{id_idx}. int_req is the
// vector of enabled interrupts. int_mat[t][k] is INT_k_t; int_task[t] is the
// OR for task t. Timing: the registers change on the rising edge; the demux
// and OR are combinational. Reset attaches every interrupt to task 0 (this
// design's choice). The id is stored in binary, ceil(log2 N) bits.
module int_assoc #(
  parameter int unsigned N = 4,
  parameter int unsigned P = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 id_we,
  input  logic [$clog2(P)-1:0] id_idx,
  input  logic [$clog2(N)-1:0] id_data,
  input  logic [P-1:0]         int_req,
  output logic [$clog2(N)-1:0] int_id [P],
  output logic [P-1:0]         int_mat [N],
  output logic [N-1:0]         int_task
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < P; k++) int_id[k] <= '0;
    end else if (id_we) begin
      int_id[id_idx] <= id_data;
    end
  end

  // demultiplexers and OR gates
  always_comb begin
    for (int unsigned t = 0; t < N; t++) begin
      for (int unsigned k = 0; k < P; k++) begin
        int_mat[t][k] = int_req[k] && (int_id[k] == t[$clog2(N)-1:0]);
      end
      int_task[t] = |int_mat[t];
    end
  end

endmodule
