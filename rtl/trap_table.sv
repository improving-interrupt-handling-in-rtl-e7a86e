// trap_table: the cells-trap table of the hardware interrupt solution.
//
// The number of the highest-priority pending interrupt, produced by the
// priority encoder, is multiplied by 4 to give the byte displacement of a
// trap cell; the cell holds the address of that interrupt's handler, which is
// read out so that control can be transferred to the handler. Every
// interrupt therefore costs the same decision time.
//
// The table holds P cells of AW bits, one per system interrupt; as each
// interrupt belongs to exactly one task, one table serves all sCPUs (this
// design's choice). The cells start at byte address TRAP_BASE in the
// processor's address map (the value is this design's choice).
//
// Interface: wr_we/wr_idx/wr_data write cell wr_idx. rd_num/rd_valid select
// a cell; cell_off = 4*rd_num, cell_addr = TRAP_BASE + cell_off, and
// handler_addr is the content of that cell, with handler_valid = rd_valid.
// Timing: write on the rising edge, read combinational. Reset clears the
// cells.
module trap_table #(
  parameter int unsigned P         = 8,
  parameter int unsigned AW        = 32,
  parameter logic [31:0] TRAP_BASE = 32'h0000_0100
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_we,
  input  logic [$clog2(P)-1:0] wr_idx,
  input  logic [AW-1:0]        wr_data,
  input  logic [$clog2(P)-1:0] rd_num,
  input  logic                 rd_valid,
  output logic [AW-1:0]        cell_off,
  output logic [AW-1:0]        cell_addr,
  output logic [AW-1:0]        handler_addr,
  output logic                 handler_valid
);

  logic [AW-1:0] cells [P];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < P; k++) cells[k] <= '0;
    end else if (wr_we) begin
      cells[wr_idx] <= wr_data;
    end
  end

  always_comb begin
    cell_off      = AW'(rd_num) << 2;
    cell_addr     = AW'(TRAP_BASE) + cell_off;
    handler_addr  = cells[cell_off[$clog2(P)+1:2]];
    handler_valid = rd_valid;
  end

endmodule
