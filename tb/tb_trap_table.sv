// tb_trap_table: fills the trap cells with random handler addresses, then
// for every interrupt number checks the cell displacement (4 * number), the
// cell address (base + displacement), the handler address read and the
// valid flag.
module tb_trap_table;
  localparam int unsigned P = 8, AW = 32;
  localparam logic [31:0] BASE = 32'h0000_0400;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_we;
  logic [$clog2(P)-1:0] wr_idx, rd_num;
  logic [AW-1:0] wr_data, cell_off, cell_addr, handler_addr;
  logic rd_valid, handler_valid;
  logic [AW-1:0] m_cell [P];
  int checks = 0, failures = 0;

  trap_table #(.P(P), .AW(AW), .TRAP_BASE(BASE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_we = 0; wr_idx = '0; wr_data = '0; rd_num = '0; rd_valid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 20; r++) begin
      for (int k = 0; k < int'(P); k++) begin
        @(negedge clk);
        wr_we = 1; wr_idx = k[$clog2(P)-1:0]; wr_data = $urandom & 32'hFFFF_FFFC;
        m_cell[k] = wr_data;
      end
      @(negedge clk);
      wr_we = 0;
      for (int k = 0; k < int'(P); k++) begin
        rd_num = k[$clog2(P)-1:0];
        rd_valid = $urandom_range(0, 1) == 1;
        #1;
        checks++;
        if (cell_off !== AW'(4 * k) || cell_addr !== BASE + AW'(4 * k)
            || handler_addr !== m_cell[k] || handler_valid !== rd_valid) begin
          failures++;
          if (failures < 10) $display("num=%0d off=%h addr=%h handler=%h expected %h", k, cell_off, cell_addr, handler_addr, m_cell[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
