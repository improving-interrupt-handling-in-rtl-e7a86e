// tb_int_dev_flags: random test of the device interrupt bits.
// A reference model in the testbench tracks flag and enable per device and
// is compared with the outputs after every clock. Also checks that an event
// arriving together with a clear keeps the flag set.
module tb_int_dev_flags;
  localparam int unsigned P = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [P-1:0] dev_event;
  logic ctrl_we, ctrl_en, ctrl_clr;
  logic [$clog2(P)-1:0] ctrl_idx;
  logic [P-1:0] flag, enable, int_req;
  logic [P-1:0] m_flag, m_en;
  int checks = 0, failures = 0;

  int_dev_flags #(.P(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dev_event = '0; ctrl_we = 0; ctrl_en = 0; ctrl_clr = 0; ctrl_idx = '0;
    m_flag = '0; m_en = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      dev_event = ($urandom_range(0, 3) == 0) ? P'($urandom) : '0;
      ctrl_we   = $urandom_range(0, 1) == 1;
      ctrl_idx  = $clog2(P)'($urandom);
      ctrl_en   = $urandom_range(0, 2) != 0;
      ctrl_clr  = $urandom_range(0, 1) == 1;
      if (i == 100) begin  // same-cycle event and clear
        dev_event = 8'h01; ctrl_we = 1; ctrl_idx = 0; ctrl_clr = 1; ctrl_en = 1;
      end
      // reference update
      if (ctrl_we) begin
        m_en[ctrl_idx] = ctrl_en;
        if (ctrl_clr) m_flag[ctrl_idx] = 1'b0;
      end
      m_flag = m_flag | dev_event;
      @(posedge clk); #1;
      checks++;
      if (flag !== m_flag || enable !== m_en || int_req !== (m_flag & m_en)) begin
        failures++;
        if (failures < 10) $display("mismatch i=%0d flag=%h/%h en=%h/%h req=%h", i, flag, m_flag, enable, m_en, int_req);
      end
      if (i == 100) begin
        checks++;
        if (!flag[0] || !int_req[0]) begin failures++; $display("event lost against clear"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
