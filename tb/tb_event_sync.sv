// tb_event_sync: checks that the event lines are sampled on the falling
// edge only: q must not change at a rising edge and must equal the value d
// had just before the last falling edge.
module tb_event_sync;
  localparam int unsigned W = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] d, q, m_q;
  int checks = 0, failures = 0;

  event_sync #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    @(negedge clk); #1;
    checks++;
    if (q !== '0) begin failures++; $display("q not cleared by reset"); end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    m_q = '0;
    for (int i = 0; i < 1000; i++) begin
      @(posedge clk); #1;
      checks++;
      if (q !== m_q) begin failures++; if (failures < 10) $display("q changed at rising edge: %h vs %h", q, m_q); end
      d = W'($urandom);
      @(negedge clk);
      m_q = d;
      #1;
      checks++;
      if (q !== m_q) begin failures++; if (failures < 10) $display("q %h expected %h after falling edge", q, m_q); end
      d = W'($urandom);  // changes between falling and rising edge must not show
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
