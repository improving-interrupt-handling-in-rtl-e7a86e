// tb_int_assoc: checks the INT_ID registers, demultiplexers and OR gates.
// Random INT_ID writes and random enabled-interrupt vectors; the expected
// INT_k_t matrix and per-task OR are computed from a copy of the ids kept by
// the testbench. Also runs the two corner cases of the scheme: all
// interrupts attached to one task, and a task that owns no interrupt.
module tb_int_assoc;
  localparam int unsigned N = 4, P = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic id_we;
  logic [$clog2(P)-1:0] id_idx;
  logic [$clog2(N)-1:0] id_data;
  logic [P-1:0] int_req;
  logic [$clog2(N)-1:0] int_id [P];
  logic [P-1:0] int_mat [N];
  logic [N-1:0] int_task;
  int m_id [P];
  int checks = 0, failures = 0;

  int_assoc #(.N(N), .P(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string tag);
    logic [N-1:0] exp_task;
    exp_task = '0;
    for (int t = 0; t < int'(N); t++) begin
      for (int k = 0; k < int'(P); k++) begin
        logic e;
        e = int_req[k] && (m_id[k] == t);
        checks++;
        if (int_mat[t][k] !== e) begin
          failures++;
          if (failures < 10) $display("%s: INT_%0d_%0d = %b, expected %b", tag, k, t, int_mat[t][k], e);
        end
        if (e) exp_task[t] = 1'b1;
      end
    end
    checks++;
    if (int_task !== exp_task) begin
      failures++;
      if (failures < 10) $display("%s: int_task %b expected %b", tag, int_task, exp_task);
    end
  endtask

  task automatic write_id(int k, int t);
    @(negedge clk);
    id_we = 1; id_idx = k[$clog2(P)-1:0]; id_data = t[$clog2(N)-1:0];
    @(negedge clk);
    id_we = 0;
    m_id[k] = t;
  endtask

  initial begin
    id_we = 0; id_idx = '0; id_data = '0; int_req = '0;
    for (int k = 0; k < int'(P); k++) m_id[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // all interrupts attached to sCPU_2, all pending
    for (int k = 0; k < int'(P); k++) write_id(k, 2);
    int_req = '1; #1;
    compare("all_to_2");
    checks++;
    if (int_task !== 4'b0100) begin failures++; $display("all_to_2 task vector %b", int_task); end
    // random traffic
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      id_we = $urandom_range(0, 1) == 1;
      id_idx = $clog2(P)'($urandom);
      id_data = $clog2(N)'($urandom);
      int_req = P'($urandom);
      if (id_we) m_id[id_idx] = id_data;
      @(posedge clk); #1;
      compare("random");
    end
    id_we = 0;
    // sCPU_3 owns nothing: none of the ids is 3
    for (int k = 0; k < int'(P); k++) write_id(k, k % 3);
    int_req = '1; #1;
    compare("none_to_3");
    checks++;
    if (int_task[3] !== 1'b0) begin failures++; $display("sCPU_3 got an interrupt"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
