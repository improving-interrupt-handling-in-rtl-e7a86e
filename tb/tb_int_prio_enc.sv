// tb_int_prio_enc: checks the priority encoder.
// For P = 4 all 16 inputs are compared with the two-level equations of the
// 4-input encoder (input 0 highest priority):
//   num[1] = ~r0 & ~r1,  num[0] = ~r0 & r1 | ~r0 & ~r2.
// For P = 8 all 256 inputs are compared with a "first set bit" search.
module tb_int_prio_enc;
  logic [3:0] req4;
  logic [1:0] num4;
  logic       valid4;
  logic [7:0] req8;
  logic [2:0] num8;
  logic       valid8;
  int checks = 0, failures = 0;

  int_prio_enc #(.P(4)) dut4 (.req(req4), .num(num4), .valid(valid4));
  int_prio_enc #(.P(8)) dut8 (.req(req8), .num(num8), .valid(valid8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic pr1, pr0;
      req4 = v[3:0];
      #1;
      pr1 = ~req4[0] & ~req4[1];
      pr0 = (~req4[0] & req4[1]) | (~req4[0] & ~req4[2]);
      checks++;
      if (valid4 !== (v != 0)) begin failures++; $display("P=4 valid wrong for %b", req4); end
      if (v != 0) begin
        checks++;
        if (num4 !== {pr1, pr0}) begin failures++; $display("P=4 req=%b num=%0d expected %0d", req4, num4, {pr1, pr0}); end
      end
    end
    for (int v = 0; v < 256; v++) begin
      int first;
      req8 = v[7:0];
      #1;
      first = -1;
      for (int k = 7; k >= 0; k--) if (v[k]) first = k;
      checks++;
      if (valid8 !== (first >= 0)) begin failures++; $display("P=8 valid wrong for %b", req8); end
      if (first >= 0) begin
        checks++;
        if (int'(num8) != first) begin failures++; $display("P=8 req=%b num=%0d expected %0d", req8, num8, first); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
