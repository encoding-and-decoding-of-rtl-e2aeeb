// tb_variable_node: all patterns of a degree-2 variable node (three votes)
// and of a degree-3 node (four votes, ties keep the bit); v_out must be the
// majority and flip must mark a changed bit.
module tb_variable_node;
  logic       v2, v3;
  logic [1:0] m2;
  logic [2:0] m3;
  logic       o2, f2, o3, f3;
  int         checks = 0, failures = 0;

  variable_node #(.DEG(2)) dut2 (.v_in(v2), .msg_in(m2), .v_out(o2), .flip(f2));
  variable_node #(.DEG(3)) dut3 (.v_in(v3), .msg_in(m3), .v_out(o3), .flip(f3));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    logic exp;
    for (int p = 0; p < 8; p++) begin
      {v2, m2} = p[2:0];
      #1;
      ones = int'(v2) + int'(m2[0]) + int'(m2[1]);
      exp = (ones >= 2);
      checks += 2;
      if (o2 !== exp) begin failures++; $display("FAIL deg2 %b got %b", p[2:0], o2); end
      if (f2 !== (exp ^ v2)) begin failures++; $display("FAIL deg2 flip %b", p[2:0]); end
    end
    for (int p = 0; p < 16; p++) begin
      {v3, m3} = p[3:0];
      #1;
      ones = int'(v3) + int'(m3[0]) + int'(m3[1]) + int'(m3[2]);
      exp = (ones > 2) ? 1'b1 : (ones < 2) ? 1'b0 : v3;
      checks += 2;
      if (o3 !== exp) begin failures++; $display("FAIL deg3 %b got %b", p[3:0], o3); end
      if (f3 !== (exp ^ v3)) begin failures++; $display("FAIL deg3 flip %b", p[3:0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
