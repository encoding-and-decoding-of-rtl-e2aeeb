// tb_check_node: all 16 input patterns of a degree-4 check node; each reply
// must be the XOR of the other three inputs and unsat the XOR of all four.
// Includes the first check node of the matrix-1 worked example.
module tb_check_node;
  logic [3:0] v_in, msg_out, exp;
  logic       unsat;
  int         checks = 0, failures = 0;

  check_node #(.DEG(4)) dut (.v_in, .msg_out, .unsat);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // check node 1 of the matrix-1 example: bits v0,v2,v8,v11 = 0,0,1,0
    // gives replies 1,1,0,1
    v_in = 4'b0100;
    #1;
    checks++;
    if (msg_out !== 4'b1011) begin
      failures++;
      $display("FAIL example: got %b", msg_out);
    end
    for (int p = 0; p < 16; p++) begin
      v_in = p[3:0];
      #1;
      for (int e = 0; e < 4; e++) begin
        exp[e] = 1'b0;
        for (int o = 0; o < 4; o++)
          if (o != e) exp[e] = exp[e] ^ v_in[o];
      end
      checks += 2;
      if (msg_out !== exp) begin
        failures++;
        $display("FAIL in %b got %b expected %b", v_in, msg_out, exp);
      end
      if (unsat !== (v_in[0] ^ v_in[1] ^ v_in[2] ^ v_in[3])) begin
        failures++;
        $display("FAIL unsat for %b", v_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
