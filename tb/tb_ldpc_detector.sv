// tb_ldpc_detector: for both matrices, all 65536 16-bit words are applied;
// the error flag must be set exactly when some check of the reference
// matrix fails, the syndrome must be zero exactly when the flag is clear,
// and syndrome bit 7 (the dependent row) must stay zero.  The received words
// of the two worked examples must be flagged.
module tb_ldpc_detector;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  cw_t  rx;
  syn_t syn1, syn2;
  logic err1, err2;
  int   checks = 0, failures = 0;

  ldpc_detector #(.MATRIX(H_REGULAR1)) dut1 (.rx, .syndrome(syn1), .err(err1));
  ldpc_detector #(.MATRIX(H_REGULAR2)) dut2 (.rx, .syndrome(syn2), .err(err2));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: rx %h got %b expected %b", what, rx, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rx = pstr("0001010010000100");
    #1 check("example m1 flagged", err1, 1'b1);
    rx = pstr("0011001000111110");
    #1 check("example m2 flagged", err2, 1'b1);
    rx = pstr("1001010010000100");
    #1 check("example m1 codeword", err1, 1'b0);
    rx = pstr("0011001100111110");
    #1 check("example m2 codeword", err2, 1'b0);
    for (int w = 0; w < 65536; w++) begin
      rx = w[15:0];
      #1;
      check("m1 err", err1, ref_checks(1, rx) != '0);
      check("m2 err", err2, ref_checks(2, rx) != '0);
      check("m1 syndrome zero", syn1 == '0, !err1);
      check("m2 syndrome zero", syn2 == '0, !err2);
      check("m1 row 7", syn1[7], 1'b0);
      check("m2 row 7", syn2[7], 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
