// tb_awgn_channel: random codewords and noise words; each noise bit must
// flip exactly the codeword bit at the same position in the low byte and
// nothing else.  Includes the two worked channel examples.
module tb_awgn_channel;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  cw_t  enc_data, err_data_out, exp;
  logic [NOISE_W-1:0] noise;
  int   checks = 0, failures = 0;

  awgn_channel dut (.enc_data, .noise, .err_data_out);

  task automatic check(string what);
    checks++;
    if (err_data_out !== exp) begin
      failures++;
      $display("FAIL %s: in %h noise %h got %h expected %h", what, enc_data, noise,
               err_data_out, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enc_data = pstr("1001010010000100");
    noise    = pstr("10000000")[7:0];
    exp      = pstr("0001010010000100");
    #1 check("example m1");
    enc_data = pstr("0011001100111110");
    noise    = pstr("00000001")[7:0];
    exp      = pstr("0011001000111110");
    #1 check("example m2");
    for (int t = 0; t < 2000; t++) begin
      enc_data = 16'($urandom);
      noise    = 8'($urandom);
      exp      = enc_data;
      for (int i = 0; i < 8; i++)
        if (noise[i]) exp[i] = !exp[i];
      #1 check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
