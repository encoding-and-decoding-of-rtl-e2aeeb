// tb_ldpc_encoder: checks both encoders against the reference model.
// All 256 messages are encoded by the matrix-1 and matrix-2 encoders and
// compared with the printed matrix-1 generator and with a search for the
// matrix-2 codeword; the two worked examples are checked as strings; the
// output must be zero in reset and must show the codeword one clock edge
// after the message is applied.
module tb_ldpc_encoder;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  logic clk = 1'b0;
  logic rst;
  msg_t data_in;
  cw_t  enc1_q, enc2_q;
  int   checks = 0, failures = 0;

  ldpc_encoder #(.MATRIX(H_REGULAR1)) dut1 (.clk, .rst, .data_in, .enc_data(enc1_q));
  ldpc_encoder #(.MATRIX(H_REGULAR2)) dut2 (.clk, .rst, .data_in, .enc_data(enc2_q));

  always #5 clk = ~clk;

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    data_in = 8'hff;
    repeat (2) @(posedge clk);
    #1;
    check("reset m1", enc1_q, '0);
    check("reset m2", enc2_q, '0);
    @(negedge clk);
    rst = 1'b0;
    // worked examples, position 0 first
    data_in = pstr("10010100")[7:0];
    @(posedge clk); #1;
    check("example m1", enc1_q, pstr("1001010010000100"));
    @(negedge clk);
    data_in = pstr("00110011")[7:0];
    @(posedge clk); #1;
    check("example m2", enc2_q, pstr("0011001100111110"));
    // exhaustive, one new message per clock
    for (int u = 0; u < 256; u++) begin
      @(negedge clk);
      data_in = u[7:0];
      // before the edge the previous codeword is still held (1-cycle latency)
      if (u > 0) check("latency m1", enc1_q, enc1(8'(u - 1)));
      @(posedge clk); #1;
      check("m1 vs printed G", enc1_q, enc1(u[7:0]));
      check("m1 vs search", enc1_q, enc(1, u[7:0]));
      check("m2 vs search", enc2_q, enc(2, u[7:0]));
    end
    // reset clears the output again
    @(negedge clk);
    rst = 1'b1;
    @(posedge clk); #1;
    check("reset again", enc1_q, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
