// tb_bit_flip_decoder: decoders for matrix 1 and 2 with the single pass of
// the described design, and a matrix-1 decoder allowed 3 passes, all fed the
// same received word.
//   * reset clears the outputs;
//   * the two worked examples decode to their messages;
//   * for every message and both matrices, the clean codeword is passed
//     through untouched (done 1 edge after load is sampled) and every one of
//     the 16 single-bit errors is corrected with one flip (done 2 edges after);
//   * random words with 2 or 3 errors are compared with the reference
//     bit-flipping model: corrected word, fail flag, flips and latency.
module tb_bit_flip_decoder;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int NDUT = 3;
  localparam int SEL [NDUT] = '{1, 2, 1};
  localparam int ITR [NDUT] = '{1, 1, 3};

  logic clk = 1'b0;
  logic rst, load;
  cw_t  rx_data;
  msg_t decode_out [NDUT];
  cw_t  corrected [NDUT];
  logic done [NDUT], busy [NDUT], err_detected [NDUT], fail [NDUT];
  syn_t rx_syndrome [NDUT];
  logic [4:0] flip_count [NDUT];
  int   checks = 0, failures = 0;
  int   n_bypass = 0, n_corrected = 0, n_failed = 0;

  bit_flip_decoder #(.MATRIX(H_REGULAR1), .MAX_ITER(1)) dut0 (.clk, .rst, .load, .rx_data,
    .decode_out(decode_out[0]), .corrected(corrected[0]), .done(done[0]), .busy(busy[0]),
    .err_detected(err_detected[0]), .rx_syndrome(rx_syndrome[0]),
    .flip_count(flip_count[0]), .fail(fail[0]));
  bit_flip_decoder #(.MATRIX(H_REGULAR2), .MAX_ITER(1)) dut1 (.clk, .rst, .load, .rx_data,
    .decode_out(decode_out[1]), .corrected(corrected[1]), .done(done[1]), .busy(busy[1]),
    .err_detected(err_detected[1]), .rx_syndrome(rx_syndrome[1]),
    .flip_count(flip_count[1]), .fail(fail[1]));
  bit_flip_decoder #(.MATRIX(H_REGULAR1), .MAX_ITER(3)) dut2 (.clk, .rst, .load, .rx_data,
    .decode_out(decode_out[2]), .corrected(corrected[2]), .done(done[2]), .busy(busy[2]),
    .err_detected(err_detected[2]), .rx_syndrome(rx_syndrome[2]),
    .flip_count(flip_count[2]), .fail(fail[2]));

  always #5 clk = ~clk;

  task automatic check(string what, int d, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 30)
        $display("FAIL %s dut%0d rx %h: got %h expected %h", what, d, rx_data, got, exp);
    end
  endtask

  // Decode one word on all decoders; lat[d] = edges from the edge that
  // samples load to the edge after which done is high.
  task automatic run(cw_t y, output int lat [NDUT]);
    @(negedge clk);
    rx_data = y;
    load = 1'b1;
    @(posedge clk);
    @(negedge clk);
    load = 1'b0;
    for (int d = 0; d < NDUT; d++) lat[d] = -1;
    for (int c = 1; c <= 8; c++) begin
      @(posedge clk); #1;
      for (int d = 0; d < NDUT; d++)
        if (done[d] && lat[d] < 0) lat[d] = c;
    end
  endtask

  // Compare every decoder with the reference for received word y.
  task automatic run_and_check(cw_t y, string what);
    int lat [NDUT];
    cw_t exp;
    int passes, nfl;
    run(y, lat);
    for (int d = 0; d < NDUT; d++) begin
      exp = bf_decode(SEL[d], y, ITR[d], passes, nfl);
      check({what, " word"}, d, corrected[d], exp);
      check({what, " message"}, d, 16'(decode_out[d]), 16'(exp[7:0]));
      check({what, " fail"}, d, 16'(fail[d]), 16'(ref_checks(SEL[d], exp) != '0));
      check({what, " detected"}, d, 16'(err_detected[d]), 16'(ref_checks(SEL[d], y) != '0));
      check({what, " syndrome"}, d, 16'(rx_syndrome[d] != '0), 16'(ref_checks(SEL[d], y) != '0));
      check({what, " flips"}, d, 16'(flip_count[d]), 16'(nfl > 31 ? 31 : nfl));  // counter saturates
      check({what, " latency"}, d, 16'(lat[d]), 16'(passes + 1));
      if (d < 2) begin
        if (ref_checks(SEL[d], y) == '0) n_bypass++;
        else if (ref_checks(SEL[d], exp) == '0) n_corrected++;
        else n_failed++;
      end
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat [NDUT];
    cw_t c1, c2, err;
    int nerr;
    rst = 1'b1;
    load = 1'b0;
    rx_data = '0;
    repeat (3) @(posedge clk);
    #1;
    for (int d = 0; d < NDUT; d++) begin
      check("reset message", d, 16'(decode_out[d]), '0);
      check("reset done", d, 16'(done[d]), '0);
    end
    @(negedge clk);
    rst = 1'b0;

    // worked examples
    run(pstr("0001010010000100"), lat);
    check("example m1 message", 0, 16'(decode_out[0]), 16'(pstr("10010100")));
    check("example m1 word", 0, corrected[0], pstr("1001010010000100"));
    check("example m1 latency", 0, 16'(lat[0]), 16'd2);
    run(pstr("0011001000111110"), lat);
    check("example m2 message", 1, 16'(decode_out[1]), 16'(pstr("00110011")));
    check("example m2 word", 1, corrected[1], pstr("0011001100111110"));

    // every message: clean word and all single errors
    for (int u = 0; u < 256; u++) begin
      c1 = enc1(u[7:0]);
      c2 = enc(2, u[7:0]);
      for (int e = -1; e < 16; e++) begin
        err = (e < 0) ? '0 : cw_t'(1) << e;
        run(c1 ^ err, lat);
        check("single m1", 0, 16'(decode_out[0]), 16'(u));
        check("single m1 flips", 0, 16'(flip_count[0]), (e < 0) ? 16'd0 : 16'd1);
        check("single m1 latency", 0, 16'(lat[0]), (e < 0) ? 16'd1 : 16'd2);
        check("single m1 fail", 0, 16'(fail[0]), 16'd0);
        n_bypass += (e < 0);
        n_corrected += (e >= 0);
        run(c2 ^ err, lat);
        check("single m2", 1, 16'(decode_out[1]), 16'(u));
        check("single m2 flips", 1, 16'(flip_count[1]), (e < 0) ? 16'd0 : 16'd1);
        check("single m2 latency", 1, 16'(lat[1]), (e < 0) ? 16'd1 : 16'd2);
        check("single m2 fail", 1, 16'(fail[1]), 16'd0);
      end
    end

    // multiple errors against the reference model
    for (int t = 0; t < 1500; t++) begin
      err = '0;
      nerr = 2 + (t % 2);
      while ($countones(err) < nerr) err[$urandom_range(15, 0)] = 1'b1;
      run_and_check(enc1(8'($urandom)) ^ err, "multi m1");
    end
    for (int t = 0; t < 500; t++) begin
      err = '0;
      nerr = 2 + (t % 2);
      while ($countones(err) < nerr) err[$urandom_range(15, 0)] = 1'b1;
      run_and_check(enc(2, 8'($urandom)) ^ err, "multi m2");
    end

    $display("decodes: passed through %0d, corrected %0d, left failing %0d",
             n_bypass, n_corrected, n_failed);
    checks += 3;
    if (n_bypass == 0 || n_corrected == 0 || n_failed == 0) begin
      failures++;
      $display("FAIL a decoder outcome never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
