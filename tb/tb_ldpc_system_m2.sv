// tb_ldpc_system_m2: end-to-end test of the LDPC link built for regular
// matrix 2 (one flipping pass); otherwise the same as tb_ldpc_system.
// Each transaction applies a message and a noise word, checks the encoder
// and channel outputs, loads the decoder and checks the decoded message,
// the flags and the latency against the reference model.  Covered:
//   * reset clearing encoder and decoder outputs;
//   * the worked example (message 00110011, noise 00000001);
//   * clean words passed through (no noise) and single-bit noise corrected,
//     for all 256 messages and all 8 noise positions;
//   * random 2- and 3-bit noise, which leaves some words failing;
//   * a new message entering the encoder while the decoder is busy, and a
//     load raised while busy, both of which must not disturb the decode.
// Every mechanism must occur at least once.
module tb_ldpc_system_m2;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int SEL = 2;

  logic clk = 1'b0;
  logic rst, load;
  msg_t data_in;
  logic [NOISE_W-1:0] noise;
  cw_t  enc_data, err_data_out, corrected;
  msg_t decode_out;
  logic done, busy, err_detected, fail;
  syn_t syndrome;
  logic [4:0] flip_count;
  int   checks = 0, failures = 0;
  int   n_reset = 0, n_bypass = 0, n_corrected = 0, n_failed = 0;
  int   n_overlap = 0, n_load_busy = 0;

  ldpc_system #(.MATRIX(H_REGULAR2)) dut (.clk, .rst, .load, .data_in, .noise, .enc_data, .err_data_out,
                   .decode_out, .corrected, .done, .busy, .err_detected, .syndrome,
                   .flip_count, .fail);

  always #5 clk = ~clk;

  function automatic cw_t encode(msg_t u);
    return (SEL == 1) ? enc1(u) : enc(SEL, u);
  endfunction

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 30)
        $display("FAIL %s: data %h noise %h got %h expected %h", what, data_in, noise, got, exp);
    end
  endtask

  // One transaction.  overlap: change data_in while decoding;
  // load_busy: raise load for one cycle while decoding.
  task automatic xfer(msg_t u, logic [NOISE_W-1:0] n, bit overlap, bit load_busy);
    cw_t c, y, exp;
    int passes, nfl, lat, ndone;
    c = encode(u);
    y = c ^ cw_t'(n);
    exp = bf_decode(SEL, y, 1, passes, nfl);
    @(negedge clk);
    data_in = u;
    noise = n;
    @(posedge clk);          // encoder registers the codeword
    @(negedge clk);
    check("encoder", enc_data, c);
    check("channel", err_data_out, y);
    load = 1'b1;
    @(posedge clk);          // decoder samples load
    @(negedge clk);
    load = 1'b0;
    if (overlap) begin
      data_in = ~u;
      n_overlap++;
    end
    lat = -1;
    ndone = 0;
    for (int k = 1; k <= 6; k++) begin
      if (load_busy && k == 1) begin
        check("busy while decoding", 16'(busy), 16'd1);
        load = 1'b1;
        n_load_busy++;
      end
      @(posedge clk); #1;
      if (load_busy && k == 1) begin
        @(negedge clk);
        load = 1'b0;
        #1;
      end
      if (done) begin
        ndone++;
        if (lat < 0) lat = k;
      end
    end
    check("one done", 16'(ndone), 16'd1);
    check("latency", 16'(lat), 16'(passes + 1));
    check("decoded message", 16'(decode_out), 16'(exp[7:0]));
    check("corrected word", corrected, exp);
    check("detected", 16'(err_detected), 16'(n != '0));
    check("fail", 16'(fail), 16'(ref_checks(SEL, exp) != '0));
    check("flips", 16'(flip_count), 16'(nfl));
    check("syndrome", 16'(syndrome != '0), 16'(n != '0));
    if ($countones(n) <= 1) check("message recovered", 16'(decode_out), 16'(u));
    if (n == '0) n_bypass++;
    else if (ref_checks(SEL, exp) == '0) n_corrected++;
    else n_failed++;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NOISE_W-1:0] n;
    rst = 1'b1;
    load = 1'b0;
    data_in = 8'hff;
    noise = '0;
    repeat (3) @(posedge clk);
    #1;
    check("reset encoder", enc_data, '0);
    check("reset decoder", 16'(decode_out), '0);
    n_reset++;
    @(negedge clk);
    rst = 1'b0;

    // worked example of matrix 1 (its channel example for matrix 2)
    if (SEL == 1) xfer(pstr("10010100")[7:0], pstr("10000000")[7:0], 0, 0);
    else          xfer(pstr("00110011")[7:0], pstr("00000001")[7:0], 0, 0);
    check("example", 16'(decode_out), SEL == 1 ? 16'(pstr("10010100")) : 16'(pstr("00110011")));

    for (int u = 0; u < 256; u++)
      for (int e = -1; e < int'(NOISE_W); e++)
        xfer(u[7:0], (e < 0) ? '0 : NOISE_W'(1) << e, (u % 3) == 0, (u % 5) == 1);

    for (int t = 0; t < 500; t++) begin
      n = '0;
      while ($countones(n) < 2 + (t % 2)) n[$urandom_range(NOISE_W - 1, 0)] = 1'b1;
      xfer(8'($urandom), n, t % 2 == 0, t % 3 == 0);
    end

    // reset in the middle of operation clears the outputs again
    @(negedge clk);
    rst = 1'b1;
    @(posedge clk); #1;
    check("reset encoder again", enc_data, '0);
    check("reset decoder again", 16'(decode_out), '0);
    n_reset++;

    $display("mechanisms: reset %0d, passed through %0d, corrected %0d, left failing %0d, new input while busy %0d, load while busy %0d",
             n_reset, n_bypass, n_corrected, n_failed, n_overlap, n_load_busy);
    checks += 6;
    if (n_reset == 0 || n_bypass == 0 || n_corrected == 0 || n_failed == 0 ||
        n_overlap == 0 || n_load_busy == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
