// tb_ldpc_pkg: checks the elaboration-time derivations of ldpc_pkg.
//   * h_matrix matches the reference row strings;
//   * std_form has its pivots on columns 9..15, an all-zero last row, and
//     every codeword of the reference code satisfies it;
//   * gen_parity of matrix 1 equals the published generator, and every
//     generator row of both matrices is a codeword with parity bit 8 set;
//   * var_edges gives each bit exactly the two check-node edges that hold it.
module tb_ldpc_pkg;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic check_matrix(matrix_e sel, int rs);
    hmat_t h  = h_matrix(sel);
    hmat_t hs = std_form(sel);
    pmat_t p  = gen_parity(sel);
    ve_t   ve = var_edges(sel);
    cw_t   c;
    int    j, e;
    for (int r = 0; r < 8; r++)
      check($sformatf("m%0d H row %0d", rs, r), h[r] == hrow(rs, r));
    for (int r = 0; r < 7; r++)
      for (int k = 0; k < 7; k++)
        check($sformatf("m%0d pivot %0d/%0d", rs, r, k), hs[r][9+k] == (r == k));
    check($sformatf("m%0d last row zero", rs), hs[7] == '0);
    for (int i = 0; i < 8; i++) begin
      c = {p[i], 8'(1 << i)};
      check($sformatf("m%0d G row %0d is a codeword", rs, i), ref_checks(rs, c) == '0);
      check($sformatf("m%0d G row %0d parity 8", rs, i), c[8] == 1'b1);
      if (rs == 1)
        check($sformatf("m1 G row %0d printed", i), c == enc1(8'(1 << i)));
    end
    for (int u = 0; u < 256; u++) begin
      c = enc(rs, u[7:0]);
      for (int r = 0; r < 8; r++)
        check($sformatf("m%0d Hs row %0d on codeword %0d", rs, r, u), ^(hs[r] & c) == 1'b0);
    end
    for (int i = 0; i < 16; i++) begin
      check($sformatf("m%0d bit %0d edges distinct", rs, i), ve[i][0] != ve[i][1]);
      for (int k = 0; k < 2; k++) begin
        j = int'(ve[i][k]) / 4;
        e = int'(ve[i][k]) % 4;
        check($sformatf("m%0d bit %0d edge %0d", rs, i, k),
              ((rs == 1) ? H1_CONN[j][e] : H2_CONN[j][e]) == i);
      end
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
    check_matrix(H_REGULAR1, 1);
    check_matrix(H_REGULAR2, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
