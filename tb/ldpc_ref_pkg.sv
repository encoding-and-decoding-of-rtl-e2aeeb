// ldpc_ref_pkg: reference model for the LDPC testbenches, written
// independently of the RTL.
//
// Matrices are typed as row strings with codeword position 0 first (the way
// a codeword is read left to right); pstr() turns such a string into a
// packed vector with bit i = position i.  The matrix-1 generator is the one
// printed for that code, not derived.  The decoder reference uses the
// equivalent "flip a bit when all of its checks fail" rule instead of the
// message-passing form the RTL uses.
package ldpc_ref_pkg;

  localparam int unsigned RN = 16;
  localparam int unsigned RK = 8;
  localparam int unsigned RM = 8;

  // Check rows of regular matrix 1 and 2, position 0 first.
  localparam string H1_ROWS [RM] = '{
    "1010000010010000", "0100010010100000", "0100001001000001", "0001110000000001",
    "1000000100100100", "0001001000001100", "0000000101010010", "0010100000001010"};
  localparam string H2_ROWS [RM] = '{
    "1001100000000010", "1000000001001100", "0010100010010000", "0001000100110000",
    "0010010000000101", "0000001011100000", "0100001000000011", "0100010100001000"};
  // Parity part of the printed generator of matrix 1, row i = message bit i.
  localparam string G1_PAR [RK] = '{
    "10100000", "11010000", "10101100", "11110101",
    "11111101", "11010001", "11110100", "10110000"};

  function automatic logic [RN-1:0] pstr(string s);
    logic [RN-1:0] v = '0;
    for (int i = 0; i < s.len() && i < RN; i++) v[i] = (s[i] == "1");
    return v;
  endfunction

  function automatic logic [RN-1:0] hrow(int sel, int j);
    return pstr(sel == 1 ? H1_ROWS[j] : H2_ROWS[j]);
  endfunction

  // Unsatisfied checks of word y under matrix sel.
  function automatic logic [RM-1:0] ref_checks(int sel, logic [RN-1:0] y);
    logic [RM-1:0] s;
    for (int j = 0; j < RM; j++) s[j] = ^(hrow(sel, j) & y);
    return s;
  endfunction

  // Matrix-1 encoder from the printed generator.
  function automatic logic [RN-1:0] enc1(logic [RK-1:0] u);
    logic [RK-1:0] p = '0;
    for (int i = 0; i < RK; i++)
      if (u[i]) p = p ^ pstr(G1_PAR[i])[RK-1:0];
    return {p, u};
  endfunction

  // Encoder for either matrix by search: the systematic codeword whose first
  // parity bit is the XOR of the message bits (the rule the matrix-1
  // generator follows).
  function automatic logic [RN-1:0] enc(int sel, logic [RK-1:0] u);
    logic [RN-1:0] c;
    for (int p = 0; p < 256; p++) begin
      c = {p[7:0], u};
      if (ref_checks(sel, c) == '0 && c[RK] == ^u) return c;
    end
    return '1;
  endfunction

  // One or more passes of hard bit flipping: a bit whose checks all fail is
  // flipped; stop when all checks hold or after max_iter passes.
  function automatic logic [RN-1:0] bf_decode(int sel, logic [RN-1:0] y, int max_iter,
                                              output int passes, output int nflips);
    logic [RN-1:0] w = y, f;
    logic [RM-1:0] s;
    passes = 0;
    nflips = 0;
    while (ref_checks(sel, w) != '0 && passes < max_iter) begin
      s = ref_checks(sel, w);
      f = '0;
      for (int i = 0; i < RN; i++) begin
        int fails = 0, deg = 0;
        for (int j = 0; j < RM; j++)
          if (hrow(sel, j)[i]) begin
            deg++;
            if (s[j]) fails++;
          end
        f[i] = (fails == deg);
      end
      w = w ^ f;
      nflips += $countones(f);
      passes++;
    end
    return w;
  endfunction

endpackage
