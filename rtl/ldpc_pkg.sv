// ldpc_pkg: code constants, types and the two regular (16,8) parity-check
// matrices shared by the LDPC encoder, detector and bit-flipping decoder.
//
// Both codes are regular with column weight WC = 2 and row weight WR = 4:
// 8 check equations over 16 codeword bits, carrying 8 message bits.  A matrix
// is given the way the decoder's Tanner graph uses it, as the list of the four
// variable nodes (codeword bit positions) joined to each check node.
//
// Bit numbering: codeword bit i is variable node v_i.  Bits 0..7 carry the
// message (u_i sits in codeword bit i) and bits 8..15 are parity, so in a
// packed vector the message occupies the low byte.  When a codeword is written
// as a string with v0 first, reverse it to get the packed literal.
//
// The standard form and the generator are derived here by constant functions,
// at elaboration, by Gaussian elimination over GF(2):
//   * Every column of a weight-2 matrix has exactly two ones, so the eight
//     rows add up to zero and H has rank 7.  Elimination uses columns 9..15 as
//     pivots; row 7 of the standard form becomes all zero and parity bit 8 is
//     left free.
//   * The generator row for message bit i is the unit vector e_i with parity
//     bit 8 set to 1 and parity bits 9..15 solved from the standard form.  So
//     parity bit 8 is the XOR of all message bits.  For matrix 1 this gives
//     exactly the generator printed for that code; for matrix 2 it gives the
//     codeword listed for message 00110011.
package ldpc_pkg;

  localparam int unsigned N  = 16;     // codeword length (variable nodes)
  localparam int unsigned K  = 8;      // message length
  localparam int unsigned M  = 8;      // check equations (check nodes)
  localparam int unsigned WC = 2;      // column weight: checks per bit
  localparam int unsigned WR = 4;      // row weight: bits per check
  localparam int unsigned NOISE_W = 8; // width of the channel's noise word

  typedef logic [N-1:0] cw_t;          // codeword, bit i = v_i
  typedef logic [K-1:0] msg_t;         // message, bit i = u_i
  typedef logic [M-1:0] syn_t;         // syndrome, bit j = check j
  typedef logic [M-1:0][N-1:0] hmat_t; // parity-check matrix, row j = check j
  typedef logic [K-1:0][N-K-1:0] pmat_t; // generator parity part, row i = u_i

  // Which of the two regular matrices a block is built for.
  typedef enum logic {
    H_REGULAR1 = 1'b0,
    H_REGULAR2 = 1'b1
  } matrix_e;

  // Variable nodes joined to each check node.
  localparam int unsigned H1_CONN [M][WR] = '{
    '{0, 2,  8, 11}, '{1, 5,  8, 10}, '{1, 6,  9, 15}, '{3, 4,  5, 15},
    '{0, 7, 10, 13}, '{3, 6, 12, 13}, '{7, 9, 11, 14}, '{2, 4, 12, 14}};
  localparam int unsigned H2_CONN [M][WR] = '{
    '{0, 3,  4, 14}, '{0, 9, 12, 13}, '{2, 4,  8, 11}, '{3, 7, 10, 11},
    '{2, 5, 13, 15}, '{6, 8,  9, 10}, '{1, 6, 14, 15}, '{1, 5,  7, 12}};

  // Parity-check matrix as row masks.
  function automatic hmat_t h_matrix(matrix_e sel);
    hmat_t h = '0;
    for (int unsigned j = 0; j < M; j++)
      for (int unsigned e = 0; e < WR; e++)
        h[j][(sel == H_REGULAR1) ? H1_CONN[j][e] : H2_CONN[j][e]] = 1'b1;
    return h;
  endfunction

  // Standard form: rows 0..M-2 have their pivots on columns K+1..N-1
  // (row r on column K+1+r); the dependent row ends up all zero.
  function automatic hmat_t std_form(matrix_e sel);
    hmat_t h = h_matrix(sel);
    logic [N-1:0] tmp;
    int unsigned piv;
    logic found;
    for (int unsigned r = 0; r < M - 1; r++) begin
      piv = r;
      found = 1'b0;
      for (int unsigned i = r; i < M; i++)
        if (!found && h[i][K+1+r]) begin
          piv = i;
          found = 1'b1;
        end
      tmp = h[r];
      h[r] = h[piv];
      h[piv] = tmp;
      for (int unsigned i = 0; i < M; i++)
        if (i != r && h[i][K+1+r]) h[i] = h[i] ^ h[r];
    end
    return h;
  endfunction

  // Parity part of the systematic generator G = [I_K | P].
  function automatic pmat_t gen_parity(matrix_e sel);
    hmat_t hs = std_form(sel);
    pmat_t p = '0;
    logic [N-1:0] c;
    for (int unsigned i = 0; i < K; i++) begin
      c = '0;
      c[i] = 1'b1;
      c[K] = 1'b1;
      for (int unsigned r = 0; r < M - 1; r++)
        c[K+1+r] = ^(hs[r][K:0] & c[K:0]);
      p[i] = c[N-1:K];
    end
    return p;
  endfunction

  // Edge numbering for the decoder: edge j*WR+e is the e-th edge of check
  // node j.  ve_t lists, for every variable node, its WC edges.
  localparam int unsigned EW = $clog2(M * WR);
  typedef logic [N-1:0][WC-1:0][EW-1:0] ve_t;

  function automatic ve_t var_edges(matrix_e sel);
    ve_t ve = '0;
    int unsigned cnt [N];
    int unsigned v;
    for (int unsigned i = 0; i < N; i++) cnt[i] = 0;
    for (int unsigned j = 0; j < M; j++)
      for (int unsigned e = 0; e < WR; e++) begin
        v = (sel == H_REGULAR1) ? H1_CONN[j][e] : H2_CONN[j][e];
        if (cnt[v] < WC) ve[v][cnt[v]] = EW'(j * WR + e);
        cnt[v] = cnt[v] + 1;
      end
    return ve;
  endfunction

endpackage
