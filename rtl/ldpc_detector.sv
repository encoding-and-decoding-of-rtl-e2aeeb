// ldpc_detector: tests whether a received 16-bit word is a codeword.
//
// It multiplies the word by the standard-form parity-check matrix over GF(2),
// syndrome = Hs * Y^T, one XOR tree per row.  A zero syndrome means the word
// is valid and its low byte is the message; any set bit means the word must be
// corrected.  Hs is derived from the selected matrix at elaboration (see
// ldpc_pkg).  Because the weight-2 matrices have rank 7, the last row of Hs is
// all zero and syndrome bit 7 is always 0.
//
// Interface: rx in; syndrome and err (syndrome nonzero) out.
// Timing: purely combinational.
module ldpc_detector
  import ldpc_pkg::*;
#(
  parameter matrix_e MATRIX = H_REGULAR1
) (
  input  cw_t  rx,
  output syn_t syndrome,
  output logic err
);

  localparam hmat_t HS = std_form(MATRIX);

  always_comb begin
    for (int unsigned j = 0; j < M; j++)
      syndrome[j] = ^(HS[j] & rx);
    err = |syndrome;
  end

endmodule
