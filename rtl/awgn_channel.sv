// awgn_channel: channel model between encoder and decoder.
//
// The transmitted codeword is corrupted by modulo-2 addition of a noise word:
// every set noise bit flips one codeword bit.  The noise word is supplied from
// outside (a test pattern or a noise source), so the channel adds no
// randomness itself; it models the effect of additive noise after hard
// decisions.  The 8-bit noise word covers codeword bits 0..7, noise bit i
// flipping codeword bit i; parity bits pass through.  Both the 8-bit width and
// the modulo-2 addition follow the described channel; the alignment of the
// noise word onto the low codeword bits is read from its worked examples.
//
// Interface: enc_data in, noise in, err_data_out out.
// Timing: purely combinational.
module awgn_channel
  import ldpc_pkg::*;
#(
  parameter int unsigned NW = NOISE_W
) (
  input  cw_t           enc_data,
  input  logic [NW-1:0] noise,
  output cw_t           err_data_out
);

  always_comb begin
    err_data_out = enc_data;
    err_data_out[NW-1:0] = enc_data[NW-1:0] ^ noise;
  end

  initial assert (NW >= 1 && NW <= N) else $error("awgn_channel: NW out of range");

endmodule
