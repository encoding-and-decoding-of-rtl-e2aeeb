// ldpc_encoder: systematic (16,8) LDPC encoder, C = U * G with G = [I_8 | P].
//
// Each of the eight parity bits is one XOR structure over the message bits
// selected by a column of P; the message itself passes into codeword bits
// 0..7 unchanged.  P is derived from the chosen parity-check matrix at
// elaboration (see ldpc_pkg), so the encoder holds no table of its own.
// For matrix 1 no generator row has a one in parity column 6, so codeword
// bit 14 is always 0; this is a property of that generator, which the
// encoder reproduces, and synthesis reduces that output bit to a constant.
//
// Interface: data_in is the 8-bit message, enc_data the 16-bit codeword
// (bit i = codeword position i, message in the low byte).
// Timing: the codeword is registered.  While rst is high enc_data is zero;
// after reset the codeword for the data_in sampled at a rising edge appears
// right after that edge, i.e. one cycle of latency and a new word every cycle.
// The reset-to-zero output follows the described encoder behaviour; the
// synchronous active-high reset and the single register stage are choices of
// this implementation.
module ldpc_encoder
  import ldpc_pkg::*;
#(
  parameter matrix_e MATRIX = H_REGULAR1
) (
  input  logic clk,
  input  logic rst,
  input  msg_t data_in,
  output cw_t  enc_data
);

  localparam pmat_t P = gen_parity(MATRIX);

  logic [N-K-1:0] parity;

  // Parity bit j is the modulo-2 sum of the message bits whose generator row
  // has a one in parity column j.
  always_comb begin
    for (int unsigned j = 0; j < N - K; j++) begin
      parity[j] = 1'b0;
      for (int unsigned i = 0; i < K; i++)
        parity[j] = parity[j] ^ (data_in[i] & P[i][j]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) enc_data <= '0;
    else     enc_data <= {parity, data_in};
  end

endmodule
