// ldpc_system: complete LDPC link - encoder, noisy channel and bit-flipping
// decoder for one of the two regular (16,8) codes.
//
// An 8-bit message on data_in is encoded into a 16-bit systematic codeword
// (enc_data, registered), corrupted in the channel by the 8-bit noise word
// (err_data_out, combinational) and, when load is raised, taken by the
// decoder, which tests it and corrects it by bit flipping.  The recovered
// message appears on decode_out when done pulses.
//
// Timing: data_in sampled at edge 0 gives enc_data and err_data_out after
// edge 0; load may be raised in that cycle and is sampled at edge 1; done
// follows 2 edges later for a valid word and 3 for a corrected one (with
// the default single pass).  rst (synchronous, active high) clears encoder
// and decoder outputs to zero, as described for the system.
// With matrix 1, enc_data[14] and err_data_out[14] are constant 0 (see
// ldpc_encoder) and syndrome[7] is always 0 (see ldpc_detector).
// The three blocks and their connection follow the described system; the
// extra status outputs (done, busy, err_detected, syndrome, flip_count,
// fail, corrected word) are choices of this implementation.
module ldpc_system
  import ldpc_pkg::*;
#(
  parameter matrix_e     MATRIX   = H_REGULAR1,
  parameter int unsigned MAX_ITER = 1
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   load,
  input  msg_t                   data_in,
  input  logic [NOISE_W-1:0]     noise,
  output cw_t                    enc_data,
  output cw_t                    err_data_out,
  output msg_t                   decode_out,
  output cw_t                    corrected,
  output logic                   done,
  output logic                   busy,
  output logic                   err_detected,
  output syn_t                   syndrome,
  output logic [$clog2(N+1)-1:0] flip_count,
  output logic                   fail
);

  ldpc_encoder #(.MATRIX(MATRIX)) u_encoder (
    .clk      (clk),
    .rst      (rst),
    .data_in  (data_in),
    .enc_data (enc_data)
  );

  awgn_channel #(.NW(NOISE_W)) u_channel (
    .enc_data     (enc_data),
    .noise        (noise),
    .err_data_out (err_data_out)
  );

  bit_flip_decoder #(.MATRIX(MATRIX), .MAX_ITER(MAX_ITER)) u_decoder (
    .clk          (clk),
    .rst          (rst),
    .load         (load),
    .rx_data      (err_data_out),
    .decode_out   (decode_out),
    .corrected    (corrected),
    .done         (done),
    .busy         (busy),
    .err_detected (err_detected),
    .rx_syndrome  (syndrome),
    .flip_count   (flip_count),
    .fail         (fail)
  );

endmodule
