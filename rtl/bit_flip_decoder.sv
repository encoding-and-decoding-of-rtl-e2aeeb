// bit_flip_decoder: hard-decision bit-flipping decoder for the (16,8) code.
//
// A received word is first tested by the detector (syndrome with the
// standard-form matrix).  A valid word is passed straight to the output; its
// low byte is the message.  Otherwise one bit-flipping pass runs on the Tanner
// graph of the parity-check matrix:
//   1. the 16 variable nodes hold the current word and send their bits to the
//      check nodes they are joined to;
//   2. each of the 8 check nodes answers every joined variable node with the
//      XOR of its other three inputs;
//   3. each variable node takes the majority of its own bit and its two
//      replies; a bit that loses the vote is flipped.
// The new word is tested again.  Up to MAX_ITER passes are made; the default
// of one pass is the described design, which corrects every single-bit error
// of either matrix (no two columns share both of their checks).  A word still
// failing the test after MAX_ITER passes is output anyway with fail set.
//
// Interface: load starts a decode of rx_data when the decoder is idle; done
// pulses for one cycle when decode_out (message), corrected (whole word),
// err_detected (the received word failed the first test), rx_syndrome (its
// syndrome), flip_count (bits flipped in total) and fail are updated; they hold until the next decode.  busy is high while decoding.
// Timing: with load sampled at edge 0, done is high after edge 1 for a valid
// word and after edge 1+p when p flipping passes were made.
// rst (synchronous, active high) clears all outputs, as described; load
// active high follows the decoder's description (the system-level text once
// speaks of load low).  The FSM, done/busy/fail flags and the repeated test
// after a pass are choices of this implementation.
module bit_flip_decoder
  import ldpc_pkg::*;
#(
  parameter matrix_e     MATRIX   = H_REGULAR1,
  parameter int unsigned MAX_ITER = 1
) (
  input  logic clk,
  input  logic rst,
  input  logic load,
  input  cw_t  rx_data,
  output msg_t decode_out,
  output cw_t  corrected,
  output logic done,
  output logic busy,
  output logic err_detected,
  output syn_t rx_syndrome,
  output logic [$clog2(N+1)-1:0] flip_count,
  output logic fail
);

  localparam ve_t VE = var_edges(MATRIX);
  localparam int unsigned IW = $clog2(MAX_ITER + 1);
  localparam int unsigned FW = $clog2(N + 1);

  typedef enum logic {
    S_IDLE,
    S_DECODE
  } state_e;

  state_e        state;
  cw_t           cw;        // word being decoded (variable-node values)
  logic [IW-1:0] iter;      // flipping passes made on cw
  syn_t          syndrome;
  logic          det_err;

  logic [M-1:0][WR-1:0] cn_in, cn_msg;
  logic [M*WR-1:0]      edge_msg;
  logic [M-1:0]         unsat;
  cw_t                  cw_next;
  cw_t                  flips;
  logic [FW-1:0]        nflip;     // bits flipped by the current pass
  logic [FW-1:0]        flip_acc;  // bits flipped so far in this decode
  logic [FW:0]          flip_sum;

  ldpc_detector #(.MATRIX(MATRIX)) u_detector (
    .rx       (cw),
    .syndrome (syndrome),
    .err      (det_err)
  );

  // Check nodes: gather the four joined bits, reply on each edge.
  for (genvar j = 0; j < M; j++) begin : g_check
    for (genvar e = 0; e < WR; e++) begin : g_edge
      assign cn_in[j][e] = cw[(MATRIX == H_REGULAR1) ? H1_CONN[j][e] : H2_CONN[j][e]];
      assign edge_msg[j*WR+e] = cn_msg[j][e];
    end
    check_node #(.DEG(WR)) u_cn (
      .v_in    (cn_in[j]),
      .msg_out (cn_msg[j]),
      .unsat   (unsat[j])
    );
  end

  // Variable nodes: majority of own bit and the replies on its edges.
  for (genvar i = 0; i < N; i++) begin : g_var
    logic [WC-1:0] vmsg;
    for (genvar k = 0; k < WC; k++) begin : g_in
      assign vmsg[k] = edge_msg[VE[i][k]];
    end
    variable_node #(.DEG(WC)) u_vn (
      .v_in   (cw[i]),
      .msg_in (vmsg),
      .v_out  (cw_next[i]),
      .flip   (flips[i])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_IDLE;
      cw           <= '0;
      iter         <= '0;
      decode_out   <= '0;
      corrected    <= '0;
      done         <= 1'b0;
      err_detected <= 1'b0;
      rx_syndrome  <= '0;
      flip_acc     <= '0;
      flip_count   <= '0;
      fail         <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (load) begin
            cw    <= rx_data;
            iter     <= '0;
            flip_acc <= '0;
            state    <= S_DECODE;
          end
        end
        S_DECODE: begin
          if (iter == '0) begin
            err_detected <= det_err;
            rx_syndrome  <= syndrome;
          end
          if (!det_err || iter == IW'(MAX_ITER)) begin
            decode_out <= cw[K-1:0];
            corrected  <= cw;
            fail       <= det_err;
            flip_count <= flip_acc;
            done       <= 1'b1;
            state      <= S_IDLE;
          end else begin
            cw       <= cw_next;
            iter     <= iter + 1'b1;
            flip_acc <= flip_sum[FW] ? '1 : flip_sum[FW-1:0];  // saturate
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    nflip = '0;
    for (int unsigned i = 0; i < N; i++) nflip = nflip + FW'(flips[i]);
    flip_sum = {1'b0, flip_acc} + {1'b0, nflip};
  end

  assign busy = (state == S_DECODE);

  // The detector and the check nodes test the same code: a word whose
  // syndrome is zero satisfies every check node, and vice versa.
  always_comb begin
    if (!rst && state == S_DECODE)
      assert ((|unsat) == det_err) else $error("detector and check nodes disagree");
  end

  // done is only raised from a decode in progress.
  assert property (@(posedge clk) disable iff (rst) done |-> $past(busy));

endmodule
