// variable_node: one variable node of the Tanner graph used by bit flipping.
//
// It holds a received codeword bit and takes DEG replies from the check nodes
// joined to it.  The new bit value is the majority vote of the DEG+1 bits
// (received bit plus replies): when the majority disagrees with the received
// bit, the bit is flipped.  With DEG = 2 this is the three-input majority of
// the described design.  For an even number of votes a tie keeps the received
// bit (a choice of this implementation; it does not arise for DEG = 2).
//
// Interface: v_in is the current bit, msg_in the check-node replies; v_out
// the voted bit and flip is high when v_out differs from v_in.
// Timing: purely combinational.
module variable_node #(
  parameter int unsigned DEG = 2
) (
  input  logic           v_in,
  input  logic [DEG-1:0] msg_in,
  output logic           v_out,
  output logic           flip
);

  localparam int unsigned VOTES = DEG + 1;
  localparam int unsigned CW = $clog2(VOTES + 1);

  logic [CW-1:0] ones;

  always_comb begin
    ones = CW'(v_in);
    for (int unsigned e = 0; e < DEG; e++)
      ones = ones + CW'(msg_in[e]);
    if (2 * ones > VOTES)      v_out = 1'b1;
    else if (2 * ones < VOTES) v_out = 1'b0;
    else                       v_out = v_in;
    flip = v_out ^ v_in;
  end

endmodule
