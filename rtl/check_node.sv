// check_node: one check node of the Tanner graph used by bit flipping.
//
// It receives the current values of the DEG variable nodes joined to it and
// answers each of them with the modulo-2 sum of the *other* DEG-1 inputs,
// i.e. the value that bit would need for the parity equation to hold.  It also
// reports whether its parity equation is violated (XOR of all inputs = 1).
// This matches the described check-node messages exactly; computing each
// reply as (total parity XOR own input) is this implementation's choice.
//
// Interface: v_in[e] is the bit on edge e, msg_out[e] the reply on edge e.
// Timing: purely combinational.
module check_node #(
  parameter int unsigned DEG = 4
) (
  input  logic [DEG-1:0] v_in,
  output logic [DEG-1:0] msg_out,
  output logic           unsat
);

  always_comb begin
    unsat = ^v_in;
    for (int unsigned e = 0; e < DEG; e++)
      msg_out[e] = unsat ^ v_in[e];
  end

endmodule
