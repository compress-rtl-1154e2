// sw_gate: sharewise masked gate (Algorithm 1 of the HPC scheme).
//
// Applies a two-input gate share by share: z[i] = X(x[i], y[i]). For XOR the result is a
// sharing of x ^ y. For the affine XNOR the inversion goes onto share 0 only, so the result
// shares x XNOR y. Sharewise AND does not compute x & y on its own: it only produces the
// inner-domain products x[i] & y[i] used when an HPC AND gadget is split into parts.
// Purely combinational, no latency. Interface: D-bit sharings x, y in, z out; OP selects
// the gate at elaboration time. The XNOR variant is this design's way of covering the
// affine gates the scheme mentions.
module sw_gate
  import masked_pkg::*;
#(
  parameter int     D  = 2,
  parameter sw_op_e OP = SW_XOR
) (
  input  logic [D-1:0] x,
  input  logic [D-1:0] y,
  output logic [D-1:0] z
);

  always_comb begin
    unique case (OP)
      SW_AND:  z = x & y;
      SW_XNOR: z = (x ^ y) ^ D'(1);
      default: z = x ^ y;
    endcase
  end

endmodule
