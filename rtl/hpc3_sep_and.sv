// hpc3_sep_and: HPC3 AND built from smaller gadgets (Algorithm 5), D shares.
//
// z = Sharewise-XOR(HPC3-cross(x, y), Sharewise-AND(x', y')), where x' and y' are x and y
// delayed by one cycle. Those two delayed sharings are inputs: the pipeline registers that
// make them live outside the gadget, so that gadgets and pipeline stages that need the same
// delayed sharing can share one register (register de-duplication). The inner-domain
// products are formed after the registers, as in the fully separated HPC3.
// The result is the same sharing of x & y as hpc3_and gives for the same randomness.
//
// Timing: x, y, r, rp in cycle t; x_d, y_d in cycle t+1; z valid in cycle t+1.
module hpc3_sep_and
  import masked_pkg::*;
#(
  parameter int D = 2
) (
  input  logic                 clk,
  input  logic [D-1:0]         x,
  input  logic [D-1:0]         y,
  input  logic [D-1:0]         x_d,
  input  logic [D-1:0]         y_d,
  input  logic [npairs(D)-1:0] r,
  input  logic [npairs(D)-1:0] rp,
  output logic [D-1:0]         z
);

  logic [D-1:0] cross_z, inner_z;

  hpc3_cross #(.D(D)) u_cross (
    .clk, .x, .x_d, .y, .r, .rp, .z(cross_z)
  );

  sw_gate #(.D(D), .OP(masked_pkg::SW_AND)) u_inner (
    .x(x_d), .y(y_d), .z(inner_z)
  );

  sw_gate #(.D(D), .OP(masked_pkg::SW_XOR)) u_sum (
    .x(cross_z), .y(inner_z), .z(z)
  );

endmodule
