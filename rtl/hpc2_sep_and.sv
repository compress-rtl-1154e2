// hpc2_sep_and: HPC2 AND built from smaller gadgets, D shares.
//
// z = Sharewise-XOR(HPC2-cross(x, y), Sharewise-AND(x', y'')), where x' is x delayed by one
// more cycle and y'' is y delayed by two cycles, so that both reach the output stage. Those
// delayed sharings are inputs, made by pipeline registers outside the gadget that other
// gadgets may share. The inner-domain products are formed at the output stage, after the
// registers. Same pattern as the separated HPC3 (hpc3_sep_and).
//
// Timing: y, r in cycle t; x in cycle t+1; x_d (x of cycle t+1) and y_dd (y of cycle t) in
// cycle t+2; z valid in cycle t+2.
module hpc2_sep_and
  import masked_pkg::*;
#(
  parameter int D = 2
) (
  input  logic                 clk,
  input  logic [D-1:0]         x,
  input  logic [D-1:0]         y,
  input  logic [D-1:0]         x_d,
  input  logic [D-1:0]         y_dd,
  input  logic [npairs(D)-1:0] r,
  output logic [D-1:0]         z
);

  logic [D-1:0] cross_z, inner_z;

  hpc2_cross #(.D(D)) u_cross (
    .clk, .x, .y, .r, .z(cross_z)
  );

  sw_gate #(.D(D), .OP(masked_pkg::SW_AND)) u_inner (
    .x(x_d), .y(y_dd), .z(inner_z)
  );

  sw_gate #(.D(D), .OP(masked_pkg::SW_XOR)) u_sum (
    .x(cross_z), .y(inner_z), .z(z)
  );

endmodule
