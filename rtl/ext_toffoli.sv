// ext_toffoli: extended Toffoli gadget, z = (x & y) ^ w_0 ^ ... ^ w_{K-1}.
//
// An AND whose result is only XORed with further values is computed by one HPC3o or HPC2o
// Toffoli gadget. A register chain of OUT_LAT masked registers then carries the result
// deeper into the pipeline, and each XOR operand w_k is added where it becomes available.
// This avoids forwarding the operands themselves. The 4-bit field POS[4k +: 4] (K <= 8)
// gives the position p_k where operand k enters:
//   p_k = 0  : XORed into the gadget's w input, in the gadget's input stage
//   p_k = p  : XORed (sharewise) p-1 stages after the gadget's output stage, so p = 1 is
//              the gadget's output stage and p = OUT_LAT + 1 the final stage.
// The structure (base gadget, w as an XOR of a subset of operands, output register chain
// with sharewise XORs in between) follows the extended Toffoli gate of the scheduling
// model. The parameter encoding is this design's own.
//
// Timing, with stage 0 the cycle in which y and the randomness are sampled:
//   HPC3o base (USE_HPC3O = 1): x, y and p_k = 0 operands in stage 0, gadget output stage 1.
//   HPC2o base (USE_HPC3O = 0): y in stage 0, x and p_k = 0 operands in stage 1, output 2.
//   Operand with p_k = p >= 1 is sampled in stage G + p - 1, where G is the output stage.
//   z is valid in stage G + OUT_LAT.
// acc_q[0] is a tied-off placeholder so that acc_q[s] lines up with chain stage s; lint
// reports it as unused.
module ext_toffoli
  import masked_pkg::*;
#(
  parameter int D         = 2,
  parameter bit USE_HPC3O = 1'b1,
  parameter int K         = 3,
  parameter int OUT_LAT   = 2,
  parameter logic [31:0] POS = 32'h0000_0310,   // operand 0 at 0, 1 at 1, 2 at 3
  localparam int RND      = USE_HPC3O ? hpc3_rnd(D) : hpc2_rnd(D)
) (
  input  logic                clk,
  input  logic [D-1:0]        x,
  input  logic [D-1:0]        y,
  input  logic [K-1:0][D-1:0] w,
  input  logic [RND-1:0]      rnd,
  output logic [D-1:0]        z
);

  localparam int NP = npairs(D);

  function automatic int pos_of(int k);
    return int'(POS[4*k +: 4]);
  endfunction

  if (K < 1 || K > 8) begin : g_bad_k
    $error("ext_toffoli: K must be 1 to 8");
  end

  for (genvar k = 0; k < K; k++) begin : g_pos_check
    if (pos_of(k) > OUT_LAT + 1) begin : g_bad
      $error("ext_toffoli: operand position out of range");
    end
  end

  // Operands grouped by entry position: grp[p] = XOR of all w_k with p_k == p.
  logic [OUT_LAT+1:0][D-1:0] grp;

  always_comb begin
    grp = '0;
    for (int k = 0; k < K; k++)
      for (int p = 0; p <= OUT_LAT + 1; p++)
        if (pos_of(k) == p) grp[p] = grp[p] ^ w[k];
  end

  logic [D-1:0] tof_z;

  if (USE_HPC3O) begin : g_hpc3o
    hpc3o_toffoli #(.D(D)) u_tof (
      .clk, .x, .y, .w(grp[0]), .r(rnd[NP-1:0]), .rp(rnd[2*NP-1:NP]), .z(tof_z)
    );
  end else begin : g_hpc2o
    hpc2o_toffoli #(.D(D)) u_tof (
      .clk, .x, .y, .w(grp[0]), .r(rnd[NP-1:0]), .z(tof_z)
    );
  end

  // Register chain with sharewise XORs: acc[s] lives s stages after the gadget output.
  logic [OUT_LAT:0][D-1:0] acc, acc_q;

  sw_gate #(.D(D), .OP(masked_pkg::SW_XOR)) u_x0 (.x(tof_z), .y(grp[1]), .z(acc[0]));

  for (genvar s = 1; s <= OUT_LAT; s++) begin : g_chain
    masked_reg #(.D(D)) u_r (.clk, .d_i(acc[s-1]), .q_o(acc_q[s]));
    sw_gate #(.D(D), .OP(masked_pkg::SW_XOR)) u_x (.x(acc_q[s]), .y(grp[s+1]), .z(acc[s]));
  end

  assign acc_q[0] = '0;
  assign z = acc[OUT_LAT];

endmodule
