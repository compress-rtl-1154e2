// hpc2_cross: cross-domain part of the HPC2 AND gadget, D shares.
//
// Computes only the terms with i != j of HPC2:
//   p_ij = R(~x_i & PR(r_ij)) ^ R(x_i & R(y_j ^ r_ij)),   z_i = XOR over j != i of p_ij
// The inner-domain terms and their pipeline registers are left to the surrounding
// pipeline (see hpc2_sep_and). Split in the same way as the HPC3 cross gadget. The
// register on the randomness, PR(r_ij), stays inside because randomness is private to
// the gadget.
//
// Timing: y and r in cycle t, x in cycle t+1, z valid in cycle t+2.
module hpc2_cross
  import masked_pkg::*;
#(
  parameter int D = 2
) (
  input  logic                 clk,
  input  logic [D-1:0]         x,   // latency 1
  input  logic [D-1:0]         y,   // latency 2
  input  logic [npairs(D)-1:0] r,
  output logic [D-1:0]         z
);

  localparam int NP = npairs(D);

  logic [NP-1:0]       r_d;
  logic [D-1:0][D-1:0] yr_q;
  logic [D-1:0][D-1:0] u_q;
  logic [D-1:0][D-1:0] v_q;

  always_ff @(posedge clk) begin
    r_d <= r;
    for (int i = 0; i < D; i++) begin
      for (int j = 0; j < D; j++) begin
        if (i != j) begin
          yr_q[i][j] <= y[j] ^ r[pair_idx(D, i, j)];
          u_q[i][j]  <= ~x[i] & r_d[pair_idx(D, i, j)];
          v_q[i][j]  <= x[i] & yr_q[i][j];
        end else begin
          yr_q[i][j] <= 1'b0;
          u_q[i][j]  <= 1'b0;
          v_q[i][j]  <= 1'b0;
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < D; i++) begin
      z[i] = 1'b0;
      for (int j = 0; j < D; j++)
        if (i != j) z[i] = z[i] ^ u_q[i][j] ^ v_q[i][j];
    end
  end

endmodule
