// hpc3_cross: cross-domain part of the HPC3 AND gadget (Algorithm 4), D shares.
//
// Computes only the terms with i != j of HPC3:
//   p_ij = R((~x_i & r_ij) ^ r'_ij) ^ (x'_i & R(y_j ^ r_ij)),   z_i = XOR over j != i of p_ij
// where x' is the sharing x delayed by one cycle. Its pipeline register is taken out of the
// gadget (x_d input), so that one register can serve several gadgets and the surrounding
// pipeline. On its own z is not a sharing of any function of x and y: XORed with the
// sharewise products x'_i & y'_i it gives a sharing of x & y (see hpc3_sep_and).
//
// Timing: x, y, r, rp in cycle t; x_d (= x of cycle t) in cycle t+1; z valid in cycle t+1.
module hpc3_cross
  import masked_pkg::*;
#(
  parameter int D = 2
) (
  input  logic                 clk,
  input  logic [D-1:0]         x,
  input  logic [D-1:0]         x_d,  // x one cycle later, from an outside pipeline register
  input  logic [D-1:0]         y,
  input  logic [npairs(D)-1:0] r,
  input  logic [npairs(D)-1:0] rp,
  output logic [D-1:0]         z
);

  logic [D-1:0][D-1:0] u_q;   // R((~x_i & r_ij) ^ r'_ij)
  logic [D-1:0][D-1:0] v_q;   // R(y_j ^ r_ij)

  always_ff @(posedge clk) begin
    for (int i = 0; i < D; i++) begin
      for (int j = 0; j < D; j++) begin
        if (i != j) begin
          u_q[i][j] <= (~x[i] & r[pair_idx(D, i, j)]) ^ rp[pair_idx(D, i, j)];
          v_q[i][j] <= y[j] ^ r[pair_idx(D, i, j)];
        end else begin
          u_q[i][j] <= 1'b0;
          v_q[i][j] <= 1'b0;
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < D; i++) begin
      z[i] = 1'b0;
      for (int j = 0; j < D; j++)
        if (i != j) z[i] = z[i] ^ u_q[i][j] ^ (x_d[i] & v_q[i][j]);
    end
  end

endmodule
