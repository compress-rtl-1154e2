// hpc3o_toffoli: HPC3o masked Toffoli gadget (Algorithm 7), D shares.
//
// Computes a sharing of z = w ^ (x & y). Compared with HPC3 it drops the inversion of x_i
// and folds the inner-domain term x_i & y_i and the share w_i into the cross-domain term
// of one partner share j_i (j_0 = 1, j_i = 0 otherwise), which removes the inner-domain
// pipeline registers:
//   j == j_i : p_ij = R(w_i ^ (x_i & (y_i ^ r_ij)) ^ r'_ij) ^ (PR(x_i) & R(y_j ^ r_ij))
//   otherwise: p_ij = R((x_i & r_ij) ^ r'_ij)               ^ (PR(x_i) & R(y_j ^ r_ij))
//   z_i = XOR over j != i of p_ij
// Two random bits per share pair, D(D-1) bits per cycle. Tie w to 0 for a plain AND.
//
// Timing: x, y, w, r and rp are sampled in cycle t and z is valid in cycle t+1 (latency 1
// on every input). A new operation can start every cycle. D must be at least 2.
module hpc3o_toffoli
  import masked_pkg::*;
#(
  parameter int D = 2
) (
  input  logic                 clk,
  input  logic [D-1:0]         x,
  input  logic [D-1:0]         y,
  input  logic [D-1:0]         w,
  input  logic [npairs(D)-1:0] r,
  input  logic [npairs(D)-1:0] rp,
  output logic [D-1:0]         z
);

  logic [D-1:0]        x_d;   // PR(x_i)
  logic [D-1:0][D-1:0] u_q;   // R(... ^ r'_ij)
  logic [D-1:0][D-1:0] v_q;   // R(y_j ^ r_ij)

  always_ff @(posedge clk) begin
    x_d <= x;
    for (int i = 0; i < D; i++) begin
      for (int j = 0; j < D; j++) begin
        if (i == j) begin
          u_q[i][j] <= 1'b0;
          v_q[i][j] <= 1'b0;
        end else begin
          v_q[i][j] <= y[j] ^ r[pair_idx(D, i, j)];
          if (j == merge_idx(i))
            u_q[i][j] <= w[i] ^ (x[i] & (y[i] ^ r[pair_idx(D, i, j)])) ^ rp[pair_idx(D, i, j)];
          else
            u_q[i][j] <= (x[i] & r[pair_idx(D, i, j)]) ^ rp[pair_idx(D, i, j)];
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
