// hpc2o_toffoli: HPC2o masked Toffoli gadget (Algorithm 6), D shares.
//
// Computes a sharing of z = w ^ (x & y). Starting from HPC2, the inner-domain term
// x_i & y_i and the share w_i are merged into the cross-domain term of one partner share
// j_i (j_0 = 1, j_i = 0 otherwise), which removes the inner-domain pipeline registers:
//   j == j_i : p_ij = R(w_i ^ (x_i & PR(y_i)) ^ (~x_i & PR(r_ij))) ^ R(x_i & R(y_j ^ r_ij))
//   otherwise: p_ij = R(~x_i & PR(r_ij))  |  R(x_i & R(y_j ^ r_ij))
//   z_i = XOR over j != i of p_ij
// In the second line the two registered terms are never both 1 (one has x_i, the other
// ~x_i), so an OR replaces the XOR. One random bit per share pair, D(D-1)/2 bits per cycle.
// Tie w to 0 for a plain AND.
//
// Timing: y and r are sampled in cycle t, x and w in cycle t+1, and z is valid in cycle
// t+2 (latency 1 on x and w, 2 on y). A new operation can start every cycle. D >= 2.
module hpc2o_toffoli
  import masked_pkg::*;
#(
  parameter int D = 2
) (
  input  logic                 clk,
  input  logic [D-1:0]         x,   // latency 1
  input  logic [D-1:0]         y,   // latency 2
  input  logic [D-1:0]         w,   // latency 1
  input  logic [npairs(D)-1:0] r,   // with y
  output logic [D-1:0]         z
);

  localparam int NP = npairs(D);

  logic [D-1:0]        y_d;    // PR(y_i)
  logic [NP-1:0]       r_d;    // PR(r_ij)
  logic [D-1:0][D-1:0] yr_q;   // R(y_j ^ r_ij)
  logic [D-1:0][D-1:0] u_q;    // first register of p_ij
  logic [D-1:0][D-1:0] v_q;    // R(x_i & R(y_j ^ r_ij))

  always_ff @(posedge clk) begin
    y_d <= y;
    r_d <= r;
    for (int i = 0; i < D; i++) begin
      for (int j = 0; j < D; j++) begin
        if (i == j) begin
          yr_q[i][j] <= 1'b0;
          u_q[i][j]  <= 1'b0;
          v_q[i][j]  <= 1'b0;
        end else begin
          yr_q[i][j] <= y[j] ^ r[pair_idx(D, i, j)];
          v_q[i][j]  <= x[i] & yr_q[i][j];
          if (j == merge_idx(i))
            u_q[i][j] <= w[i] ^ (x[i] & y_d[i]) ^ (~x[i] & r_d[pair_idx(D, i, j)]);
          else
            u_q[i][j] <= ~x[i] & r_d[pair_idx(D, i, j)];
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < D; i++) begin
      z[i] = 1'b0;
      for (int j = 0; j < D; j++) begin
        if (i != j) begin
          if (j == merge_idx(i)) z[i] = z[i] ^ (u_q[i][j] ^ v_q[i][j]);
          else                   z[i] = z[i] ^ (u_q[i][j] | v_q[i][j]);
        end
      end
    end
  end

endmodule
