// hpc3_and: HPC3 masked AND gadget (Algorithm 3), D shares.
//
// Computes a sharing of z = x & y in a single cycle of latency on both inputs:
//   p_ii = PR(x_i & y_i)
//   p_ij = R((~x_i & r_ij) ^ r'_ij) ^ (PR(x_i) & R(y_j ^ r_ij))     (i != j)
//   z_i  = XOR over j of p_ij
// Two random bits per share pair (r and r'), D(D-1) bits per cycle.
//
// Timing: x, y, r and rp are all sampled in cycle t and z is valid in cycle t+1. Its final
// AND and XOR are combinational after the registers, as in the algorithm. A new operation
// can start every cycle.
module hpc3_and
  import masked_pkg::*;
#(
  parameter int D = 2
) (
  input  logic                 clk,
  input  logic [D-1:0]         x,
  input  logic [D-1:0]         y,
  input  logic [npairs(D)-1:0] r,
  input  logic [npairs(D)-1:0] rp,
  output logic [D-1:0]         z
);

  logic [D-1:0]        x_d;    // PR(x_i)
  logic [D-1:0]        pii_q;  // PR(x_i & y_i)
  logic [D-1:0][D-1:0] u_q;    // R((~x_i & r_ij) ^ r'_ij)
  logic [D-1:0][D-1:0] v_q;    // R(y_j ^ r_ij)

  always_ff @(posedge clk) begin
    x_d <= x;
    for (int i = 0; i < D; i++) begin
      pii_q[i] <= x[i] & y[i];
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
      z[i] = pii_q[i];
      for (int j = 0; j < D; j++)
        if (i != j) z[i] = z[i] ^ u_q[i][j] ^ (x_d[i] & v_q[i][j]);
    end
  end

endmodule
