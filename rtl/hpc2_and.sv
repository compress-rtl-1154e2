// hpc2_and: HPC2 masked AND gadget (Algorithm 2), D shares.
//
// Computes a sharing of z = x & y. Each cross-domain term is
//   p_ij = R(~x_i & PR(r_ij)) ^ R(x_i & R(y_j ^ r_ij))      (i != j)
// and the inner-domain term is p_ii = PR(x_i & PR(y_i)); z_i is the XOR of p_i0..p_i(D-1).
// R() marks the glitch-stopping registers, PR() the registers only needed for pipelining.
// One random bit per share pair (r_ij = r_ji), D(D-1)/2 bits per cycle.
//
// Timing (asymmetric, Table-1 latencies 1 and 2): y and r are sampled in cycle t, x in
// cycle t+1, and z is valid in cycle t+2 as an XOR of register outputs. A new operation can
// start every cycle. The register for PR(r_ij) is shared by r_ij and r_ji (same value).
module hpc2_and
  import masked_pkg::*;
#(
  parameter int D = 2
) (
  input  logic                 clk,
  input  logic [D-1:0]         x,   // latency 1
  input  logic [D-1:0]         y,   // latency 2
  input  logic [npairs(D)-1:0] r,   // with y
  output logic [D-1:0]         z
);

  localparam int NP = npairs(D);

  logic [D-1:0]      y_d;      // PR(y_i)
  logic [NP-1:0]     r_d;      // PR(r_ij)
  logic [D-1:0][D-1:0] yr_q;   // R(y_j ^ r_ij), [i][j]
  logic [D-1:0][D-1:0] u_q;    // R(~x_i & PR(r_ij))
  logic [D-1:0][D-1:0] v_q;    // R(x_i & R(y_j ^ r_ij))
  logic [D-1:0]      pii_q;    // PR(x_i & PR(y_i))

  always_ff @(posedge clk) begin
    y_d <= y;
    r_d <= r;
    for (int i = 0; i < D; i++) begin
      pii_q[i] <= x[i] & y_d[i];
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
      z[i] = pii_q[i];
      for (int j = 0; j < D; j++)
        if (i != j) z[i] = z[i] ^ u_q[i][j] ^ v_q[i][j];
    end
  end

endmodule
