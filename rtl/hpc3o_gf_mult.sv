// hpc3o_gf_mult: HPC3o masked multiply-accumulate gadget over GF(2^K), D shares.
//
// Computes an additive sharing of z = w + x * y in GF(2^K), where every share is a K-bit
// field element and + is XOR. It is the HPC3o Toffoli gadget with the single bits
// replaced by field elements and the ANDs replaced by field products:
//   j == j_i : p_ij = R(w_i + x_i * (y_i + r_ij) + r'_ij) + PR(x_i) * R(y_j + r_ij)
//   otherwise: p_ij = R(x_i * r_ij + r'_ij)                + PR(x_i) * R(y_j + r_ij)
//   z_i = sum over j != i of p_ij
// with j_0 = 1 and j_i = 0 otherwise, and r_ij = r_ji, r'_ij = r'_ji random field
// elements. The x_i * r_ij terms cancel within p_ij, so z = w + x * y. HPC3o has no
// inversion of x_i, so the same equations hold in any field of characteristic 2. Its
// randomness is 2 * K * D(D-1)/2 bits per cycle. Tie w to 0 for a plain product.
//
// Field: polynomial basis, reduction polynomial POLY (bit K set, K <= 8). The default,
// GF(16) with x^4 + x + 1, is this design's choice. Tower-field S-boxes use GF(4) and
// GF(16) products, but the basis they use is a property of the S-box, not of the gadget,
// so set K and POLY to match.
//
// Interface: x, y, w are [D-1:0][K-1:0] (share i at [i]); r and rp hold one K-bit element
// per share pair, pair (i, j), i < j, at element pair_idx(D, i, j).
// Timing: all inputs sampled in cycle t, z valid in cycle t+1 (latency 1 on every input).
// A new operation can start every cycle. No reset.
module hpc3o_gf_mult
  import masked_pkg::*;
#(
  parameter int         D    = 2,
  parameter int         K    = 4,
  parameter logic [8:0] POLY = 9'h013,   // x^4 + x + 1
  localparam int        NP   = npairs(D)
) (
  input  logic                clk,
  input  logic [D-1:0][K-1:0] x,
  input  logic [D-1:0][K-1:0] y,
  input  logic [D-1:0][K-1:0] w,
  input  logic [NP-1:0][K-1:0] r,
  input  logic [NP-1:0][K-1:0] rp,
  output logic [D-1:0][K-1:0] z
);

  if (K < 1 || K > 8 || !POLY[K]) begin : g_bad_field
    $error("hpc3o_gf_mult: K must be 1 to 8 and POLY must have degree K");
  end

  // Product in GF(2^K): shift-and-add with reduction by POLY.
  function automatic logic [K-1:0] gmul(logic [K-1:0] a, logic [K-1:0] b);
    logic [K-1:0] acc, sh;
    acc = '0;
    sh  = a;
    for (int n = 0; n < K; n++) begin
      if (b[n]) acc = acc ^ sh;
      sh = sh[K-1] ? ((sh << 1) ^ POLY[K-1:0]) : (sh << 1);
    end
    return acc;
  endfunction

  logic [D-1:0][K-1:0]         x_d;   // PR(x_i)
  logic [D-1:0][D-1:0][K-1:0]  u_q;   // R(... + r'_ij)
  logic [D-1:0][D-1:0][K-1:0]  v_q;   // R(y_j + r_ij)

  always_ff @(posedge clk) begin
    x_d <= x;
    for (int i = 0; i < D; i++) begin
      for (int j = 0; j < D; j++) begin
        if (i == j) begin
          u_q[i][j] <= '0;
          v_q[i][j] <= '0;
        end else begin
          v_q[i][j] <= y[j] ^ r[pair_idx(D, i, j)];
          if (j == merge_idx(i))
            u_q[i][j] <= w[i] ^ gmul(x[i], y[i] ^ r[pair_idx(D, i, j)]) ^ rp[pair_idx(D, i, j)];
          else
            u_q[i][j] <= gmul(x[i], r[pair_idx(D, i, j)]) ^ rp[pair_idx(D, i, j)];
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < D; i++) begin
      z[i] = '0;
      for (int j = 0; j < D; j++)
        if (i != j) z[i] = z[i] ^ u_q[i][j] ^ gmul(x_d[i], v_q[i][j]);
    end
  end

endmodule
