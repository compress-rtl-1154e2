// masked_ks_adder: N-bit Boolean-masked Kogge-Stone adder pipeline.
//
// Computes s = a + b mod 2^N on D-share Boolean sharings, with a parallel-prefix carry
// tree instead of a ripple chain. Bit-level propagate and generate signals are
//   p_i = a_i ^ b_i                    (sharewise, stage 0)
//   g_i = a_i & b_i                    (HPC3, stage 0 -> 1)
// and the carries come from L = clog2(N-1) Kogge-Stone levels. Level l (span s = 2^(l-1))
// combines each group with the group s bits below it:
//   G^l_i = G^{l-1}_i ^ (P^{l-1}_i & G^{l-1}_{i-s})    for i >= s
//   P^l_i = P^{l-1}_i & P^{l-1}_{i-s}                  for i >= 2s (only where used)
// After level L, G^L_i is the carry into bit i+1, and s_i = p_i ^ G^L_{i-1}.
//
// Gadgets: every group generate G^l_i is an AND whose result is XORed with G^{l-1}_i,
// so it is one HPC2o Toffoli gadget. Its latency-1 inputs x = G^{l-1}_{i-s} and
// w = G^{l-1}_i lie on the critical path. The latency-2 input y = P^{l-1}_i comes from
// the propagate tree, which runs one stage ahead. The bit generates g_i and the group
// propagates P^l_i use HPC3 gadgets (latency 1). With this mix the adder needs
//   (N-1 + #P) * hpc3_rnd(D) + #G * hpc2_rnd(D)
// random bits per cycle. For N = 32 that is 31 + 94 HPC3 and 124 HPC2o gadgets: 374 bits
// at D = 2 and 1122 at D = 3. The Kogge-Stone structure is the standard one. The gadget
// mix and the stage timing (g at stage 1, P^l at stage l, G^l at stage l+1) are this
// design's own schedule. It gives latency L+1 (6 for N = 32). Groups that are already
// final (i < s) are forwarded by pipeline registers, as is p_i to the output stage. The
// register placement is simple and not area-optimised.
//
// Interface: a, b (N sharings of D shares, bit k at [k]) and rnd enter in cycle t. s is
// valid in cycle t+L+1. One addition can start every cycle. No control logic, no reset.
// Randomness layout (offsets from the ks_* functions of masked_pkg): the N-1 g gadgets
// (HPC3: r then r'), then for each level l = 1..L the P gadgets (HPC3, ascending i)
// followed by the G gadgets (HPC2o, ascending i).
module masked_ks_adder
  import masked_pkg::*;
#(
  parameter int D = 2,
  parameter int N = 32,
  localparam int L = $clog2(N - 1),
  localparam int RND = ks_rnd(D, N)
) (
  input  logic                clk,
  input  logic [N-1:0][D-1:0] a,
  input  logic [N-1:0][D-1:0] b,
  input  logic [RND-1:0]      rnd,
  output logic [N-1:0][D-1:0] s
);

  localparam int NP = npairs(D);
  localparam int R3 = hpc3_rnd(D);
  localparam int R2 = hpc2_rnd(D);
  localparam int M  = N - 1;          // carries G_0 .. G_{N-2} are needed

  if (N < 3) begin : g_bad_n
    $error("masked_ks_adder: N must be at least 3");
  end

  // Gv[l][i]: G^l_i, valid at stage l+1 (G^0 = g). Pv[l][i]: P^l_i, valid at stage l.
  logic [L:0][M-1:0][D-1:0] Gv;
  logic [L-1:0][M-1:0][D-1:0] Pv;   // P^L is not needed
  logic [N-1:0][D-1:0]      p, p_out;

  for (genvar i = 0; i < N; i++) begin : g_bit
    sw_gate #(.D(D), .OP(masked_pkg::SW_XOR)) u_p (.x(a[i]), .y(b[i]), .z(p[i]));
    masked_reg #(.D(D), .LAT(L+1)) u_p_fwd (.clk, .d_i(p[i]), .q_o(p_out[i]));
    if (i == 0) begin : g_s0
      assign s[i] = p_out[i];
    end else begin : g_si
      sw_gate #(.D(D), .OP(masked_pkg::SW_XOR)) u_s (.x(p_out[i]), .y(Gv[L][i-1]), .z(s[i]));
    end
  end

  // Level 0: g_i = a_i & b_i, and P^0 = p.
  for (genvar i = 0; i < M; i++) begin : g_gen
    hpc3_and #(.D(D)) u_g (
      .clk, .x(a[i]), .y(b[i]),
      .r(rnd[i*R3 +: NP]), .rp(rnd[i*R3 + NP +: NP]), .z(Gv[0][i])
    );
    assign Pv[0][i] = p[i];
  end

  for (genvar l = 1; l <= L; l++) begin : g_lvl
    localparam int S   = 1 << (l - 1);
    localparam int OFF = ks_lvl_off(D, N, l);
    localparam int NPC = ks_p_cnt(N, l);
    for (genvar i = 0; i < M; i++) begin : g_i
      // group generate
      if (i >= S) begin : g_g
        hpc2o_toffoli #(.D(D)) u_tof (
          .clk, .x(Gv[l-1][i-S]), .y(Pv[l-1][i]), .w(Gv[l-1][i]),
          .r(rnd[OFF + NPC*R3 + (i-S)*R2 +: NP]), .z(Gv[l][i])
        );
      end else begin : g_fwd
        masked_reg #(.D(D), .LAT(1)) u_g_fwd (.clk, .d_i(Gv[l-1][i]), .q_o(Gv[l][i]));
      end
      // group propagate, only where a later level reads it
      if (l <= L - 1) begin : g_pl
        if (i >= 2*S) begin : g_p
          hpc3_and #(.D(D)) u_pp (
            .clk, .x(Pv[l-1][i]), .y(Pv[l-1][i-S]),
            .r(rnd[OFF + (i-2*S)*R3 +: NP]), .rp(rnd[OFF + (i-2*S)*R3 + NP +: NP]),
            .z(Pv[l][i])
          );
        end else begin : g_nop
          assign Pv[l][i] = '0;   // never read
        end
      end
    end
  end

endmodule
