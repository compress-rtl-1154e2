// compress_top: masked pipelines built from HPC gadgets, sharing one Trivium PRNG.
//
// Six independent masked pipelines stand side by side. Each has its own ports, and all
// take their randomness from one unrolled Trivium PRNG. The PRNG refreshes every random
// bit each cycle, so each pipeline can accept one operation per cycle:
//   - adder: a 32-bit masked ripple-carry adder, latency 31 (HPC3o + HPC2o Toffoli
//     gadgets).
//   - ks:    a 32-bit masked Kogge-Stone adder, latency 6 (HPC3 gadgets for the bit
//     generates and group propagates, HPC2o Toffoli gadgets for the group generates).
//   - and3:  z = a & b & c at the minimum latency 2, an HPC3 gadget feeding the
//     latency-1 input of an HPC2 gadget.
//   - sep:   an example of register de-duplication with gadgets split into parts. Two
//     separated HPC3 gadgets compute x&y and x&v and share one pipeline register for
//     x. A separated HPC2 gadget then ANDs x&y with v, reusing the registered copy of v
//     that the second HPC3 gadget also uses. Outputs x&y&v and x&v, both at stage 2.
//   - tof:   an extended Toffoli gadget, z = (x & y) ^ w0 ^ w1 ^ w2, built from an HPC3o
//     gadget and a two-register output chain. x, y, w0 enter with the operation (stage
//     0), w1 one cycle later (stage 1) and w2 three cycles later (stage 3). Each XOR
//     operand is added where it arrives instead of being forwarded. Result at stage 3.
//   - gfm:   a GF(16) multiply-accumulate z = w + x * y (polynomial basis, x^4 + x + 1),
//     one HPC3o field gadget, latency 1.
// The PRNG output bus is split in a fixed order: adder, and3, sep, tof, ks, then gfm
// (424 of the 512 bits at D = 2). The remaining PRNG bits are left unconnected on
// purpose (lint reports them as unused); synthesis removes the logic behind them.
//
// Timing: after reset, pulse `seed` with key/iv. Issue operations only while prng_ready
// is high (an assertion checks this). Each pipeline's *_valid_o marks the cycle its
// result appears: 31 cycles after issue for the adder, 6 for ks, 2 for and3 and sep, 3
// for tof, 1 for gfm. Sharings are D-share Boolean sharings (share i at bit i; GF(16)
// shares are 4-bit elements). The valid lines and the shared-PRNG wiring are this
// design's choice.
module compress_top
  import masked_pkg::*;
#(
  parameter int D      = 2,
  parameter int N      = 32,
  parameter int UNROLL = 512
) (
  input  logic                clk,
  input  logic                rst_n,
  // PRNG seeding
  input  logic                seed,
  input  logic [79:0]         key,
  input  logic [79:0]         iv,
  output logic                prng_ready,
  // masked adder
  input  logic                add_valid_i,
  input  logic [N-1:0][D-1:0] add_a,
  input  logic [N-1:0][D-1:0] add_b,
  output logic                add_valid_o,
  output logic [N-1:0][D-1:0] add_s,
  // masked Kogge-Stone adder
  input  logic                ks_valid_i,
  input  logic [N-1:0][D-1:0] ks_a,
  input  logic [N-1:0][D-1:0] ks_b,
  output logic                ks_valid_o,
  output logic [N-1:0][D-1:0] ks_s,
  // masked AND3
  input  logic                and3_valid_i,
  input  logic [D-1:0]        and3_a,
  input  logic [D-1:0]        and3_b,
  input  logic [D-1:0]        and3_c,
  output logic                and3_valid_o,
  output logic [D-1:0]        and3_z,
  // separated-gadget pipeline
  input  logic                sep_valid_i,
  input  logic [D-1:0]        sep_x,
  input  logic [D-1:0]        sep_y,
  input  logic [D-1:0]        sep_v,
  output logic                sep_valid_o,
  output logic [D-1:0]        sep_xyv,
  output logic [D-1:0]        sep_xv,
  // extended Toffoli pipeline (tof_w[1] one cycle, tof_w[2] three cycles after issue)
  input  logic                tof_valid_i,
  input  logic [D-1:0]        tof_x,
  input  logic [D-1:0]        tof_y,
  input  logic [2:0][D-1:0]   tof_w,
  output logic                tof_valid_o,
  output logic [D-1:0]        tof_z,
  // GF(16) multiply-accumulate
  input  logic                gfm_valid_i,
  input  logic [D-1:0][3:0]   gfm_x,
  input  logic [D-1:0][3:0]   gfm_y,
  input  logic [D-1:0][3:0]   gfm_w,
  output logic                gfm_valid_o,
  output logic [D-1:0][3:0]   gfm_z
);

  localparam int NP      = npairs(D);
  localparam int RND_ADD = hpc3_rnd(D) + (N - 2) * hpc2_rnd(D);
  localparam int RND_AND3 = hpc3_rnd(D) + hpc2_rnd(D);
  localparam int RND_SEP = 2 * hpc3_rnd(D) + hpc2_rnd(D);
  localparam int RND_TOF = hpc3_rnd(D);
  localparam int RND_KS  = ks_rnd(D, N);
  localparam int RND_GFM = 4 * hpc3_rnd(D);
  localparam int RND_ALL = RND_ADD + RND_AND3 + RND_SEP + RND_TOF + RND_KS + RND_GFM;

  if (RND_ALL > UNROLL) begin : g_rnd_check
    $error("PRNG too narrow for the pipelines' randomness");
  end

  logic [UNROLL-1:0] rnd;

  trivium_prng #(.UNROLL(UNROLL)) u_prng (
    .clk, .rst_n, .seed, .key, .iv, .ready(prng_ready), .rnd
  );

  // ---------------- adder ----------------
  masked_rc_adder #(.D(D), .N(N)) u_adder (
    .clk, .a(add_a), .b(add_b), .rnd(rnd[RND_ADD-1:0]), .s(add_s)
  );
  valid_pipe #(.LAT(N-1)) u_add_v (.clk, .rst_n, .in_valid(add_valid_i), .out_valid(add_valid_o));

  // ---------------- AND3 ----------------
  and3_pipeline #(.D(D)) u_and3 (
    .clk, .a(and3_a), .b(and3_b), .c(and3_c),
    .rnd(rnd[RND_ADD +: RND_AND3]), .z(and3_z)
  );
  valid_pipe #(.LAT(2)) u_and3_v (.clk, .rst_n, .in_valid(and3_valid_i), .out_valid(and3_valid_o));

  // ---------------- separated gadgets ----------------
  localparam int SB = RND_ADD + RND_AND3;   // base of this pipeline's randomness

  logic [D-1:0] x_d, y_d, v_d, v_dd, xy, xy_d, xv;

  // Shared pipeline registers: x_d serves both HPC3 gadgets, v_d serves the second HPC3
  // gadget and (delayed once more) the HPC2 gadget's inner-domain term.
  masked_reg #(.D(D), .W(3)) u_st1 (.clk, .d_i({sep_x, sep_y, sep_v}), .q_o({x_d, y_d, v_d}));
  masked_reg #(.D(D), .W(2)) u_st2 (.clk, .d_i({v_d, xy}), .q_o({v_dd, xy_d}));

  hpc3_sep_and #(.D(D)) u_xy (
    .clk, .x(sep_x), .y(sep_y), .x_d, .y_d,
    .r(rnd[SB +: NP]), .rp(rnd[SB + NP +: NP]), .z(xy)
  );

  hpc3_sep_and #(.D(D)) u_xv (
    .clk, .x(sep_x), .y(sep_v), .x_d, .y_d(v_d),
    .r(rnd[SB + 2*NP +: NP]), .rp(rnd[SB + 3*NP +: NP]), .z(xv)
  );

  hpc2_sep_and #(.D(D)) u_xyv (
    .clk, .x(xy), .y(sep_v), .x_d(xy_d), .y_dd(v_dd),
    .r(rnd[SB + 4*NP +: NP]), .z(sep_xyv)
  );

  masked_reg #(.D(D)) u_xv_out (.clk, .d_i(xv), .q_o(sep_xv));

  valid_pipe #(.LAT(2)) u_sep_v (.clk, .rst_n, .in_valid(sep_valid_i), .out_valid(sep_valid_o));

  // ---------------- extended Toffoli ----------------
  ext_toffoli #(.D(D), .USE_HPC3O(1'b1), .K(3), .OUT_LAT(2), .POS(32'h0000_0310)) u_tof (
    .clk, .x(tof_x), .y(tof_y), .w(tof_w), .rnd(rnd[SB + RND_SEP +: RND_TOF]), .z(tof_z)
  );
  valid_pipe #(.LAT(3)) u_tof_v (.clk, .rst_n, .in_valid(tof_valid_i), .out_valid(tof_valid_o));

  // ---------------- Kogge-Stone adder ----------------
  masked_ks_adder #(.D(D), .N(N)) u_ks (
    .clk, .a(ks_a), .b(ks_b), .rnd(rnd[SB + RND_SEP + RND_TOF +: RND_KS]), .s(ks_s)
  );
  valid_pipe #(.LAT($clog2(N-1) + 1)) u_ks_v (.clk, .rst_n, .in_valid(ks_valid_i), .out_valid(ks_valid_o));

  // ---------------- GF(16) multiply-accumulate ----------------
  localparam int GB = SB + RND_SEP + RND_TOF + RND_KS;   // base of this pipeline's randomness

  hpc3o_gf_mult #(.D(D), .K(4), .POLY(9'h013)) u_gfm (
    .clk, .x(gfm_x), .y(gfm_y), .w(gfm_w),
    .r(rnd[GB +: 4*NP]), .rp(rnd[GB + 4*NP +: 4*NP]), .z(gfm_z)
  );
  valid_pipe #(.LAT(1)) u_gfm_v (.clk, .rst_n, .in_valid(gfm_valid_i), .out_valid(gfm_valid_o));

  // Operations may only enter once the PRNG delivers fresh randomness.
  a_issue_after_ready : assert property (
    @(posedge clk) disable iff (!rst_n) (add_valid_i || ks_valid_i || and3_valid_i || sep_valid_i || tof_valid_i ||
       gfm_valid_i)
      |-> prng_ready
  );

endmodule
