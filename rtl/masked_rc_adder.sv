// masked_rc_adder: N-bit Boolean-masked ripple-carry adder pipeline, latency N-1 (or N).
//
// Computes s = a + b mod 2^N on D-share Boolean sharings of a and b. The carries are
//   c_1     = a_0 & b_0
//   c_{k+1} = b_k ^ ((a_k ^ b_k) & (c_k ^ b_k))       (majority of a_k, b_k, c_k)
//   s_k     = a_k ^ b_k ^ c_k
// Each carry takes one AND, so the AND depth and the latency are N-1 cycles.
// Gadgets:
//   - c_1: an HPC3o Toffoli gadget with w = 0. Both operands arrive at stage 0 and it
//     has latency 1 on both inputs.
//   - c_{k+1} for k >= 1: an HPC2o Toffoli gadget with x = c_k ^ b_k and w = b_k, both
//     on the critical carry path, on its latency-1 inputs. The propagate bit a_k ^ b_k
//     does not depend on the carry. It is forwarded to the latency-2 input y, one stage
//     earlier.
// That costs hpc3_rnd(D) + (N-2)*hpc2_rnd(D) random bits per cycle (32 for N = 32,
// D = 2). With LOW_RND = 1, c_1 also uses an HPC2o gadget (y = b_0, x = a_0 one cycle
// later). That needs (N-1)*hpc2_rnd(D) random bits (31 for N = 32, D = 2) at the cost of
// one cycle: every carry and the output move one stage later, latency N. The Toffoli form and the gadget choice are this design's reading of the
// shortest schedule. The placement of the pipeline registers is a simple one: each
// operand is forwarded to the stage where it is used. Each sum bit is forwarded from the
// stage where it is formed to the output. The solver-optimised placement is not
// reproduced.
//
// Interface: a, b (N sharings of D shares, bit k at [k]) and rnd enter in cycle t. s is
// valid in cycle t+N-1 (t+N with LOW_RND). One addition can start every cycle. No control logic, no reset.
// Randomness layout: the c_1 gadget's bits first (HPC3o: r then r'), then the HPC2o gadget of carry k+1
// for k = 1 .. N-2 in order.
// The per-bit arrays are indexed by bit position throughout. Their entries for bit 0
// (and b_k for the last bit) are never read, which lint reports as unused bits.
module masked_rc_adder
  import masked_pkg::*;
#(
  parameter int D = 2,
  parameter int N = 32,
  parameter bit LOW_RND = 1'b0,
  localparam int RND = (LOW_RND ? hpc2_rnd(D) : hpc3_rnd(D)) + (N - 2) * hpc2_rnd(D)
) (
  input  logic                clk,
  input  logic [N-1:0][D-1:0] a,
  input  logic [N-1:0][D-1:0] b,
  input  logic [RND-1:0]      rnd,
  output logic [N-1:0][D-1:0] s
);

  localparam int NP = npairs(D);
  localparam int O  = LOW_RND ? 1 : 0;   // stage offset of the whole carry chain
  localparam int R1 = LOW_RND ? hpc2_rnd(D) : hpc3_rnd(D);   // bits of the c_1 gadget

  logic [N-1:0][D-1:0] p;       // a_k ^ b_k at stage 0
  logic [N-1:0][D-1:0] p_at;    // p_k at stage k-1+O (HPC2o y input), p_0 unused
  logic [N-1:0][D-1:0] p_k;     // p_k at stage k+O
  logic [N-1:0][D-1:0] b_k;     // b_k at stage k+O
  logic [N-1:0][D-1:0] c;       // c_k at stage k+O, c_0 unused
  logic [N-1:0][D-1:0] s_k;     // s_k at stage k+O (k >= 1)

  for (genvar k = 0; k < N; k++) begin : g_bit
    sw_gate #(.D(D), .OP(masked_pkg::SW_XOR)) u_p (.x(a[k]), .y(b[k]), .z(p[k]));

    // Bring b_k and p_k to stage k+O (and p_k to stage k-1+O for the gadget's y input).
    if (k >= 1) begin : g_fwd
      if (k < N - 1) begin : g_b
        masked_reg #(.D(D), .LAT(k+O)) u_b (.clk, .d_i(b[k]), .q_o(b_k[k]));
      end else begin : g_nob
        assign b_k[k] = '0;   // the last bit produces no carry
      end
      if (k - 1 + O >= 1) begin : g_p1
        masked_reg #(.D(D), .LAT(k-1+O)) u_p1 (.clk, .d_i(p[k]), .q_o(p_at[k]));
      end else begin : g_p0
        assign p_at[k] = p[k];
      end
      masked_reg #(.D(D), .LAT(1)) u_p2 (.clk, .d_i(p_at[k]), .q_o(p_k[k]));
      sw_gate #(.D(D), .OP(masked_pkg::SW_XOR)) u_s (.x(p_k[k]), .y(c[k]), .z(s_k[k]));
    end else begin : g_lsb
      assign b_k[k]  = b[k];
      assign p_at[k] = '0;
      assign p_k[k]  = p[k];
      assign s_k[k]  = p[k];
    end

    // Forward the sum bit to the output stage N-1+O (s_0 is formed at stage 0).
    if (k == 0) begin : g_s0fwd
      masked_reg #(.D(D), .LAT(N-1+O)) u_s_fwd (.clk, .d_i(s_k[k]), .q_o(s[k]));
    end else if (k < N - 1) begin : g_sfwd
      masked_reg #(.D(D), .LAT(N-1-k)) u_s_fwd (.clk, .d_i(s_k[k]), .q_o(s[k]));
    end else begin : g_sout
      assign s[k] = s_k[k];
    end
  end

  assign c[0] = '0;

  // c_1 = a_0 & b_0, stage 0 -> 1+O
  if (LOW_RND) begin : g_c1_hpc2
    logic [D-1:0] a0_d;
    masked_reg #(.D(D), .LAT(1)) u_a0 (.clk, .d_i(a[0]), .q_o(a0_d));
    hpc2o_toffoli #(.D(D)) u_c1 (
      .clk, .x(a0_d), .y(b[0]), .w('0), .r(rnd[NP-1:0]), .z(c[1])
    );
  end else begin : g_c1_hpc3
    hpc3o_toffoli #(.D(D)) u_c1 (
      .clk, .x(a[0]), .y(b[0]), .w('0),
      .r(rnd[NP-1:0]), .rp(rnd[2*NP-1:NP]), .z(c[1])
    );
  end

  // c_{k+1}, stage k+O -> k+1+O. The gadget samples its randomness together with y, at
  // stage k-1+O. The bus carries fresh bits every cycle.
  for (genvar k = 1; k < N - 1; k++) begin : g_carry
    logic [D-1:0] x_in;
    sw_gate #(.D(D), .OP(masked_pkg::SW_XOR)) u_x (.x(c[k]), .y(b_k[k]), .z(x_in));
    hpc2o_toffoli #(.D(D)) u_tof (
      .clk, .x(x_in), .y(p_at[k]), .w(b_k[k]),
      .r(rnd[R1 + (k-1)*NP +: NP]), .z(c[k+1])
    );
  end

endmodule
