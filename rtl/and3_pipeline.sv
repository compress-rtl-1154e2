// and3_pipeline: masked 3-input AND z = a & b & c with the minimum latency of 2 cycles.
//
// The AND depth of the function is 2, so two register layers are the least possible. An
// HPC3 gadget (latency 1 on both inputs) computes a & b. Its output, one cycle old, goes
// to the latency-1 input x of an HPC2 gadget. The third operand c goes straight to the
// latency-2 input y of the HPC2 gadget. No pipeline register is needed anywhere. The
// mix of gadgets is cheaper than two HPC3 gadgets plus a register on c, or two HPC2
// gadgets, which would need latency 3.
//
// Interface: sharings a, b, c and the randomness of both gadgets enter in the same cycle
// t. z is valid in cycle t+2. A new operation can start every cycle. Randomness:
// hpc3_rnd(D) + hpc2_rnd(D) bits per cycle, HPC3's first.
module and3_pipeline
  import masked_pkg::*;
#(
  parameter int D = 2,
  localparam int RND = hpc3_rnd(D) + hpc2_rnd(D)
) (
  input  logic           clk,
  input  logic [D-1:0]   a,
  input  logic [D-1:0]   b,
  input  logic [D-1:0]   c,
  input  logic [RND-1:0] rnd,
  output logic [D-1:0]   z
);

  localparam int NP = npairs(D);

  logic [D-1:0] ab;   // valid one cycle after a, b

  hpc3_and #(.D(D)) u_ab (
    .clk, .x(a), .y(b), .r(rnd[NP-1:0]), .rp(rnd[2*NP-1:NP]), .z(ab)
  );

  hpc2_and #(.D(D)) u_abc (
    .clk, .x(ab), .y(c), .r(rnd[3*NP-1:2*NP]), .z
  );

endmodule
