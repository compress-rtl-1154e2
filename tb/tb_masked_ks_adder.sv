// tb_masked_ks_adder: masked Kogge-Stone adder. Three instances add the same random
// operands, one new addition per cycle:
//   - N = 32, 2 shares: checked against a + b mod 2^32 exactly 6 cycles later;
//   - N = 32, 3 shares: same sums, same latency;
//   - N = 9, 2 shares (3 prefix levels, latency 4): checked against the low 9 bits.
// The operand mix includes full-length carry chains (a = all ones, b = 1) and a + ~a. The
// bench also checks the randomness width of the 32-bit instances (374 bits for 2 shares,
// 1122 for 3), and that share 0 alone does not give the sum.
module tb_masked_ks_adder;
  localparam int N = 32, LAT = 6, NS = 9, LATS = 4, OPS = 300, WD = OPS + LAT + 50;
  localparam int D2 = 2, D3 = 3;
  localparam int RND2 = masked_pkg::ks_rnd(D2, N);
  localparam int RND3 = masked_pkg::ks_rnd(D3, N);
  localparam int RNDS = masked_pkg::ks_rnd(D2, NS);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, full_chain = 0, masked_seen = 0;

  logic [N-1:0][D2-1:0]  a2, b2, s2;
  logic [N-1:0][D3-1:0]  a3, b3, s3;
  logic [NS-1:0][D2-1:0] as, bs, ss;
  logic [RND2-1:0] rnd2;
  logic [RND3-1:0] rnd3;
  logic [RNDS-1:0] rnds;
  logic [N-1:0] expv [OPS];

  masked_ks_adder #(.D(D2), .N(N))  dut2 (.clk, .a(a2), .b(b2), .rnd(rnd2), .s(s2));
  masked_ks_adder #(.D(D3), .N(N))  dut3 (.clk, .a(a3), .b(b3), .rnd(rnd3), .s(s3));
  masked_ks_adder #(.D(D2), .N(NS)) duts (.clk, .a(as), .b(bs), .rnd(rnds), .s(ss));

  initial begin
    logic [N-1:0] av, bv, v2, v3, z0;
    logic [NS-1:0] vs;
    checks += 2;
    if (RND2 != 374) begin failures++; $display("randomness D=2: %0d", RND2); end
    if (RND3 != 1122) begin failures++; $display("randomness D=3: %0d", RND3); end
    for (int t = 0; t < OPS + LAT; t++) begin
      @(negedge clk);
      if (t < OPS) begin
        case (t % 5)
          0: begin av = '1; bv = 1; full_chain++; end
          1: begin av = $urandom(); bv = ~av; end
          default: begin av = $urandom(); bv = $urandom(); end
        endcase
        expv[t] = av + bv;
        for (int k = 0; k < N; k++) begin
          a2[k] = D2'($urandom()); a2[k][D2-1] = av[k] ^ (^a2[k][D2-2:0]);
          b2[k] = D2'($urandom()); b2[k][D2-1] = bv[k] ^ (^b2[k][D2-2:0]);
          a3[k] = D3'($urandom()); a3[k][D3-1] = av[k] ^ (^a3[k][D3-2:0]);
          b3[k] = D3'($urandom()); b3[k][D3-1] = bv[k] ^ (^b3[k][D3-2:0]);
        end
        for (int k = 0; k < NS; k++) begin
          as[k] = D2'($urandom()); as[k][D2-1] = av[k] ^ as[k][0];
          bs[k] = D2'($urandom()); bs[k][D2-1] = bv[k] ^ bs[k][0];
        end
      end
      for (int q = 0; q < RND2; q++) rnd2[q] = 1'($urandom());
      for (int q = 0; q < RND3; q++) rnd3[q] = 1'($urandom());
      for (int q = 0; q < RNDS; q++) rnds[q] = 1'($urandom());
      #1;  // outputs are checked while the next operation's inputs are applied
      if (t >= LAT) begin
        for (int k = 0; k < N; k++) begin v2[k] = ^s2[k]; v3[k] = ^s3[k]; z0[k] = s2[k][0]; end
        checks += 2;
        if (v2 !== expv[t-LAT]) begin
          failures++; $display("D=2 op %0d: got %h exp %h", t-LAT, v2, expv[t-LAT]);
        end
        if (v3 !== expv[t-LAT]) begin
          failures++; $display("D=3 op %0d: got %h exp %h", t-LAT, v3, expv[t-LAT]);
        end
        if (z0 != expv[t-LAT]) masked_seen++;
      end
      if (t >= LATS && t - LATS < OPS) begin
        for (int k = 0; k < NS; k++) vs[k] = ^ss[k];
        checks++;
        if (vs !== expv[t-LATS][NS-1:0]) begin
          failures++; $display("N=9 op %0d: got %h exp %h", t-LATS, vs, expv[t-LATS][NS-1:0]);
        end
      end
    end
    checks += 2;
    if (full_chain == 0) failures++;
    if (masked_seen == 0) failures++;
    $display("full carry chains: %0d", full_chain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (WD) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
