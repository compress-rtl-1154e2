// tb_masked_rc_adder: 32-bit masked ripple-carry adder (2 shares). Starts one random
// addition per cycle and checks that the unmasked output equals a + b mod 2^32 exactly 31
// cycles later. The operand mix includes full-length carry chains (a = all ones, b = 1).
// It counts those, and also checks that the output is not given in the clear in share 0.
// A second instance with 3 shares (second-order, 96 random bits per cycle) adds the same
// operands and must give the same sums. Two more instances use the lower-randomness
// variant (LOW_RND: 31 bits at 2 shares, 93 at 3 shares) and must give the same sums one
// cycle later (latency 32).
module tb_masked_rc_adder;
  localparam int D = 2, N = 32, LAT = N - 1, OPS = 300, WD = OPS + LAT + 50;
  localparam int RND = 2*D*(D-1)/2 + (N-2)*D*(D-1)/2;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, full_chain = 0, masked_seen = 0;

  logic [N-1:0][D-1:0] a, b, s;
  logic [RND-1:0] rnd;
  logic [N-1:0] expv [OPS];
  logic [N-1:0] sv, s0;

  masked_rc_adder #(.D(D), .N(N)) dut (.clk, .a, .b, .rnd, .s);

  localparam int D3 = 3, RND3 = 2*D3*(D3-1)/2 + (N-2)*D3*(D3-1)/2;
  logic [N-1:0][D3-1:0] a3, b3, s3;
  logic [RND3-1:0] rnd3;
  logic [N-1:0] sv3;
  masked_rc_adder #(.D(D3), .N(N)) dut3 (.clk, .a(a3), .b(b3), .rnd(rnd3), .s(s3));

  localparam int RNDL2 = (N-1)*D*(D-1)/2, RNDL3 = (N-1)*D3*(D3-1)/2;
  logic [RNDL2-1:0] rndl2;
  logic [RNDL3-1:0] rndl3;
  logic [N-1:0][D-1:0]  sl2;
  logic [N-1:0][D3-1:0] sl3;
  logic [N-1:0] svl2, svl3;
  masked_rc_adder #(.D(D),  .N(N), .LOW_RND(1'b1)) dutl2 (.clk, .a,      .b,      .rnd(rndl2), .s(sl2));
  masked_rc_adder #(.D(D3), .N(N), .LOW_RND(1'b1)) dutl3 (.clk, .a(a3), .b(b3), .rnd(rndl3), .s(sl3));

  function automatic void share_word(logic [N-1:0] v, output logic [N-1:0][D-1:0] sh);
    for (int k = 0; k < N; k++) begin
      sh[k] = D'($urandom());
      sh[k][D-1] = v[k] ^ (^sh[k][D-2:0]);
    end
  endfunction

  initial begin
    logic [N-1:0] av, bv;
    checks += 2;
    if ($bits(rndl2) != 31 || $bits(rnd) != 32) failures++;
    if ($bits(rndl3) != 93 || $bits(rnd3) != 96) failures++;
    for (int t = 0; t < OPS + LAT + 1; t++) begin
      @(negedge clk);
      if (t < OPS) begin
        case (t % 5)
          0: begin av = '1; bv = 1; full_chain++; end
          1: begin av = $urandom(); bv = ~av; end
          default: begin av = $urandom(); bv = $urandom(); end
        endcase
        expv[t] = av + bv;
        share_word(av, a);
        share_word(bv, b);
        for (int k = 0; k < N; k++) begin
          a3[k] = D3'($urandom()); a3[k][D3-1] = av[k] ^ (^a3[k][D3-2:0]);
          b3[k] = D3'($urandom()); b3[k][D3-1] = bv[k] ^ (^b3[k][D3-2:0]);
        end
      end
      for (int q = 0; q < RND; q += 32) rnd[q +: 32] = $urandom();
      for (int q = 0; q < RND3; q++) rnd3[q] = 1'($urandom());
      for (int q = 0; q < RNDL2; q++) rndl2[q] = 1'($urandom());
      for (int q = 0; q < RNDL3; q++) rndl3[q] = 1'($urandom());
      #1;  // outputs are checked while the next operation's inputs are applied
      if (t >= LAT + 1) begin
        for (int k = 0; k < N; k++) begin svl2[k] = ^sl2[k]; svl3[k] = ^sl3[k]; end
        checks += 2;
        if (svl2 !== expv[t-LAT-1]) begin failures++; $display("LOW_RND D=2 op %0d: got %h", t-LAT-1, svl2); end
        if (svl3 !== expv[t-LAT-1]) begin failures++; $display("LOW_RND D=3 op %0d: got %h", t-LAT-1, svl3); end
      end
      if (t >= LAT && t - LAT < OPS) begin
        for (int k = 0; k < N; k++) begin sv[k] = ^s[k]; s0[k] = s[k][0]; end
        checks++;
        if (sv !== expv[t-LAT]) begin
          failures++;
          $display("op %0d: got %h exp %h", t-LAT, sv, expv[t-LAT]);
        end
        if (s0 != expv[t-LAT]) masked_seen++;
        for (int k = 0; k < N; k++) sv3[k] = ^s3[k];
        checks++;
        if (sv3 !== expv[t-LAT]) begin failures++; $display("D=3 op %0d: got %h", t-LAT, sv3); end
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
