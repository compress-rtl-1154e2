// tb_compress_top: end-to-end test of the top at its default parameters (2 shares, 32-bit
// adder, 512-bit PRNG). It resets and seeds the PRNG, waits for ready, then feeds all
// six masked pipelines a new random operation every cycle. It checks:
//   - each result against a + b (ripple-carry and Kogge-Stone), a&b&c, x&y&v, x&v,
//     (x&y)^w0^w1^w2 and the GF(16) value w + x*y, and each *_valid_o against the issue
//     cycle plus the pipeline latency (31, 6, 2, 2, 3, 1);
//   - that the randomness changes every cycle, and that the PRNG can be re-seeded midway
//     (operations pause until ready returns).
// Mechanisms counted, each must happen at least once: seeding, re-seeding, full-length
// carry ripple in both adders, an all-ones AND3, a true x&y&v result, back-to-back issue,
// an idle gap in the stream, extended-Toffoli operations with late XOR operands, and a
// GF(16) product with a nonzero reduction step.
module tb_compress_top;
  localparam int D = 2, N = 32, OPS = 240;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_seed = 0, n_full_chain = 0, n_and3_one = 0, n_xyv_one = 0, n_b2b = 0, n_gap = 0;

  logic rst_n, seed, prng_ready;
  logic [79:0] key, iv;
  logic add_valid_i, add_valid_o, and3_valid_i, and3_valid_o, sep_valid_i, sep_valid_o;
  logic [N-1:0][D-1:0] add_a, add_b, add_s;
  logic ks_valid_i, ks_valid_o;
  logic [N-1:0][D-1:0] ks_a, ks_b, ks_s;
  logic [D-1:0] and3_a, and3_b, and3_c, and3_z, sep_x, sep_y, sep_v, sep_xyv, sep_xv;
  logic tof_valid_i, tof_valid_o;
  logic [D-1:0] tof_x, tof_y, tof_z;
  logic [2:0][D-1:0] tof_w;
  // late operands of the extended Toffoli pipeline, keyed by the cycle they are due in
  logic [D-1:0] tof_w1_due [int], tof_w2_due [int];
  int n_tof = 0, n_gfm_red = 0;
  logic gfm_valid_i, gfm_valid_o;
  logic [D-1:0][3:0] gfm_x, gfm_y, gfm_w, gfm_z;
  logic [3:0] q_gfm [$];
  int         q_gfm_t [$];

  // GF(16) reference (x^4 + x + 1): carry-less product, then polynomial division
  function automatic logic [3:0] gf16_mul(logic [3:0] a, logic [3:0] b);
    logic [7:0] p;
    p = '0;
    for (int n = 0; n < 4; n++) if (b[n]) p = p ^ (8'(a) << n);
    for (int n = 7; n >= 4; n--) if (p[n]) p = p ^ (8'h13 << (n - 4));
    return p[3:0];
  endfunction

  compress_top dut (.*);

  function automatic logic [D-1:0] share(logic v);
    logic [D-1:0] s;
    s = D'($urandom());
    s[D-1] = v ^ (^s[D-2:0]);
    return s;
  endfunction

  // expected results, queued by issue order
  logic [N-1:0] q_sum [$], q_ks [$];
  logic         q_and3 [$], q_xyv [$], q_xv [$], q_tof [$];
  int           q_add_t [$], q_ks_t [$], q_and3_t [$], q_sep_t [$], q_tof_t [$];
  int           cycle = 0;
  logic [511:0] rnd_prev;

  always @(posedge clk) cycle <= cycle + 1;

  // output checker, just after the negative edge, once this cycle's inputs are applied
  always @(negedge clk) begin : out_check
    logic [N-1:0] sv;
    #1;
    if (rst_n) begin
    if (add_valid_o) begin
      for (int k = 0; k < N; k++) sv[k] = ^add_s[k];
      checks += 2;
      if (q_sum.size() == 0) failures++;
      else begin
        if (sv !== q_sum.pop_front()) begin failures++; $display("adder mismatch at %0d", cycle); end
        if (cycle - q_add_t.pop_front() != N - 1) failures++;
      end
    end
    if (ks_valid_o) begin
      for (int k = 0; k < N; k++) sv[k] = ^ks_s[k];
      checks += 2;
      if (q_ks.size() == 0) failures++;
      else begin
        if (sv !== q_ks.pop_front()) begin failures++; $display("ks mismatch at %0d", cycle); end
        if (cycle - q_ks_t.pop_front() != 6) failures++;
      end
    end
    if (and3_valid_o) begin
      checks += 2;
      if (q_and3.size() == 0) failures++;
      else begin
        if (^and3_z !== q_and3.pop_front()) failures++;
        if (cycle - q_and3_t.pop_front() != 2) failures++;
      end
    end
    if (sep_valid_o) begin
      checks += 3;
      if (q_xyv.size() == 0) failures++;
      else begin
        if (^sep_xyv !== q_xyv.pop_front()) failures++;
        if (^sep_xv !== q_xv.pop_front()) failures++;
        if (cycle - q_sep_t.pop_front() != 2) failures++;
      end
    end
    if (tof_valid_o) begin
      checks += 2;
      if (q_tof.size() == 0) failures++;
      else begin
        if (^tof_z !== q_tof.pop_front()) begin failures++; $display("tof mismatch at %0d", cycle); end
        if (cycle - q_tof_t.pop_front() != 3) failures++;
      end
    end
    if (gfm_valid_o) begin
      checks += 2;
      if (q_gfm.size() == 0) failures++;
      else begin
        if ((gfm_z[0] ^ gfm_z[1]) !== q_gfm.pop_front()) begin failures++; $display("gfm mismatch at %0d", cycle); end
        if (cycle - q_gfm_t.pop_front() != 1) failures++;
      end
    end
    if (prng_ready) begin
      checks++;
      if (dut.rnd == rnd_prev) failures++;
      rnd_prev = dut.rnd;
    end
    end
  end

  // Drive the late Toffoli operands in the cycle they are due (independent of issue).
  always @(negedge clk) begin
    #0;
    tof_w[1] = tof_w1_due.exists(cycle) ? tof_w1_due[cycle] : '0;
    tof_w[2] = tof_w2_due.exists(cycle) ? tof_w2_due[cycle] : '0;
  end

  task automatic do_seed();
    key = {$urandom(), $urandom(), $urandom()};
    iv  = {$urandom(), $urandom(), $urandom()};
    seed = 1'b1;
    @(negedge clk) seed = 1'b0;
    n_seed++;
    while (!prng_ready) @(negedge clk);
  endtask

  task automatic issue(int t);
    logic [N-1:0] av, bv;
    logic a3, b3, c3, xv, yv, vv, tx, ty, tw0, tw1, tw2;
    case (t % 4)
      0: begin av = '1; bv = 1; n_full_chain++; end
      1: begin av = $urandom(); bv = ~av; end
      default: begin av = $urandom(); bv = $urandom(); end
    endcase
    for (int k = 0; k < N; k++) begin add_a[k] = share(av[k]); add_b[k] = share(bv[k]); end
    for (int k = 0; k < N; k++) begin ks_a[k] = share(av[k]); ks_b[k] = share(bv[k]); end
    ks_valid_i = 1'b1;
    begin
      logic [3:0] gx, gy, gw;
      logic [7:0] raw;
      gx = 4'($urandom()); gy = 4'($urandom()); gw = 4'($urandom());
      raw = '0;
      for (int n = 0; n < 4; n++) if (gy[n]) raw = raw ^ (8'(gx) << n);
      if (raw[7:4] != 0) n_gfm_red++;
      gfm_x[0] = 4'($urandom()); gfm_x[1] = gx ^ gfm_x[0];
      gfm_y[0] = 4'($urandom()); gfm_y[1] = gy ^ gfm_y[0];
      gfm_w[0] = 4'($urandom()); gfm_w[1] = gw ^ gfm_w[0];
      gfm_valid_i = 1'b1;
      q_gfm.push_back(gf16_mul(gx, gy) ^ gw); q_gfm_t.push_back(cycle);
    end
    q_ks.push_back(av + bv); q_ks_t.push_back(cycle);
    a3 = ($urandom() % 4) != 0; b3 = ($urandom() % 4) != 0; c3 = ($urandom() % 4) != 0;
    and3_a = share(a3); and3_b = share(b3); and3_c = share(c3);
    xv = ($urandom() % 4) != 0; yv = ($urandom() % 4) != 0; vv = ($urandom() % 4) != 0;
    sep_x = share(xv); sep_y = share(yv); sep_v = share(vv);
    tx = 1'($urandom()); ty = 1'($urandom());
    tw0 = 1'($urandom()); tw1 = 1'($urandom()); tw2 = 1'($urandom());
    tof_x = share(tx); tof_y = share(ty); tof_w[0] = share(tw0);
    tof_w1_due[cycle + 1] = share(tw1);
    tof_w2_due[cycle + 3] = share(tw2);
    q_tof.push_back((tx & ty) ^ tw0 ^ tw1 ^ tw2); q_tof_t.push_back(cycle);
    n_tof++;
    add_valid_i = 1'b1; and3_valid_i = 1'b1; sep_valid_i = 1'b1; tof_valid_i = 1'b1;
    q_sum.push_back(av + bv);           q_add_t.push_back(cycle);
    q_and3.push_back(a3 & b3 & c3);     q_and3_t.push_back(cycle);
    q_xyv.push_back(xv & yv & vv);      q_xv.push_back(xv & vv);  q_sep_t.push_back(cycle);
    if (a3 & b3 & c3) n_and3_one++;
    if (xv & yv & vv) n_xyv_one++;
  endtask

  initial begin
    bit last_issued;
    rst_n = 1'b0; seed = 1'b0; key = '0; iv = '0; rnd_prev = '0;
    add_valid_i = 1'b0; ks_valid_i = 1'b0; gfm_valid_i = 1'b0; and3_valid_i = 1'b0; sep_valid_i = 1'b0; tof_valid_i = 1'b0;
    add_a = '0; add_b = '0; ks_a = '0; ks_b = '0; and3_a = '0; and3_b = '0; and3_c = '0;
    sep_x = '0; sep_y = '0; sep_v = '0;
    tof_x = '0; tof_y = '0; tof_w = '0; gfm_x = '0; gfm_y = '0; gfm_w = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    do_seed();
    last_issued = 0;
    for (int t = 0; t < OPS; t++) begin
      if (t == OPS / 2) begin
        add_valid_i = 1'b0; ks_valid_i = 1'b0; gfm_valid_i = 1'b0; and3_valid_i = 1'b0; sep_valid_i = 1'b0; tof_valid_i = 1'b0;
        do_seed();        // re-seed in the middle of the stream
        last_issued = 0;
      end
      if (t % 37 == 36) begin
        add_valid_i = 1'b0; ks_valid_i = 1'b0; gfm_valid_i = 1'b0; and3_valid_i = 1'b0; sep_valid_i = 1'b0; tof_valid_i = 1'b0;
        n_gap++;
        last_issued = 0;
      end else begin
        issue(t);
        if (last_issued) n_b2b++;
        last_issued = 1;
      end
      @(negedge clk);
    end
    add_valid_i = 1'b0; ks_valid_i = 1'b0; gfm_valid_i = 1'b0; and3_valid_i = 1'b0; sep_valid_i = 1'b0; tof_valid_i = 1'b0;
    repeat (N + 4) @(negedge clk);
    checks += 4;
    if (q_sum.size() != 0 || q_ks.size() != 0 || q_and3.size() != 0 || q_xyv.size() != 0 || q_tof.size() != 0 ||
        q_gfm.size() != 0) failures++;
    if (n_seed < 2 || n_full_chain == 0) failures++;
    if (n_and3_one == 0 || n_xyv_one == 0) failures++;
    if (n_b2b == 0 || n_gap == 0 || n_tof == 0 || n_gfm_red == 0) failures++;
    $display("seeds=%0d full_carry_chains=%0d and3_ones=%0d xyv_ones=%0d back_to_back=%0d gaps=%0d toffoli_ops=%0d gf16_reductions=%0d",
             n_seed, n_full_chain, n_and3_one, n_xyv_one, n_b2b, n_gap, n_tof, n_gfm_red);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (OPS + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
