// tb_hpc3o_gf_mult: HPC3o field multiply-accumulate gadget. Three instances run side by
// side with a new random operation and fresh randomness every cycle:
//   - GF(16), x^4 + x + 1, 3 shares (the default field);
//   - GF(4),  x^2 + x + 1, 2 shares;
//   - GF(256), x^8 + x^4 + x^3 + x + 1, 2 shares.
// One cycle later, the sum of the output shares must equal w + x * y. The reference
// product is a carry-less multiplication followed by polynomial division, a different
// method from the gadget's. The reference is itself checked on known products first
// (0x57 * 0x83 = 0xC1 in the AES field, x^3 * x = x + 1 in GF(16)). Share 0 alone
// must not always give the result.
module tb_hpc3o_gf_mult;
  localparam int OPS = 400, WD = OPS + 50;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, masked_seen = 0;

  // carry-less product of two elements of up to 8 bits, then reduction modulo poly
  function automatic logic [7:0] ref_mul(logic [7:0] a, logic [7:0] b, int k, logic [8:0] poly);
    logic [15:0] prod;
    prod = '0;
    for (int n = 0; n < 8; n++) if (b[n]) prod = prod ^ (16'(a) << n);
    for (int n = 15; n >= k; n--) if (prod[n]) prod = prod ^ (16'(poly) << (n - k));
    return prod[7:0];
  endfunction

  initial begin : watchdog
    repeat (WD) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // GF(16), 3 shares
  localparam int DA = 3, KA = 4, NPA = DA*(DA-1)/2;
  localparam logic [8:0] PA = 9'h013;
  logic [DA-1:0][KA-1:0] xa, ya, wa, za;
  logic [NPA-1:0][KA-1:0] ra, rpa;
  hpc3o_gf_mult #(.D(DA), .K(KA), .POLY(PA)) dut_a (.clk, .x(xa), .y(ya), .w(wa), .r(ra), .rp(rpa), .z(za));

  // GF(4), 2 shares
  localparam int DB = 2, KB = 2, NPB = 1;
  localparam logic [8:0] PB = 9'h007;
  logic [DB-1:0][KB-1:0] xb, yb, wb, zb;
  logic [NPB-1:0][KB-1:0] rb, rpb;
  hpc3o_gf_mult #(.D(DB), .K(KB), .POLY(PB)) dut_b (.clk, .x(xb), .y(yb), .w(wb), .r(rb), .rp(rpb), .z(zb));

  // GF(256), 2 shares
  localparam int DC = 2, KC = 8, NPC = 1;
  localparam logic [8:0] PC = 9'h11B;
  logic [DC-1:0][KC-1:0] xc, yc, wc, zc;
  logic [NPC-1:0][KC-1:0] rc, rpc;
  hpc3o_gf_mult #(.D(DC), .K(KC), .POLY(PC)) dut_c (.clk, .x(xc), .y(yc), .w(wc), .r(rc), .rp(rpc), .z(zc));

  logic [KA-1:0] exp_a [OPS];
  logic [KB-1:0] exp_b [OPS];
  logic [KC-1:0] exp_c [OPS];

  initial begin
    logic [7:0] vx, vy, vw, sa, sb, sc;
    checks += 2;
    if (ref_mul(8'h57, 8'h83, 8, PC) != 8'hC1) failures++;
    if (ref_mul(8'h08, 8'h02, 4, PA) != 8'h03) failures++;
    for (int t = 0; t <= OPS; t++) begin
      @(negedge clk);
      if (t < OPS) begin
        // GF(16): every 8th operation multiplies by zero or one
        vx = 8'($urandom()) & 8'h0F; vy = (t % 8 == 0) ? 8'(t % 16 == 0) : 8'($urandom()) & 8'h0F;
        vw = 8'($urandom()) & 8'h0F;
        exp_a[t] = KA'(ref_mul(vx, vy, KA, PA) ^ vw);
        for (int i = 0; i < DA; i++) begin
          xa[i] = KA'($urandom()); ya[i] = KA'($urandom()); wa[i] = KA'($urandom());
        end
        xa[DA-1] = vx[KA-1:0] ^ xa[0] ^ xa[1];
        ya[DA-1] = vy[KA-1:0] ^ ya[0] ^ ya[1];
        wa[DA-1] = vw[KA-1:0] ^ wa[0] ^ wa[1];
        // GF(4)
        vx = 8'($urandom()) & 8'h03; vy = 8'($urandom()) & 8'h03; vw = 8'($urandom()) & 8'h03;
        exp_b[t] = KB'(ref_mul(vx, vy, KB, PB) ^ vw);
        xb[0] = KB'($urandom()); yb[0] = KB'($urandom()); wb[0] = KB'($urandom());
        xb[1] = vx[KB-1:0] ^ xb[0]; yb[1] = vy[KB-1:0] ^ yb[0]; wb[1] = vw[KB-1:0] ^ wb[0];
        // GF(256)
        vx = 8'($urandom()); vy = 8'($urandom()); vw = 8'($urandom());
        exp_c[t] = ref_mul(vx, vy, KC, PC) ^ vw;
        xc[0] = 8'($urandom()); yc[0] = 8'($urandom()); wc[0] = 8'($urandom());
        xc[1] = vx ^ xc[0]; yc[1] = vy ^ yc[0]; wc[1] = vw ^ wc[0];
      end
      ra = '0; rpa = '0;
      for (int q = 0; q < NPA; q++) begin ra[q] = KA'($urandom()); rpa[q] = KA'($urandom()); end
      rb[0] = KB'($urandom()); rpb[0] = KB'($urandom());
      rc[0] = KC'($urandom()); rpc[0] = KC'($urandom());
      #1;  // outputs of the previous operation, checked while this one is applied
      if (t >= 1) begin
        sa = 8'(za[0] ^ za[1] ^ za[2]);
        sb = 8'(zb[0] ^ zb[1]);
        sc = zc[0] ^ zc[1];
        checks += 3;
        if (sa[KA-1:0] !== exp_a[t-1]) begin
          failures++; $display("GF16 op %0d: got %h exp %h", t-1, sa, exp_a[t-1]);
        end
        if (sb[KB-1:0] !== exp_b[t-1]) begin
          failures++; $display("GF4 op %0d: got %h exp %h", t-1, sb, exp_b[t-1]);
        end
        if (sc !== exp_c[t-1]) begin
          failures++; $display("GF256 op %0d: got %h exp %h", t-1, sc, exp_c[t-1]);
        end
        if (za[0] != exp_a[t-1]) masked_seen++;
      end
    end
    checks++;
    if (masked_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
