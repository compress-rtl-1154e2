// tb_ext_toffoli: two extended Toffoli gadgets (3 shares), one new operation per cycle.
//   A: HPC3o base, K = 3, OUT_LAT = 2, POS = {0, 1, 3}. x, y, w0 in stage 0, w1 in stage 1,
//      w2 in stage 3, result in stage 3.
//   B: HPC2o base, K = 4, OUT_LAT = 1, POS = {0, 0, 1, 2}. y in stage 0; x, w0, w1 in
//      stage 1; w2 in stage 2; w3 in stage 3; result in stage 3.
// Every input is driven in its own stage with the values of the operation that owns
// that stage. Each result must XOR to (x & y) ^ XOR of the w's in the cycle of its
// latency.
module tb_ext_toffoli;
  localparam int D = 3, NP = D*(D-1)/2, OPS = 300, LAT = 3, WD = OPS + 60;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  function automatic logic [D-1:0] share(logic v);
    logic [D-1:0] s;
    s = D'($urandom());
    s[D-1] = v ^ (^s[D-2:0]);
    return s;
  endfunction

  // per-operation shared operands
  logic [D-1:0] xs [OPS], ys [OPS], wa [OPS][3], wb [OPS][4];
  logic         ea [OPS], eb [OPS];

  logic [D-1:0]        xa, ya, za, xb, yb, zb;
  logic [2:0][D-1:0]   w_a;
  logic [3:0][D-1:0]   w_b;
  logic [2*NP-1:0]     ra;
  logic [NP-1:0]       rb;

  ext_toffoli #(.D(D), .USE_HPC3O(1'b1), .K(3), .OUT_LAT(2), .POS(32'h0000_0310))
    dut_a (.clk, .x(xa), .y(ya), .w(w_a), .rnd(ra), .z(za));
  ext_toffoli #(.D(D), .USE_HPC3O(1'b0), .K(4), .OUT_LAT(1), .POS(32'h0000_2100))
    dut_b (.clk, .x(xb), .y(yb), .w(w_b), .rnd(rb), .z(zb));

  // operation sampled in stage `st` during cycle c is operation c - st
  function automatic bit ok(int c, int st);
    return (c - st >= 0) && (c - st < OPS);
  endfunction

  initial begin
    for (int t = 0; t < OPS; t++) begin
      logic xv, yv, acc_a, acc_b;
      logic wv;
      xv = 1'($urandom()); yv = 1'($urandom());
      xs[t] = share(xv); ys[t] = share(yv);
      acc_a = xv & yv; acc_b = xv & yv;
      for (int k = 0; k < 3; k++) begin wv = 1'($urandom()); wa[t][k] = share(wv); acc_a ^= wv; end
      for (int k = 0; k < 4; k++) begin wv = 1'($urandom()); wb[t][k] = share(wv); acc_b ^= wv; end
      ea[t] = acc_a; eb[t] = acc_b;
    end
    for (int c = 0; c < OPS + LAT; c++) begin
      @(negedge clk);
      // instance A
      xa = ok(c, 0) ? xs[c] : '0;   ya = ok(c, 0) ? ys[c] : '0;
      w_a[0] = ok(c, 0) ? wa[c][0] : '0;
      w_a[1] = ok(c, 1) ? wa[c-1][1] : '0;
      w_a[2] = ok(c, 3) ? wa[c-3][2] : '0;
      // instance B
      yb = ok(c, 0) ? ys[c] : '0;
      xb = ok(c, 1) ? xs[c-1] : '0;
      w_b[0] = ok(c, 1) ? wb[c-1][0] : '0;
      w_b[1] = ok(c, 1) ? wb[c-1][1] : '0;
      w_b[2] = ok(c, 2) ? wb[c-2][2] : '0;
      w_b[3] = ok(c, 3) ? wb[c-3][3] : '0;
      ra = (2*NP)'($urandom()); rb = NP'($urandom());
      #1;
      if (c >= LAT) begin
        checks += 2;
        if (^za !== ea[c-LAT]) begin failures++; $display("A op %0d bad", c-LAT); end
        if (^zb !== eb[c-LAT]) begin failures++; $display("B op %0d bad", c-LAT); end
      end
    end
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
