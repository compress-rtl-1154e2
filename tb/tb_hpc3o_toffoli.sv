// tb_hpc3o_toffoli: drives the HPC3o Toffoli gadget (3 shares) with a random operation
// every cycle and fresh randomness. Checks, one cycle later, that the output shares XOR to
// w ^ (x & y). Also checks that share 0 alone does not always equal the result, i.e. the
// output stays masked.
module tb_hpc3o_toffoli;
  localparam int D = 3, NP = D*(D-1)/2, OPS = 400, WD = OPS + 50;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, masked_seen = 0;

  function automatic logic [D-1:0] share(logic v);
    logic [D-1:0] s;
    s = D'($urandom());
    s[D-1] = v ^ (^s[D-2:0]);
    return s;
  endfunction

  initial begin : watchdog
    repeat (WD) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [D-1:0] x, y, w, z;
  logic [NP-1:0] r, rp;
  logic expv [OPS];

  hpc3o_toffoli #(.D(D)) dut (.clk, .x, .y, .w, .r, .rp, .z);

  initial begin
    logic xv, yv, wv;
    for (int t = 0; t < OPS + 1; t++) begin
      @(negedge clk);
      if (t < OPS) begin
        xv = 1'($urandom()); yv = 1'($urandom()); wv = 1'($urandom());
        expv[t] = wv ^ (xv & yv);
        x = share(xv); y = share(yv); w = share(wv);
        r = NP'($urandom()); rp = NP'($urandom());
      end
      #1;  // outputs are checked while the next operation's inputs are applied
      if (t >= 1) begin
        checks++;
        if (^z !== expv[t-1]) begin failures++; $display("op %0d: got %b exp %b", t-1, ^z, expv[t-1]); end
        if (z[0] != expv[t-1]) masked_seen++;
      end
    end
    checks++; if (masked_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
