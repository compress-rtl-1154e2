// tb_hpc2_and: HPC2 AND gadget (3 shares). Operation t puts y and r in cycle t and x in
// cycle t+1; the output of cycle t+2 must XOR to x & y and stay masked.
module tb_hpc2_and;
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

  logic [D-1:0] x, y, z;
  logic [NP-1:0] r;
  logic expv [OPS];
  logic [D-1:0] xs [OPS];

  hpc2_and #(.D(D)) dut (.clk, .x, .y, .r, .z);

  initial begin
    logic xv, yv;
    for (int t = 0; t < OPS + 2; t++) begin
      @(negedge clk);
      if (t < OPS) begin
        xv = 1'($urandom()); yv = 1'($urandom());
        expv[t] = xv & yv;
        xs[t] = share(xv);
        y = share(yv); r = NP'($urandom());
      end
      if (t >= 1 && t <= OPS) x = xs[t-1];
      #1;  // outputs are checked while the next operation's inputs are applied
      if (t >= 2) begin
        checks++;
        if (^z !== expv[t-2]) begin failures++; $display("op %0d: got %b exp %b", t-2, ^z, expv[t-2]); end
        if (z[0] != expv[t-2]) masked_seen++;
      end
    end
    checks++; if (masked_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
