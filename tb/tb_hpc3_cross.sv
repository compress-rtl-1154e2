// tb_hpc3_cross: HPC3-cross gadget (3 shares) with its x register outside. The cross
// terms alone share nothing useful, so the check adds the inner-domain products
// x_i & y_i, kept in the testbench, and requires the total to XOR to x & y one cycle
// later.
module tb_hpc3_cross;
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

  logic [D-1:0] x, x_d, y, z;
  logic [NP-1:0] r, rp;
  logic expv [OPS];
  logic [D-1:0] inner [OPS], xsh [OPS];

  hpc3_cross #(.D(D)) dut (.clk, .x, .x_d, .y, .r, .rp, .z);

  initial begin
    logic xv, yv;
    for (int t = 0; t < OPS + 1; t++) begin
      @(negedge clk);
      if (t < OPS) begin
        xv = 1'($urandom()); yv = 1'($urandom());
        expv[t] = xv & yv;
        x = share(xv); y = share(yv);
        xsh[t] = x; inner[t] = x & y;
        r = NP'($urandom()); rp = NP'($urandom());
      end
      if (t >= 1 && t <= OPS) x_d = xsh[t-1];
      #1;  // outputs are checked while the next operation's inputs are applied
      if (t >= 1) begin
        checks++;
        if (^(z ^ inner[t-1]) !== expv[t-1]) begin failures++; $display("op %0d bad", t-1); end
        if ((z[0] ^ inner[t-1][0]) != expv[t-1]) masked_seen++;
      end
    end
    checks++; if (masked_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
