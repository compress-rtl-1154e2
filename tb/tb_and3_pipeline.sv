// tb_and3_pipeline: masked 3-input AND (default 2 shares). One random operation per cycle,
// all operands in the same cycle. The result must appear exactly 2 cycles later. Operand
// values are biased towards 1 so that both results occur often; the all-ones case must
// have occurred at least once.
module tb_and3_pipeline;
  localparam int D = 2, OPS = 400, WD = OPS + 50;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, ones = 0;

  function automatic logic [D-1:0] share(logic v);
    logic [D-1:0] s;
    s = D'($urandom());
    s[D-1] = v ^ (^s[D-2:0]);
    return s;
  endfunction

  logic [D-1:0] a, b, c, z;
  logic [D*(D-1)*3/2-1:0] rnd;
  logic expv [OPS];

  and3_pipeline #(.D(D)) dut (.clk, .a, .b, .c, .rnd, .z);

  initial begin
    logic av, bv, cv;
    for (int t = 0; t < OPS + 2; t++) begin
      @(negedge clk);
      if (t < OPS) begin
        // bias towards 1 so that the all-ones case is frequent
        av = ($urandom() % 4) != 0; bv = ($urandom() % 4) != 0; cv = ($urandom() % 4) != 0;
        expv[t] = av & bv & cv;
        a = share(av); b = share(bv); c = share(cv);
        rnd = $urandom();
      end
      #1;  // outputs are checked while the next operation's inputs are applied
      if (t >= 2) begin
        checks++;
        if (^z !== expv[t-2]) begin failures++; $display("op %0d bad", t-2); end
        if (expv[t-2]) ones++;
      end
    end
    checks++; if (ones == 0) failures++;
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
