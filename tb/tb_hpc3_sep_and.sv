// tb_hpc3_sep_and: the decomposed HPC3 AND (3 shares), with its two pipeline registers
// built in the testbench, runs next to the monolithic HPC3 AND on the same inputs and
// randomness. The two must give identical output shares, and those must share x & y one
// cycle after the inputs.
module tb_hpc3_sep_and;
  localparam int D = 3, NP = D*(D-1)/2, OPS = 400, WD = OPS + 50;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  function automatic logic [D-1:0] share(logic v);
    logic [D-1:0] s;
    s = D'($urandom());
    s[D-1] = v ^ (^s[D-2:0]);
    return s;
  endfunction

  logic [D-1:0] x, y, x_d, y_d, z, z_ref;
  logic [NP-1:0] r, rp;
  logic expv [OPS];

  always_ff @(posedge clk) begin
    x_d <= x;
    y_d <= y;
  end

  hpc3_sep_and #(.D(D)) dut (.clk, .x, .y, .x_d, .y_d, .r, .rp, .z);
  hpc3_and     #(.D(D)) ref_g (.clk, .x, .y, .r, .rp, .z(z_ref));

  initial begin
    logic xv, yv;
    for (int t = 0; t < OPS + 1; t++) begin
      @(negedge clk);
      if (t < OPS) begin
        xv = 1'($urandom()); yv = 1'($urandom());
        expv[t] = xv & yv;
        x = share(xv); y = share(yv);
        r = NP'($urandom()); rp = NP'($urandom());
      end
      #1;  // outputs are checked while the next operation's inputs are applied
      if (t >= 1) begin
        checks += 2;
        if (^z !== expv[t-1]) failures++;
        if (z !== z_ref) failures++;
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
