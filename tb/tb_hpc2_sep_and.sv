// tb_hpc2_sep_and: the decomposed HPC2 AND (3 shares) next to the monolithic HPC2 AND.
// y and r enter in cycle t and x in cycle t+1. The testbench's registers supply x one
// cycle later and y two cycles later. Output shares must match the monolithic gadget
// exactly and share x & y in cycle t+2.
module tb_hpc2_sep_and;
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

  logic [D-1:0] x, y, x_d, y_d, y_dd, z, z_ref;
  logic [NP-1:0] r;
  logic expv [OPS];
  logic [D-1:0] xs [OPS];

  always_ff @(posedge clk) begin
    x_d  <= x;
    y_d  <= y;
    y_dd <= y_d;
  end

  hpc2_sep_and #(.D(D)) dut (.clk, .x, .y, .x_d, .y_dd, .r, .z);
  hpc2_and     #(.D(D)) ref_g (.clk, .x, .y, .r, .z(z_ref));

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
        checks += 2;
        if (^z !== expv[t-2]) failures++;
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
