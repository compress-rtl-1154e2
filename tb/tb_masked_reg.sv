// tb_masked_reg: a 3-stage masked register with two 3-share sharings in parallel. Every
// output must equal the input of exactly three cycles earlier, share for share.
module tb_masked_reg;
  localparam int D = 3, W = 2, LAT = 3, OPS = 200;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [W*D-1:0] d_i, q_o, hist [OPS];

  masked_reg #(.D(D), .W(W), .LAT(LAT)) dut (.clk, .d_i, .q_o);

  initial begin
    for (int t = 0; t < OPS; t++) begin
      @(negedge clk);
      if (t >= LAT) begin
        checks++;
        if (q_o !== hist[t-LAT]) failures++;
      end
      d_i = (W*D)'($urandom());
      hist[t] = d_i;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (OPS + 50) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
