// tb_sw_gate: the three sharewise gadget variants (3 shares). XOR and XNOR must give
// sharings of x ^ y and ~(x ^ y). Sharewise AND must give exactly x_i & y_i in each share,
// checked share by share against the inputs.
module tb_sw_gate;
  localparam int D = 3;
  int checks = 0, failures = 0;
  logic [D-1:0] x, y, zx, za, zn;

  sw_gate #(.D(D), .OP(masked_pkg::SW_XOR))  u_x (.x, .y, .z(zx));
  sw_gate #(.D(D), .OP(masked_pkg::SW_AND))  u_a (.x, .y, .z(za));
  sw_gate #(.D(D), .OP(masked_pkg::SW_XNOR)) u_n (.x, .y, .z(zn));

  initial begin
    for (int t = 0; t < 200; t++) begin
      x = D'($urandom()); y = D'($urandom());
      #1;
      checks += 3;
      if (^zx !== (^x ^ ^y)) failures++;
      if (^zn !== ~(^x ^ ^y)) failures++;
      for (int i = 0; i < D; i++) if (za[i] !== (x[i] && y[i])) begin failures++; break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
