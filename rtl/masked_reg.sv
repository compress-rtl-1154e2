// masked_reg: masked pipeline register.
//
// Delays a D-share sharing by LAT clock cycles, one flip-flop per share per stage, so the
// shares never meet in logic. This is the "pipeline register" gadget that synchronises
// sharings between pipeline stages; LAT = 1 is a single register layer. No reset: like the
// rest of the pipeline it holds data only, and its output is meaningful LAT cycles after
// the input (the absence of control logic follows the pipelined-circuit style of the
// design; W > 1 lets several sharings share one instance).
module masked_reg #(
  parameter int D   = 2,
  parameter int W   = 1,
  parameter int LAT = 1
) (
  input  logic             clk,
  input  logic [W*D-1:0]   d_i,
  output logic [W*D-1:0]   q_o
);

  logic [W*D-1:0] stage [LAT+1];

  assign stage[0] = d_i;

  for (genvar s = 0; s < LAT; s++) begin : g_stage
    always_ff @(posedge clk) stage[s+1] <= stage[s];
  end

  assign q_o = stage[LAT];

endmodule
