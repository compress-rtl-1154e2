// valid_pipe: LAT-stage valid-bit delay line with synchronous active-low reset.
//
// The masked pipelines carry no control. This line marks which output cycles hold the
// result of an accepted operation, LAT cycles after it entered. It is this design's
// addition for the integration wrapper.
module valid_pipe #(
  parameter int LAT = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic out_valid
);

  logic [LAT:0] v_q;

  assign v_q[0] = in_valid;

  for (genvar s = 0; s < LAT; s++) begin : g_stage
    always_ff @(posedge clk) begin
      if (!rst_n) v_q[s+1] <= 1'b0;
      else        v_q[s+1] <= v_q[s];
    end
  end

  assign out_valid = v_q[LAT];

endmodule
