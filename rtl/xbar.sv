// xbar: crossbar network between the CRAM read ports and the PE lanes.
//
// Every output lane k takes input lane sel[k]; the selects are part of the
// sequence context and can change from one sequence to the next. In the SAD
// mapping it routes to each candidate lane the reference lane that holds the
// same block rows. The paper only names the crossbar; a full
// combinational LANES x LANES multiplexer is this design's choice.
module xbar #(
  parameter int unsigned LANES = 8,
  parameter int unsigned DW    = 16,
  parameter int unsigned SW    = $clog2(LANES)
) (
  input  logic [LANES-1:0][SW-1:0] sel,
  input  logic [LANES-1:0][DW-1:0] din,
  output logic [LANES-1:0][DW-1:0] dout
);

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      dout[k] = din[sel[k]];
    end
  end

endmodule
