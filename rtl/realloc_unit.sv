// realloc_unit: data re-allocation datapath of the FE-GA (one lane per CRAM).
//
// After the DTU has packed two 8-bit pixels into each 16-bit CRAM word (first
// pixel in the upper byte), each lane takes either the upper byte (first
// sequence of a phase) or the lower byte (second sequence) and widens it to a
// 16-bit word with zeros, ready to be stored at its new CRAM address. This is
// the through / extend chain of cells the paper maps onto the PE array;
// here it is a fixed, purely combinational datapath. The paper's text
// says the byte is widened with zeros while its figure labels the cell as a
// sign extension; zero extension is used because pixels are unsigned.
//
// Interface: sel_lo selects the byte, din/dout carry LANES words.
module realloc_unit #(
  parameter int unsigned LANES = 8
) (
  input  logic                  sel_lo,
  input  logic [LANES-1:0][15:0] din,
  output logic [LANES-1:0][15:0] dout
);

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      dout[k] = sel_lo ? {8'h00, din[k][7:0]} : {8'h00, din[k][15:8]};
    end
  end

endmodule
