// freq_adder: the adder of the compression modules.
//
// SUM = NUM_1 + NUM_2, combinational. In the Huffman lane it adds the two
// least frequent nodes to give the weight of their new parent node; in the
// Shannon lane it accumulates the sorted counts into cumulative counts.
// Port names follow the document; the width W is this design's choice and is
// wide enough for the total count of one message window.
module freq_adder
  import src_enc_pkg::*;
#(
  parameter int unsigned W = CNT_W
) (
  input  logic [W-1:0] NUM_1,
  input  logic [W-1:0] NUM_2,
  output logic [W-1:0] SUM
);
  assign SUM = NUM_1 + NUM_2;
endmodule
