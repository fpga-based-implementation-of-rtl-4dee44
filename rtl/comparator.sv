// comparator: equality compare of a target-word segment with a library phone.
//
// cmp is 1 when the two 16-bit values are equal. Combinational: cmp is valid
// in the same cycle as its inputs, which the controller samples in its
// compare state. The width (16 bits) is the thesis's.
module comparator #(
  parameter int unsigned W = tts_pkg::SEG_W
) (
  input  logic [W-1:0] a,    // target-word segment X
  input  logic [W-1:0] b,    // library phone Y(K)
  output logic         cmp
);
  assign cmp = (a == b);
endmodule
