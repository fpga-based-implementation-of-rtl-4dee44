// inv: single-bit inverter.
//
// The datapath uses it on the register file's sel line: the library is
// written while sel is 0 and read while sel is 1, so the write enable is the
// inverse of sel. Purely combinational, no timing of its own.
module inv (
  input  logic a,
  output logic y
);
  assign y = ~a;
endmodule
