// cnu: check node unit, a DC-input XOR.
//
// The output is the parity of the DC VN bits of one check node: 1 means the
// check is unsatisfied. Purely combinational.
module cnu #(
  parameter int DC = 6
) (
  input  logic [DC-1:0] vin,
  output logic          c
);
  assign c = ^vin;
endmodule
