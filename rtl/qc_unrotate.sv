// qc_unrotate: rotates one base column of Z bits back into code order.
//
// After k iterations of the VNSA decoder, VN j of a base column sits at
// position (j + rot) % Z of that column, rot = k * SHIFT_L % Z. The output
// is out[j] = in[(j + rot) % Z], a barrel rotation. Combinational.
module qc_unrotate #(
  parameter  int Z  = 54,
  localparam int RW = $clog2(Z)
) (
  input  logic [Z-1:0]  in,
  input  logic [RW-1:0] rot,
  output logic [Z-1:0]  out
);
  always_comb begin
    for (int j = 0; j < Z; j++) begin
      int idx;
      idx = j + int'(rot);
      if (idx >= Z) idx -= Z;
      out[j] = in[idx];
    end
  end
endmodule
