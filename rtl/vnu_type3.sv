// vnu_type3: non-flipping variable node unit of the imprecise decoder
// (VNSA-IM-PGDBF).
//
// Like vnu_type2 it never flips its VN, but it also computes no energy: its
// VN is left out of the maximum search altogether. All that remains are the
// two one-bit registers B (VN value) and C (channel value). v goes to the
// check nodes and, as v_next, on to the next position of the base column;
// y goes on to the next position's C register. It has no check inputs.
//
// Timing: B and C load y_ch on load and take v_in / y_in on en (rising edge).
module vnu_type3 (
  input  logic clk,
  input  logic load,
  input  logic en,
  input  logic y_ch,
  input  logic v_in,
  input  logic y_in,
  output logic v,
  output logic y,
  output logic v_next
);
  logic b_q, c_q;

  always_ff @(posedge clk) begin
    if (load) begin
      b_q <= y_ch;
      c_q <= y_ch;
    end else if (en) begin
      b_q <= v_in;
      c_q <= y_in;
    end
  end

  assign v      = b_q;
  assign y      = c_q;
  assign v_next = b_q;
endmodule
