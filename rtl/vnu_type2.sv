// vnu_type2: non-flipping variable node unit of the VNSA-PGDBF decoder.
//
// It reproduces the conventional PGDBF variable node unit with its random
// input at 0: the VN is never flipped, so the equality comparator and the
// flipping XOR are removed and v_next is the current value v. The energy
// E = (v xor y) + (number of unsatisfied checks among the DV inputs) is
// still computed, because in the precise decoder every VN takes part in the
// search for the maximum energy.
//
// Registers and timing are those of vnu_type1: B and C load y_ch on load and
// take v_in / y_in (from the previous position of the base column) on en.
module vnu_type2 #(
  parameter int DV = 3,
  localparam int EW = pgdbf_pkg::energy_width(DV)
) (
  input  logic          clk,
  input  logic          load,
  input  logic          en,
  input  logic          y_ch,
  input  logic          v_in,
  input  logic          y_in,
  input  logic [DV-1:0] chk,
  output logic          v,
  output logic          y,
  output logic [EW-1:0] energy,
  output logic          v_next
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

  always_comb begin
    energy = EW'(b_q ^ c_q);
    for (int t = 0; t < DV; t++) energy += EW'(chk[t]);
  end

  assign v      = b_q;
  assign y      = c_q;
  assign v_next = b_q;
endmodule
