// vnu_type1: flipping variable node unit of the VNSA-based PGDBF decoder.
//
// It behaves like the conventional PGDBF variable node unit with its random
// input at 1, which is the same as a GDBF variable node unit. It holds two
// one-bit registers: B (the current VN value v) and C (the channel value y
// travelling with that VN). The energy is E = (v xor y) + (number of
// unsatisfied neighbour checks among the DV check inputs). The value passed
// on to the next iteration is v_next = v xor (E == emax).
//
// Under VNSA the registers are not written from this unit's own outputs: B
// and C take v_in / y_in, the v_next / y of the VNU one position earlier in
// the same base column, so each VN moves on by one position per iteration.
// That rewiring is done by the enclosing decoder.
//
// Timing: energy and v_next are combinational from the registers, the check
// inputs and emax; B and C update on the rising clock edge when en is high.
// load (priority over en) writes the received channel bit y_ch into both B
// and C, which starts a new frame with v = y. The registers have no reset:
// a frame always starts with load.
module vnu_type1 #(
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
  input  logic [EW-1:0] emax,
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
  assign v_next = b_q ^ (energy == emax);
endmodule
