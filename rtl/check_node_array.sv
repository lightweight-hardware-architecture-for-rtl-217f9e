// check_node_array: the check node side of a fully parallel QC-LDPC
// bit-flipping decoder.
//
// v[i][p] is VN p (0..Z-1) of base column i; c[a][b] is check b of base row
// a; chk[i][p][t] is the check bit VN (i, p) gets from its t-th base row
// (base rows of column i in increasing order). The block holds
//   - the VN-to-CN network S(h, v): check (a, b) reads VN ((b + h) % Z) of
//     every base column i with h = h(a, i) != -1;
//   - NR*Z check node units (DC-input XORs), giving the check vector c;
//   - the CN-to-VN network S-bar(h, c): VN (i, p) receives, for each of its DV
//     base rows a, check ((p - h + Z) % Z) of row a;
//   - all_sat, high when every check is satisfied (c == 0), the stopping
//     condition of the decoder.
// Both networks are fixed wiring computed from the base matrix in pgdbf_pkg.
// Purely combinational.
module check_node_array #(
  parameter  int Z  = 54,
  parameter  int NR = 12,
  parameter  int NC = 24,
  parameter  int DV = 3,
  localparam int DC = NC * DV / NR
) (
  input  logic [Z-1:0]  v   [NC],
  output logic [Z-1:0]  c   [NR],
  output logic [DV-1:0] chk [NC][Z],
  output logic          all_sat
);
  import pgdbf_pkg::*;

  localparam int S = NR / DV;  // base columns sharing the same base rows

  for (genvar a = 0; a < NR; a++) begin : g_row
    for (genvar b = 0; b < Z; b++) begin : g_chk
      logic [DC-1:0] vin;
      for (genvar k = 0; k < DC; k++) begin : g_in
        localparam int I = (a % S) + k * S;
        localparam int H = hb_shift(a, I, Z, NR, DV);
        assign vin[k] = v[I][(b + H) % Z];
      end
      cnu #(.DC(DC)) u_cnu (.vin(vin), .c(c[a][b]));
    end
  end

  for (genvar i = 0; i < NC; i++) begin : g_col
    for (genvar p = 0; p < Z; p++) begin : g_vn
      for (genvar t = 0; t < DV; t++) begin : g_nb
        localparam int A = col_row(i, t, NR, DV);
        localparam int H = hb_shift(A, i, Z, NR, DV);
        assign chk[i][p][t] = c[A][(p - H + Z) % Z];
      end
    end
  end

  always_comb begin
    all_sat = 1'b1;
    for (int a = 0; a < NR; a++) if (c[a] != '0) all_sat = 1'b0;
  end
endmodule
