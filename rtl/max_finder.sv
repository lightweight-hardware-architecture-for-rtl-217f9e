// max_finder: maximum of NIN unsigned energies.
//
// A balanced tree of two-input maximum cells: the inputs are padded with
// zeros to the next power of two, and each tree level halves the number of
// candidates, so the depth is ceil(log2(NIN)) comparator stages. Purely
// combinational.
//
// The precise decoder feeds the energies of all N VNUs; the imprecise
// decoder feeds only those of its p0*N type-1 VNUs (NIN = p0*N), which is
// where its smaller and faster maximum finder comes from.
module max_finder #(
  parameter int NIN = 1296,
  parameter int EW  = 3
) (
  input  logic [EW-1:0] e [NIN],
  output logic [EW-1:0] emax
);
  localparam int LV = (NIN > 1) ? $clog2(NIN) : 1;  // tree levels
  localparam int NP = 1 << LV;                        // padded leaf count

  logic [EW-1:0] leaf [NP];

  for (genvar k = 0; k < NP; k++) begin : g_leaf
    if (k < NIN) begin : g_in
      assign leaf[k] = e[k];
    end else begin : g_pad
      assign leaf[k] = '0;
    end
  end

  // level l holds NP >> (l+1) candidates, each the larger of two below it
  for (genvar l = 0; l < LV; l++) begin : g_lvl
    logic [EW-1:0] nd [NP >> (l + 1)];
    for (genvar k = 0; k < (NP >> (l + 1)); k++) begin : g_cell
      logic [EW-1:0] a, b;
      if (l == 0) begin : g_from_leaf
        assign a = leaf[2*k];
        assign b = leaf[2*k+1];
      end else begin : g_from_lvl
        assign a = g_lvl[l-1].nd[2*k];
        assign b = g_lvl[l-1].nd[2*k+1];
      end
      assign nd[k] = (a >= b) ? a : b;
    end
  end

  assign emax = g_lvl[LV-1].nd[0];
endmodule
