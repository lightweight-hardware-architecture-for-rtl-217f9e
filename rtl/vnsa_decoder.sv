// vnsa_decoder: fully parallel PGDBF decoder for a regular QC-LDPC code built
// on the Variable-Node Shift Architecture (VNSA).
//
// PGDBF flips, in each iteration, only a random subset (probability p0) of
// the VNs whose energy equals the maximum energy. Instead of generating
// random bits, this decoder hard-wires two kinds of VNU: at every position of
// a base column there is either a flipping type-1 VNU (random bit 1) or a
// non-flipping VNU (random bit 0); round(p0 * Z) positions per column are
// type-1 (pattern in pgdbf_pkg::is_type1). The VN values and channel values
// are written back one position further along their base column every
// iteration (VNU at position p feeds the B/C registers at position
// (p + SHIFT_L) % Z), so each VN meets a different VNU type from one
// iteration to the next. Because the code is quasi-cyclic, shifting a whole
// base column changes no check result: the check node array and its fixed
// networks are those of a conventional decoder.
//
// IMPRECISE = 0 gives VNSA-PGDBF: the non-flipping units are type-2 VNUs that
// still compute their energy, and the maximum is taken over all N energies.
// IMPRECISE = 1 gives VNSA-IM-PGDBF: they are type-3 VNUs without energy, and
// the maximum finder only sees the round(p0 * Z) * NC type-1 energies, so the
// maximum it finds can be lower than the true one.
//
// Interface: pulse start (when not busy) with the received hard-decision word
// y valid in that cycle; bit i*Z + j is VN j of base column i. One iteration
// per clock follows; done pulses when all checks are satisfied (success = 1)
// or after ITMAX iterations (success = 0). iters gives the number of flipping
// iterations, and x_hat the decoded word, in code order, from the done cycle
// until the next start. Latency is iters + 2 cycles from start to done.
// The output rotation (qc_unrotate) that puts x_hat back in code order, the
// load path, the code's base matrix and the VNU type pattern are this
// design's own choices.
module vnsa_decoder #(
  parameter  int Z          = 54,
  parameter  int NR         = 12,
  parameter  int NC         = 24,
  parameter  int DV         = 3,
  parameter  int ITMAX      = 100,
  parameter  int SHIFT_L    = 1,
  parameter  int P0_PCT     = 70,
  parameter  bit IMPRECISE  = 1'b0,
  localparam int N          = NC * Z,
  localparam int IW         = $clog2(ITMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [N-1:0]  y,
  output logic          busy,
  output logic          done,
  output logic          success,
  output logic [IW-1:0] iters,
  output logic [N-1:0]  x_hat
);
  import pgdbf_pkg::*;

  localparam int EW   = energy_width(DV);
  localparam int RW   = $clog2(Z);
  localparam int ONES = type1_per_col(Z, P0_PCT);
  localparam int NIN  = IMPRECISE ? ONES * NC : N;
  localparam int L    = SHIFT_L % Z;

  logic                 load, en, all_sat;
  logic [RW-1:0]        rot;
  logic [Z-1:0]         v      [NC];  // B registers, by base column
  logic [Z-1:0]         yq     [NC];  // C registers
  logic [Z-1:0]         v_next [NC];
  logic [DV-1:0]        chk    [NC][Z];
  logic [EW-1:0]        mf_in  [NIN];
  logic [EW-1:0]        emax;

  decode_ctrl #(.ITMAX(ITMAX), .Z(Z), .SHIFT_L(SHIFT_L)) u_ctrl (
    .clk, .rst_n, .start, .all_sat, .load, .en, .busy, .done, .success,
    .iters, .rot
  );

  check_node_array #(.Z(Z), .NR(NR), .NC(NC), .DV(DV)) u_cna (
    .v, .c(), .chk, .all_sat
  );

  max_finder #(.NIN(NIN), .EW(EW)) u_mf (.e(mf_in), .emax);

  for (genvar i = 0; i < NC; i++) begin : g_col
    for (genvar p = 0; p < Z; p++) begin : g_vnu
      localparam int K    = i * Z + p;         // flat VN index
      localparam int PREV = (p - L + Z) % Z;   // position feeding this B and C
      if (is_type1(i, p, Z, P0_PCT)) begin : g_t1
        localparam int MI = IMPRECISE ? type1_rank(i, p, Z, P0_PCT) : K;
        vnu_type1 #(.DV(DV)) u_vnu (
          .clk, .load, .en, .y_ch(y[K]), .v_in(v_next[i][PREV]), .y_in(yq[i][PREV]),
          .chk(chk[i][p]), .emax, .v(v[i][p]), .y(yq[i][p]), .energy(mf_in[MI]),
          .v_next(v_next[i][p])
        );
      end else if (!IMPRECISE) begin : g_t2
        vnu_type2 #(.DV(DV)) u_vnu (
          .clk, .load, .en, .y_ch(y[K]), .v_in(v_next[i][PREV]), .y_in(yq[i][PREV]),
          .chk(chk[i][p]), .v(v[i][p]), .y(yq[i][p]), .energy(mf_in[K]),
          .v_next(v_next[i][p])
        );
      end else begin : g_t3
        vnu_type3 u_vnu (
          .clk, .load, .en, .y_ch(y[K]), .v_in(v_next[i][PREV]), .y_in(yq[i][PREV]),
          .v(v[i][p]), .y(yq[i][p]), .v_next(v_next[i][p])
        );
      end
    end

    qc_unrotate #(.Z(Z)) u_unrot (
      .in(v[i]), .rot, .out(x_hat[i*Z +: Z])
    );
  end
endmodule
