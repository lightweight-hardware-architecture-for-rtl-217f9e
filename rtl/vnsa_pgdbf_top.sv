// vnsa_pgdbf_top: the two VNSA-based PGDBF decoders side by side.
//
// pg_* is the VNSA-PGDBF decoder (type-1 and type-2 VNUs, maximum over all N
// energies); im_* is the imprecise VNSA-IM-PGDBF decoder (type-1 and type-3
// VNUs, maximum over the type-1 energies only). They share clock, reset and
// code parameters but are otherwise independent, each with its own frame
// interface (see vnsa_decoder for the protocol and timing). Defaults: the
// dv = 3, dc = 6, Z = 54, N = 1296 rate-1/2 code, p0 = 0.7, shift 1 per
// iteration.
module vnsa_pgdbf_top #(
  parameter  int Z       = 54,
  parameter  int NR      = 12,
  parameter  int NC      = 24,
  parameter  int DV      = 3,
  parameter  int ITMAX   = 100,
  parameter  int SHIFT_L = 1,
  parameter  int P0_PCT  = 70,
  localparam int N       = NC * Z,
  localparam int IW      = $clog2(ITMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pg_start,
  input  logic [N-1:0]  pg_y,
  output logic          pg_busy,
  output logic          pg_done,
  output logic          pg_success,
  output logic [IW-1:0] pg_iters,
  output logic [N-1:0]  pg_x_hat,
  input  logic          im_start,
  input  logic [N-1:0]  im_y,
  output logic          im_busy,
  output logic          im_done,
  output logic          im_success,
  output logic [IW-1:0] im_iters,
  output logic [N-1:0]  im_x_hat
);
  vnsa_decoder #(
    .Z(Z), .NR(NR), .NC(NC), .DV(DV), .ITMAX(ITMAX), .SHIFT_L(SHIFT_L),
    .P0_PCT(P0_PCT), .IMPRECISE(1'b0)
  ) u_pgdbf (
    .clk, .rst_n, .start(pg_start), .y(pg_y), .busy(pg_busy), .done(pg_done),
    .success(pg_success), .iters(pg_iters), .x_hat(pg_x_hat)
  );

  vnsa_decoder #(
    .Z(Z), .NR(NR), .NC(NC), .DV(DV), .ITMAX(ITMAX), .SHIFT_L(SHIFT_L),
    .P0_PCT(P0_PCT), .IMPRECISE(1'b1)
  ) u_im_pgdbf (
    .clk, .rst_n, .start(im_start), .y(im_y), .busy(im_busy), .done(im_done),
    .success(im_success), .iters(im_iters), .x_hat(im_x_hat)
  );
endmodule
