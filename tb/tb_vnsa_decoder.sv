// tb_vnsa_decoder: the decoder block in both variants (IMPRECISE = 0 and 1)
// on a reduced code (Z = 16, N = 384, same base-matrix shape, ITMAX = 6,
// shift 3 per iteration, p0 = 0.6).
//
// Each frame is the all-zero codeword sent through a binary symmetric channel
// with a chosen number of bit errors; both decoders get the same received
// word. For every frame the decoded word, the iteration count, the success
// flag and the start-to-done latency (iterations + 2 cycles) are compared with
// pgdbf_ref_pkg::ref_decode, a code-order model of PGDBF whose random bits
// follow the shifting VNU types. Coverage: frames stopped by satisfied checks,
// frames stopped at ITMAX, frames already a codeword, frames long enough for
// the VN shift to wrap around a base column, type-1 flips, maximum-energy VNs
// held by non-flipping VNUs, and iterations of the imprecise decoder whose
// maximum is below the true maximum. A mechanism never seen is a failure.
module tb_vnsa_decoder;
  import pgdbf_pkg::*;
  import pgdbf_ref_pkg::*;
  localparam int Z = 16, NR = 12, NC = 24, DV = 3, ITMAX = 6, L = 3;
  localparam int P0 = 60;
  localparam int N = NC * Z, IW = $clog2(ITMAX + 1);

  logic clk = 0, rst_n = 0;
  logic pg_start = 0, im_start = 0;
  logic [N-1:0] pg_y = '0, im_y = '0, pg_x_hat, im_x_hat;
  logic pg_busy, pg_done, pg_success, im_busy, im_done, im_success;
  logic [IW-1:0] pg_iters, im_iters;

  int checks = 0, failures = 0;
  int n_success = 0, n_itmax = 0, n_zero_it = 0, n_wrap = 0;
  int n_flips = 0, n_held = 0, n_imprecise = 0, n_frames = 0;

  vnsa_decoder #(.Z(Z), .NR(NR), .NC(NC), .DV(DV), .ITMAX(ITMAX), .SHIFT_L(L),
                 .P0_PCT(P0), .IMPRECISE(1'b0)) dut_pg (
    .clk, .rst_n, .start(pg_start), .y(pg_y), .busy(pg_busy), .done(pg_done),
    .success(pg_success), .iters(pg_iters), .x_hat(pg_x_hat));

  vnsa_decoder #(.Z(Z), .NR(NR), .NC(NC), .DV(DV), .ITMAX(ITMAX), .SHIFT_L(L),
                 .P0_PCT(P0), .IMPRECISE(1'b1)) dut_im (
    .clk, .rst_n, .start(im_start), .y(im_y), .busy(im_busy), .done(im_done),
    .success(im_success), .iters(im_iters), .x_hat(im_x_hat));

  always #5 clk = ~clk;

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run_frame(input int weight);
    bit y[], xr_pg[], xr_im[];
    ref_stats_t st_pg, st_im;
    int cyc, pg_cyc, im_cyc, bad_pg, bad_im;
    y = new[N];
    foreach (y[n]) y[n] = 0;
    for (int w = 0; w < weight; w++) y[$urandom_range(N - 1, 0)] = 1;
    ref_decode(Z, NR, NC, DV, ITMAX, L, P0, 1'b0, y, xr_pg, st_pg);
    ref_decode(Z, NR, NC, DV, ITMAX, L, P0, 1'b1, y, xr_im, st_im);
    @(negedge clk);
    for (int n = 0; n < N; n++) begin
      pg_y[n] = y[n];
      im_y[n] = y[n];
    end
    pg_start = 1;
    im_start = 1;
    @(negedge clk);
    pg_start = 0;
    im_start = 0;
    cyc = 1;
    pg_cyc = 0;
    im_cyc = 0;
    while ((pg_cyc == 0 || im_cyc == 0) && cyc < ITMAX + 10) begin
      if (pg_done && pg_cyc == 0) pg_cyc = cyc;
      if (im_done && im_cyc == 0) im_cyc = cyc;
      if (pg_cyc == 0 || im_cyc == 0) begin
        @(negedge clk);
        cyc++;
      end
    end
    bad_pg = 0;
    bad_im = 0;
    for (int n = 0; n < N; n++) begin
      if (pg_x_hat[n] != xr_pg[n]) bad_pg++;
      if (im_x_hat[n] != xr_im[n]) bad_im++;
    end
    expect_eq(bad_pg, 0, "VNSA-PGDBF decoded word");
    expect_eq(bad_im, 0, "VNSA-IM-PGDBF decoded word");
    expect_eq(int'(pg_iters), st_pg.iters, "VNSA-PGDBF iterations");
    expect_eq(int'(im_iters), st_im.iters, "VNSA-IM-PGDBF iterations");
    expect_eq(int'(pg_success), int'(st_pg.success), "VNSA-PGDBF success");
    expect_eq(int'(im_success), int'(st_im.success), "VNSA-IM-PGDBF success");
    expect_eq(pg_cyc, st_pg.iters + 2, "VNSA-PGDBF latency");
    expect_eq(im_cyc, st_im.iters + 2, "VNSA-IM-PGDBF latency");
    n_frames++;
    n_success   += int'(st_pg.success) + int'(st_im.success);
    n_itmax     += int'(!st_pg.success) + int'(!st_im.success);
    n_zero_it   += int'(st_pg.iters == 0);
    n_wrap      += int'(st_pg.iters * L >= Z) + int'(st_im.iters * L >= Z);
    n_flips     += st_pg.flips + st_im.flips;
    n_held      += st_pg.held;
    n_imprecise += st_im.imprecise_max;
    $display("frame %0d: %0d errors, PGDBF %0d it %s (weight %0d), IM-PGDBF %0d it %s (weight %0d)",
             n_frames, weight, st_pg.iters, st_pg.success ? "ok" : "fail",
             $countones(pg_x_hat), st_im.iters, st_im.success ? "ok" : "fail",
             $countones(im_x_hat));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    run_frame(0);
    for (int k = 0; k < 4; k++) run_frame(1 + k);
    for (int k = 0; k < 20; k++) run_frame(4 + k % 8);
    for (int k = 0; k < 3; k++) run_frame(80);   // beyond correction
    for (int k = 0; k < 3; k++) run_frame(170);
    expect_eq(int'(n_success > 0), 1, "frames stopped by satisfied checks");
    expect_eq(int'(n_itmax > 0), 1, "frames stopped at ITMAX");
    expect_eq(int'(n_zero_it > 0), 1, "frames that were already codewords");
    expect_eq(int'(n_wrap > 0), 1, "frames where the VN shift wrapped");
    expect_eq(int'(n_flips > 0), 1, "type-1 flips");
    expect_eq(int'(n_held > 0), 1, "maximum-energy VNs held by type-2 VNUs");
    expect_eq(int'(n_imprecise > 0), 1, "imprecise maximum in VNSA-IM-PGDBF");
    $display("coverage: success=%0d itmax=%0d zero_it=%0d wrap=%0d flips=%0d held=%0d imprecise=%0d",
             n_success, n_itmax, n_zero_it, n_wrap, n_flips, n_held, n_imprecise);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
