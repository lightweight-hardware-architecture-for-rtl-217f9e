// tb_p0_sweep: p0 sweep of both decoder variants at the default code size
// and crossover probability alpha = 0.014, the setting of the frame-error
// versus p0 curves.
//
// p0 is a build-time parameter (it fixes how many VNUs per base column are
// flipping), so the test builds one decoder per variant and p0 value
// (p0 = 0.4, 0.7, 0.95) and feeds all of them the same frames. Each result is
// compared bit for bit with the reference model; per decoder the test prints
// frame errors and average iterations. The frame count is small: this shows
// that every p0 point runs and is exact, not the error-rate curve itself.
module tb_p0_sweep;
  import pgdbf_pkg::*;
  import pgdbf_ref_pkg::*;
  localparam int Z = 54, NR = 12, NC = 24, DV = 3, ITMAX = 100, L = 1;
  localparam int N = NC * Z, IW = $clog2(ITMAX + 1);
  localparam int NP = 3;
  localparam int P0 [NP] = '{40, 70, 95};
  localparam int ND = 2 * NP;         // decoder d: variant d % 2, p0 P0[d / 2]
  localparam int FRAMES = 16;
  localparam int ALPHA_PPM = 14000;

  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] y_in = '0;
  logic [N-1:0] x_hat [ND];
  logic busy [ND], done [ND], success [ND];
  logic [IW-1:0] iters [ND];
  int checks = 0, failures = 0;

  for (genvar d = 0; d < ND; d++) begin : g_dec
    vnsa_decoder #(.Z(Z), .NR(NR), .NC(NC), .DV(DV), .ITMAX(ITMAX), .SHIFT_L(L),
                   .P0_PCT(P0[d / 2]), .IMPRECISE(d % 2 == 1)) u_dec (
      .clk, .rst_n, .start, .y(y_in), .busy(busy[d]), .done(done[d]),
      .success(success[d]), .iters(iters[d]), .x_hat(x_hat[d]));
  end

  always #5 clk = ~clk;

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fe [ND];
    int it [ND];
    foreach (fe[d]) begin
      fe[d] = 0;
      it[d] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      bit y[];
      bit xr [ND][];
      ref_stats_t st [ND];
      int guard;
      bit any_busy;
      y = new[N];
      foreach (y[n]) y[n] = ($urandom_range(999999, 0) < ALPHA_PPM);
      for (int d = 0; d < ND; d++)
        ref_decode(Z, NR, NC, DV, ITMAX, L, P0[d / 2], d % 2 == 1, y, xr[d], st[d]);
      @(negedge clk);
      for (int n = 0; n < N; n++) y_in[n] = y[n];
      start = 1;
      @(negedge clk);
      start = 0;
      guard = 0;
      do begin
        any_busy = 0;
        foreach (busy[d]) any_busy |= busy[d];
        if (any_busy) begin
          @(negedge clk);
          guard++;
        end
      end while (any_busy && guard < ITMAX + 10);
      for (int d = 0; d < ND; d++) begin
        int bad, w;
        bad = 0;
        w = 0;
        for (int n = 0; n < N; n++) begin
          bad += int'(x_hat[d][n] != xr[d][n]);
          w += int'(x_hat[d][n]);
        end
        expect_eq(bad, 0, "decoded word");
        expect_eq(int'(iters[d]), st[d].iters, "iterations");
        expect_eq(int'(success[d]), int'(st[d].success), "success");
        fe[d] += int'(!success[d] || w != 0);
        it[d] += int'(iters[d]);
      end
    end
    for (int d = 0; d < ND; d++)
      $display("%s p0=%0.2f alpha=0.014 frames=%0d: frame errors %0d, avg iterations %0.2f",
               (d % 2 == 1) ? "VNSA-IM-PGDBF" : "VNSA-PGDBF   ", real'(P0[d / 2]) / 100.0,
               FRAMES, fe[d], real'(it[d]) / FRAMES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
