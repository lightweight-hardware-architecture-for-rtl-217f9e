// tb_alpha_sweep: crossover-probability sweep of both decoders at the default
// size (N = 1296, p0 = 0.7), the operating points of the error-rate curves.
//
// For each crossover probability alpha, frames of the all-zero codeword with
// independent bit errors (probability alpha per bit) are decoded by both
// decoders. Every frame is compared bit for bit with the reference model
// (decoded word, iterations, success). Per point the test prints the frame
// count, frame errors (no codeword found, or a wrong codeword) and the
// average number of iterations. At alpha = 0.01 it also prints the
// throughput in bits per cycle, N / (average iterations + 2), the 2 being
// this design's load and done cycles. The frame counts are far too small for
// the low error rates of the curves; the sweep shows the trend and the
// bit-exactness only.
module tb_alpha_sweep;
  import pgdbf_pkg::*;
  import pgdbf_ref_pkg::*;
  localparam int Z = 54, NR = 12, NC = 24, DV = 3, ITMAX = 100, L = 1, P0 = 70;
  localparam int N = NC * Z, IW = $clog2(ITMAX + 1);
  localparam int NPT = 5;
  localparam int ALPHA_PPM [NPT] = '{4000, 10000, 20000, 40000, 70000};
  localparam int FRAMES    [NPT] = '{20, 40, 30, 15, 6};

  logic clk = 0, rst_n = 0;
  logic pg_start = 0, im_start = 0;
  logic [N-1:0] pg_y = '0, im_y = '0, pg_x_hat, im_x_hat;
  logic pg_busy, pg_done, pg_success, im_busy, im_done, im_success;
  logic [IW-1:0] pg_iters, im_iters;
  int checks = 0, failures = 0;

  vnsa_pgdbf_top dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int pt = 0; pt < NPT; pt++) begin
      int fe_pg, fe_im, it_pg, it_im;
      fe_pg = 0; fe_im = 0; it_pg = 0; it_im = 0;
      for (int f = 0; f < FRAMES[pt]; f++) begin
        bit y[], xr_pg[], xr_im[];
        ref_stats_t st_pg, st_im;
        int bad_pg, bad_im, w_pg, w_im, guard;
        y = new[N];
        foreach (y[n]) y[n] = ($urandom_range(999999, 0) < ALPHA_PPM[pt]);
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
        guard = 0;
        while ((pg_busy || im_busy) && guard < ITMAX + 10) begin
          @(negedge clk);
          guard++;
        end
        bad_pg = 0; bad_im = 0; w_pg = 0; w_im = 0;
        for (int n = 0; n < N; n++) begin
          bad_pg += int'(pg_x_hat[n] != xr_pg[n]);
          bad_im += int'(im_x_hat[n] != xr_im[n]);
          w_pg += int'(pg_x_hat[n]);
          w_im += int'(im_x_hat[n]);
        end
        expect_eq(bad_pg, 0, "VNSA-PGDBF decoded word");
        expect_eq(bad_im, 0, "VNSA-IM-PGDBF decoded word");
        expect_eq(int'(pg_iters), st_pg.iters, "VNSA-PGDBF iterations");
        expect_eq(int'(im_iters), st_im.iters, "VNSA-IM-PGDBF iterations");
        expect_eq(int'(pg_success), int'(st_pg.success), "VNSA-PGDBF success");
        expect_eq(int'(im_success), int'(st_im.success), "VNSA-IM-PGDBF success");
        fe_pg += int'(!pg_success || w_pg != 0);
        fe_im += int'(!im_success || w_im != 0);
        it_pg += int'(pg_iters);
        it_im += int'(im_iters);
      end
      $display("alpha=%0.3f frames=%0d | VNSA-PGDBF frame errors %0d, avg iterations %0.2f | VNSA-IM-PGDBF frame errors %0d, avg iterations %0.2f",
               real'(ALPHA_PPM[pt]) / 1.0e6, FRAMES[pt], fe_pg, real'(it_pg) / FRAMES[pt],
               fe_im, real'(it_im) / FRAMES[pt]);
      if (ALPHA_PPM[pt] == 10000)
        $display("alpha=0.010 throughput: VNSA-PGDBF %0.1f bits/cycle, VNSA-IM-PGDBF %0.1f bits/cycle",
                 real'(N) / (real'(it_pg) / FRAMES[pt] + 2.0),
                 real'(N) / (real'(it_im) / FRAMES[pt] + 2.0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
