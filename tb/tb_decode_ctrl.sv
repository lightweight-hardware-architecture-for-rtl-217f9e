// tb_decode_ctrl: runs frames that converge after K iterations (K = 0 ..
// beyond ITMAX) against the controller, with all_sat driven by a counter of
// the en pulses. Checks the load pulse, the number of en pulses, the done
// latency (K + 2 cycles from start), success, iters, the rotation offset
// modulo Z (which wraps several times) and that start is ignored while busy.
module tb_decode_ctrl;
  localparam int ITMAX = 12, Z = 5, L = 2;
  localparam int IW = $clog2(ITMAX + 1), RW = $clog2(Z);
  logic clk = 0, rst_n, start, all_sat, load, en, busy, done, success;
  logic [IW-1:0] iters;
  logic [RW-1:0] rot;
  int checks = 0, failures = 0;
  int en_cnt, load_cnt, k_target;

  decode_ctrl #(.ITMAX(ITMAX), .Z(Z), .SHIFT_L(L)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (load) begin
      en_cnt   <= 0;
      load_cnt <= load_cnt + 1;
    end else if (en) en_cnt <= en_cnt + 1;
  end
  assign all_sat = !load && (en_cnt >= k_target);

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; start = 0; k_target = 0; load_cnt = 0; en_cnt = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    expect_eq(int'(busy), 0, "idle after reset");
    for (int k = 0; k <= ITMAX + 3; k++) begin
      int cyc, exp_it, loads0;
      k_target = k;
      loads0 = load_cnt;
      @(negedge clk);
      start = 1;
      #1;
      expect_eq(int'(load), 1, "load with start");
      @(negedge clk);
      start = 1;  // held high while busy: must not reload
      cyc = 1;
      while (!done && cyc < 100) begin
        @(negedge clk);
        if (cyc == 1) start = 0;
        cyc++;
      end
      start = 0;
      exp_it = (k <= ITMAX) ? k : ITMAX;
      expect_eq(cyc, exp_it + 2, "start-to-done cycles");
      expect_eq(int'(success), int'(k <= ITMAX), "success");
      expect_eq(int'(iters), exp_it, "iters");
      expect_eq(en_cnt, exp_it, "en pulses");
      expect_eq(int'(rot), (exp_it * L) % Z, "rot");
      expect_eq(load_cnt - loads0, 1, "one load per frame");
      expect_eq(int'(busy), 0, "idle after done");
      @(negedge clk);
      expect_eq(int'(done), 0, "done is one pulse");
      expect_eq(int'(iters), exp_it, "iters held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
