// tb_max_finder: drives random energy vectors (with sparse maxima, all-zero
// and all-maximum cases, a lone maximum at every position) and compares emax
// with a plain maximum loop.
module tb_max_finder;
  localparam int NIN = 37;
  localparam int EW  = 3;
  logic [EW-1:0]          e [NIN];
  logic [EW-1:0]          emax;
  int checks = 0, failures = 0;

  max_finder #(.NIN(NIN), .EW(EW)) dut (.e, .emax);

  task automatic check();
    int m;
    #1;
    m = 0;
    for (int n = 0; n < NIN; n++) if (int'(e[n]) > m) m = int'(e[n]);
    checks++;
    if (int'(emax) != m) begin
      failures++;
      $display("FAIL expected %0d got %0d", m, emax);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (e[n]) e[n] = '0;
    check();
    foreach (e[n]) e[n] = '1;
    check();
    // one non-zero value at every position and every level
    for (int n = 0; n < NIN; n++)
      for (int t = 1; t < (1 << EW); t++) begin
        foreach (e[m]) e[m] = '0;
        e[n] = EW'(t);
        check();
      end
    // random vectors with values limited to a random ceiling
    for (int k = 0; k < 500; k++) begin
      int ceil;
      ceil = $urandom_range((1 << EW) - 1, 1);
      for (int n = 0; n < NIN; n++) e[n] = EW'($urandom_range(ceil, 0));
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
