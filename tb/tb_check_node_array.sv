// tb_check_node_array: at the default code size, drives random VN vectors,
// single-bit vectors and the all-zero word, and compares every check, every
// gathered check bit of every VN and all_sat with values computed from the
// base matrix directly.
module tb_check_node_array;
  import pgdbf_pkg::*;
  localparam int Z = 54, NR = 12, NC = 24, DV = 3;
  localparam int N = NC * Z, M = NR * Z;
  logic [Z-1:0]  v   [NC];
  logic [Z-1:0]  c   [NR];
  logic [DV-1:0] chk [NC][Z];
  logic          all_sat;
  int checks = 0, failures = 0;

  check_node_array #(.Z(Z), .NR(NR), .NC(NC), .DV(DV)) dut (.*);

  task automatic check();
    bit ec[M];
    bit any;
    int bad;
    #1;
    foreach (ec[n]) ec[n] = 0;
    for (int a = 0; a < NR; a++)
      for (int i = 0; i < NC; i++) begin
        int h;
        h = hb_shift(a, i, Z, NR, DV);
        if (h >= 0) for (int b = 0; b < Z; b++) ec[a*Z + b] ^= v[i][(b + h) % Z];
      end
    bad = 0;
    any = 0;
    for (int n = 0; n < M; n++) begin
      any |= ec[n];
      if (c[n / Z][n % Z] != ec[n]) bad++;
    end
    for (int i = 0; i < NC; i++)
      for (int j = 0; j < Z; j++)
        for (int t = 0; t < DV; t++) begin
          int a, h;
          a = col_row(i, t, NR, DV);
          h = hb_shift(a, i, Z, NR, DV);
          if (chk[i][j][t] != ec[a*Z + (j - h + Z) % Z]) bad++;
        end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL %0d mismatching check bits", bad);
    end
    checks++;
    if (all_sat != !any) begin
      failures++;
      $display("FAIL all_sat=%b", all_sat);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt;
    foreach (v[i]) v[i] = '0;
    check();
    checks++;
    if (!all_sat) begin
      failures++;
      $display("FAIL all-zero word not a codeword");
    end
    for (int k = 0; k < 40; k++) begin
      int pos;
      foreach (v[i]) v[i] = '0;
      pos = $urandom_range(N - 1, 0);
      v[pos / Z][pos % Z] = 1'b1;
      check();
      // a single error leaves exactly DV checks unsatisfied
      cnt = 0;
      foreach (c[a]) cnt += $countones(c[a]);
      checks++;
      if (cnt != DV) begin
        failures++;
        $display("FAIL single error gives %0d unsatisfied checks", cnt);
      end
    end
    for (int k = 0; k < 40; k++) begin
      for (int n = 0; n < N; n++) v[n / Z][n % Z] = ($urandom_range(99, 0) < 5);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
