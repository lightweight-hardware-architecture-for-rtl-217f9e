// tb_vnu_type2: loads channel bits, applies random check bits and maximum
// energies, and checks the energy, the absent flip and the register
// behaviour (load, shift-in on en, hold when idle) of the non-flipping type-2 VNU (v_next is always v).
module tb_vnu_type2;
  localparam int DV = 3;
  localparam int EW = pgdbf_pkg::energy_width(DV);
  logic clk = 0, load, en, y_ch, v_in, y_in, v, y, v_next;
  logic [DV-1:0] chk;
  logic [EW-1:0] emax, energy;  // emax is not a port of this unit, only a reference
  logic mv, my;  // model of B and C
  int checks = 0, failures = 0, flips = 0;

  vnu_type2 #(.DV(DV)) dut (.clk, .load, .en, .y_ch, .v_in, .y_in, .chk, .v, .y,
                              .energy, .v_next);

  always #5 clk = ~clk;

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic check_comb();
    int ee;
    #1;
    ee = int'(mv ^ my);
    for (int t = 0; t < DV; t++) ee += int'(chk[t]);
    expect_eq(int'(v), int'(mv), "v");
    expect_eq(int'(y), int'(my), "y");
    expect_eq(int'(energy), ee, "energy");
    expect_eq(int'(v_next), int'(mv), "v_next");
    if (ee == int'(emax)) flips++;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; en = 0; y_ch = 0; v_in = 0; y_in = 0; chk = '0; emax = '0;
    for (int k = 0; k < 400; k++) begin
      int op;
      op = (k < 2) ? 0 : $urandom_range(2, 0);
      @(negedge clk);
      load = (op == 0);
      en   = (op == 1) || ($urandom_range(1, 0) == 1 && op == 0);
      y_ch = 1'($urandom);
      v_in = 1'($urandom);
      y_in = 1'($urandom);
      @(posedge clk);
      if (load) begin
        mv = y_ch;
        my = y_ch;
      end else if (en) begin
        mv = v_in;
        my = y_in;
      end
      @(negedge clk);
      load = 0;
      en = 0;
      for (int r = 0; r < 4; r++) begin
        chk  = DV'($urandom);
        emax = EW'($urandom_range(DV + 1, 0));
        check_comb();
      end
    end
    expect_eq(int'(flips > 0), 1, "some held max-energy cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
