// tb_vnu_type3: checks the register-only VNU of the imprecise decoder: load
// of the channel bit, shift-in of v_in / y_in on en, hold otherwise, and
// v_next = v.
module tb_vnu_type3;
  logic clk = 0, load, en, y_ch, v_in, y_in, v, y, v_next;
  logic mv, my;  // model of B and C
  int checks = 0, failures = 0;

  vnu_type3 dut (.*);

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
    load = 0; en = 0; y_ch = 0; v_in = 0; y_in = 0;
    for (int k = 0; k < 500; k++) begin
      int op;
      op = (k < 2) ? 0 : $urandom_range(2, 0);
      @(negedge clk);
      load = (op == 0);
      en   = (op == 1);
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
      #1;
      expect_eq(int'(v), int'(mv), "v");
      expect_eq(int'(y), int'(my), "y");
      expect_eq(int'(v_next), int'(mv), "v_next");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
