// tb_cnu: checks the check node unit (DC-input XOR) against a bit count on
// random and corner-case inputs.
module tb_cnu;
  localparam int DC = 6;
  logic [DC-1:0] vin;
  logic          c;
  int checks = 0, failures = 0;

  cnu #(.DC(DC)) dut (.vin, .c);

  task automatic check(input logic [DC-1:0] val);
    int ones;
    vin = val;
    #1;
    ones = 0;
    for (int k = 0; k < DC; k++) ones += int'(val[k]);
    checks++;
    if (c !== logic'(ones % 2)) begin
      failures++;
      $display("FAIL vin=%b c=%b", val, c);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < (1 << DC); k++) check(DC'(k));
    for (int k = 0; k < 100; k++) check(DC'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
