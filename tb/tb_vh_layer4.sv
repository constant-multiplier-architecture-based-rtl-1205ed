// tb_vh_layer4: self-checking test of the final addition.
//
// Drives random byte sums in their reachable ranges, plus the extremes, and
// checks the product magnitude floor((AS5 + AS6) / 2).
module tb_vh_layer4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [16:0] as5;
  logic [8:0]  as6;
  logic [15:0] ym;

  vh_layer4 dut (.as5(as5), .as6(as6), .ym(ym));

  task automatic run(input int unsigned a, input int unsigned b);
    as5 = 17'(a);
    as6 = 9'(b);
    #1;
    checks++;
    if (int'(ym) != (a + b) / 2) begin
      failures++;
      if (failures < 10) $display("FAIL %0d + %0d -> %0d expected %0d", a, b, ym, (a + b) / 2);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run(0, 0);
    run(1, 0);
    run(130555, 509);
    run(130554, 1);
    for (int i = 0; i < 50000; i++) run($urandom % 130556, $urandom % 510);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
