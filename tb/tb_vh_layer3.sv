// tb_vh_layer3: self-checking test of the layer-3 controlled addition.
//
// Drives random nibble sums within their reachable ranges and a random c7,
// and checks AS5 = AS1 + AS2 and AS6 = c7 ? AS5>>8 : AS3 + AS4.
module tb_vh_layer3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int reuse_cnt = 0, add_cnt = 0;

  logic [16:0] as1, as5;
  logic [12:0] as2;
  logic [8:0]  as3, as6;
  logic [4:0]  as4;
  logic        c7;

  vh_layer3 dut (.as1(as1), .as2(as2), .as3(as3), .as4(as4), .c7(c7), .as5(as5), .as6(as6));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned e5, e6;
    for (int i = 0; i < 50000; i++) begin
      as1 = 17'($urandom % 122878);
      as2 = 13'($urandom % 7679);
      as3 = 9'($urandom % 479);
      as4 = 5'($urandom % 29);
      c7  = 1'($urandom);
      #1;
      e5 = int'(as1) + int'(as2);
      e6 = c7 ? e5 / 256 : int'(as3) + int'(as4);
      if (c7) reuse_cnt++; else add_cnt++;
      checks++;
      if (int'(as5) != e5 || int'(as6) != e6) begin
        failures++;
        if (failures < 10) $display("FAIL as5=%0d/%0d as6=%0d/%0d c7=%0b", as5, e5, as6, e6, c7);
      end
    end
    $display("reused %0d times, added %0d times", reuse_cnt, add_cnt);
    checks++;
    if (reuse_cnt == 0 || add_cnt == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
