// tb_vh_ctrl_gen: self-checking test of the control logic generator.
//
// Applies all 65536 coefficient magnitudes and compares the seven control
// signals with nibble and byte comparisons done on integers. Also counts
// how often each control fired, and fails if one never did.
module tb_vh_ctrl_gen;
  import vh_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int fired [1:7];

  coef_mag_t hm;
  ctrl_t     c;

  vh_ctrl_gen dut (.hm(hm), .c(c));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n[4];
    logic [7:1] exp_c;
    for (int i = 1; i <= 7; i++) fired[i] = 0;
    for (int v = 0; v < 65536; v++) begin
      hm = 16'(v);
      #1;
      for (int k = 0; k < 4; k++) n[k] = (v / (1 << (4 * (3 - k)))) % 16;  // n[0] = top nibble
      exp_c[1] = (n[0] == n[1]);
      exp_c[2] = (n[0] == n[2]);
      exp_c[3] = (n[0] == n[3]);
      exp_c[4] = (n[1] == n[2]);
      exp_c[5] = (n[1] == n[3]);
      exp_c[6] = (n[2] == n[3]);
      exp_c[7] = ((v / 256) == (v % 256));
      checks++;
      if (c !== exp_c) begin
        failures++;
        if (failures < 10) $display("FAIL hm=%04h c=%b expected %b", v, c, exp_c);
      end
      for (int i = 1; i <= 7; i++) if (c[i]) fired[i]++;
    end
    for (int i = 1; i <= 7; i++) begin
      $display("c%0d fired %0d times", i, fired[i]);
      checks++;
      if (fired[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
