// tb_vh_ppg: self-checking test of the partial product generator.
//
// Applies every 16-bit sample magnitude and checks the three partial
// products against integer arithmetic: floor(X/2), X and X + floor(X/2).
module tb_vh_ppg;
  import vh_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [15:0] xm;
  ppg_t        pp;

  vh_ppg dut (.xm(xm), .pp(pp));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      xm = 16'(v);
      #1;
      checks++;
      if (int'(pp.xh) != v / 2 || int'(pp.xf) != v || int'(pp.x1) != v + v / 2) begin
        failures++;
        if (failures < 10)
          $display("FAIL x=%0d xh=%0d xf=%0d x1=%0d", v, pp.xh, pp.xf, pp.x1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
