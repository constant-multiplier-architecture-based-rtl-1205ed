// tb_vh_mux_unit: self-checking test of the layer-1 multiplexer unit.
//
// Feeds the unit PPG values for random sample magnitudes and random
// coefficient magnitudes (plus all-ones and all-zeros) and compares each of
// P8..P1 with the reference's truncated pair product.
module tb_vh_mux_unit;
  import vh_pkg::*;
  import vh_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  coef_mag_t hm;
  ppg_t      pp;
  pp_set_t   p;
  int unsigned got [8];

  vh_mux_unit dut (.hm(hm), .pp(pp), .p(p));

  task automatic run(input int unsigned xm, input int unsigned hv);
    hm    = 16'(hv);
    pp.xh = 17'(xm / 2);
    pp.xf = 17'(xm);
    pp.x1 = 17'(xm + xm / 2);
    #1;
    got[0] = 32'(p.p8); got[1] = 32'(p.p7); got[2] = 32'(p.p6); got[3] = 32'(p.p5);
    got[4] = 32'(p.p4); got[5] = 32'(p.p3); got[6] = 32'(p.p2); got[7] = 32'(p.p1);
    for (int j = 0; j < 8; j++) begin
      checks++;
      if (got[j] != pair_pp(xm, hv, j)) begin
        failures++;
        if (failures < 10)
          $display("FAIL x=%0d hm=%04h P%0d=%0d expected %0d", xm, hv, 8 - j, got[j], pair_pp(xm, hv, j));
      end
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
    run(65535, 32'hFFFF);
    run(65535, 32'h5555);
    run(65535, 32'hAAAA);
    run(12345, 32'h0000);
    for (int i = 0; i < 20000; i++) run($urandom % 65536, $urandom % 65536);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
