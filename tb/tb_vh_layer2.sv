// tb_vh_layer2: self-checking test of the layer-2 controlled addition.
//
// Partial products come from random sample and coefficient magnitudes
// through the reference pair products. The controls are driven two ways:
// at random, to reach every selection path, and as the true nibble
// equalities of the coefficient. Expected sums follow the selection rules
// (first matching higher nibble wins).
module tb_vh_layer2;
  import vh_pkg::*;
  import vh_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int path_cnt [8];

  pp_set_t      p;
  logic [6:1]   c;
  logic [16:0]  as1;
  logic [12:0]  as2;
  logic [8:0]   as3;
  logic [4:0]   as4;

  vh_layer2 dut (.p(p), .c(c), .as1(as1), .as2(as2), .as3(as3), .as4(as4));

  task automatic run(input int unsigned xm, input int unsigned hv, input logic [6:1] cv);
    int unsigned e1, e2, e3, e4;
    p.p8 = 17'(pair_pp(xm, hv, 0));
    p.p7 = 15'(pair_pp(xm, hv, 1));
    p.p6 = 13'(pair_pp(xm, hv, 2));
    p.p5 = 11'(pair_pp(xm, hv, 3));
    p.p4 = 9'(pair_pp(xm, hv, 4));
    p.p3 = 7'(pair_pp(xm, hv, 5));
    p.p2 = 5'(pair_pp(xm, hv, 6));
    p.p1 = 3'(pair_pp(xm, hv, 7));
    c = cv;
    #1;
    e1 = nib_direct(xm, hv, 0);
    e2 = cv[1] ? e1 >> 4 : nib_direct(xm, hv, 1);
    e3 = cv[2] ? e1 >> 8 : cv[4] ? e2 >> 4 : nib_direct(xm, hv, 2);
    e4 = cv[3] ? e1 >> 12 : cv[5] ? e2 >> 8 : cv[6] ? e3 >> 4 : nib_direct(xm, hv, 3);
    if (cv[1]) path_cnt[0]++;
    if (cv[2]) path_cnt[1]++;
    else if (cv[4]) path_cnt[2]++;
    if (cv[3]) path_cnt[3]++;
    else if (cv[5]) path_cnt[4]++;
    else if (cv[6]) path_cnt[5]++;
    if (cv == '0) path_cnt[6]++;
    checks++;
    if (as1 != 17'(e1) || as2 != 13'(e2) || as3 != 9'(e3) || as4 != 5'(e4)) begin
      failures++;
      if (failures < 10)
        $display("FAIL x=%0d hm=%04h c=%b got %0d %0d %0d %0d expected %0d %0d %0d %0d",
                 xm, hv, cv, as1, as2, as3, as4, e1, e2, e3, e4);
    end
  endtask

  function automatic logic [6:1] true_ctrl(input int unsigned hv);
    logic [6:1] r;
    r[1] = nibble(hv, 0) == nibble(hv, 1);
    r[2] = nibble(hv, 0) == nibble(hv, 2);
    r[3] = nibble(hv, 0) == nibble(hv, 3);
    r[4] = nibble(hv, 1) == nibble(hv, 2);
    r[5] = nibble(hv, 1) == nibble(hv, 3);
    r[6] = nibble(hv, 2) == nibble(hv, 3);
    return r;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned xm, hv;
    for (int i = 0; i < 8; i++) path_cnt[i] = 0;
    for (int i = 0; i < 20000; i++) begin
      xm = $urandom % 65536;
      hv = $urandom % 65536;
      run(xm, hv, 6'($urandom));
      // coefficient built from repeated nibbles, with its true controls
      hv = (($urandom % 4) << 12) | (($urandom % 4) << 8) | (($urandom % 4) << 4) | ($urandom % 4);
      hv = hv * (1 + ($urandom % 3));
      hv = hv & 32'hFFFF;
      run(xm, hv, true_ctrl(hv));
    end
    for (int i = 0; i < 7; i++) begin
      $display("selection path %0d taken %0d times", i, path_cnt[i]);
      checks++;
      if (path_cnt[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
