// tb_vh_cm: self-checking test of one VHBCSE constant multiplier.
//
// The testbench plays the shared partial product generator itself: it
// forms the sample's 1's complement magnitude and its three partial
// products with integer arithmetic and drives them with the sample sign.
// Each product is compared bit for bit with the reference model, and the
// reference itself is held within a small bound of floor(X*H/2^16).
// Coefficients are drawn so that every nibble and byte equality, negative
// coefficients and negative samples all occur; each is counted.
module tb_vh_cm;
  import vh_pkg::*;
  import vh_ref_pkg::*;

  localparam int ERR_BOUND = 8;   // |reference - floor(X*H/2^16)| limit

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int fired [1:7];
  int neg_h = 0, neg_x = 0, max_err = 0, differs = 0;

  ppg_t     pp;
  logic     x_neg;
  coef_t    h;
  product_t y;
  ctrl_t    ctrl;

  vh_cm dut (.pp(pp), .x_neg(x_neg), .h(h), .y(y), .ctrl(ctrl));

  task automatic run(input logic [15:0] xv, input logic [16:0] hv);
    int unsigned xm;
    logic [14:0] xb;
    logic [15:0] hb;
    longint ex, err;
    logic [15:0] ey;
    xb    = xv[15] ? ~xv[14:0] : xv[14:0];
    xm    = 32'(xb);
    x_neg = xv[15];
    pp.xh = 17'(xm / 2);
    pp.xf = 17'(xm);
    pp.x1 = 17'(xm + xm / 2);
    h     = hv;
    #1;
    ey = vh_mult(xv, hv);
    ex = exact_mult(xv, hv);
    err = longint'(signed'(ey)) - ex;
    if (err < 0) err = -err;
    if (err > longint'(max_err)) max_err = int'(err);
    checks++;
    if (y !== ey) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d h=%05h y=%0d expected %0d", signed'(xv), hv, signed'(y), signed'(ey));
    end
    checks++;
    if (err > longint'(ERR_BOUND)) begin
      failures++;
      if (failures < 10) $display("FAIL reference off by %0d for x=%0d h=%05h", err, signed'(xv), hv);
    end
    hb = hv[16] ? ~hv[15:0] : hv[15:0];
    if (vh_mag(xm, 32'(hb)) != bcse2_mag(xm, 32'(hb))) differs++;
    for (int i = 1; i <= 7; i++) if (ctrl[i]) fired[i]++;
    if (hv[16]) neg_h++;
    if (xv[15]) neg_x++;
  endtask

  // coefficient from a few distinct nibbles, so that equalities occur
  function automatic logic [16:0] patterned();
    logic [3:0] a, b;
    logic [15:0] m;
    a = 4'($urandom);
    b = 4'($urandom);
    for (int k = 0; k < 4; k++) m[4*k +: 4] = ($urandom % 2 == 1) ? a : b;
    return {1'($urandom), m};
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 1; i <= 7; i++) fired[i] = 0;
    run(16'h7FFF, 17'h0FFFF);   // worst case coefficient, all ones
    run(16'h8000, 17'h0FFFF);
    run(16'h7FFF, 17'h10000);   // -1.0
    run(16'h8000, 17'h10000);
    run(16'h1234, 17'h1FFFE);   // small negative coefficient
    run(16'h0000, 17'h0ABCD);
    for (int i = 0; i < 30000; i++) begin
      run(16'($urandom), 17'($urandom));
      run(16'($urandom), patterned());
    end
    for (int i = 1; i <= 7; i++) begin
      $display("c%0d fired %0d times", i, fired[i]);
      checks++;
      if (fired[i] == 0) failures++;
    end
    $display("negative coefficients %0d, negative samples %0d, largest error vs exact %0d LSB",
             neg_h, neg_x, max_err);
    $display("products differing from the plain 2-bit BCSE sum: %0d of %0d", differs, checks / 2);
    checks++;
    if (neg_h == 0 || neg_x == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
