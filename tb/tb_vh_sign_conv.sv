// tb_vh_sign_conv: self-checking test of the sign conversion block.
//
// Runs the coefficient-sized instance (17 bits) over random words and
// corner values, and a sample-sized instance (16 bits) exhaustively. The
// expected magnitude of a negative word is |value| - 1 (1's complement),
// worked out with signed integer arithmetic rather than bit inversion.
module tb_vh_sign_conv;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [16:0] h;
  logic        h_sign;
  logic [15:0] h_mag;
  logic [15:0] x;
  logic        x_sign;
  logic [14:0] x_mag;

  vh_sign_conv #(.W(17)) dut_h (.din(h), .sign(h_sign), .mag(h_mag));
  vh_sign_conv #(.W(16)) dut_x (.din(x), .sign(x_sign), .mag(x_mag));

  task automatic check_h(input logic [16:0] v);
    int sv, exp_mag;
    h = v;
    #1;
    sv = int'(signed'(v));
    exp_mag = (sv < 0) ? (-sv - 1) : sv;
    checks++;
    if (h_sign !== (sv < 0) || int'(h_mag) != exp_mag) begin
      failures++;
      $display("FAIL h=%0d sign=%0b mag=%0d expected mag %0d", sv, h_sign, h_mag, exp_mag);
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
    int sv, exp_mag;
    h = '0;
    x = '0;
    check_h(17'h00000);
    check_h(17'h0FFFF);
    check_h(17'h10000);
    check_h(17'h1FFFF);
    check_h(17'h1FFF0);
    for (int i = 0; i < 2000; i++) check_h(17'($urandom));
    for (int v = -32768; v < 32768; v++) begin
      x = 16'(v);
      #1;
      exp_mag = (v < 0) ? (-v - 1) : v;
      checks++;
      if (x_sign !== (v < 0) || int'(x_mag) != exp_mag) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d mag=%0d expected %0d", v, x_mag, exp_mag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
