// tb_vh_mcm: self-checking test of the multiple constant multiplication
// block with its default four coefficients.
//
// One random sample is multiplied by four coefficients at a time; every
// product is compared with the reference model. Coefficient sets include
// equal, bit-shifted and negative coefficients.
module tb_vh_mcm;
  import vh_pkg::*;
  import vh_ref_pkg::*;

  localparam int N = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  sample_t  x;
  coef_t    h    [N];
  product_t y    [N];
  ctrl_t    ctrl [N];

  vh_mcm dut (.x(x), .h(h), .y(y), .ctrl(ctrl));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      x = 16'($urandom);
      for (int k = 0; k < N; k++) h[k] = 17'($urandom);
      if (i % 3 == 1) h[1] = h[0];
      if (i % 3 == 2) h[3] = {h[2][16], 16'hFFFF ^ h[2][15:0]};
      if (i % 5 == 0) x = 16'hFFFF - 16'($urandom % 8);
      #1;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (y[k] !== vh_mult(x, h[k])) begin
          failures++;
          if (failures < 10)
            $display("FAIL x=%0d h[%0d]=%05h y=%0d expected %0d", signed'(x), k, h[k],
                     signed'(y[k]), signed'(vh_mult(x, h[k])));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
