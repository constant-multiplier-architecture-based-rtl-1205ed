// tb_vhbcse_fir: end-to-end test of the reconfigurable symmetric FIR filter
// at its default size (8 taps, 4 coefficients).
//
// Streams signed samples, with gaps in in_valid, through the filter while
// rewriting the coefficient LUT several times, also while samples are in
// flight. Each accepted sample's expected output is the direct-form sum
// y[n] = sum_k h_k(n-k) * x[n-k], where h_k(m) is the symmetric coefficient
// that was in the LUT when sample m was multiplied and each product is the
// reference multiplier's. The output must appear exactly two clock cycles
// after the sample is accepted. The test counts the mechanisms of the design
// (each nibble/byte reuse control, negative coefficients and samples,
// coefficient rewrites in flight, idle cycles, back-to-back samples) and
// fails if one never occurs.
module tb_vhbcse_fir;
  import vh_pkg::*;
  import vh_ref_pkg::*;

  localparam int NTAP  = 8;
  localparam int NCOEF = NTAP / 2;
  localparam int NSAMP = 3000;
  localparam int LAT   = 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;

  logic             rst_n;
  logic             coef_we;
  logic [1:0]       coef_addr;
  coef_t            coef_wdata;
  logic             in_valid;
  sample_t          x_in;
  logic             out_valid;
  logic signed [18:0] y_out;
  ctrl_t            ctrl [NCOEF];

  vhbcse_fir dut (
    .clk(clk), .rst_n(rst_n),
    .coef_we(coef_we), .coef_addr(coef_addr), .coef_wdata(coef_wdata),
    .in_valid(in_valid), .x_in(x_in),
    .out_valid(out_valid), .y_out(y_out), .ctrl(ctrl)
  );

  // testbench view of the LUT and of the accepted samples
  coef_t   lut_m [NCOEF];
  sample_t xs    [$];
  coef_t   hs    [$][NCOEF];
  longint  exp_y [$];
  longint  exp_t [$];

  // mechanism counters
  int fired [1:7];
  int neg_h_cnt = 0, neg_x_cnt = 0, rewrite_in_flight = 0, idle_cnt = 0, b2b_cnt = 0;
  int outputs = 0;
  logic v_m = 1'b0;   // a sample sits in the DUT's input register

  function automatic longint expected_out(input int n);
    longint acc = 0;
    int m, ci;
    for (int k = 0; k < NTAP; k++) begin
      m = n - k;
      if (m < 0) break;
      ci = (k < NCOEF) ? k : NTAP - 1 - k;
      acc += longint'(signed'(vh_mult(xs[m], hs[m][ci])));
    end
    return acc;
  endfunction

  // coefficient with repeated nibbles, to trigger the reuse controls
  function automatic coef_t patterned();
    logic [3:0] a, b;
    logic [15:0] m;
    a = 4'($urandom);
    b = 4'($urandom);
    for (int k = 0; k < 4; k++) m[4*k +: 4] = ($urandom % 2 == 1) ? a : b;
    return {1'($urandom), m};
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bookkeeping at every rising edge: what the DUT samples now
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (coef_we) begin
        lut_m[coef_addr] = coef_wdata;
        if (v_m || in_valid) rewrite_in_flight++;
      end
      if (in_valid) begin
        xs.push_back(x_in);
        hs.push_back(lut_m);
        exp_y.push_back(expected_out(xs.size() - 1));
        exp_t.push_back(cycle + longint'(LAT));
        if (x_in[15]) neg_x_cnt++;
        if (v_m) b2b_cnt++;
      end else begin
        idle_cnt++;
      end
      if (v_m) begin
        for (int c = 0; c < NCOEF; c++) begin
          for (int i = 1; i <= 7; i++) if (ctrl[c][i]) fired[i]++;
          if (hs[hs.size() - 1 - (in_valid ? 1 : 0)][c][16]) neg_h_cnt++;
        end
      end
      v_m = in_valid;
    end
  end

  // output check, just after the edge
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      outputs++;
      checks++;
      if (exp_y.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %0d", y_out);
      end else begin
        if (longint'(y_out) != exp_y[0] || cycle != exp_t[0]) begin
          failures++;
          if (failures < 10)
            $display("FAIL output %0d: y=%0d expected %0d, at cycle %0d expected %0d",
                     outputs, y_out, exp_y[0], cycle, exp_t[0]);
        end
        void'(exp_y.pop_front());
        void'(exp_t.pop_front());
      end
    end
  end

  task automatic write_coef(input int a, input coef_t v);
    coef_we    = 1'b1;
    coef_addr  = 2'(a);
    coef_wdata = v;
  endtask

  initial begin
    for (int i = 1; i <= 7; i++) fired[i] = 0;
    for (int i = 0; i < NCOEF; i++) lut_m[i] = '0;
    rst_n = 1'b0;
    coef_we = 1'b0;
    coef_addr = '0;
    coef_wdata = '0;
    in_valid = 1'b0;
    x_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // a low-pass-like set: H0..H3 = 0.03, 0.11, 0.22, 0.28 (x 2^16) with a
    // negative outer tap
    @(negedge clk); write_coef(0, 17'h1F852);
    @(negedge clk); write_coef(1, 17'h01C28);
    @(negedge clk); write_coef(2, 17'h03852);
    @(negedge clk); write_coef(3, 17'h047AE);
    @(negedge clk); coef_we = 1'b0;
    for (int n = 0; n < NSAMP; n++) begin
      @(negedge clk);
      coef_we = 1'b0;
      in_valid = ($urandom % 4) != 0;
      x_in = (n % 7 == 0) ? 16'h8000 + 16'($urandom % 4) : 16'($urandom);
      if ($urandom % 16 == 0) begin
        if ($urandom % 2 == 1) write_coef($urandom % NCOEF, patterned());
        else              write_coef($urandom % NCOEF, 17'($urandom));
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    coef_we = 1'b0;
    repeat (6) @(negedge clk);
    checks++;
    if (exp_y.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", exp_y.size());
    end
    for (int i = 1; i <= 7; i++) begin
      $display("control c%0d used %0d times", i, fired[i]);
      checks++;
      if (fired[i] == 0) failures++;
    end
    $display("negative coefficient products %0d, negative samples %0d", neg_h_cnt, neg_x_cnt);
    $display("coefficient rewrites with samples in flight %0d", rewrite_in_flight);
    $display("idle cycles %0d, back-to-back samples %0d, outputs %0d", idle_cnt, b2b_cnt, outputs);
    checks++;
    if (neg_h_cnt == 0 || neg_x_cnt == 0 || rewrite_in_flight == 0 || idle_cnt == 0 ||
        b2b_cnt == 0 || outputs == 0)
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
