// fir_filter_tb: drives two FIR filters with random samples and random gaps
// in the valid strobe and compares every output with a 64-bit convolution.
//  - dut_a: the default order-8 filter with folded symmetric coefficients.
//  - dut_b: order 12, unfolded, with a fixed asymmetric coefficient set, a
//    wider output than input and large coefficients, so that outputs clip.
// It also checks the latency (out_valid exactly one clock after in_valid),
// the symmetry and DC gain of the default coefficients, and the impulse
// response of dut_b.
module fir_filter_tb;
  import filt_pkg::*;
  import tb_ref_pkg::*;

  localparam int A_ORD = 8,  A_IN = 18, A_OUT = 18, CW = 16;
  localparam int B_ORD = 12, B_IN = 10, B_OUT = 12;

  localparam coef_table_t A_COEF = fir1_table(A_ORD + 1, 0.5, CW);

  function automatic coef_table_t b_table();
    coef_table_t t;
    int v [13] = '{30000, -12000, 7, 25000, -32768, 4000, 1, -1, 900, 32767, -20000, 123, -5};
    for (int k = 0; k < MAX_TAPS; k++) t[k] = (k < 13) ? v[k] : 0;
    return t;
  endfunction
  localparam coef_table_t B_COEF = b_table();

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0;
  logic signed [A_IN-1:0] a_in = '0;
  logic signed [B_IN-1:0] b_in = '0;
  logic a_ov, b_ov, a_sat, b_sat;
  logic signed [A_OUT-1:0] a_out;
  logic signed [B_OUT-1:0] b_out;

  fir_filter #(.ORDER(A_ORD), .IN_W(A_IN), .OUT_W(A_OUT), .COEF_W(CW), .FOLD(1'b1)) dut_a (
    .clk, .rst_n, .in_valid, .in_data(a_in), .out_valid(a_ov), .out_data(a_out), .out_sat(a_sat));
  fir_filter #(.ORDER(B_ORD), .IN_W(B_IN), .OUT_W(B_OUT), .COEF_W(CW), .FOLD(1'b0), .COEFS(B_COEF)) dut_b (
    .clk, .rst_n, .in_valid, .in_data(b_in), .out_valid(b_ov), .out_data(b_out), .out_sat(b_sat));

  int checks = 0, failures = 0, cycles = 0, sats = 0;
  lq_t xa, xb, ha, hb;
  int na = 0, oa = 0, ob = 0;
  logic iv_d = 0;

  always @(posedge clk) iv_d <= in_valid;

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL @%0t: %s", $time, msg);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output checker: compare with the convolution of everything sent so far.
  always @(negedge clk) begin
    if (rst_n) begin
      cycles++;
      checks++;
      if (a_ov !== iv_d || b_ov !== iv_d) fail("out_valid is not in_valid delayed by one clock");
      if (a_ov) begin
        longint acc, e; bit s;
        acc = 0;
        for (int k = 0; k <= A_ORD; k++) if (oa - k >= 0) acc += ha[k] * xa[oa - k];
        e = rnd_sat(acc, A_IN + CW - 1 - A_OUT, A_OUT, s);
        checks++;
        if (a_out != e || a_sat != s) fail($sformatf("A sample %0d: got %0d expected %0d", oa, a_out, e));
        oa++;
      end
      if (b_ov) begin
        longint acc, e; bit s;
        acc = 0;
        for (int k = 0; k <= B_ORD; k++) if (ob - k >= 0) acc += hb[k] * xb[ob - k];
        e = rnd_sat(acc, B_IN + CW - 1 - B_OUT, B_OUT, s);
        sats += s;
        checks++;
        if (b_out != e || b_sat != s) fail($sformatf("B sample %0d: got %0d expected %0d", ob, b_out, e));
        ob++;
      end
    end
  end

  initial begin
    longint sum = 0;
    for (int k = 0; k <= A_ORD; k++) ha.push_back(A_COEF[k]);
    for (int k = 0; k <= B_ORD; k++) hb.push_back(B_COEF[k]);
    // Default coefficients: symmetric, DC gain within 1% of one.
    for (int k = 0; k <= A_ORD; k++) begin
      sum += ha[k];
      checks++;
      if (ha[k] != ha[A_ORD - k]) fail("default coefficients not symmetric");
    end
    checks++;
    if (sum < 32440 || sum > 33096) fail($sformatf("default DC gain %0d / 32768", sum));

    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // Impulse into B, then random data with random gaps.
    for (int i = 0; i < 4000; i++) begin
      bit v;
      logic signed [A_IN-1:0] sa;
      logic signed [B_IN-1:0] sb;
      v = (i < 40) ? 1'b1 : ($urandom_range(0, 3) != 0);
      in_valid <= v;
      if (v) begin
        sa = A_IN'($urandom);
        sb = (i == 0) ? B_IN'(1 << (B_IN - 2)) : (i < 20 ? '0 : B_IN'($urandom));
        a_in <= sa; b_in <= sb;
        xa.push_back(sa); xb.push_back(sb);
        na++;
      end
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (sats == 0) fail("clipping never exercised");
    checks++;
    if (oa != na || ob != na) fail("number of outputs differs from number of inputs");
    $display("inputs %0d outputs A=%0d B=%0d clipped=%0d", na, oa, ob, sats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
