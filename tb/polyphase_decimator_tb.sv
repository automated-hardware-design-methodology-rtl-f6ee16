// polyphase_decimator_tb: compares two polyphase decimators with a direct
// convolution evaluated at every M-th sample, y(m) = sum_k h_k x(mM+M-1-k).
//  - dut_a: order 28, M = 8, 2-bit input, 13-bit output, default
//    coefficients (29 taps padded to 32, 4 MAC units).
//  - dut_b: order 10, M = 3, 12-bit input and output, a fixed asymmetric
//    coefficient set large enough to clip (11 taps padded to 12, 4 MAC units).
// Inputs come with random gaps in the valid strobe. The testbench also checks
// that out_valid pulses exactly one clock after every M-th valid input.
module polyphase_decimator_tb;
  import filt_pkg::*;
  import tb_ref_pkg::*;

  localparam int A_ORD = 28, A_M = 8, A_IN = 2,  A_OUT = 13, CW = 16;
  localparam int B_ORD = 10, B_M = 3, B_IN = 12, B_OUT = 12;

  localparam coef_table_t A_COEF = fir1_table(A_ORD + 1, 1.0 / A_M, CW);

  function automatic coef_table_t b_table();
    coef_table_t t;
    int v [11] = '{-32768, 20000, 31000, -7, 15000, 1, -9000, 32767, 300, -25000, 12345};
    for (int k = 0; k < MAX_TAPS; k++) t[k] = (k < 11) ? v[k] : 0;
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

  polyphase_decimator #(.ORDER(A_ORD), .DECIM(A_M), .IN_W(A_IN), .OUT_W(A_OUT), .COEF_W(CW)) dut_a (
    .clk, .rst_n, .in_valid, .in_data(a_in), .out_valid(a_ov), .out_data(a_out), .out_sat(a_sat));
  polyphase_decimator #(.ORDER(B_ORD), .DECIM(B_M), .IN_W(B_IN), .OUT_W(B_OUT), .COEF_W(CW),
                        .COEFS(B_COEF)) dut_b (
    .clk, .rst_n, .in_valid, .in_data(b_in), .out_valid(b_ov), .out_data(b_out), .out_sat(b_sat));

  int checks = 0, failures = 0, sats = 0;
  lq_t xa, xb, ha, hb;
  int na = 0, oa = 0, ob = 0;
  int cnt_a = 0, cnt_b = 0;
  logic exp_a = 0, exp_b = 0;

  // Expected strobe: registered flag on every M-th valid input.
  always @(posedge clk) begin
    if (rst_n) begin
      exp_a <= in_valid && (cnt_a % A_M == A_M - 1);
      exp_b <= in_valid && (cnt_b % B_M == B_M - 1);
      if (in_valid) begin cnt_a++; cnt_b++; end
    end
  end

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

  always @(negedge clk) begin
    if (rst_n) begin
      longint acc, e; bit s;
      checks++;
      if (a_ov !== exp_a || b_ov !== exp_b) fail("out_valid timing");
      if (a_ov) begin
        acc = 0;
        for (int k = 0; k <= A_ORD; k++)
          if (oa * A_M + A_M - 1 - k >= 0) acc += ha[k] * xa[oa * A_M + A_M - 1 - k];
        e = rnd_sat(acc, A_IN + CW - 1 - A_OUT, A_OUT, s);
        checks++;
        if (a_out != e || a_sat != s) fail($sformatf("A output %0d: got %0d expected %0d", oa, a_out, e));
        oa++;
      end
      if (b_ov) begin
        acc = 0;
        for (int k = 0; k <= B_ORD; k++)
          if (ob * B_M + B_M - 1 - k >= 0) acc += hb[k] * xb[ob * B_M + B_M - 1 - k];
        e = rnd_sat(acc, B_IN + CW - 1 - B_OUT, B_OUT, s);
        sats += s;
        checks++;
        if (b_out != e || b_sat != s) fail($sformatf("B output %0d: got %0d expected %0d", ob, b_out, e));
        ob++;
      end
    end
  end

  initial begin
    for (int k = 0; k <= A_ORD; k++) ha.push_back(A_COEF[k]);
    for (int k = 0; k <= B_ORD; k++) hb.push_back(B_COEF[k]);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 6000; i++) begin
      bit v;
      logic signed [A_IN-1:0] sa;
      logic signed [B_IN-1:0] sb;
      v = (i < 100) ? 1'b1 : ($urandom_range(0, 2) != 0);
      in_valid <= v;
      if (v) begin
        // an impulse first, then random data
        sa = (i == 0) ? A_IN'(1) : (i < 40 ? '0 : A_IN'($urandom));
        sb = (i == 0) ? B_IN'(1000) : (i < 40 ? '0 : B_IN'($urandom));
        a_in <= sa; b_in <= sb;
        xa.push_back(sa); xb.push_back(sb);
        na++;
      end
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (oa != na / A_M || ob != na / B_M) fail("number of outputs");
    checks++;
    if (sats == 0) fail("clipping never exercised");
    $display("inputs %0d outputs A=%0d B=%0d clipped=%0d", na, oa, ob, sats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
