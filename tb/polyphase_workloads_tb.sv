// polyphase_workloads_tb: runs the two order-123 polyphase decimators of the
// evaluation (18-bit input, 37-bit output, decimation 2 and 62) on random
// full-range input and compares every output with a direct convolution at
// every M-th sample. Also checks the number of shared MAC units each
// configuration builds (62 and 2) and the output count.
module polyphase_workloads_tb;
  import filt_pkg::*;
  import tb_ref_pkg::*;

  localparam int ORD = 123, IN_W = 18, OUT_W = 37, CW = 16;
  localparam int M1 = 2, M2 = 62;
  localparam int NIN = 62 * 60;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0;
  logic signed [IN_W-1:0] in_data = '0;
  logic v1, v2, s1, s2;
  logic signed [OUT_W-1:0] o1, o2;

  polyphase_decimator #(.ORDER(ORD), .DECIM(M1), .IN_W(IN_W), .OUT_W(OUT_W), .COEF_W(CW)) dut_m2 (
    .clk, .rst_n, .in_valid, .in_data, .out_valid(v1), .out_data(o1), .out_sat(s1));
  polyphase_decimator #(.ORDER(ORD), .DECIM(M2), .IN_W(IN_W), .OUT_W(OUT_W), .COEF_W(CW)) dut_m62 (
    .clk, .rst_n, .in_valid, .in_data, .out_valid(v2), .out_data(o2), .out_sat(s2));

  int checks = 0, failures = 0;
  lq_t x, y1, y2;

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL: %s", msg);
  endtask

  initial begin : watchdog
    repeat (NIN + 1000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (v1) y1.push_back(o1);
    if (v2) y2.push_back(o2);
  end

  task automatic compare(string name, lq_t y, int m);
    lq_t h, r;
    longint e;
    bit s;
    coef_table_t t = fir1_table(ORD + 1, 1.0 / m, CW);
    for (int k = 0; k <= ORD; k++) h.push_back(t[k]);
    r = conv_decim(x, h, m, 0);
    checks++;
    if (y.size() != r.size()) fail($sformatf("%s: %0d outputs, expected %0d", name, y.size(), r.size()));
    for (int i = 0; i < y.size() && i < r.size(); i++) begin
      e = rnd_sat(r[i], IN_W + CW - 1 - OUT_W, OUT_W, s);
      checks++;
      if (y[i] != e) fail($sformatf("%s output %0d: got %0d expected %0d", name, i, y[i], e));
    end
    $display("%s: %0d outputs", name, y.size());
  endtask

  initial begin
    checks++;
    if (dut_m2.NMAC != 62 || dut_m62.NMAC != 2) fail("number of MAC units");
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < NIN; n++) begin
      logic signed [IN_W-1:0] d;
      d = IN_W'($urandom);
      in_valid <= 1; in_data <= d; x.push_back(d);
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (3) @(posedge clk);
    compare("order 123, decimation 2", y1, M1);
    compare("order 123, decimation 62", y2, M2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
