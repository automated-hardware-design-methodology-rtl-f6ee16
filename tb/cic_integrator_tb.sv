// cic_integrator_tb: feeds random samples with random gaps into an
// integrator section (N = 3, R = 4, 4-bit input, deliberately narrow 9-bit
// registers so that the integrators wrap many times) and checks every R-th
// output against N-fold running sums computed on unbounded 64-bit integers
// and then wrapped to the register width. Also checks that out_valid comes
// one clock after every R-th valid input and that wrap-around happened.
module cic_integrator_tb;
  import tb_ref_pkg::*;

  localparam int N = 3, R = 4, IN_W = 4, W = 9;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0;
  logic signed [IN_W-1:0] in_data = '0;
  logic out_valid;
  logic signed [W-1:0] out_data;

  cic_integrator #(.ORDER(N), .DECIM(R), .IN_W(IN_W), .W(W)) dut (
    .clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data);

  int checks = 0, failures = 0, wraps = 0;
  lq_t x;           // inputs
  lq_t s [N + 1];   // s[j][n]: j-fold running sum up to sample n (s[0] = x)
  int cnt = 0, nout = 0;
  logic exp_v = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      exp_v <= in_valid && (cnt % R == R - 1);
      if (in_valid) cnt++;
    end
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL @%0t: %s", $time, msg);
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid !== exp_v) fail("out_valid timing");
      if (out_valid) begin
        int n;
        longint e;
        n = (nout + 1) * R - 1 - (N - 1);   // pipeline delay of N-1 samples
        e = (n >= 0) ? s[N][n] : 0;
        if (e != wrap(e, W)) wraps++;
        checks++;
        if (out_data != wrap(e, W)) fail($sformatf("output %0d: got %0d expected %0d", nout, out_data, wrap(e, W)));
        nout++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 4000; i++) begin
      bit v;
      logic signed [IN_W-1:0] d;
      v = ($urandom_range(0, 3) != 0);
      in_valid <= v;
      if (v) begin
        d = IN_W'($urandom);
        in_data <= d;
        x.push_back(d);
        s[0].push_back(d);
        for (int j = 1; j <= N; j++)
          s[j].push_back(s[j - 1][s[j - 1].size() - 1] + (s[j].size() > 0 ? s[j][s[j].size() - 1] : 0));
      end
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (nout != x.size() / R) fail("number of outputs");
    checks++;
    if (wraps == 0) fail("integrator wrap-around never exercised");
    $display("inputs %0d outputs %0d wrapped %0d", x.size(), nout, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
