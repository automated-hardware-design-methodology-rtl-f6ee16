// cic_comb_tb: checks two comb sections against differences computed on
// 64-bit integers and wrapped to the register width.
//  - dut_a: N = 8, R = 4, differential delay 2, W = 12: two shared
//    subtractors, four clocks per sample.
//  - dut_b: N = 3, R = 1, differential delay 1, W = 10: three subtractors,
//    one clock per sample, fed on every clock.
// Checks the latency (STEPS clocks from in_valid to out_valid) and that the
// shared schedule (busy) was used.
module cic_comb_tb;
  import tb_ref_pkg::*;

  localparam int NA = 8, RA = 4, MA = 2, WA = 12, STEPS_A = 4;
  localparam int NB = 3, RB = 1, MB = 1, WB = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic va = 0, vb = 0;
  logic signed [WA-1:0] da = '0;
  logic signed [WB-1:0] db = '0;
  logic ova, ovb, busy_a, busy_b;
  logic signed [WA-1:0] oda;
  logic signed [WB-1:0] odb;

  cic_comb #(.ORDER(NA), .DECIM(RA), .DIFF_DELAY(MA), .W(WA)) dut_a (
    .clk, .rst_n, .in_valid(va), .in_data(da), .out_valid(ova), .out_data(oda), .busy(busy_a));
  cic_comb #(.ORDER(NB), .DECIM(RB), .DIFF_DELAY(MB), .W(WB)) dut_b (
    .clk, .rst_n, .in_valid(vb), .in_data(db), .out_valid(ovb), .out_data(odb), .busy(busy_b));

  int checks = 0, failures = 0, busy_cycles = 0;
  lq_t xa, xb;
  int oa = 0, ob = 0;
  logic [STEPS_A:1] pipe_a = '0;
  logic pipe_b = 0;

  always @(posedge clk) begin
    pipe_a <= {pipe_a[STEPS_A-1:1], va};
    pipe_b <= vb;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL @%0t: %s", $time, msg);
  endtask

  // N-fold difference with delay m of sample n of x, wrapped to w bits.
  function automatic longint comb_ref(lq_t x, int n, int nst, int m, int w);
    lq_t c = x;
    lq_t t;
    for (int j = 0; j < nst; j++) begin
      t = {};
      for (int i = 0; i <= n; i++) t.push_back(c[i] - ((i >= m) ? c[i - m] : 0));
      c = t;
    end
    return wrap(c[n], w);
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      longint e;
      if (busy_a) busy_cycles++;
      checks++;
      if (ova !== pipe_a[STEPS_A] || ovb !== pipe_b) fail("out_valid latency");
      if (ova) begin
        e = comb_ref(xa, oa, NA, MA, WA);
        checks++;
        if (oda != e) fail($sformatf("A output %0d: got %0d expected %0d", oa, oda, e));
        oa++;
      end
      if (ovb) begin
        e = comb_ref(xb, ob, NB, MB, WB);
        checks++;
        if (odb != e) fail($sformatf("B output %0d: got %0d expected %0d", ob, odb, e));
        ob++;
      end
    end
  end

  // A: a sample every 4 to 7 clocks. B: a sample on every clock.
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    fork
      for (int i = 0; i < 400; i++) begin
        logic signed [WA-1:0] d;
        d = WA'($urandom);
        va <= 1; da <= d; xa.push_back(d);
        @(posedge clk);
        va <= 0;
        repeat ($urandom_range(RA - 1, RA + 2)) @(posedge clk);
      end
      for (int i = 0; i < 1500; i++) begin
        logic signed [WB-1:0] d;
        d = WB'($urandom);
        vb <= 1; db <= d; xb.push_back(d);
        @(posedge clk);
        if (i == 1499) vb <= 0;
      end
    join
    va <= 0; vb <= 0;
    repeat (STEPS_A + 2) @(posedge clk);
    checks++;
    if (oa != xa.size() || ob != xb.size()) fail("number of outputs");
    checks++;
    if (busy_cycles == 0) fail("shared subtractor schedule never used");
    $display("outputs A=%0d B=%0d busy cycles=%0d", oa, ob, busy_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
