// cic_decimator_tb: checks three CIC decimators against a direct convolution
// with the CIC impulse response (N boxcars of length R*M convolved), taken at
// every R-th sample (N-1 samples earlier, the integrator pipeline delay) and
// rounded half up to the output width.
//  - dut_a: N = 3, R = 512, 2-bit in, 16-bit out (29-bit registers).
//  - dut_b: N = 4, R = 8, 2-bit in, 14-bit out (full precision).
//  - dut_c: N = 3, R = 4, M = 2, 8-bit in, 10-bit out, random input gaps.
//  - dut_d: as dut_a but with three comb subtractors (NSUB = 3, no sharing);
//    it must give the same outputs as dut_a, two clocks earlier.
// Each input stream starts with a stretch at the most negative value, so the
// output reaches full scale, then random samples. Also checks the register
// width and the latency (2 + comb steps clocks after every R-th input; with
// R >= N the comb section uses one subtractor for N clocks).
module cic_decimator_tb;
  import filt_pkg::*;
  import tb_ref_pkg::*;

  localparam int NA = 3, RA = 512, MA = 1, IA = 2, OA = 16;
  localparam int NB = 4, RB = 8,   MB = 1, IB = 2, OB = 14;
  localparam int NC = 3, RC = 4,   MC = 2, IC = 8, OC = 10;
  localparam int WA = cic_reg_width(IA, NA, RA, MA);
  localparam int WB = cic_reg_width(IB, NB, RB, MB);
  localparam int WC = cic_reg_width(IC, NC, RC, MC);
  // Latency: integrator register, ceil(N / ceil(N/R)) comb steps, output register.
  localparam int LA = 2 + NA, LB = 2 + NB, LC = 2 + NC, LD = 3, LAT = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic va = 0, vb = 0, vc = 0;
  logic signed [IA-1:0] da = '0;
  logic signed [IB-1:0] db = '0;
  logic signed [IC-1:0] dc = '0;
  logic ova, ovb, ovc, ovd, sa, sb, sc, sd;
  logic signed [OA-1:0] qd;
  logic signed [OA-1:0] qa;
  logic signed [OB-1:0] qb;
  logic signed [OC-1:0] qc;

  cic_decimator #(.ORDER(NA), .DECIM(RA), .DIFF_DELAY(MA), .IN_W(IA), .OUT_W(OA)) dut_a (
    .clk, .rst_n, .in_valid(va), .in_data(da), .out_valid(ova), .out_data(qa), .out_sat(sa));
  cic_decimator #(.ORDER(NB), .DECIM(RB), .DIFF_DELAY(MB), .IN_W(IB), .OUT_W(OB)) dut_b (
    .clk, .rst_n, .in_valid(vb), .in_data(db), .out_valid(ovb), .out_data(qb), .out_sat(sb));
  cic_decimator #(.ORDER(NC), .DECIM(RC), .DIFF_DELAY(MC), .IN_W(IC), .OUT_W(OC)) dut_c (
    .clk, .rst_n, .in_valid(vc), .in_data(dc), .out_valid(ovc), .out_data(qc), .out_sat(sc));

  cic_decimator #(.ORDER(NA), .DECIM(RA), .DIFF_DELAY(MA), .IN_W(IA), .OUT_W(OA), .NSUB(NA)) dut_d (
    .clk, .rst_n, .in_valid(va), .in_data(da), .out_valid(ovd), .out_data(qd), .out_sat(sd));

  int checks = 0, failures = 0;
  lq_t xa, xb, xc, ya, yb, yc, yd;
  int ca = 0, cb = 0, cc = 0;
  logic [LAT:1] pa = '0, pb = '0, pc = '0;

  // Expected out_valid: LAT clocks after every R-th valid input.
  always @(posedge clk) begin
    if (rst_n) begin
      pa <= {pa[LAT-1:1], va && (ca % RA == RA - 1)};
      pb <= {pb[LAT-1:1], vb && (cb % RB == RB - 1)};
      pc <= {pc[LAT-1:1], vc && (cc % RC == RC - 1)};
      if (va) ca++;
      if (vb) cb++;
      if (vc) cc++;
    end
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL @%0t: %s", $time, msg);
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (ova !== pa[LA] || ovb !== pb[LB] || ovc !== pc[LC] || ovd !== pa[LD]) fail("out_valid latency");
      if (ovd) yd.push_back(qd);
      if (ova) ya.push_back(qa);
      if (ovb) yb.push_back(qb);
      if (ovc) yc.push_back(qc);
    end
  end

  task automatic compare(string name, lq_t x, lq_t y, int n, int r, int m, int w, int ow);
    lq_t full = conv_decim(x, cic_kernel(n, r, m), r, n - 1);
    longint e;
    bit s;
    bit full_scale = 0;
    checks++;
    if (y.size() != full.size()) fail($sformatf("%s: %0d outputs, expected %0d", name, y.size(), full.size()));
    for (int i = 0; i < y.size() && i < full.size(); i++) begin
      e = rnd_sat(full[i], w - ow, ow, s);
      if (e == -(longint'(1) << (ow - 1))) full_scale = 1;
      checks++;
      if (y[i] != e) fail($sformatf("%s output %0d: got %0d expected %0d", name, i, y[i], e));
    end
    checks++;
    if (!full_scale) fail($sformatf("%s: full-scale output never reached", name));
    $display("%s: %0d inputs, %0d outputs", name, x.size(), y.size());
  endtask

  function automatic logic [63:0] stim(int i, int w, int dc_len);
    return (i < dc_len) ? -(64'd1 << (w - 1)) : 64'($urandom);
  endfunction

  initial begin
    checks++;
    if (WA != 29 || WB != 14 || WC != 17) fail("register width rule");
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    fork
      for (int i = 0; i < 40 * RA; i++) begin
        logic signed [IA-1:0] d;
        d = IA'(stim(i, IA, 8 * RA));
        va <= 1; da <= d; xa.push_back(d);
        @(posedge clk);
      end
      for (int i = 0; i < 3000; i++) begin
        logic signed [IB-1:0] d;
        int gap;
        d = IB'(stim(i, IB, 8 * RB));
        vb <= 1; db <= d; xb.push_back(d);
        @(posedge clk);
        gap = $urandom_range(0, 1);
        if (gap > 0) begin
          vb <= 0;
          repeat (gap) @(posedge clk);
        end
        if (i == 2999) vb <= 0;
      end
      for (int i = 0; i < 3000; i++) begin
        logic signed [IC-1:0] d;
        int gap;
        d = IC'(stim(i, IC, 8 * RC * MC));
        vc <= 1; dc <= d; xc.push_back(d);
        @(posedge clk);
        gap = $urandom_range(0, 2);
        if (gap > 0) begin
          vc <= 0;
          repeat (gap) @(posedge clk);
        end
        if (i == 2999) vc <= 0;
      end
    join
    va <= 0; vb <= 0; vc <= 0;
    repeat (LAT + 2) @(posedge clk);
    compare("A (N=3, R=512)", xa, ya, NA, RA, MA, WA, OA);
    compare("B (N=4, R=8)", xb, yb, NB, RB, MB, WB, OB);
    compare("C (N=3, R=4, M=2)", xc, yc, NC, RC, MC, WC, OC);
    compare("D (N=3, R=512, unshared comb)", xa, yd, NA, RA, MA, WA, OA);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
