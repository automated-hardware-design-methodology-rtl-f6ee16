// filter_chain_tb: end-to-end test of the seven-stage decimation chain at its
// default parameters. It feeds 19200 two-bit samples (a full-scale negative
// stretch, then a dithered two-tone sine quantised to two bits, then random
// samples) on every clock and compares the output of every stage with a
// reference chain computed on 64-bit integers: CIC stages as convolutions
// with their boxcar kernels, the FIR and polyphase stages as direct
// convolutions, each followed by round-half-up and clipping to the stage's
// output width.
// It counts, and requires at least once: the decimation of every stage
// (exactly one output per two inputs), two's-complement wrap-around in the
// first CIC's integrators, the shared comb schedule of CIC5 (a second
// subtractor pass), and the polyphase accumulation phase (inputs that do not
// produce an output).
module filter_chain_tb;
  import filt_pkg::*;
  import tb_ref_pkg::*;

  localparam int NIN = 64 * 300;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0;
  logic signed [1:0] in_data = '0;
  logic out_valid, out_sat;
  logic signed [15:0] out_data;

  filter_chain dut (.clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data, .out_sat);

  int checks = 0, failures = 0;
  lq_t x;
  lq_t y [7];
  int comb_busy = 0, poly_acc_phase = 0, sat_count = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("FAIL @%0t: %s", $time, msg);
  endtask

  initial begin : watchdog
    repeat (NIN + 5000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Collect every stage's output stream.
  always @(negedge clk) begin
    if (rst_n) begin
      if (dut.v1) y[0].push_back(dut.d1);
      if (dut.v2) y[1].push_back(dut.d2);
      if (dut.v3) y[2].push_back(dut.d3);
      if (dut.v4) y[3].push_back(dut.d4);
      if (dut.v5) y[4].push_back(dut.d5);
      if (dut.v6) y[5].push_back(dut.d6);
      if (out_valid) begin
        y[6].push_back(out_data);
        if (out_sat) sat_count++;
      end
      if (dut.u_cic5.u_comb.busy) comb_busy++;
      if (dut.u_poly.in_valid && dut.u_poly.phase != '0) poly_acc_phase++;
    end
  end

  function automatic lq_t quant(lq_t v, int shift, int w);
    lq_t r;
    bit s;
    foreach (v[i]) r.push_back(rnd_sat(v[i], shift, w, s));
    return r;
  endfunction

  function automatic lq_t table_q(coef_table_t t, int taps);
    lq_t h;
    for (int k = 0; k < taps; k++) h.push_back(t[k]);
    return h;
  endfunction

  initial begin
    lq_t r [7];
    lq_t s1, s2, s3, s4;
    int wraps = 0;
    int order [5] = '{4, 4, 5, 8, 14};
    int inw [5]   = '{2, 6, 10, 15, 23};
    int outw [5]  = '{6, 10, 15, 23, 18};
    int regw;
    lq_t prev;

    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < NIN; n++) begin
      real a;
      int q;
      if (n < 2048) q = -2;
      else if (n < 12000) begin
        a = 1.2 * $sin(2.0 * 3.14159265 * n / 900.0) + 0.6 * $sin(2.0 * 3.14159265 * n / 157.0)
            + (real'($urandom_range(0, 1000)) / 1000.0 - 0.5);
        q = (a >= 1.0) ? 1 : (a >= 0.0) ? 0 : (a >= -1.0) ? -1 : -2;
      end else q = int'($urandom_range(0, 3)) - 2;
      in_valid <= 1;
      in_data <= 2'(q);
      x.push_back(q);
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (400) @(posedge clk);

    // Reference chain.
    prev = x;
    for (int st = 0; st < 5; st++) begin
      regw = cic_reg_width(inw[st], order[st], 2, 1);
      r[st] = quant(conv_decim(prev, cic_kernel(order[st], 2, 1), 2, order[st] - 1),
                    regw - outw[st], outw[st]);
      prev = r[st];
    end
    r[5] = quant(conv_decim(r[4], table_q(fir1_table(9, 0.5, 16), 9), 1, 0), 18 + 16 - 1 - 18, 18);
    r[6] = quant(conv_decim(r[5], table_q(fir1_table(123, 0.5, 16), 123), 2, 0), 18 + 16 - 1 - 16, 16);

    for (int st = 0; st < 7; st++) begin
      int bad = 0;
      checks++;
      if (y[st].size() != r[st].size())
        fail($sformatf("stage %0d: %0d outputs, expected %0d", st + 1, y[st].size(), r[st].size()));
      for (int i = 0; i < y[st].size() && i < r[st].size(); i++) begin
        checks++;
        if (y[st][i] != r[st][i]) begin
          bad++;
          fail($sformatf("stage %0d output %0d: got %0d expected %0d", st + 1, i, y[st][i], r[st][i]));
        end
      end
      $display("stage %0d: %0d outputs, %0d mismatches", st + 1, y[st].size(), bad);
    end
    checks++;
    if (y[6].size() != NIN / 64) fail("overall decimation is not 64");

    // Wrap-around in CIC1's integrators: unbounded running sums leave 6 bits.
    foreach (x[n]) begin
      s1.push_back(x[n] + (n > 0 ? s1[n-1] : 0));
      s2.push_back(s1[n] + (n > 0 ? s2[n-1] : 0));
      s3.push_back(s2[n] + (n > 0 ? s3[n-1] : 0));
      s4.push_back(s3[n] + (n > 0 ? s4[n-1] : 0));
      if (s4[n] != wrap(s4[n], 6)) wraps++;
    end

    $display("mechanisms: integrator wraps=%0d, shared comb passes=%0d, polyphase accumulate-only inputs=%0d, clipped outputs=%0d",
             wraps, comb_busy, poly_acc_phase, sat_count);
    checks++; if (wraps == 0)          fail("integrator wrap-around never happened");
    checks++; if (comb_busy == 0)      fail("shared comb schedule never used");
    checks++; if (poly_acc_phase == 0) fail("polyphase accumulation phase never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
