// round_sat_tb: checks the output quantiser against a 64-bit reference for a
// right shift with rounding, a left shift, and no shift, with random and
// boundary inputs, including results that must be clipped.
module round_sat_tb;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0, sats = 0;

  logic signed [23:0] a_in;  logic signed [15:0] a_out; logic a_sat;
  logic signed [11:0] b_in;  logic signed [15:0] b_out; logic b_sat;
  logic signed [9:0]  c_in;  logic signed [9:0]  c_out; logic c_sat;

  round_sat #(.IN_W(24), .OUT_W(16), .SHIFT(6))  dut_a (.din(a_in), .dout(a_out), .sat(a_sat));
  round_sat #(.IN_W(12), .OUT_W(16), .SHIFT(-3)) dut_b (.din(b_in), .dout(b_out), .sat(b_sat));
  round_sat #(.IN_W(10), .OUT_W(10), .SHIFT(0))  dut_c (.din(c_in), .dout(c_out), .sat(c_sat));

  task automatic check(string what, longint got, bit gsat, longint exp, bit esat);
    checks++;
    if (got != exp || gsat != esat) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d/%0b expected %0d/%0b", what, got, gsat, exp, esat);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit s;
    longint e;
    for (int i = 0; i < 3000; i++) begin
      case (i)
        0: a_in = 24'sh7FFFFF;
        1: a_in = 24'sh800000;
        2: a_in = 24'sd31;      // rounds down
        3: a_in = 24'sd32;      // exact half rounds up
        4: a_in = -24'sd32;     // exact half rounds up (towards zero here)
        5: a_in = -24'sd33;
        default: a_in = 24'($urandom);
      endcase
      b_in = 12'($urandom);
      c_in = 10'($urandom);
      #1;
      e = rnd_sat(longint'(a_in), 6, 16, s); sats += s; check("shift 6", a_out, a_sat, e, s);
      e = rnd_sat(longint'(b_in), -3, 16, s); sats += s; check("shift -3", b_out, b_sat, e, s);
      e = rnd_sat(longint'(c_in), 0, 10, s); check("shift 0", c_out, c_sat, e, s);
    end
    // Independent spot values of the rounding rule.
    a_in = 24'sd32; #1; check("32>>6", a_out, a_sat, 1, 0);
    a_in = 24'sd31; #1; check("31>>6", a_out, a_sat, 0, 0);
    a_in = -24'sd33; #1; check("-33>>6", a_out, a_sat, -1, 0);
    a_in = 24'sh7FFFFF; #1; check("max", a_out, a_sat, 32767, 1);
    b_in = -12'sd2048; #1; check("-2048<<3", b_out, b_sat, -16384, 0);
    checks++;
    if (sats == 0) begin failures++; $display("FAIL: clipping never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
