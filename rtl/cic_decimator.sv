// cic_decimator: cascaded integrator-comb decimation filter,
// H(z) = ((1 - z^-(R M)) / (1 - z^-1))^N, output rate = input rate / R.
//
// How it works: the input is sign-extended to W = IN_W + ceil(N log2(R M))
// bits and runs through N wrap-around integrators at the input rate
// (cic_integrator); every R-th integrator value goes to the comb section
// (cic_comb), whose N differentiators run at the low rate and share
// ceil(N / R) subtractors. The W-bit result, whose DC gain is (R M)^N, is
// brought to OUT_W bits by half-bit rounding of its lowest W - OUT_W bits
// (saturating only in the single case where rounding the largest value would
// overflow) and registered. There are no multipliers and no coefficients.
//
// Interface and timing: in_valid/in_data at up to one sample per clock;
// out_valid pulses once per R valid inputs. Latency from the R-th input of a
// frame to out_valid is 2 + ceil(N / NSUB) clocks (integrator output register,
// comb steps, output register). The output sample m is the full-rate CIC
// response at input index (m+1)R - 1 - (N-1); the extra N-1 samples are the
// integrator pipeline. Asynchronous active-low reset.
//
// The structure, register-width rule, comb resource sharing and the
// integrator and comb output registers follow the document; the reset,
// strobe interface and pipelining details are this design's.
module cic_decimator
  import filt_pkg::*;
#(
  parameter int ORDER      = 3,     // N
  parameter int DECIM      = 512,   // R
  parameter int DIFF_DELAY = 1,     // M
  parameter int IN_W       = 2,
  parameter int OUT_W      = 16,
  parameter int W          = cic_reg_width(IN_W, ORDER, DECIM, DIFF_DELAY),
  parameter int NSUB       = (ORDER + DECIM - 1) / DECIM
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data,
  output logic                    out_sat
);

  logic                iv;
  logic signed [W-1:0] id;
  logic                cv;
  logic signed [W-1:0] cd;
  logic                cbusy;
  logic signed [OUT_W-1:0] q;
  logic                q_sat;

  cic_integrator #(.ORDER(ORDER), .DECIM(DECIM), .IN_W(IN_W), .W(W)) u_int (
    .clk, .rst_n, .in_valid, .in_data, .out_valid(iv), .out_data(id)
  );

  cic_comb #(.ORDER(ORDER), .DECIM(DECIM), .DIFF_DELAY(DIFF_DELAY), .W(W), .NSUB(NSUB)) u_comb (
    .clk, .rst_n, .in_valid(iv), .in_data(id), .out_valid(cv), .out_data(cd), .busy(cbusy)
  );

  round_sat #(.IN_W(W), .OUT_W(OUT_W), .SHIFT(W - OUT_W)) u_q (
    .din(cd), .dout(q), .sat(q_sat)
  );

  // The counter spaces the integrator's outputs R valid inputs apart, which
  // leaves the shared comb enough clocks; a sample must never meet a busy comb.
  a_comb_ready: assert property (@(posedge clk) disable iff (!rst_n) !(iv && cbusy))
    else $error("cic_decimator: comb section still busy when the next sample arrived");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sat   <= 1'b0;
    end else begin
      out_valid <= cv;
      if (cv) begin
        out_data <= q;
        out_sat  <= q_sat;
      end
    end
  end

endmodule
