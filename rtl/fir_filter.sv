// fir_filter: direct-form FIR filter of order ORDER (ORDER+1 taps),
// y(n) = sum_k b_k x(n-k), fully parallel, one output per input sample.
//
// How it works: an ORDER-stage delay line holds the previous samples; the
// newest sample is taken straight from the input. All TAPS products are formed
// and summed in the same cycle (every loop fully unrolled, initiation interval
// one), and the sum goes through half-bit rounding and saturation into the
// output register. The coefficients are constants held inside the filter
// (parameter COEFS, by default a Hamming-windowed low-pass), so synthesis can
// turn each multiplication into shifts and adds. With FOLD = 1 the filter uses
// the symmetry b_k = b_(ORDER-k): the two samples sharing a coefficient are
// added first and multiplied once, halving the multipliers; elaboration stops
// with an error if the coefficients are not symmetric.
//
// Number formats: input, coefficients and output are signed fractions
// (IN_W-1, COEF_W-1 and OUT_W-1 fraction bits), so the filter's DC gain is the
// sum of the coefficients / 2^(COEF_W-1).
//
// Interface and timing: in_valid marks a sample on in_data. The filter
// advances only on valid samples; out_valid/out_data follow one clock after
// in_valid (latency 1, throughput 1 sample per clock). out_sat flags a result
// that was clipped. Reset is asynchronous, active low, and clears the delay
// line and the output.
//
// The structure, full unrolling, internal coefficients and folding follow the
// document. Coefficient width, cutoff, number formats, rounding mode,
// saturation and the valid strobe are this design's choices.
module fir_filter
  import filt_pkg::*;
#(
  parameter int          ORDER  = 8,
  parameter int          IN_W   = 18,
  parameter int          OUT_W  = 18,
  parameter int          COEF_W = 16,
  parameter real         CUTOFF = 0.5,
  parameter bit          FOLD   = 1'b1,
  parameter coef_table_t COEFS  = fir1_table(ORDER + 1, CUTOFF, COEF_W)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data,
  output logic                    out_sat
);

  localparam int TAPS   = ORDER + 1;
  localparam int NPAIR  = FOLD ? (TAPS + 1) / 2 : TAPS;  // multipliers used
  localparam int PROD_W = IN_W + 1 + COEF_W;
  localparam int ACC_W  = PROD_W + $clog2(TAPS + 1);
  localparam int SHIFT  = IN_W + COEF_W - 1 - OUT_W;

  if (TAPS > MAX_TAPS) begin : g_too_long
    $error("fir_filter: ORDER+1 exceeds filt_pkg::MAX_TAPS");
  end
  if (FOLD && !is_symmetric(COEFS, TAPS)) begin : g_not_sym
    $error("fir_filter: FOLD requires symmetric coefficients");
  end

  // Delay line: dl[k] holds x(n-k) for k = 1..ORDER (index 0 unused).
  logic signed [IN_W-1:0] dl [TAPS];
  logic signed [IN_W-1:0] tap [TAPS];
  logic signed [ACC_W-1:0] acc;
  logic signed [OUT_W-1:0] q;
  logic                    q_sat;

  always_comb begin
    tap[0] = in_data;
    for (int k = 1; k < TAPS; k++) tap[k] = dl[k];
  end

  // Sum of products; with folding, pre-add the mirrored pair.
  always_comb begin
    logic signed [IN_W:0]     pre;
    logic signed [COEF_W-1:0] cf;
    logic signed [PROD_W-1:0] prod;
    acc = '0;
    for (int k = 0; k < NPAIR; k++) begin
      if (FOLD && (k != TAPS - 1 - k))
        pre = (IN_W+1)'(tap[k]) + (IN_W+1)'(tap[TAPS-1-k]);
      else
        pre = (IN_W+1)'(tap[k]);
      cf   = COEF_W'(COEFS[k]);
      prod = pre * cf;
      acc  = acc + ACC_W'(prod);
    end
  end

  round_sat #(.IN_W(ACC_W), .OUT_W(OUT_W), .SHIFT(SHIFT)) u_q (
    .din(acc), .dout(q), .sat(q_sat)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) dl[k] <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sat   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        dl[0] <= '0;
        for (int k = 1; k < TAPS; k++) dl[k] <= tap[k-1];
        out_data <= q;
        out_sat  <= q_sat;
      end
    end
  end

endmodule
