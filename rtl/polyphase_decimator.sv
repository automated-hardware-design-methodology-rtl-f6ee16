// polyphase_decimator: FIR decimation filter that computes only the outputs it
// keeps, y(m) = sum_k h_k x(mM + M - 1 - k), reusing a few multipliers over
// the M input samples that arrive per output.
//
// How it works: the TAPS = ORDER+1 coefficients are zero-padded to
// NMAC*M, where NMAC = ceil(TAPS / M) is the number of multiply-accumulate
// units. Write tap index k = i*M + j (i = 0..NMAC-1, j = 0..M-1). Over one
// output frame the filter sees M samples; when the sample that is j samples
// before the output instant arrives, MAC unit i multiplies the delay line at
// the fixed position i*M by coefficient h(i*M + j). The coefficient is chosen
// by the phase counter j through a multiplexer, so unit i realises the
// sub-filters one after another (the polyphase components E_j of the
// document's derivation), and each cycle's NMAC products are added to one
// accumulator. After the last sample of a frame (j = 0) the sum is rounded
// and saturated into the output register. Zero padding keeps the formula valid
// when TAPS is not a multiple of M. A filter of order 28 with M = 8 thus needs
// 4 multipliers instead of 29.
//
// Number formats as in fir_filter: signed fractions with IN_W-1, COEF_W-1 and
// OUT_W-1 fraction bits (a negative shift is used when OUT_W is wider).
//
// Interface and timing: in_valid marks an input sample; the filter advances
// only on valid samples, so it can sit behind another decimator. out_valid
// pulses for one clock, one clock after every M-th valid input (the first
// after the M-th input following reset). Asynchronous active-low reset clears
// the delay line, accumulator, phase and output.
//
// The MAC-unit count, the fixed-tap / rotating-coefficient sharing and the
// zero padding follow the document; coefficient width and values, rounding,
// saturation and the valid strobe are this design's choices.
module polyphase_decimator
  import filt_pkg::*;
#(
  parameter int          ORDER  = 122,
  parameter int          DECIM  = 2,
  parameter int          IN_W   = 18,
  parameter int          OUT_W  = 16,
  parameter int          COEF_W = 16,
  parameter real         CUTOFF = 1.0 / DECIM,
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
  localparam int NMAC   = (TAPS + DECIM - 1) / DECIM;  // shared MAC units
  localparam int PTAPS  = NMAC * DECIM;                // padded tap count
  localparam int DL_LEN = (NMAC - 1) * DECIM + 1;      // positions 0..(NMAC-1)*M
  localparam int PROD_W = IN_W + COEF_W;
  localparam int ACC_W  = PROD_W + $clog2(PTAPS + 1);
  localparam int SHIFT  = IN_W + COEF_W - 1 - OUT_W;
  localparam int PH_W   = (DECIM > 1) ? $clog2(DECIM) : 1;

  if (PTAPS > MAX_TAPS) begin : g_too_long
    $error("polyphase_decimator: padded tap count exceeds filt_pkg::MAX_TAPS");
  end

  // Coefficient of MAC unit i in phase j: coef_at(i, j) = h(i*M + j), zero
  // where i*M + j >= TAPS (coefficient padding).
  typedef logic signed [COEF_W-1:0] coef_t;
  function automatic coef_t coef_at(int i, int j);
    int k = i * DECIM + j;
    return (k < TAPS) ? COEF_W'(COEFS[k]) : '0;
  endfunction

  // dl[p] holds x(n-p) for p = 1..DL_LEN-1; position 0 is the input itself.
  logic signed [IN_W-1:0]  dl [DL_LEN];
  logic [PH_W-1:0]         phase;      // j: samples left until the output
  logic signed [ACC_W-1:0] acc, acc_next;
  logic signed [OUT_W-1:0] q;
  logic                    q_sat;

  always_comb begin
    logic signed [IN_W-1:0]   x;
    logic signed [COEF_W-1:0] c;
    logic signed [PROD_W-1:0] prod;
    acc_next = (phase == PH_W'(DECIM - 1)) ? '0 : acc;
    for (int i = 0; i < NMAC; i++) begin
      x = (i == 0) ? in_data : dl[i * DECIM];
      c = '0;
      for (int j = 0; j < DECIM; j++)
        if (phase == PH_W'(j)) c = coef_at(i, j);
      prod     = x * c;
      acc_next = acc_next + ACC_W'(prod);
    end
  end

  round_sat #(.IN_W(ACC_W), .OUT_W(OUT_W), .SHIFT(SHIFT)) u_q (
    .din(acc_next), .dout(q), .sat(q_sat)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < DL_LEN; p++) dl[p] <= '0;
      phase     <= PH_W'(DECIM - 1);
      acc       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sat   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        dl[0] <= '0;
        for (int p = 1; p < DL_LEN; p++) dl[p] <= (p == 1) ? in_data : dl[p-1];
        acc <= acc_next;
        if (phase == '0) begin
          phase     <= PH_W'(DECIM - 1);
          out_valid <= 1'b1;
          out_data  <= q;
          out_sat   <= q_sat;
        end else begin
          phase <= phase - 1'b1;
        end
      end
    end
  end

endmodule
