// filter_chain: seven-stage decimation chain, five CIC filters, one FIR
// filter and one polyphase decimator, overall rate change 1/64.
//
// How it works: each stage is one of the parameterised filters of this
// library, and the output stream of one is the input stream of the next. A
// stage advances only when its predecessor presents a sample (valid strobe),
// so the rates need no further control: each decimating stage halves the
// sample rate, and the stages further down have more clocks per sample.
// Stage configuration (order / decimation / input width / output width):
//   CIC1  4 / 2 /  2 ->  6      CIC4  8 / 2 / 15 -> 23
//   CIC2  4 / 2 /  6 -> 10      CIC5 14 / 2 / 23 -> 18
//   CIC3  5 / 2 / 10 -> 15      FIR   8 / 1 / 18 -> 18
//   POLY 122 / 2 / 18 -> 16
// CIC1 to CIC4 keep their full register width at the output; CIC5 rounds its
// 37-bit result to 18 bits. The FIR stage is a half-band-like low-pass with
// folded symmetric coefficients; the polyphase stage uses 62 shared MAC units.
//
// Interface and timing: in_valid/in_data carry the 2-bit input stream at up
// to one sample per clock; out_valid pulses once per 64 input samples with a
// 16-bit output. out_sat, valid with out_valid, is raised if the polyphase
// stage clipped this output or CIC5 or the FIR stage clipped a sample since
// the previous output.
// Asynchronous active-low reset.
//
// The stage types, orders, decimation rates and widths are those of the
// evaluated filter chain; the FIR and polyphase coefficients (Hamming-windowed
// low-pass designs, cutoffs 0.5 and 1/2 of Nyquist, 16-bit) and the strobe
// interface are this design's choices.
module filter_chain #(
  parameter int IN_W   = 2,
  parameter int OUT_W  = 16,
  parameter int COEF_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data,
  output logic                    out_sat
);

  localparam int W1 = 6, W2 = 10, W3 = 15, W4 = 23, W5 = 18, W6 = 18;

  logic                 v1, v2, v3, v4, v5, v6;
  logic signed [W1-1:0] d1;
  logic signed [W2-1:0] d2;
  logic signed [W3-1:0] d3;
  logic signed [W4-1:0] d4;
  logic signed [W5-1:0] d5;
  logic signed [W6-1:0] d6;
  logic                 s1, s2, s3, s4, s5, s6, s7;

  cic_decimator #(.ORDER(4), .DECIM(2), .IN_W(IN_W), .OUT_W(W1)) u_cic1 (
    .clk, .rst_n, .in_valid, .in_data, .out_valid(v1), .out_data(d1), .out_sat(s1));
  cic_decimator #(.ORDER(4), .DECIM(2), .IN_W(W1), .OUT_W(W2)) u_cic2 (
    .clk, .rst_n, .in_valid(v1), .in_data(d1), .out_valid(v2), .out_data(d2), .out_sat(s2));
  cic_decimator #(.ORDER(5), .DECIM(2), .IN_W(W2), .OUT_W(W3)) u_cic3 (
    .clk, .rst_n, .in_valid(v2), .in_data(d2), .out_valid(v3), .out_data(d3), .out_sat(s3));
  cic_decimator #(.ORDER(8), .DECIM(2), .IN_W(W3), .OUT_W(W4)) u_cic4 (
    .clk, .rst_n, .in_valid(v3), .in_data(d3), .out_valid(v4), .out_data(d4), .out_sat(s4));
  cic_decimator #(.ORDER(14), .DECIM(2), .IN_W(W4), .OUT_W(W5)) u_cic5 (
    .clk, .rst_n, .in_valid(v4), .in_data(d4), .out_valid(v5), .out_data(d5), .out_sat(s5));

  fir_filter #(.ORDER(8), .IN_W(W5), .OUT_W(W6), .COEF_W(COEF_W), .CUTOFF(0.5), .FOLD(1'b1)) u_fir (
    .clk, .rst_n, .in_valid(v5), .in_data(d5), .out_valid(v6), .out_data(d6), .out_sat(s6));

  polyphase_decimator #(.ORDER(122), .DECIM(2), .IN_W(W6), .OUT_W(OUT_W), .COEF_W(COEF_W),
                        .CUTOFF(0.5)) u_poly (
    .clk, .rst_n, .in_valid(v6), .in_data(d6), .out_valid, .out_data, .out_sat(s7));

  // Clipping seen in CIC5 or the FIR stage since the last output sample.
  logic clip_seen;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           clip_seen <= 1'b0;
    else if (out_valid)                   clip_seen <= 1'b0;
    else if ((v5 && s5) || (v6 && s6))    clip_seen <= 1'b1;
  end
  assign out_sat = s7 | clip_seen;

  // CIC1..CIC4 keep full precision, so their flags never rise.
  logic unused_sat;
  assign unused_sat = s1 | s2 | s3 | s4;

endmodule
