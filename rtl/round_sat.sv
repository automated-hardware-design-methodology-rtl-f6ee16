// round_sat: output quantiser of the filters (half-bit rounding, then
// saturation to the output width).
//
// A signed IN_W-bit accumulator value is scaled by 2^-SHIFT and brought to a
// signed OUT_W-bit result. For SHIFT > 0 the SHIFT lowest bits are dropped
// after adding half of the new LSB (round half up, "half-bit rounding"); for
// SHIFT <= 0 the value is shifted left by -SHIFT. A result that does not fit
// in OUT_W bits is clipped to the largest or smallest code and sat is raised.
// Rounding before quantisation follows the document's reference flow; the
// choice of saturation (rather than wrap-around) on overflow is this design's.
// Purely combinational: no clock, no latency.
module round_sat #(
  parameter int IN_W  = 24,
  parameter int OUT_W = 16,
  parameter int SHIFT = 8
) (
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout,
  output logic                    sat
);

  // Working width: the input, one bit for the rounding carry, and room for
  // a left shift.
  localparam int LSH = (SHIFT < 0) ? -SHIFT : 0;
  localparam int RSH = (SHIFT > 0) ? SHIFT : 0;
  localparam int WW  = (IN_W + LSH + 1 > OUT_W + 1) ? IN_W + LSH + 1 : OUT_W + 1;

  localparam logic signed [WW-1:0] MAXV = WW'((longint'(1) << (OUT_W - 1)) - 1);
  localparam logic signed [WW-1:0] MINV = -WW'(longint'(1) << (OUT_W - 1));

  logic signed [WW-1:0] ext, rnd, scaled;

  always_comb begin
    ext = WW'(din);
    if (RSH > 0) begin
      rnd    = ext + (WW'(1) <<< (RSH - 1));
      scaled = rnd >>> RSH;
    end else begin
      rnd    = ext;
      scaled = ext <<< LSH;
    end
    if (scaled > MAXV) begin
      dout = MAXV[OUT_W-1:0];
      sat  = 1'b1;
    end else if (scaled < MINV) begin
      dout = MINV[OUT_W-1:0];
      sat  = 1'b1;
    end else begin
      dout = scaled[OUT_W-1:0];
      sat  = 1'b0;
    end
  end

endmodule
