// cic_comb: comb section of a CIC decimation filter, N differentiators
// y = v - v(m - DIFF_DELAY) at the decimated rate, with shared subtractors.
//
// How it works: at the low rate a new sample arrives at most every R clocks,
// so the N comb stages need not run side by side. The section has
// NSUB = ceil(N / R) subtractors (by default) and works through the stages
// NSUB at a time, one group per clock: the running value passes through
// stages s, s+1, ..., each subtracting that stage's delayed input and pushing
// its own input into the stage's DIFF_DELAY-deep delay line. After
// STEPS = ceil(N / NSUB) clocks the result is complete. With N = 8 and R = 4,
// for example, two subtractors do the eight subtractions in four clocks. All
// arithmetic is W-bit two's complement and wraps, which is exact for the
// register width of a CIC filter.
//
// Interface and timing: in_valid/in_data take a sample; out_valid pulses with
// the result STEPS clocks later (out_data is registered). A new sample must
// not arrive while the section is still busy: an assertion checks this rule.
// Asynchronous active-low reset clears delay lines and state.
//
// The comb structure and the sharing of subtractors over the decimated
// sample period follow the document; the stage-group schedule and the
// strobe interface are this design's own.
module cic_comb #(
  parameter int ORDER      = 3,    // N
  parameter int DECIM      = 512,  // R, sets the default sharing
  parameter int DIFF_DELAY = 1,    // M
  parameter int W          = 29,
  parameter int NSUB       = (ORDER + DECIM - 1) / DECIM
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  output logic                out_valid,
  output logic signed [W-1:0] out_data,
  output logic                busy
);

  localparam int STEPS  = (ORDER + NSUB - 1) / NSUB;
  localparam int STEP_W = (STEPS > 1) ? $clog2(STEPS) : 1;

  // dly[s][d] holds the input of stage s from d+1 low-rate samples ago.
  logic signed [W-1:0] dly [ORDER][DIFF_DELAY];
  logic signed [W-1:0] work;       // value between stage groups
  logic [STEP_W-1:0]   step;       // group being processed while busy

  logic signed [W-1:0] grp_in;     // input of this clock's group
  logic [STEP_W-1:0]   grp;        // index of this clock's group
  logic                active;
  logic signed [W-1:0] stage_in  [NSUB];
  logic signed [W-1:0] grp_out;

  assign active = in_valid || busy;
  assign grp_in = busy ? work : in_data;
  assign grp    = busy ? step : '0;

  // One group of NSUB chained subtractors; stages past N pass through.
  always_comb begin
    logic signed [W-1:0] v;
    int s;
    v = grp_in;
    for (int u = 0; u < NSUB; u++) begin
      s = int'(grp) * NSUB + u;
      stage_in[u] = v;
      if (s < ORDER) v = v - dly[s][DIFF_DELAY-1];
    end
    grp_out = v;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < ORDER; s++)
        for (int d = 0; d < DIFF_DELAY; d++) dly[s][d] <= '0;
      work      <= '0;
      step      <= '0;
      busy      <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (active) begin
        for (int u = 0; u < NSUB; u++) begin
          if (int'(grp) * NSUB + u < ORDER) begin
            for (int d = DIFF_DELAY - 1; d > 0; d--)
              dly[int'(grp) * NSUB + u][d] <= dly[int'(grp) * NSUB + u][d-1];
            dly[int'(grp) * NSUB + u][0] <= stage_in[u];
          end
        end
        if (int'(grp) == STEPS - 1) begin
          busy      <= 1'b0;
          step      <= '0;
          out_valid <= 1'b1;
          out_data  <= grp_out;
        end else begin
          busy <= 1'b1;
          step <= grp + 1'b1;
          work <= grp_out;
        end
      end
    end
  end

  // Rate rule of the decimated stream: no new sample while busy.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && busy))
    else $error("cic_comb: input sample arrived while the comb section was busy");

endmodule
