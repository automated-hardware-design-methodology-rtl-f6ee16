// cic_integrator: integrator section and rate-change counter of a CIC
// decimation filter.
//
// How it works: the input is sign-extended to the register width W and passed
// through N integrators, acc_1 += x and acc_i += acc_(i-1). Every integrator
// feeds the next from its register, so the adders form a straight pipeline
// with no adder chain between registers; this adds N-1 samples of delay and
// leaves the transfer function 1/(1 - z^-1)^N otherwise unchanged. The adders
// wrap around in two's complement: overflow in the integrators is harmless as
// long as W is at least in_w + ceil(N log2(M R)), because the comb section
// removes it again. A counter of the valid input samples passes every R-th
// value of the last integrator into the section's output register.
//
// Interface and timing: the section advances on in_valid only. When the
// counter reaches R-1, out_data is loaded with the last integrator's new value
// and out_valid pulses one clock later; this value is the N-fold running sum
// up to input sample n-(N-1), where n counts valid samples from 0 after reset.
// Asynchronous active-low reset clears integrators and counter.
//
// The integrator chain, wrap-around arithmetic, register width rule, counter
// and output register follow the document; the exact pipelining of the stages
// and the strobe interface are this design's reading of it.
module cic_integrator #(
  parameter int ORDER = 3,    // N
  parameter int DECIM = 512,  // R
  parameter int IN_W  = 2,
  parameter int W     = 29
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IN_W-1:0] in_data,
  output logic                 out_valid,
  output logic signed [W-1:0]  out_data
);

  localparam int CNT_W = (DECIM > 1) ? $clog2(DECIM) : 1;

  logic signed [W-1:0] acc [ORDER];
  logic signed [W-1:0] acc_next [ORDER];
  logic [CNT_W-1:0]    cnt;

  always_comb begin
    acc_next[0] = acc[0] + W'(in_data);
    for (int i = 1; i < ORDER; i++) acc_next[i] = acc[i] + acc[i-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ORDER; i++) acc[i] <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        for (int i = 0; i < ORDER; i++) acc[i] <= acc_next[i];
        if (cnt == CNT_W'(DECIM - 1)) begin
          cnt       <= '0;
          out_valid <= 1'b1;
          out_data  <= acc_next[ORDER-1];
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
