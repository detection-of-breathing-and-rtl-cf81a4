// timing_controller: clock-enable generator of the breath envelope filter.
//
// How it works: a modulo-DECIM counter (reset value 1) advances on every
// sample enable. Two phase flags are registered from it: phase0 is set for
// the sample after the counter read DECIM-1, phase1 for the sample after it
// read 0. phase1 comes out of reset set, so the very first sample is a
// phase1 sample. The outputs are the phase flags gated with the sample
// enable, so each is a one-cycle strobe once every DECIM samples; phase1
// follows phase0 by one sample. DECIM = 500 is the decimation of the
// filter chain; the reset values and phase arrangement follow the
// fixed-point model this filter reproduces.
//
// Interface: clk_enable is the sample strobe; enb repeats it, enb_0 strobes
// the decimated-rate stage, enb_1 the decimator's capture. Reset is
// synchronous, active high.
module timing_controller #(
  parameter int unsigned DECIM = 500
) (
  input  logic clk,
  input  logic rst,
  input  logic clk_enable,
  output logic enb,
  output logic enb_0,
  output logic enb_1
);

  localparam int CW = $clog2(DECIM);

  logic [CW-1:0] count;
  logic          phase0, phase1;

  always_ff @(posedge clk) begin
    if (rst) begin
      count  <= CW'(1);
      phase0 <= 1'b0;
      phase1 <= 1'b1;
    end else if (clk_enable) begin
      count  <= (count == CW'(DECIM - 1)) ? '0 : count + 1'b1;
      phase0 <= (count == CW'(DECIM - 1));
      phase1 <= (count == '0);
    end
  end

  assign enb   = clk_enable;
  assign enb_0 = phase0 & clk_enable;
  assign enb_1 = phase1 & clk_enable;

endmodule
