// envelope_filter: turns 8 kHz audio samples into a 16 Hz breathing envelope.
//
// How it works: the chain is band-limit, decimate, rectify, smooth.
//   1. bandpass_fir filters every input sample (11 taps, Q14.17 result).
//   2. A decimator keeps one band-limited sample in DECIM (500): on the enb_1
//      strobe the live FIR output is passed on and captured in a hold
//      register; at all other times the hold register is passed on.
//   3. The kept sample is rectified (two's-complement negation of negative
//      values, done in 33 bits and cut back to 32, so the most negative value
//      stays negative) and its bits [31:17] are taken as a signed 15-bit
//      integer, sign-extended to 16 bits. This drops the 17 fraction bits.
//   4. envelope_avg_fir averages the last 30 rectified values; its delay
//      line moves on the enb_0 strobe, one sample before the next capture.
// All of this chain, its word widths, and the strobe arrangement follow the
// fixed-point filter this block reproduces. It runs in a single clock domain:
// clk_enable marks the cycles that carry a new sample.
//
// Interface: in1 is a signed 16-bit bipolar sample, taken on a cycle with
// clk_enable high. out1 is the envelope, signed 32-bit Q12.19. ce_out
// strobes when the decimator captures.
// Timing: out1 is combinational in the state and changes only on sample
// cycles; a new decimated value reaches the averager DECIM-1 samples after
// it was captured. Reset is synchronous, active high.
//
// Lint note: neg[32] and abs_y[16:0] are left unused on purpose. The
// rectifier keeps only the 32-bit result of the negation and passes bits
// [31:17] of the magnitude on, as the reference filter did.
module envelope_filter #(
  parameter int unsigned DECIM = 500
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               clk_enable,
  input  logic signed [15:0] in1,
  output logic               ce_out,
  output logic signed [31:0] out1
);

  logic               enb, enb_0, enb_1;
  logic signed [31:0] bpf_out;
  logic signed [31:0] hold_q, dec_out;
  logic signed [32:0] neg;
  logic signed [31:0] abs_y;
  logic signed [15:0] mag;

  timing_controller #(.DECIM(DECIM)) u_tc (
    .clk, .rst, .clk_enable, .enb, .enb_0, .enb_1
  );

  bandpass_fir u_bpf (
    .clk, .rst, .en(enb), .din(in1), .dout(bpf_out)
  );

  // decimator hold register
  always_ff @(posedge clk) begin
    if (rst)        hold_q <= '0;
    else if (enb_1) hold_q <= bpf_out;
  end
  assign dec_out = enb_1 ? bpf_out : hold_q;

  // rectifier and scaling
  always_comb begin
    neg   = -(33'(dec_out));
    abs_y = (dec_out < 0) ? neg[31:0] : dec_out;
    mag   = 16'(signed'(abs_y[31:17]));
  end

  envelope_avg_fir u_avg (
    .clk, .rst, .en(enb_0), .din(mag), .dout(out1)
  );

  assign ce_out = enb_1;

endmodule
