// bandpass_fir: first stage of the breath envelope filter, an 11-tap
// symmetric direct-form FIR that keeps the breathing band of the 8 kHz audio.
//
// How it works: a 10-entry delay line plus the live input form taps x0..x10.
// Mirror taps are added first (x0+x10, x1+x9, ... x4+x6), each pre-sum cut
// back to 16 bits, then multiplied by one of the six unique Q1.17
// coefficients (x5 is the centre tap). The 32-bit products are summed with
// 32-bit wrap-around. These word widths and the wrap-around are the
// behaviour of the fixed-point filter this block reproduces; there is no
// saturation.
//
// Interface: din is a signed 16-bit sample, dout the signed 32-bit result
// in Q14.17. The delay line shifts on a clock cycle with en high.
// Timing: dout is combinational in din and the delay line, so the new
// sample appears on dout in the cycle it is presented; the delay line is
// updated at the end of that cycle. Reset (synchronous, active high)
// clears the delay line.
module bandpass_fir
  import apnea_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  logic signed [15:0] din,
  output logic signed [31:0] dout
);

  localparam int NDLY = BPF_TAPS - 1;

  logic signed [15:0] dly [NDLY];
  logic signed [15:0] x   [BPF_TAPS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NDLY; i++) dly[i] <= '0;
    end else if (en) begin
      dly[0] <= din;
      for (int i = 1; i < NDLY; i++) dly[i] <= dly[i-1];
    end
  end

  always_comb begin
    x[0] = din;
    for (int i = 1; i < BPF_TAPS; i++) x[i] = dly[i-1];
  end

  always_comb begin
    logic signed [15:0] pre;
    logic signed [31:0] acc;
    acc = '0;
    for (int k = 0; k < BPF_UNIQ; k++) begin
      if (k < BPF_TAPS / 2) pre = 16'(x[k] + x[BPF_TAPS-1-k]);  // wraps
      else                  pre = x[k];                          // centre
      acc = 32'(acc + pre * BPF_COEF[k]);
    end
    dout = acc;
  end

endmodule
