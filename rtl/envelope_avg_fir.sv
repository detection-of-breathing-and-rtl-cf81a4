// envelope_avg_fir: last stage of the breath envelope filter, a 30-tap
// moving-average FIR that smooths the rectified, decimated signal into a
// breathing envelope.
//
// How it works: a 29-entry delay line plus the live input form taps
// x0..x29. Mirror taps are added in pairs (x0+x29, ... x14+x15), each
// pre-sum cut back to 16 bits, and every pair is multiplied by the same
// coefficient, 17476 in Q1.19 (about 1/30). The 15 products are summed with
// 32-bit wrap-around. Widths and wrap-around follow the fixed-point filter
// this block reproduces.
//
// Interface: din is a signed 16-bit magnitude sample, dout the signed
// 32-bit average in Q12.19. The delay line shifts on a cycle with en high.
// Timing: dout is combinational in din and the delay line; reset
// (synchronous, active high) clears the delay line.
module envelope_avg_fir
  import apnea_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  logic signed [15:0] din,
  output logic signed [31:0] dout
);

  localparam int NDLY  = AVG_TAPS - 1;
  localparam int NPAIR = AVG_TAPS / 2;

  logic signed [15:0] dly [NDLY];
  logic signed [15:0] x   [AVG_TAPS];

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
    for (int i = 1; i < AVG_TAPS; i++) x[i] = dly[i-1];
  end

  always_comb begin
    logic signed [15:0] pre;
    logic signed [31:0] acc;
    acc = '0;
    for (int k = 0; k < NPAIR; k++) begin
      pre = 16'(x[k] + x[AVG_TAPS-1-k]);  // wraps
      acc = 32'(acc + pre * AVG_COEF);
    end
    dout = acc;
  end

endmodule
