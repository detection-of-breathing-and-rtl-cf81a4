// filter_clk_div: derives the 8 kHz sample strobe of the sound filter from
// the 8 MHz filter clock.
//
// How it works: in the f_clk domain a counter (reset value 1) runs from 0 to
// HALF-1 and toggles slow_clk every time it wraps, so slow_clk has a period
// of 2*HALF f_clk cycles (1000 cycles: 8 MHz / 1000 = 8 kHz). The reset
// value, the count of 500 and the toggle are as the filter's divider was
// built. Instead of clocking the filter with slow_clk, this design passes
// slow_clk through a two-flop synchroniser into the bus clock domain and
// turns each rising edge into a one-cycle sample_en strobe there, so that all
// filter state lives in the bus clock domain.
//
// Interface: f_clk/f_rst (divider domain), clk/rst (bus domain, both resets
// synchronous active high), slow_clk (the divided clock, for observation)
// and sample_en (strobe in the clk domain).
// Timing: sample_en follows a rising edge of slow_clk by two to three clk
// cycles; clk must be faster than 2*f_clk/HALF.
module filter_clk_div #(
  parameter int unsigned HALF = 500
) (
  input  logic f_clk,
  input  logic f_rst,
  input  logic clk,
  input  logic rst,
  output logic slow_clk,
  output logic sample_en
);

  localparam int CW = (HALF > 1) ? $clog2(HALF) : 1;

  logic [CW-1:0] div_count;

  always_ff @(posedge f_clk) begin
    if (f_rst) begin
      div_count <= CW'(1);
      slow_clk  <= 1'b0;
    end else if (div_count == CW'(HALF - 1)) begin
      div_count <= '0;
      slow_clk  <= ~slow_clk;
    end else begin
      div_count <= div_count + 1'b1;
    end
  end

  logic [2:0] sync_q;  // [0],[1] synchroniser, [2] edge detect

  always_ff @(posedge clk) begin
    if (rst) sync_q <= '0;
    else     sync_q <= {sync_q[1:0], slow_clk};
  end

  assign sample_en = sync_q[1] & ~sync_q[2];

endmodule
