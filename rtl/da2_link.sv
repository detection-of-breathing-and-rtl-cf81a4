// da2_link: joins two SPI masters onto the one port of the dual-channel
// DAC module.
//
// How it works: the DAC module holds two single-channel converters that share
// one serial clock and one active-low sync line, but each has its own data
// line. Channel 0's master drives data line 1 and channel 1's master drives
// data line 2. The shared clock is the OR of the two masters' clocks. The
// shared sync is the AND of their active-low selects, so the DAC is selected
// while either master selects it. Software therefore always updates both
// channels together, starting both masters back to back, and the two clocks
// must be close to aligned. The OR/AND joining follows the system as built;
// which signals are ORed is read from it as the serial clocks.
//
// Interface: purely combinational, no clock.
module da2_link (
  input  logic sclk0, mosi0, ss0_n,
  input  logic sclk1, mosi1, ss1_n,
  output logic dac_sclk,
  output logic dac_sync_n,
  output logic dac_d1,
  output logic dac_d2
);

  assign dac_sclk   = sclk0 | sclk1;
  assign dac_sync_n = ss0_n & ss1_n;
  assign dac_d1     = mosi0;
  assign dac_d2     = mosi1;

endmodule
