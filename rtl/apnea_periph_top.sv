// apnea_periph_top: the programmable-logic side of the infant breathing
// monitor, everything on the processor's peripheral bus.
//
// What it does: a soft processor (outside this module) takes one audio
// sample per 8 kHz timer interrupt from the ADC over SPI and writes it to
// the sound filter. Every 500 interrupts it reads back the breathing
// envelope, looks for a peak and keeps the time since the last breath on the
// LEDs. The processor also drives the DAC (a test output plus the reference
// voltage of the microphone level shifter), reads the switches and sounds
// the alarm. This module holds all the hardware it talks to:
//   - periph_bus   address decoder, seven windows selected by addr[15:12]
//   - gpio_port    x2: LEDs (window 0) and DIP switches (window 1)
//   - spi_master   x3: DAC channel 0 (window 2), DAC channel 1 (window 3),
//                  ADC (window 4)
//   - da2_link     joins the two DAC masters onto the dual-DAC module port
//   - sound_filter the envelope filter peripheral (window 5), clocked by
//                  the sample strobe of filter_clk_div
//   - interval_timer the sampling-interrupt timer (window 6)
// The set of peripherals follows the system as built; the window layout,
// the same-cycle bus and the single-clock filter with a synchronised
// sample strobe are this design's choices.
//
// Interface: clk/rst is the processor clock domain (66.67 MHz in the built
// system), f_clk/f_rst the 8 MHz filter clock; both resets synchronous,
// active high. m_req/m_rsp is the processor's bus port (same-cycle
// acknowledge), irq the timer interrupt. led_o/sw_i are the board LEDs and
// switches, adc_* the ADC module's SPI port, dac_* the dual-DAC module port.
// env/env_strobe expose the filter's envelope and decimation strobe.
//
// Unused signals, on purpose: led_t (the LED port is always driven, the
// tri-state setting only affects read-back), sw_o/sw_t (the switch port is
// input only), adc_mosi (the ADC module has no data input) and slow_clk
// (the divided clock is exported by filter_clk_div for boards that want it
// on a pin; here only its synchronised edge strobe is used).
module apnea_periph_top
  import apnea_pkg::*;
#(
  parameter int unsigned DECIM     = 500,  // filter decimation
  parameter int unsigned FDIV_HALF = 500,  // f_clk half-periods per sample
  parameter int unsigned SCK_RATIO = 16    // clk cycles per SPI clock
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               f_clk,
  input  logic               f_rst,
  input  bus_req_t           m_req,
  output bus_rsp_t           m_rsp,
  output logic               irq,
  output logic [7:0]         led_o,
  input  logic [7:0]         sw_i,
  output logic               adc_sclk,
  output logic               adc_cs_n,
  input  logic               adc_sdata,
  output logic               dac_sclk,
  output logic               dac_sync_n,
  output logic               dac_d1,
  output logic               dac_d2,
  output logic signed [31:0] env,
  output logic               env_strobe
);

  bus_req_t s_req [NUM_PERIPH];
  bus_rsp_t s_rsp [NUM_PERIPH];

  periph_bus u_bus (.m_req, .m_rsp, .s_req, .s_rsp);

  // LEDs: pins read back what they drive; tri-state only matters on reads
  logic [7:0] led_t, sw_o, sw_t;
  gpio_port #(.WIDTH(8)) u_leds (
    .clk, .rst, .req(s_req[int'(SEL_LEDS)]), .rsp(s_rsp[int'(SEL_LEDS)]),
    .gpio_i(led_o), .gpio_o(led_o), .gpio_t(led_t)
  );
  gpio_port #(.WIDTH(8)) u_switches (
    .clk, .rst, .req(s_req[int'(SEL_SWITCHES)]), .rsp(s_rsp[int'(SEL_SWITCHES)]),
    .gpio_i(sw_i), .gpio_o(sw_o), .gpio_t(sw_t)
  );

  // DAC: two masters share one module port
  logic sclk0, mosi0, ss0_n, sclk1, mosi1, ss1_n;
  spi_master #(.SCK_RATIO(SCK_RATIO)) u_dac0 (
    .clk, .rst, .req(s_req[int'(SEL_DAC0)]), .rsp(s_rsp[int'(SEL_DAC0)]),
    .sclk(sclk0), .mosi(mosi0), .miso(1'b0), .ss_n(ss0_n)
  );
  spi_master #(.SCK_RATIO(SCK_RATIO)) u_dac1 (
    .clk, .rst, .req(s_req[int'(SEL_DAC1)]), .rsp(s_rsp[int'(SEL_DAC1)]),
    .sclk(sclk1), .mosi(mosi1), .miso(1'b0), .ss_n(ss1_n)
  );
  da2_link u_da2 (
    .sclk0, .mosi0, .ss0_n, .sclk1, .mosi1, .ss1_n,
    .dac_sclk, .dac_sync_n, .dac_d1, .dac_d2
  );

  // ADC: receive only
  logic adc_mosi;
  spi_master #(.SCK_RATIO(SCK_RATIO)) u_adc (
    .clk, .rst, .req(s_req[int'(SEL_ADC)]), .rsp(s_rsp[int'(SEL_ADC)]),
    .sclk(adc_sclk), .mosi(adc_mosi), .miso(adc_sdata), .ss_n(adc_cs_n)
  );

  // sound filter and its sample strobe
  logic slow_clk, sample_en;
  filter_clk_div #(.HALF(FDIV_HALF)) u_div (
    .f_clk, .f_rst, .clk, .rst, .slow_clk, .sample_en
  );
  sound_filter #(.DECIM(DECIM)) u_filter (
    .clk, .rst, .sample_en, .req(s_req[int'(SEL_FILTER)]), .rsp(s_rsp[int'(SEL_FILTER)]),
    .env, .env_strobe
  );

  interval_timer u_timer (
    .clk, .rst, .req(s_req[int'(SEL_TIMER)]), .rsp(s_rsp[int'(SEL_TIMER)]), .irq
  );

endmodule
