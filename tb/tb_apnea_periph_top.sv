// tb_apnea_periph_top: end-to-end test of the peripheral top with the
// processor, ADC and DAC played by apnea_sw_model. Parameters are reduced
// so that the scenario fits a short simulation: the filter decimates by 8
// (instead of 500), a filter sample comes every 100 f_clk cycles (instead of
// 1000), the SPI clock is clk/8, the apnea limit is 64 envelope samples
// and the timer period is 800 clk cycles. With clk eight times faster than
// f_clk, that matches the filter's sample rate. The SPI clock is kept at
// clk/8 or slower because the two DAC masters start two clk cycles apart and
// their clocks are ORed: each SPI clock half period must outlast that skew. The scenario breathes, stops
// breathing until the apnea alarm and blinking LEDs, uses the silence
// switch and both DAC echo modes, then breathes again. Every mechanism is
// counted and must occur at least once.
module tb_apnea_periph_top;
  import apnea_pkg::*;
  localparam int DECIM = 8, FDIV_HALF = 50, APNEA = 64;
  localparam int N_ISR = DECIM * (200 + APNEA + 60 + 100);

  logic clk = 0, f_clk = 0, rst = 1, f_rst = 1;
  bus_req_t m_req;
  bus_rsp_t m_rsp;
  logic irq, adc_sclk, adc_cs_n, adc_sdata, dac_sclk, dac_sync_n, dac_d1, dac_d2, env_strobe;
  logic [7:0] led_o, sw_i;
  logic signed [31:0] env;
  logic done;
  int checks, failures;

  apnea_periph_top #(.DECIM(DECIM), .FDIV_HALF(FDIV_HALF), .SCK_RATIO(8)) dut (
    .clk, .rst, .f_clk, .f_rst, .m_req, .m_rsp, .irq, .led_o, .sw_i,
    .adc_sclk, .adc_cs_n, .adc_sdata, .dac_sclk, .dac_sync_n, .dac_d1, .dac_d2,
    .env, .env_strobe
  );

  apnea_sw_model #(.DECIM(DECIM), .TLR(2 * FDIV_HALF * 8 - 2), .N_ISR(N_ISR),
                   .APNEA_TIME(APNEA), .SAMPLE_TIME(5), .TONE_PERIOD(32), .SCENARIO(1)) sw (
    .clk, .rst, .m_req, .m_rsp, .irq, .led_o, .sw_i, .adc_sclk, .adc_cs_n, .adc_sdata,
    .dac_sclk, .dac_sync_n, .dac_d1, .dac_d2, .sample_tick(dut.sample_en),
    .env_strobe, .done, .checks, .failures
  );

  always #5 clk = ~clk;
  always #40 f_clk = ~f_clk;

  initial begin
    #(64'd10 * 800 * (N_ISR + 200));
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (4) @(posedge f_clk);
    @(negedge clk) begin rst = 0; f_rst = 0; end
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
