// tb_apnea_full: the peripheral top at its built size, with no parameter
// overrides: decimation by 500, filter sample every 1000 cycles of an
// 8 MHz f_clk, SPI clock of clk/16. clk runs 25/3 times faster than f_clk
// (66.67 MHz against 8 MHz, half periods of 15 and 125 time units), and the
// software model programs the timer load value 8331, which gives a period
// of 8333 clk cycles, i.e. 8 kHz. The input is a continuous breathing tone
// around the level-shifter reference of 1250. The model checks every
// interrupt period, every ADC frame, every DAC pair and, every 500
// interrupts, the envelope read back against its own filter model.
// 4000 interrupts give eight decimated envelope samples.
module tb_apnea_full;
  import apnea_pkg::*;
  localparam int N_ISR = 4000;

  logic clk = 0, f_clk = 0, rst = 1, f_rst = 1;
  bus_req_t m_req;
  bus_rsp_t m_rsp;
  logic irq, adc_sclk, adc_cs_n, adc_sdata, dac_sclk, dac_sync_n, dac_d1, dac_d2, env_strobe;
  logic [7:0] led_o, sw_i;
  logic signed [31:0] env;
  logic done;
  int checks, failures;

  apnea_periph_top dut (
    .clk, .rst, .f_clk, .f_rst, .m_req, .m_rsp, .irq, .led_o, .sw_i,
    .adc_sclk, .adc_cs_n, .adc_sdata, .dac_sclk, .dac_sync_n, .dac_d1, .dac_d2,
    .env, .env_strobe
  );

  apnea_sw_model #(.DECIM(500), .TLR(8331), .N_ISR(N_ISR), .APNEA_TIME(320),
                   .SAMPLE_TIME(10), .TONE_PERIOD(32), .SCENARIO(0)) sw (
    .clk, .rst, .m_req, .m_rsp, .irq, .led_o, .sw_i, .adc_sclk, .adc_cs_n, .adc_sdata,
    .dac_sclk, .dac_sync_n, .dac_d1, .dac_d2, .sample_tick(dut.sample_en),
    .env_strobe, .done, .checks, .failures
  );

  always #15 clk = ~clk;
  always #125 f_clk = ~f_clk;

  initial begin
    #(64'd30 * 8333 * (64'(N_ISR) + 20));
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
