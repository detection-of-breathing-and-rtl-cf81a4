// tb_spi_master: drives one SPI master with the register sequences of the
// sampling software. The read sequence fetches two bytes from the ADC model
// with the slave select held low by software, and must return the model's
// 12-bit value. The write sequence sends a 12-bit word in two bytes to a
// DAC model and must update it with that word. Also checks the sclk period
// (SCK_RATIO = 16 clk cycles), that nothing shifts while the master is
// inhibited, the TX-empty and RX-empty status bits and the IPISR flag.
module tb_spi_master;
  import apnea_pkg::*;
  logic clk = 0, rst = 1;
  bus_req_t req;
  bus_rsp_t rsp;
  logic sclk, mosi, miso, ss_n;
  logic [11:0] adc_val = 0;
  int frames, updates;
  logic [11:0] dac1, dac2;
  int checks = 0, failures = 0;
  longint cyc = 0, last_rise = -1;
  int bad_period = 0, rises = 0;

  spi_master dut (.clk, .rst, .req, .rsp, .sclk, .mosi, .miso, .ss_n);
  ad1_model adc (.sclk, .cs_n(ss_n), .sdata(miso), .value(adc_val), .frames);
  da2_model dac (.sclk, .sync_n(ss_n), .d1(mosi), .d2(1'b0), .out1(dac1), .out2(dac2), .updates);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(posedge sclk) begin
    if (rises % 8 != 0 && cyc - last_rise != 16) bad_period++;  // within a byte
    rises++;
    last_rise = cyc;
  end
  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    req = '{valid: 1, wr: 1, addr: {8'h40, a}, wdata: d, be: 4'hf};
    @(negedge clk) req.valid = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    req = '{valid: 1, wr: 0, addr: {8'h40, a}, wdata: 0, be: 4'hf};
    #1 d = rsp.rdata;
    @(negedge clk) req.valid = 0;
  endtask
  task automatic wait_tx_empty();
    logic [31:0] s;
    do rd(SPI_SR, s); while (!s[SPISR_TX_EMPTY]);
  endtask
  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // the software's two-byte read
  task automatic spi_in(output int v);
    logic [31:0] hi, lo, s;
    int r0;
    wr(SPI_CR, 32'h194);
    wr(SPI_DTR, 32'h0F);
    wr(SPI_SSR, 32'hFFF);
    wr(SPI_CR, 32'h196);
    wr(SPI_SSR, 0);
    r0 = rises;
    repeat (50) @(posedge clk);
    check(rises == r0, "no shifting while inhibited");
    wr(SPI_CR, 32'h096);
    wait_tx_empty();
    wr(SPI_CR, 32'h196);
    rd(SPI_SR, s); check(!s[SPISR_RX_EMPTY], "RX not empty after a transfer");
    rd(SPI_DRR, hi);
    rd(SPI_SR, s); check(s[SPISR_RX_EMPTY], "RX empty after reading DRR");
    wr(SPI_DTR, 32'h0F);
    wr(SPI_CR, 32'h096);
    wait_tx_empty();
    wr(SPI_CR, 32'h196);
    rd(SPI_DRR, lo);
    wr(SPI_SSR, 32'hFFF);
    wr(SPI_CR, 32'h194);
    v = int'((hi[7:0] << 8) | lo[7:0]);
  endtask

  // the software's two-byte write
  task automatic spi_out(input int value);
    logic [31:0] ip;
    value &= 'hFFF;
    wr(SPI_CR, 32'h194);
    wr(SPI_DTR, value >> 8);
    wr(SPI_SSR, 32'hFFF);
    wr(SPI_CR, 32'h196);
    wr(SPI_SSR, 0);
    wr(SPI_CR, 32'h096);
    wait_tx_empty();
    wr(SPI_CR, 32'h196);
    rd(SPI_IPISR, ip); check(ip[2], "IPISR flag set");
    wr(SPI_IPISR, 32'hFF);
    rd(SPI_IPISR, ip); check(!ip[2], "IPISR flag cleared");
    wr(SPI_DTR, value & 'hFF);
    wr(SPI_CR, 32'h096);
    wait_tx_empty();
    wr(SPI_CR, 32'h196);
    wr(SPI_IPISR, 32'hFF);
    wr(SPI_SSR, 32'hFFF);
    wr(SPI_CR, 32'h194);
  endtask

  initial begin
    int v;
    req = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check(ss_n == 1'b1, "slave deselected after reset");
    for (int i = 0; i < 8; i++) begin
      adc_val = 12'($urandom);
      if (i == 0) adc_val = 12'hFFF;
      if (i == 1) adc_val = 12'h000;
      spi_in(v);
      check(v == int'(adc_val), $sformatf("ADC read %h expected %h", v, adc_val));
    end
    check(frames == 8, "ADC frames");
    for (int i = 0; i < 8; i++) begin
      v = int'($urandom) & 'hFFF;
      spi_out(v);
      check(dac1 == 12'(v), $sformatf("DAC got %h expected %h", dac1, v));
    end
    check(updates == 16, "DAC updates");  // the ADC reads share ss_n here
    check(bad_period == 0 && rises == 16 * 16, $sformatf("sclk rises %0d, bad %0d", rises, bad_period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
