// tb_filter_clk_div: runs the divider at its default HALF = 500 with an
// f_clk eight times slower than clk (8 MHz against 64 MHz). Checks that
// slow_clk first toggles 499 f_clk cycles after reset and then every 500,
// that sample_en is a single-cycle strobe once per slow_clk period
// (8000 clk cycles), and that it follows each rising edge of slow_clk by
// 2 to 3 clk cycles.
module tb_filter_clk_div;
  logic f_clk = 0, clk = 0, f_rst = 1, rst = 1;
  logic slow_clk, sample_en;
  int checks = 0, failures = 0;
  int fcyc = 0, ccyc = 0, last_tog = -1, last_se = -1, last_rise = -1, nse = 0;

  filter_clk_div dut (.f_clk, .f_rst, .clk, .rst, .slow_clk, .sample_en);

  always #8 f_clk = ~f_clk;
  always #1 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge f_clk) if (!f_rst) fcyc++;
  always @(slow_clk) if (!f_rst) begin
    checks++;
    if (last_tog < 0) begin
      if (fcyc != 499) begin failures++; $display("first toggle at %0d", fcyc); end
    end else if (fcyc - last_tog != 500) begin
      failures++; $display("toggle interval %0d", fcyc - last_tog);
    end
    last_tog = fcyc;
    if (slow_clk) last_rise = ccyc;
  end
  always @(posedge clk) if (!rst) begin
    ccyc++;
    if (sample_en) begin
      nse++;
      checks += 2;
      if (last_se >= 0 && ccyc - last_se != 8000) begin
        failures++; $display("strobe interval %0d", ccyc - last_se);
      end
      if (ccyc - last_rise < 2 || ccyc - last_rise > 4) begin
        failures++; $display("strobe latency %0d", ccyc - last_rise);
      end
      last_se = ccyc;
    end
  end

  initial begin
    repeat (3) @(posedge f_clk);
    @(negedge f_clk) begin f_rst = 0; rst = 0; end
    wait (nse == 5);
    checks++;
    if (last_tog < 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
