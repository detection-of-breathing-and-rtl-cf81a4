// tb_timing_controller: counts enabled cycles and checks that enb_1 strobes
// on the first sample after reset and then every DECIM samples, that enb_0
// strobes one sample before each enb_1 (from the second period on), and
// that enb follows clk_enable. Runs at the default DECIM = 500 with a
// random clk_enable pattern.
module tb_timing_controller;
  localparam int DECIM = 500;
  logic clk = 0, rst = 1, ce = 0;
  logic enb, enb_0, enb_1;
  int checks = 0, failures = 0;
  int n = 0;            // index of the enabled sample since reset
  int n0 = 0, n1 = 0;

  timing_controller dut (.clk, .rst, .clk_enable(ce), .enb, .enb_0, .enb_1);

  always #5 clk = ~clk;
  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    while (n < 3 * DECIM + 10) begin
      @(negedge clk);
      ce = ($urandom % 3) == 0;
      #1;
      checks++;
      if (enb !== ce) failures++;
      if (ce) begin
        // sample n: enb_1 when n % DECIM == 0, enb_0 when n % DECIM == DECIM-1
        checks += 2;
        if (enb_1 !== (n % DECIM == 0)) begin
          failures++; $display("enb_1 wrong at sample %0d", n);
        end
        if (enb_0 !== (n % DECIM == DECIM - 1)) begin
          failures++; $display("enb_0 wrong at sample %0d", n);
        end
        n0 += enb_0; n1 += enb_1;
        n++;
      end else begin
        checks++;
        if (enb_0 || enb_1) failures++;
      end
    end
    checks++;
    if (n1 != 4 || n0 != 3) begin
      failures++; $display("strobe counts %0d %0d", n0, n1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
