// tb_envelope_avg_fir: checks the 30-tap moving average against an integer
// reference model (16-bit wrapped pairwise pre-adds, coefficient 17476,
// 32-bit wrapped sum): a step response, random magnitudes with random
// enables, wrap-provoking extremes and a reset.
module tb_envelope_avg_fir;
  logic clk = 0, rst = 1, en = 0;
  logic signed [15:0] din = 0;
  logic signed [31:0] dout;
  int checks = 0, failures = 0;
  shortint hist [30];

  envelope_avg_fir dut (.clk, .rst, .en, .din, .dout);

  always #5 clk = ~clk;
  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model();
    int acc = 0;
    shortint p;
    for (int k = 0; k < 15; k++) begin
      p = shortint'(int'(hist[k]) + int'(hist[29-k]));
      acc += int'(p) * 17476;
    end
    return acc;
  endfunction

  task automatic step(input logic e, input shortint x);
    @(negedge clk);
    en = e; din = x; hist[0] = x;
    #1;
    checks++;
    if (dout !== model()) begin
      failures++;
      if (failures < 10) $display("mismatch: dout=%0d expected=%0d", dout, model());
    end
    @(posedge clk);
    if (e && !rst) for (int i = 29; i > 0; i--) hist[i] = hist[i-1];
  endtask

  initial begin
    for (int i = 0; i < 30; i++) hist[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // step of 1000: after 30 samples the average is 30*1000*17476 / 2^19 ~ 1000
    for (int i = 0; i < 35; i++) step(1, 1000);
    checks++;
    if ((dout >>> 19) != 999 && (dout >>> 19) != 1000) begin
      failures++;
      $display("step average wrong: %0d", dout >>> 19);
    end
    for (int i = 0; i < 400; i++) step(($urandom % 3) != 0, shortint'($urandom % 32768));
    for (int i = 0; i < 60; i++) step(1, 16'sh7fff);
    @(negedge clk) begin rst = 1; en = 0; end
    @(negedge clk) rst = 0;
    for (int i = 0; i < 30; i++) hist[i] = 0;
    step(0, 5);
    for (int i = 0; i < 60; i++) step(1, shortint'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
