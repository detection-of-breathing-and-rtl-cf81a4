// tb_bandpass_fir: checks the 11-tap band-limiting FIR against a reference
// model written with plain integer arithmetic (16-bit wrapped pre-adds,
// 32-bit wrapped sum), with random samples, random enables, full-scale
// extremes that make the pre-adds wrap, and a reset in the middle.
module tb_bandpass_fir;
  logic clk = 0, rst = 1, en = 0;
  logic signed [15:0] din = 0;
  logic signed [31:0] dout;
  int checks = 0, failures = 0;
  shortint hist [11];                 // hist[0] = live input
  int unsigned cyc = 0;
  localparam int C [6] = '{1856, 3960, 9506, 16448, 22113, 24286};

  bandpass_fir dut (.clk, .rst, .en, .din, .dout);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
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
    for (int k = 0; k < 5; k++) begin
      p = shortint'(int'(hist[k]) + int'(hist[10-k]));
      acc += int'(p) * C[k];
    end
    acc += int'(hist[5]) * C[5];
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
    if (e && !rst) for (int i = 10; i > 0; i--) hist[i] = hist[i-1];
  endtask

  initial begin
    for (int i = 0; i < 11; i++) hist[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // impulse: output must walk through the coefficients
    step(1, 1);
    for (int i = 0; i < 12; i++) step(1, 0);
    for (int i = 0; i < 400; i++) step(($urandom % 4) != 0, shortint'($urandom));
    for (int i = 0; i < 40; i++) step(1, (i % 2) ? 16'sh7fff : -16'sh8000);
    for (int i = 0; i < 40; i++) step(1, 16'sh7fff);
    // reset clears the delay line
    @(negedge clk) begin rst = 1; en = 0; end
    @(negedge clk) rst = 0;
    for (int i = 0; i < 11; i++) hist[i] = 0;
    step(0, 100);
    for (int i = 0; i < 100; i++) step(1, shortint'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
