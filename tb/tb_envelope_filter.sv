// tb_envelope_filter: runs the whole envelope chain (band-limit, decimate,
// rectify, average) at a reduced decimation of 10 and compares out1 and
// ce_out on every cycle with a sample-level reference model built here from
// integer arithmetic. The input is an amplitude-modulated tone with random
// noise, so the decimated value is negative often enough to exercise the
// rectifier; the test counts those events, and also feeds full-scale
// samples so that the most negative value case of the rectifier is reached.
module tb_envelope_filter;
  localparam int D = 10;
  logic clk = 0, rst = 1, ce = 0;
  logic signed [15:0] in1 = 0;
  logic signed [31:0] out1;
  logic ce_out;
  int checks = 0, failures = 0;
  int n = 0, negs = 0;
  shortint xh [11];
  shortint ah [30];
  int hold = 0;
  localparam int C [6] = '{1856, 3960, 9506, 16448, 22113, 24286};

  envelope_filter #(.DECIM(D)) dut (.clk, .rst, .clk_enable(ce), .in1, .ce_out, .out1);

  always #5 clk = ~clk;
  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bpf();
    int acc = 0;
    for (int k = 0; k < 5; k++) acc += int'(shortint'(int'(xh[k]) + int'(xh[10-k]))) * C[k];
    return acc + int'(xh[5]) * C[5];
  endfunction
  function automatic shortint mag(int v);
    int a = (v < 0) ? -v : v;        // -(most negative) wraps back to itself
    return shortint'(a >>> 17);      // bits 31..17, sign-extended
  endfunction
  function automatic int avg(shortint live);
    int acc = 0;
    shortint t [30];
    t[0] = live;
    for (int i = 1; i < 30; i++) t[i] = ah[i-1];
    for (int k = 0; k < 15; k++) acc += int'(shortint'(int'(t[k]) + int'(t[29-k]))) * 17476;
    return acc;
  endfunction

  task automatic step(input logic e, input shortint x);
    int b, dec;
    logic p1, p0;
    @(negedge clk);
    ce = e; in1 = x;
    xh[0] = x;
    b = bpf();
    p1 = e && (n % D == 0);
    p0 = e && (n % D == D - 1);
    dec = p1 ? b : hold;
    #1;
    checks += 2;
    if (out1 !== avg(mag(dec))) begin
      failures++;
      if (failures < 10) $display("n=%0d out1=%0d exp=%0d", n, out1, avg(mag(dec)));
    end
    if (ce_out !== p1) failures++;
    @(posedge clk);
    if (e) begin
      if (p1) begin hold = b; if (b < 0) negs++; end
      if (p0) begin
        for (int i = 29; i > 0; i--) ah[i] = ah[i-1];
        ah[0] = mag(hold);
      end
      for (int i = 10; i > 0; i--) xh[i] = xh[i-1];
      n++;
    end
  endtask

  initial begin
    real ph;
    for (int i = 0; i < 11; i++) xh[i] = 0;
    for (int i = 0; i < 30; i++) ah[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 3000; i++) begin
      ph = 2.0 * 3.14159265 * i;
      step(1, shortint'($rtoi(12000.0 * (1.0 + $sin(ph / 700.0)) * $sin(ph * 0.05))
                      + int'($urandom % 200) - 100));
      if ($urandom % 4 == 0) step(0, shortint'($urandom));
    end
    for (int i = 0; i < 200; i++) step(1, (i % 3 == 0) ? -16'sh8000 : 16'sh7fff);
    checks++;
    if (negs == 0) begin failures++; $display("rectifier never saw a negative value"); end
    $display("decimated samples=%0d negative=%0d", n / D, negs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
