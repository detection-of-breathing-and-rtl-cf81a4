// tb_interval_timer: programs the timer the way the sampling software does
// (TLR = 66,666,700 / 8000 - 2 = 8331, TCSR = 0x20 then 0xD2) and checks
// that the interrupt arrives every TLR + 2 = 8333 clock cycles (8 kHz at
// 66.67 MHz), that reading TCSR and writing it back clears it, and that the
// flag is visible in TCSR bit 8. Then checks one-shot mode (no auto reload:
// one interrupt, then the timer stops) and that ENIT = 0 masks the output.
module tb_interval_timer;
  import apnea_pkg::*;
  logic clk = 0, rst = 1;
  bus_req_t req;
  bus_rsp_t rsp;
  logic irq;
  int checks = 0, failures = 0;
  longint cyc = 0;

  interval_timer dut (.clk, .rst, .req, .rsp, .irq);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    req = '{valid: 1, wr: 1, addr: {8'h60, a}, wdata: d, be: 4'hf};
    @(negedge clk) req.valid = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    req = '{valid: 1, wr: 0, addr: {8'h60, a}, wdata: 0, be: 4'hf};
    #1 d = rsp.rdata;
    @(negedge clk) req.valid = 0;
  endtask
  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    logic [31:0] st;
    longint t_prev, t_now;
    req = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wr(TMR_TLR, 66_666_700 / 8000 - 2);
    rd(TMR_TLR, st); check(st == 8331, "TLR readback");
    wr(TMR_TCSR, 32'h20);
    wr(TMR_TCSR, 32'hD2);
    check(!irq, "no interrupt right after start");
    @(posedge irq); t_prev = cyc;
    for (int i = 0; i < 6; i++) begin
      rd(TMR_TCSR, st);
      check(st[8] && st[7:0] == 8'hD2, "TCSR shows flag and control");
      wr(TMR_TCSR, st);                      // acknowledge
      check(!irq, "write-back clears the interrupt");
      @(posedge irq); t_now = cyc;
      check(t_now - t_prev == 8333, $sformatf("period %0d", t_now - t_prev));
      t_prev = t_now;
    end
    // one-shot: no auto reload
    wr(TMR_TCSR, 32'h100);                   // clear flag, stop
    wr(TMR_TLR, 100);
    wr(TMR_TCSR, 32'h20);
    wr(TMR_TCSR, 32'hC2);
    @(posedge irq); t_now = cyc;
    rd(TMR_TCSR, st); wr(TMR_TCSR, st);
    check(st[7] == 1'b0, "one-shot clears ENT");
    repeat (300) @(posedge clk);
    check(!irq, "one-shot fires once");
    // masked interrupt
    wr(TMR_TCSR, 32'h20);
    wr(TMR_TCSR, 32'h92);                    // ENT, ARHT, UDT, no ENIT
    repeat (250) @(posedge clk);
    rd(TMR_TCSR, st);
    check(st[8] && !irq, "flag set but masked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
