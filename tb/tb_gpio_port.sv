// tb_gpio_port: checks the GPIO port's reset state (all inputs, data 0),
// data and tri-state writes with byte enables, and that a DATA read returns
// the input pin for tri-stated bits and the driven value for output bits,
// over random patterns.
module tb_gpio_port;
  import apnea_pkg::*;
  logic clk = 0, rst = 1;
  bus_req_t req;
  bus_rsp_t rsp;
  logic [7:0] gi = 0, go, gt;
  int checks = 0, failures = 0;

  gpio_port dut (.clk, .rst, .req, .rsp, .gpio_i(gi), .gpio_o(go), .gpio_t(gt));

  always #5 clk = ~clk;
  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic wr(input logic [7:0] a, input logic [31:0] d, input logic [3:0] be = 4'hf);
    @(negedge clk);
    req = '{valid: 1, wr: 1, addr: {8'h00, a}, wdata: d, be: be};
    @(negedge clk) req.valid = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    req = '{valid: 1, wr: 0, addr: {8'h00, a}, wdata: 0, be: 4'hf};
    #1 d = rsp.rdata;
    @(negedge clk) req.valid = 0;
  endtask
  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [31:0] d;
    logic [7:0] dv, tv;
    req = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check(gt == 8'hFF && go == 8'h00, "reset state");
    gi = 8'hA5;
    rd(GPIO_DATA, d); check(d == 32'hA5, "inputs read");
    wr(GPIO_TRI, 0);
    wr(GPIO_DATA, 32'hFF);
    check(go == 8'hFF && gt == 8'h00, "LEDs on");
    wr(GPIO_DATA, 32'h0F00, 4'b0010);   // other byte lane: no change
    check(go == 8'hFF, "byte enable");
    for (int i = 0; i < 50; i++) begin
      dv = 8'($urandom); tv = 8'($urandom); gi = 8'($urandom);
      wr(GPIO_DATA, dv); wr(GPIO_TRI, tv);
      rd(GPIO_DATA, d);
      check(d[7:0] == ((gi & tv) | (dv & ~tv)), "mixed read");
      rd(GPIO_TRI, d);
      check(d[7:0] == tv && go == dv, "tri/data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
