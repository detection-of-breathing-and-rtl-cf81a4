// tb_sound_filter: exercises the filter peripheral through its bus port at
// a reduced decimation of 4. Checks register read-back, byte-enabled writes,
// the same-cycle acknowledge, that the filter sees IN - REF, and the
// settled envelope for a constant input held 1000 counts above and then
// below the reference: the DC gain of the band-limiting FIR is
// 132052 / 2^17, so both give magnitude m = (1000*132052) >> 17 = 1007 and
// an averaged output of 15 * (2*m) * 17476. An input equal to the
// reference must settle to zero.
module tb_sound_filter;
  import apnea_pkg::*;
  localparam int D = 4;
  logic clk = 0, rst = 1, sample_en = 0;
  bus_req_t req;
  bus_rsp_t rsp;
  logic signed [31:0] env;
  logic env_strobe;
  int checks = 0, failures = 0;

  sound_filter #(.DECIM(D)) dut (.clk, .rst, .sample_en, .req, .rsp, .env, .env_strobe);

  always #5 clk = ~clk;
  int scnt = 0;
  always @(posedge clk) begin
    scnt <= (scnt == 2) ? 0 : scnt + 1;
    sample_en <= (scnt == 2);
  end
  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d, input logic [3:0] be = 4'hf);
    @(negedge clk);
    req = '{valid: 1, wr: 1, addr: {8'h50, a}, wdata: d, be: be};
    #1 checks++; if (!rsp.ack) failures++;
    @(negedge clk) req.valid = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    req = '{valid: 1, wr: 0, addr: {8'h50, a}, wdata: 0, be: 4'hf};
    #1 checks++; if (!rsp.ack) failures++;
    d = rsp.rdata;
    @(negedge clk) req.valid = 0;
  endtask
  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] d;
    int m, expo;
    req = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // idle: no acknowledge without valid
    #1 checks++; if (rsp.ack) failures++;
    wr(FILT_REF, 32'h0000_04E2);            // 1250, the shifter reference
    rd(FILT_REF, d); expect_eq(d, 32'h4E2, "REF");
    wr(FILT_IN, 32'hABCD_1234);
    rd(FILT_IN, d);  expect_eq(d, 32'h1234, "IN readback");
    wr(FILT_IN, 32'h0000_5600, 4'b0010);    // byte 1 only
    rd(FILT_IN, d);  expect_eq(d, 32'h5634, "IN byte write");
    expect_eq(32'(dut.filt_in), 32'(16'(16'h5634 - 16'h04E2)), "IN-REF");
    wr(FILT_OUT, 32'hFFFF_FFFF);            // ignored
    // DC at the reference: envelope settles to zero
    wr(FILT_IN, 1250);
    repeat (3 * 40 * D + 50) @(posedge clk);
    rd(FILT_OUT, d); expect_eq(d, 0, "zero input");
    m = (1000 * 132052) >>> 17;
    expo = 15 * (2 * m) * 17476;
    wr(FILT_IN, 1250 + 1000);
    repeat (3 * 40 * D + 50) @(posedge clk);
    rd(FILT_OUT, d); expect_eq(d, expo, "positive step");
    expect_eq(env, expo, "env port");
    wr(FILT_IN, 1250 - 1000);
    repeat (3 * 40 * D + 50) @(posedge clk);
    rd(FILT_OUT, d); expect_eq(d, expo, "negative step (rectified)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
