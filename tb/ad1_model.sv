// ad1_model: behavioural model of one channel of the 12-bit SPI ADC module
// (testbench use only). When cs_n falls it latches `value` and presents a
// 16-bit frame, four zeros then the 12-bit sample MSB first, on sdata; the
// next bit appears after each falling edge of sclk, so a master sampling on
// rising edges reads the frame. `frames` counts completed 16-bit frames.
module ad1_model (
  input  logic        sclk,
  input  logic        cs_n,
  output logic        sdata,
  input  logic [11:0] value,
  output int          frames
);
  logic [15:0] sh = '0;
  int          nbits = 0;
  initial frames = 0;

  always @(negedge cs_n) begin
    sh    = {4'b0000, value};
    nbits = 0;
  end
  always @(negedge sclk) if (!cs_n) begin
    sh = {sh[14:0], 1'b0};
    nbits++;
    if (nbits == 16) frames++;
  end
  assign sdata = cs_n ? 1'b0 : sh[15];
endmodule
