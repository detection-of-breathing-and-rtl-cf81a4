// da2_model: behavioural model of the dual 12-bit SPI DAC module (testbench
// use only). Two converters share sclk and sync_n and have their own data
// lines d1 and d2. While sync_n is low, each rising edge of sclk shifts one
// bit into each converter. When sync_n rises after at least 16 bits, the
// low 12 bits of the last 16 become the outputs out1/out2 and `updates`
// counts the event.
module da2_model (
  input  logic        sclk,
  input  logic        sync_n,
  input  logic        d1,
  input  logic        d2,
  output logic [11:0] out1,
  output logic [11:0] out2,
  output int          updates
);
  logic [15:0] s1 = '0, s2 = '0;
  int          nbits = 0;
  initial begin out1 = '0; out2 = '0; updates = 0; end

  always @(negedge sync_n) nbits = 0;
  always @(posedge sclk) if (!sync_n) begin
    s1 = {s1[14:0], d1};
    s2 = {s2[14:0], d2};
    nbits++;
  end
  always @(posedge sync_n) if (nbits >= 16) begin
    out1 = s1[11:0];
    out2 = s2[11:0];
    updates++;
  end
endmodule
