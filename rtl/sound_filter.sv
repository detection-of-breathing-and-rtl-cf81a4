// sound_filter: the breath envelope filter as a memory-mapped peripheral.
//
// How it works: software writes each 12-bit ADC sample to the IN register
// and the known DC offset of the level-shifted microphone signal to the REF
// register once. The filter input is IN[15:0] - REF[15:0] (16-bit
// wrap-around), which restores the bipolar audio the filter expects. The
// envelope_filter takes that difference on every sample_en strobe (8 kHz),
// independently of when software writes IN, and software reads the 16 Hz
// envelope from OUT. Three registers, byte-enabled writes and a
// same-cycle acknowledge follow the peripheral as built; reading IN returns
// the 16 filter-input bits of IN with zero above them, as the built
// peripheral did for test.
//
// Register map (byte offsets): 0x0 IN (r/w, bits 15:0 used),
// 0x4 OUT (read: envelope, Q12.19; writes are acknowledged and ignored),
// 0x8 REF (r/w, bits 15:0 used).
// Interface: req is a bus request already qualified by this peripheral's
// address window; rsp answers in the same cycle. env/env_strobe expose the
// envelope and the decimator strobe. Reset is synchronous, active high.
module sound_filter
  import apnea_pkg::*;
#(
  parameter int unsigned DECIM = 500
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               sample_en,
  input  bus_req_t           req,
  output bus_rsp_t           rsp,
  output logic signed [31:0] env,
  output logic               env_strobe
);

  logic [31:0]        reg_in, reg_ref;
  logic signed [15:0] filt_in;

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_in  <= '0;
      reg_ref <= '0;
    end else if (req.valid && req.wr) begin
      case (req.addr[7:0])
        FILT_IN:  reg_in  <= merge_be(reg_in,  req.wdata, req.be);
        FILT_REF: reg_ref <= merge_be(reg_ref, req.wdata, req.be);
        default: ;
      endcase
    end
  end

  assign filt_in = signed'(16'(reg_in[15:0] - reg_ref[15:0]));

  envelope_filter #(.DECIM(DECIM)) u_env (
    .clk, .rst, .clk_enable(sample_en), .in1(filt_in),
    .ce_out(env_strobe), .out1(env)
  );

  always_comb begin
    rsp = BUS_IDLE;
    if (req.valid) begin
      rsp.ack = 1'b1;
      if (!req.wr) begin
        case (req.addr[7:0])
          FILT_IN:  rsp.rdata = {16'h0, reg_in[15:0]};
          FILT_OUT: rsp.rdata = env;
          FILT_REF: rsp.rdata = reg_ref;
          default:  rsp.rdata = '0;
        endcase
      end
    end
  end

endmodule
