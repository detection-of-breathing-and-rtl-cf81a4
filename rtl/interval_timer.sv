// interval_timer: the periodic timer that raises the 8 kHz sampling
// interrupt.
//
// How it works: a 32-bit counter is programmed through three registers.
// Writing TCSR with LOAD set copies TLR into the counter (continuously, for
// as long as LOAD stays set). With ENT set and LOAD clear it counts down
// (UDT=1) or up (UDT=0). On reaching its terminal value (0 down, all ones
// up) it sets the interrupt flag TINT and, with ARHT set, spends one cycle
// reloading TLR before counting again, so the interrupt period is TLR+2
// clock cycles; without ARHT it stops at the terminal value
// and clears ENT. The interrupt
// output is TINT and ENIT. TINT is cleared by writing TCSR with bit 8 set,
// so reading TCSR and writing the value back acknowledges the interrupt.
// The "load minus two" period, the control word 0xD2 (count down, auto
// reload, interrupt enable, timer enable), the LOAD word 0x20 and the
// read-and-write-back acknowledge are how the control software uses the
// timer; the bit positions are the usual ones of the processor's timer
// peripheral, and the capture and cascade modes are left out.
//
// Register map (byte offsets): 0x0 TCSR, 0x4 TLR, 0x8 TCR (counter, read).
// Interface: req/rsp bus slave port (same-cycle acknowledge), irq level
// output. Reset is synchronous, active high.
module interval_timer
  import apnea_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  bus_req_t req,
  output bus_rsp_t rsp,
  output logic     irq
);

  logic [7:0]  ctrl;
  logic        tint;
  logic [31:0] tlr, tcr;
  logic        reload_pend;
  logic        wr_tcsr, wr_tlr;
  logic [31:0] tcsr_w;
  logic        terminal;

  assign wr_tcsr  = req.valid && req.wr && (req.addr[7:0] == TMR_TCSR);
  assign wr_tlr   = req.valid && req.wr && (req.addr[7:0] == TMR_TLR);
  assign tcsr_w   = merge_be({23'h0, tint, ctrl}, req.wdata, req.be);
  assign terminal = ctrl[TCSR_UDT] ? (tcr == '0) : (tcr == '1);

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl        <= '0;
      tint        <= 1'b0;
      tlr         <= '0;
      tcr         <= '0;
      reload_pend <= 1'b0;
    end else begin
      if (wr_tlr) tlr <= merge_be(tlr, req.wdata, req.be);
      if (wr_tcsr) ctrl <= tcsr_w[7:0];

      if (ctrl[TCSR_LOAD]) begin
        tcr         <= tlr;
        reload_pend <= 1'b0;
      end else if (ctrl[TCSR_ENT]) begin
        if (reload_pend) begin
          tcr         <= tlr;
          reload_pend <= 1'b0;
        end else if (terminal) begin
          reload_pend <= ctrl[TCSR_ARHT];
          if (!ctrl[TCSR_ARHT]) ctrl[TCSR_ENT] <= 1'b0;  // one-shot ends
        end else begin
          tcr <= ctrl[TCSR_UDT] ? tcr - 1'b1 : tcr + 1'b1;
        end
      end

      // set on terminal count, cleared by writing a 1 to bit 8
      if (ctrl[TCSR_ENT] && !ctrl[TCSR_LOAD] && !reload_pend && terminal)
        tint <= 1'b1;
      else if (wr_tcsr && tcsr_w[TCSR_TINT] && req.be[1])
        tint <= 1'b0;
    end
  end

  assign irq = tint & ctrl[TCSR_ENIT];

  always_comb begin
    rsp = BUS_IDLE;
    if (req.valid) begin
      rsp.ack = 1'b1;
      if (!req.wr) begin
        case (req.addr[7:0])
          TMR_TCSR: rsp.rdata = {23'h0, tint, ctrl};
          TMR_TLR:  rsp.rdata = tlr;
          TMR_TCR:  rsp.rdata = tcr;
          default:  rsp.rdata = '0;
        endcase
      end
    end
  end

endmodule
