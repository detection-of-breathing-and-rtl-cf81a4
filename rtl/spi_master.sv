// spi_master: byte-wide SPI master used three times, once for the ADC and
// once for each of the two DAC channels.
//
// How it works: software drives it in the register style of the processor's
// SPI peripheral. It sets SPICR (enable, master, manual slave select,
// inhibit), writes a byte to SPIDTR, drives ss_n low through SPISSR, clears
// the inhibit bit and polls SPISR until TX-empty is set; the received byte
// is then in SPIDRR. A transfer starts when a byte waits in SPIDTR and the
// core is enabled, in master mode and not inhibited. It shifts 8 bits MSB
// first. sclk idles low and runs at clk/SCK_RATIO; mosi changes after a
// falling edge and miso is sampled on each rising edge. TX-empty reads 1
// only when no byte waits and the shifter is idle, so it marks the end of
// the transfer. The slave select is software controlled (manual mode);
// with manual mode off it is driven low for the length of each transfer.
// This is the subset of the peripheral that the control software uses. The
// clock phase and polarity bits, FIFOs, loop-back and slave mode are left
// out; the sclk ratio is this design's choice.
//
// Register map (byte offsets): 0x20 IPISR (bit 2 set at the end of each
// transfer, write 1 to clear), 0x60 SPICR, 0x64 SPISR (bit 0 RX empty,
// bit 1 RX full, bit 2 TX empty, bit 3 TX full), 0x68 SPIDTR (write,
// wdata[7:0]), 0x6C SPIDRR (read, clears RX full), 0x70 SPISSR (bit 0
// drives ss_n in manual mode; resets to 1).
// Interface: req/rsp bus slave port (same-cycle acknowledge), SPI pins.
// Reset is synchronous, active high.
//
// Lint note: cr_w is the 32-bit byte-merged write value; only its low ten
// bits exist as control register bits, the rest are dropped on purpose.
module spi_master
  import apnea_pkg::*;
#(
  parameter int unsigned SCK_RATIO = 16   // even, >= 2
) (
  input  logic     clk,
  input  logic     rst,
  input  bus_req_t req,
  output bus_rsp_t rsp,
  output logic     sclk,
  output logic     mosi,
  input  logic     miso,
  output logic     ss_n
);

  localparam int HALF = SCK_RATIO / 2;
  localparam int DW   = (HALF > 1) ? $clog2(HALF) : 1;

  logic [9:0]    cr;
  logic          ssr;
  logic [7:0]    dtr, drr;
  logic          tx_full, rx_full;
  logic          ipisr_dtr_empty;
  logic          busy;
  logic [7:0]    tx_sh, rx_sh;
  logic [2:0]    bitcnt;
  logic [DW-1:0] div_cnt;
  logic          sclk_q;
  logic          half_tick;

  logic        wr, rd;
  logic [31:0] cr_w;
  assign cr_w = merge_be({22'h0, cr}, req.wdata, req.be);
  assign wr = req.valid &&  req.wr;
  assign rd = req.valid && !req.wr;

  assign half_tick = (div_cnt == DW'(HALF - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      cr              <= 10'h180;   // inhibit, manual slave select
      ssr             <= 1'b1;
      dtr             <= '0;
      drr             <= '0;
      tx_full         <= 1'b0;
      rx_full         <= 1'b0;
      ipisr_dtr_empty <= 1'b0;
      busy            <= 1'b0;
      tx_sh           <= '0;
      rx_sh           <= '0;
      bitcnt          <= '0;
      div_cnt         <= '0;
      sclk_q          <= 1'b0;
    end else begin
      // register writes
      if (wr) begin
        case (req.addr[7:0])
          SPI_CR:    cr  <= cr_w[9:0];
          SPI_SSR:   ssr <= req.wdata[0];
          SPI_DTR: begin
            dtr     <= req.wdata[7:0];
            tx_full <= 1'b1;
          end
          SPI_IPISR: if (req.wdata[2]) ipisr_dtr_empty <= 1'b0;
          default: ;
        endcase
      end
      if (rd && req.addr[7:0] == SPI_DRR) rx_full <= 1'b0;

      // shift engine
      if (!busy) begin
        div_cnt <= '0;
        sclk_q  <= 1'b0;
        if (tx_full && cr[SPICR_SPE] && cr[SPICR_MASTER] && !cr[SPICR_INHIBIT]
            && !(wr && req.addr[7:0] == SPI_DTR)) begin
          busy    <= 1'b1;
          tx_sh   <= dtr;
          tx_full <= 1'b0;
          bitcnt  <= '0;
        end
      end else begin
        div_cnt <= half_tick ? '0 : div_cnt + 1'b1;
        if (half_tick) begin
          if (!sclk_q) begin
            sclk_q <= 1'b1;
            rx_sh  <= {rx_sh[6:0], miso};
          end else begin
            sclk_q <= 1'b0;
            if (bitcnt == 3'd7) begin
              busy            <= 1'b0;
              drr             <= rx_sh;
              rx_full         <= 1'b1;
              ipisr_dtr_empty <= 1'b1;
            end else begin
              bitcnt <= bitcnt + 1'b1;
              tx_sh  <= {tx_sh[6:0], 1'b0};
            end
          end
        end
      end
    end
  end

  assign sclk = sclk_q;
  assign mosi = busy & tx_sh[7];
  assign ss_n = cr[SPICR_MANSS] ? ssr : ~busy;

  always_comb begin
    rsp = BUS_IDLE;
    if (req.valid) begin
      rsp.ack = 1'b1;
      if (!req.wr) begin
        case (req.addr[7:0])
          SPI_IPISR: rsp.rdata = {29'h0, ipisr_dtr_empty, 2'b00};
          SPI_CR:    rsp.rdata = {22'h0, cr};
          SPI_SR: begin
            rsp.rdata                 = {28'h0, tx_full, 1'b0, rx_full, 1'b0};
            rsp.rdata[SPISR_RX_EMPTY] = ~rx_full;
            rsp.rdata[SPISR_TX_EMPTY] = ~tx_full & ~busy;
          end
          SPI_DRR:   rsp.rdata = {24'h0, drr};
          SPI_SSR:   rsp.rdata = {31'h0, ssr};
          default:   rsp.rdata = '0;
        endcase
      end
    end
  end

endmodule
