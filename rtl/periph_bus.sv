// periph_bus: the processor's peripheral bus, reduced to an address decoder
// and a read-data multiplexer.
//
// How it works: address bits [15:12] select one of NUM_PERIPH peripheral
// windows (order given by apnea_pkg::periph_sel_e: LEDs, switches, DAC
// channel 0 SPI, DAC channel 1 SPI, ADC SPI, sound filter, timer). The
// request is copied to every slave with valid gated by its select, so only
// the addressed slave sees a transfer, and the addressed slave's response
// is returned. A request outside every window is acknowledged with zero
// data, so a stray access cannot hang the master. Which peripherals share
// the bus follows the system as built; the window layout and the
// zero-wait-state, same-cycle protocol are this design's choice.
//
// Interface: m_req/m_rsp master side, s_req/s_rsp one entry per slave.
// Purely combinational.
module periph_bus
  import apnea_pkg::*;
(
  input  bus_req_t m_req,
  output bus_rsp_t m_rsp,
  output bus_req_t s_req [NUM_PERIPH],
  input  bus_rsp_t s_rsp [NUM_PERIPH]
);

  logic [3:0] sel;
  assign sel = m_req.addr[15:12];

  always_comb begin
    m_rsp = BUS_IDLE;
    for (int i = 0; i < NUM_PERIPH; i++) begin
      s_req[i]       = m_req;
      s_req[i].valid = m_req.valid && (sel == 4'(i));
      if (sel == 4'(i)) m_rsp = s_rsp[i];
    end
    if (m_req.valid && sel >= 4'(NUM_PERIPH)) m_rsp.ack = 1'b1;
  end

endmodule
