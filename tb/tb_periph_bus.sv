// tb_periph_bus: checks that each of the seven windows (addr[15:12]) passes
// the request only to its own slave, returns that slave's response, and
// that an address outside every window is acknowledged with zero data and
// reaches no slave.
module tb_periph_bus;
  import apnea_pkg::*;
  bus_req_t m_req;
  bus_rsp_t m_rsp;
  bus_req_t s_req [NUM_PERIPH];
  bus_rsp_t s_rsp [NUM_PERIPH];
  int checks = 0, failures = 0;

  periph_bus dut (.m_req, .m_rsp, .s_req, .s_rsp);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < NUM_PERIPH; i++) s_rsp[i] = '{ack: 1'b1, rdata: 32'h1000 + i};
    for (int w = 0; w < 16; w++) begin
      for (int r = 0; r < 4; r++) begin
        m_req = '{valid: 1, wr: r[0], addr: {4'(w), 12'($urandom)}, wdata: $urandom, be: 4'($urandom)};
        #1;
        for (int i = 0; i < NUM_PERIPH; i++) begin
          checks++;
          if (s_req[i].valid !== (i == w) || s_req[i].addr !== m_req.addr ||
              s_req[i].wdata !== m_req.wdata || s_req[i].wr !== m_req.wr) begin
            failures++; $display("FAIL request to slave %0d for window %0d", i, w);
          end
        end
        checks++;
        if (w < NUM_PERIPH) begin
          if (m_rsp.ack !== 1'b1 || m_rsp.rdata !== 32'h1000 + w) failures++;
        end else begin
          if (m_rsp.ack !== 1'b1 || m_rsp.rdata !== 0) failures++;
        end
      end
    end
    m_req.valid = 0;
    #1 checks++;
    if (m_rsp.ack && m_req.addr[15:12] >= NUM_PERIPH) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
