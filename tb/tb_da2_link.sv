// tb_da2_link: exhaustively checks the joining of two SPI masters onto the
// dual-DAC port: shared clock = OR of the two clocks, shared active-low
// sync = AND of the two selects, data lines passed to their own converter.
module tb_da2_link;
  logic [5:0] v;
  logic sclk, sync_n, d1, d2;
  int checks = 0, failures = 0;

  da2_link dut (.sclk0(v[0]), .mosi0(v[1]), .ss0_n(v[2]),
                .sclk1(v[3]), .mosi1(v[4]), .ss1_n(v[5]),
                .dac_sclk(sclk), .dac_sync_n(sync_n), .dac_d1(d1), .dac_d2(d2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 64; i++) begin
      v = 6'(i);
      #1;
      checks++;
      if (sclk !== (v[0] | v[3]) || sync_n !== (v[2] & v[5]) || d1 !== v[1] || d2 !== v[4]) begin
        failures++; $display("FAIL at %b", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
