// apnea_sw_model: testbench model of everything around the peripheral top:
// the processor running the breath-monitoring software, the ADC and DAC
// modules, and an independent reference of the envelope filter.
//
// The processor part follows the monitor's control program. It sets the
// LEDs to outputs, writes the level-shifter reference (1250) to the filter,
// and programs the timer (TLR, then 0x20, then 0xD2). It then serves N_ISR
// interrupts. Each one reads an ADC sample over SPI with the two-byte
// sequence, reads the switches, optionally echoes the sample to the DAC
// (switch 1) and writes the sample to the filter. Every REDUCTION-th
// interrupt (at count SAMPLE_TIME) it reads the envelope. It may echo that
// to the DAC (switch 2), runs the windowed peak detector (window of 16, peak
// when the middle sample equals the window maximum and the maximum is at
// least MIN_MAX_LEVEL) and advances the breath timer. It shows the timer on
// the LEDs, blinking once six LEDs are lit, and switch 8 resets and
// silences. Finally it acknowledges the timer by writing TCSR back.
//
// Checks: every interrupt period equals TLR + 2; every ADC read returns the
// value the ADC model held; every envelope read equals the reference
// filter, which is fed IN - REF at each filter sample strobe; every DAC
// pair update lands on both DAC channels; every LED write appears on the
// pins. The mechanism counters record how often each behaviour happened.
module apnea_sw_model
  import apnea_pkg::*;
#(
  parameter int DECIM       = 500,
  parameter int TLR         = 8331,
  parameter int N_ISR       = 1500,
  parameter int APNEA_TIME  = 320,
  parameter int SAMPLE_TIME = 10,
  parameter int TONE_PERIOD = 32,
  parameter bit SCENARIO    = 1     // 1: breaths, apnea, silence switch, echo modes
) (
  input  logic               clk,
  input  logic               rst,
  output bus_req_t           m_req,
  input  bus_rsp_t           m_rsp,
  input  logic               irq,
  input  logic [7:0]         led_o,
  output logic [7:0]         sw_i,
  input  logic               adc_sclk,
  input  logic               adc_cs_n,
  output logic               adc_sdata,
  input  logic               dac_sclk,
  input  logic               dac_sync_n,
  input  logic               dac_d1,
  input  logic               dac_d2,
  input  logic               sample_tick,   // the filter's sample strobe
  input  logic               env_strobe,
  output logic               done,
  output int                 checks,
  output int                 failures
);
  localparam int SHIFTER_REF = 1250;
  localparam int W = 16;
  localparam int MIN_MAX_LEVEL = 'hFFFFF;
  localparam logic [15:0] A_LEDS = 16'h0000, A_SW = 16'h1000, A_DAC0 = 16'h2000,
                          A_DAC1 = 16'h3000, A_ADC = 16'h4000, A_FILT = 16'h5000,
                          A_TMR = 16'h6000;

  // ---------------------------------------------------------- board models
  logic [11:0] adc_val = 0;
  int adc_frames, dac_updates;
  logic [11:0] dac1, dac2;
  ad1_model adc (.sclk(adc_sclk), .cs_n(adc_cs_n), .sdata(adc_sdata), .value(adc_val), .frames(adc_frames));
  da2_model dac (.sclk(dac_sclk), .sync_n(dac_sync_n), .d1(dac_d1), .d2(dac_d2),
                 .out1(dac1), .out2(dac2), .updates(dac_updates));

  // ------------------------------------------------------ mechanism counts
  int n_irq = 0, n_dec = 0, n_neg = 0, n_breath = 0, n_apnea = 0, n_blink = 0,
      n_silent = 0, n_echo_raw = 0, n_echo_env = 0, n_dac_pairs = 0, n_env_reads = 0;

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // --------------------------------------------------- reference filter
  localparam int C [6] = '{1856, 3960, 9506, 16448, 22113, 24286};
  shortint xh [11];
  shortint ah [30];
  int hold = 0, tick_n = 0;
  int ref_in = 0, ref_ref = 0;

  function automatic int bpf();
    int acc = 0;
    for (int k = 0; k < 5; k++) acc += int'(shortint'(int'(xh[k]) + int'(xh[10-k]))) * C[k];
    return acc + int'(xh[5]) * C[5];
  endfunction
  function automatic shortint mag(int v);
    int a = (v < 0) ? -v : v;
    return shortint'(a >>> 17);
  endfunction
  function automatic int avg_now();
    int acc = 0;
    shortint t [30];
    t[0] = mag(hold);
    for (int i = 1; i < 30; i++) t[i] = ah[i-1];
    for (int k = 0; k < 15; k++) acc += int'(shortint'(int'(t[k]) + int'(t[29-k]))) * 17476;
    return acc;
  endfunction

  always @(posedge clk) begin
    if (sample_tick && !rst) begin
      xh[0] = shortint'(ref_in - ref_ref);
      if (tick_n % DECIM == 0) begin hold = bpf(); if (hold < 0) n_neg++; end
      if (tick_n % DECIM == DECIM - 1) begin
        for (int i = 29; i > 0; i--) ah[i] = ah[i-1];
        ah[0] = mag(hold);
      end
      for (int i = 10; i > 0; i--) xh[i] = xh[i-1];
      tick_n++;
    end
    if (m_req.valid && m_req.wr && m_req.addr == A_FILT + 16'(FILT_IN))  ref_in  = int'(m_req.wdata[15:0]);
    if (m_req.valid && m_req.wr && m_req.addr == A_FILT + 16'(FILT_REF)) ref_ref = int'(m_req.wdata[15:0]);
  end
  always @(posedge clk) if (env_strobe && !rst) n_dec++;

  // ------------------------------------------------------------ bus access
  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    m_req = '{valid: 1, wr: 1, addr: a, wdata: d, be: 4'hf};
    #1 if (!m_rsp.ack) begin failures++; $display("no ack for write %h", a); end
    @(negedge clk) m_req.valid = 0;
  endtask
  task automatic rd(input logic [15:0] a, output logic [31:0] d, output logic tick);
    @(negedge clk);
    m_req = '{valid: 1, wr: 0, addr: a, wdata: 0, be: 4'hf};
    #1 d = m_rsp.rdata;
    tick = sample_tick;
    @(negedge clk) m_req.valid = 0;
  endtask
  task automatic rd0(input logic [15:0] a, output logic [31:0] d);
    logic t;
    rd(a, d, t);
  endtask

  // ----------------------------------------------------- SPI driver code
  task automatic wait_tx_empty(input logic [15:0] b);
    logic [31:0] s;
    do rd0(b + 16'(SPI_SR), s); while (!s[SPISR_TX_EMPTY]);
  endtask
  task automatic spi_in(input logic [15:0] b, output int v);
    logic [31:0] hi, lo;
    wr(b + 16'(SPI_CR), 32'h194);
    wr(b + 16'(SPI_DTR), 32'h0F);
    wr(b + 16'(SPI_SSR), 32'hFFF);
    wr(b + 16'(SPI_CR), 32'h196);
    wr(b + 16'(SPI_SSR), 0);
    wr(b + 16'(SPI_CR), 32'h096);
    wait_tx_empty(b);
    wr(b + 16'(SPI_CR), 32'h196);
    rd0(b + 16'(SPI_DRR), hi);
    wr(b + 16'(SPI_DTR), 32'h0F);
    wr(b + 16'(SPI_CR), 32'h096);
    wait_tx_empty(b);
    wr(b + 16'(SPI_CR), 32'h196);
    rd0(b + 16'(SPI_DRR), lo);
    wr(b + 16'(SPI_SSR), 32'hFFF);
    wr(b + 16'(SPI_CR), 32'h194);
    v = int'({16'h0, hi[7:0], lo[7:0]});
  endtask
  // both DAC masters side by side, as the shared sync line requires
  task automatic spi_out2(input int v1, input int v2);
    v1 &= 'hFFF; v2 &= 'hFFF;
    wr(A_DAC0 + 16'(SPI_CR), 32'h194);  wr(A_DAC1 + 16'(SPI_CR), 32'h194);
    wr(A_DAC0 + 16'(SPI_DTR), v1 >> 8); wr(A_DAC1 + 16'(SPI_DTR), v2 >> 8);
    wr(A_DAC0 + 16'(SPI_SSR), 'hFFF);   wr(A_DAC1 + 16'(SPI_SSR), 'hFFF);
    wr(A_DAC0 + 16'(SPI_CR), 32'h196);  wr(A_DAC1 + 16'(SPI_CR), 32'h196);
    wr(A_DAC0 + 16'(SPI_SSR), 0);       wr(A_DAC1 + 16'(SPI_SSR), 0);
    wr(A_DAC0 + 16'(SPI_CR), 32'h096);  wr(A_DAC1 + 16'(SPI_CR), 32'h096);
    wait_tx_empty(A_DAC0); wait_tx_empty(A_DAC1);
    wr(A_DAC0 + 16'(SPI_CR), 32'h196);  wr(A_DAC1 + 16'(SPI_CR), 32'h196);
    wr(A_DAC0 + 16'(SPI_IPISR), 'hFF);  wr(A_DAC1 + 16'(SPI_IPISR), 'hFF);
    wr(A_DAC0 + 16'(SPI_DTR), v1 & 'hFF); wr(A_DAC1 + 16'(SPI_DTR), v2 & 'hFF);
    wr(A_DAC0 + 16'(SPI_CR), 32'h096);  wr(A_DAC1 + 16'(SPI_CR), 32'h096);
    wait_tx_empty(A_DAC0); wait_tx_empty(A_DAC1);
    wr(A_DAC0 + 16'(SPI_CR), 32'h196);  wr(A_DAC1 + 16'(SPI_CR), 32'h196);
    wr(A_DAC0 + 16'(SPI_IPISR), 'hFF);  wr(A_DAC1 + 16'(SPI_IPISR), 'hFF);
    wr(A_DAC0 + 16'(SPI_SSR), 'hFFF);   wr(A_DAC1 + 16'(SPI_SSR), 'hFFF);
    wr(A_DAC0 + 16'(SPI_CR), 32'h194);  wr(A_DAC1 + 16'(SPI_CR), 32'h194);
    n_dac_pairs++;
    check(dac1 == 12'(v1) && dac2 == 12'(v2),
          $sformatf("DAC pair got %h/%h expected %h/%h", dac1, dac2, v1, v2));
  endtask
  task automatic dac_out(input int v);
    spi_out2(v, SHIFTER_REF);
  endtask

  // ------------------------------------------------------- input signal
  // breathing: a tone burst for 16 envelope samples out of every 48, then
  // (SCENARIO) a long pause that must raise the apnea alarm, then breathing
  function automatic int signal_at(int i);
    int k = i / DECIM;
    logic breathing;
    real a;
    if (SCENARIO) breathing = (k < 200 || k >= 200 + APNEA_TIME + 60) && (k % 48 < 16);
    else          breathing = 1'b1;
    a = breathing ? 600.0 * $sin(2.0 * 3.14159265 * i / TONE_PERIOD) : 0.0;
    return SHIFTER_REF + $rtoi(a);
  endfunction

  // ---------------------------------------------------------- interrupt
  longint cyc = 0, last_irq = -1;
  always @(posedge clk) cyc++;
  always @(posedge irq) if (!rst) begin
    if (last_irq >= 0) check(cyc - last_irq == longint'(TLR) + 2, $sformatf("interrupt period %0d", cyc - last_irq));
    last_irq = cyc;
    n_irq++;
  end

  // ------------------------------------------------------------ program
  int count = 0, breath_count = 0, sample_spot = W, mid_spot = W / 2 - 1;
  logic blink = 0;
  int samples [W];

  function automatic logic peak_detect();
    int mx = 0;
    for (int i = 0; i < W; i++) if (samples[i] > mx) mx = samples[i];
    if (mx < MIN_MAX_LEVEL) return 1'b0;
    return samples[mid_spot] == mx;
  endfunction

  task automatic breath_detect(input int i);
    int sample, filter_out, shift, leds, expect_env;
    logic [31:0] d, sw;
    logic spi_sent, tick;
    adc_val = 12'(signal_at(i));
    spi_in(A_ADC, sample);
    check(sample == int'(adc_val), $sformatf("ADC read %0d expected %0d", sample, adc_val));
    rd0(A_SW, sw);
    spi_sent = 0;
    if (sw[0]) begin dac_out(sample); spi_sent = 1; n_echo_raw++; end
    wr(A_FILT + 16'(FILT_IN), sample);
    count = (count + 1) % DECIM;
    if (count == SAMPLE_TIME) begin
      expect_env = avg_now();
      rd(A_FILT + 16'(FILT_OUT), d, tick);
      filter_out = int'(d);
      n_env_reads++;
      if (!tick) check(filter_out == expect_env,
                       $sformatf("envelope %0d expected %0d", filter_out, expect_env));
      if (sw[1] && !spi_sent) begin
        dac_out(filter_out >>> sw[7:2]); spi_sent = 1; n_echo_env++;
      end
      sample_spot = (sample_spot + 1) % W;
      mid_spot = (mid_spot + 1) % W;
      samples[sample_spot] = filter_out;
      if (peak_detect()) begin
        breath_count = 0;
        n_breath++;
        if (!spi_sent) dac_out('hFFF);
      end else begin
        if (breath_count < APNEA_TIME) begin
          breath_count++;
          if (breath_count == APNEA_TIME) n_apnea++;
        end
        if (!spi_sent) dac_out(0);
      end
      shift = 8 - breath_count / (APNEA_TIME / 8);
      leds = 'hFF >> shift;
      if ((leds & 'h20) != 0) begin
        if (blink) blink = 0;
        else begin leds = 0; blink = 1; n_blink++; end
      end
      if (sw[7]) begin breath_count = 0; leds = 'h80; n_silent++; end
      wr(A_LEDS, leds);
      check(led_o == 8'(leds), "LEDs show the written pattern");
    end
  endtask

  initial begin
    logic [31:0] st;
    for (int i = 0; i < 11; i++) xh[i] = 0;
    for (int i = 0; i < 30; i++) ah[i] = 0;
    for (int i = 0; i < W; i++) samples[i] = 0;
    checks = 0; failures = 0; done = 0;
    m_req = '0;
    sw_i = 8'h00;
    wait (!rst);
    repeat (20) @(posedge clk);
    wr(A_LEDS + 16'(GPIO_TRI), 0);
    wr(A_LEDS, 'hFF);
    wr(A_FILT + 16'(FILT_REF), SHIFTER_REF);
    wr(A_TMR + 16'(TMR_TLR), TLR);
    wr(A_TMR + 16'(TMR_TCSR), 'h20);
    wr(A_TMR + 16'(TMR_TCSR), 'hD2);
    for (int i = 0; i < N_ISR; i++) begin
      if (SCENARIO) begin
        // operator actions: echo raw audio, echo the envelope, silence
        sw_i = 8'h00;
        if (i / DECIM >= 60  && i / DECIM < 64)  sw_i = 8'h01;
        if (i / DECIM >= 64  && i / DECIM < 68)  sw_i = 8'h02 | (8'd20 << 2);
        if (i / DECIM >= 200 + APNEA_TIME + 40 && i / DECIM < 200 + APNEA_TIME + 46) sw_i = 8'h80;
      end
      wait (irq);
      breath_detect(i);
      rd0(A_TMR + 16'(TMR_TCSR), st);
      wr(A_TMR + 16'(TMR_TCSR), st);
      check(!irq, "interrupt acknowledged");
    end
    $display("mechanisms: irq=%0d decimations=%0d negative=%0d envelope_reads=%0d breaths=%0d apnea=%0d blink=%0d silent=%0d echo_raw=%0d echo_env=%0d dac_pairs=%0d adc_frames=%0d",
             n_irq, n_dec, n_neg, n_env_reads, n_breath, n_apnea, n_blink, n_silent,
             n_echo_raw, n_echo_env, n_dac_pairs, adc_frames);
    check(n_irq >= N_ISR, "every timer interrupt arrived");
    check(n_dec > 0, "the filter decimated");
    check(n_neg > 0, "the rectifier saw negative values");
    check(n_env_reads > 0, "envelope samples were read");
    check(n_dac_pairs > 0, "the DAC pair was written");
    check(adc_frames > 0, "the ADC was read");
    if (SCENARIO) begin
      check(n_breath > 0, "a breath was detected");
      check(n_apnea > 0, "an apnea event was reached");
      check(n_blink > 0, "the LEDs blinked");
      check(n_silent > 0, "the silence switch acted");
      check(n_echo_raw > 0 && n_echo_env > 0, "both DAC echo modes were used");
    end
    done = 1;
  end
endmodule
