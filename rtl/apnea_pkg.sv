// apnea_pkg: types and constants shared by the breath-detection peripherals.
//
// The peripherals hang off one simple processor bus: a request carries a
// valid strobe, a write flag, a byte address, write data and byte enables,
// and every slave answers in the same cycle (zero wait states) with an
// acknowledge and read data. The filter coefficients are the fixed-point
// values of the breath filter chain: a symmetric 11-tap band-limiting FIR
// (Q1.17 coefficients, only the 6 unique ones stored) and a 30-tap moving
// average (every coefficient 17476 = 1/30 in Q1.19). The register offsets
// are those the control software uses; the peripheral base addresses are
// this design's own choice.
package apnea_pkg;

  // ---------------------------------------------------------------- bus
  typedef struct packed {
    logic        valid;   // a transfer is presented this cycle
    logic        wr;      // 1 = write, 0 = read
    logic [15:0] addr;    // byte address
    logic [31:0] wdata;
    logic [3:0]  be;      // byte enables, be[i] covers wdata[8*i+7 -: 8]
  } bus_req_t;

  typedef struct packed {
    logic        ack;     // transfer accepted (same cycle as valid)
    logic [31:0] rdata;   // read data, zero when not acknowledging a read
  } bus_rsp_t;

  localparam bus_rsp_t BUS_IDLE = '{ack: 1'b0, rdata: 32'h0};

  // Peripheral windows, selected by addr[15:12].
  typedef enum logic [3:0] {
    SEL_LEDS     = 4'h0,
    SEL_SWITCHES = 4'h1,
    SEL_DAC0     = 4'h2,
    SEL_DAC1     = 4'h3,
    SEL_ADC      = 4'h4,
    SEL_FILTER   = 4'h5,
    SEL_TIMER    = 4'h6
  } periph_sel_e;
  localparam int NUM_PERIPH = 7;

  // ------------------------------------------------------ register maps
  // sound filter
  localparam logic [7:0] FILT_IN  = 8'h00;  // sample in (low 16 bits)
  localparam logic [7:0] FILT_OUT = 8'h04;  // envelope out (read only)
  localparam logic [7:0] FILT_REF = 8'h08;  // offset removed from input
  // SPI master
  localparam logic [7:0] SPI_IPISR = 8'h20; // interrupt status, write 1 to clear
  localparam logic [7:0] SPI_CR    = 8'h60; // control
  localparam logic [7:0] SPI_SR    = 8'h64; // status
  localparam logic [7:0] SPI_DTR   = 8'h68; // transmit byte
  localparam logic [7:0] SPI_DRR   = 8'h6C; // receive byte
  localparam logic [7:0] SPI_SSR   = 8'h70; // slave select, bit 0 drives ss_n
  // SPI control bits
  localparam int SPICR_SPE     = 1;  // enable
  localparam int SPICR_MASTER  = 2;
  localparam int SPICR_MANSS   = 7;  // slave select follows SPISSR
  localparam int SPICR_INHIBIT = 8;  // hold the transmitter
  // SPI status bits
  localparam int SPISR_RX_EMPTY = 0;
  localparam int SPISR_TX_EMPTY = 2;
  // timer
  localparam logic [7:0] TMR_TCSR = 8'h00;  // control / status
  localparam logic [7:0] TMR_TLR  = 8'h04;  // load value
  localparam logic [7:0] TMR_TCR  = 8'h08;  // counter (read only)
  localparam int TCSR_UDT  = 1;  // 1 = count down
  localparam int TCSR_ARHT = 4;  // auto reload
  localparam int TCSR_LOAD = 5;  // copy TLR into the counter
  localparam int TCSR_ENIT = 6;  // interrupt enable
  localparam int TCSR_ENT  = 7;  // timer enable
  localparam int TCSR_TINT = 8;  // interrupt flag, write 1 to clear
  // GPIO
  localparam logic [7:0] GPIO_DATA = 8'h00;
  localparam logic [7:0] GPIO_TRI  = 8'h04;

  // ------------------------------------------------- filter coefficients
  localparam int BPF_TAPS  = 11;
  localparam int BPF_UNIQ  = 6;
  localparam logic signed [15:0] BPF_COEF [BPF_UNIQ] =
    '{16'sd1856, 16'sd3960, 16'sd9506, 16'sd16448, 16'sd22113, 16'sd24286};

  localparam int AVG_TAPS = 30;
  localparam logic signed [15:0] AVG_COEF = 16'sd17476;

  // Byte-enabled register update used by every peripheral.
  function automatic logic [31:0] merge_be(logic [31:0] old, logic [31:0] wd,
                                           logic [3:0] be);
    for (int b = 0; b < 4; b++)
      if (be[b]) old[8*b +: 8] = wd[8*b +: 8];
    return old;
  endfunction

endpackage
