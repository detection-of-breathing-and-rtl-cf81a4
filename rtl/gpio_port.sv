// gpio_port: 8-bit general-purpose I/O port, used once for the board LEDs
// and once for the DIP switches.
//
// How it works: a data register drives gpio_o and a tri-state register
// gpio_t selects, bit by bit, whether a pin is an input (1) or an output (0).
// Reading DATA returns the pin value: gpio_i for input bits, the data
// register for output bits. Software sets the LED port to all outputs by
// writing 0 to TRI and the switch port is left as inputs (TRI resets to all
// ones). The offsets (DATA at 0x0, TRI at 0x4) are those the control
// software uses; the tri-state reset value follows the usual GPIO peripheral.
//
// Interface: req/rsp bus slave port (same-cycle acknowledge), pin side
// gpio_i/gpio_o/gpio_t. Reset is synchronous, active high.
module gpio_port
  import apnea_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  bus_req_t         req,
  output bus_rsp_t         rsp,
  input  logic [WIDTH-1:0] gpio_i,
  output logic [WIDTH-1:0] gpio_o,
  output logic [WIDTH-1:0] gpio_t
);

  logic [31:0]      data_q, tri_q;
  logic [WIDTH-1:0] pins;

  always_ff @(posedge clk) begin
    if (rst) begin
      data_q <= '0;
      tri_q  <= '1;
    end else if (req.valid && req.wr) begin
      case (req.addr[7:0])
        GPIO_DATA: data_q <= merge_be(data_q, req.wdata, req.be);
        GPIO_TRI:  tri_q  <= merge_be(tri_q,  req.wdata, req.be);
        default: ;
      endcase
    end
  end

  assign gpio_o = data_q[WIDTH-1:0];
  assign gpio_t = tri_q[WIDTH-1:0];
  assign pins   = (gpio_i & gpio_t) | (gpio_o & ~gpio_t);

  always_comb begin
    rsp = BUS_IDLE;
    if (req.valid) begin
      rsp.ack = 1'b1;
      if (!req.wr) begin
        case (req.addr[7:0])
          GPIO_DATA: rsp.rdata = 32'(pins);
          GPIO_TRI:  rsp.rdata = 32'(gpio_t);
          default:   rsp.rdata = '0;
        endcase
      end
    end
  end

endmodule
