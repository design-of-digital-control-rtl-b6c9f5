// sa_pkg: types and constants shared by the spectrum-analyser control logic.
//
// The peripherals hang on a simple single-cycle register bus that stands in
// for the soft processor's peripheral bus. A master drives one request for
// one clock (sel=1); a write takes effect on that edge, and read data is
// returned combinationally in the same cycle. Register reads that have a side
// effect (popping the UART receive register) act on that same edge.
// The register map below is this design's own; the document names the
// peripherals but not their registers.
package sa_pkg;

  // Master side: 8-bit word address, upper nibble selects the peripheral.
  typedef struct packed {
    logic        sel;
    logic        we;
    logic [7:0]  addr;
    logic [31:0] wdata;
  } pbus_mreq_t;

  // Slave side: 4-bit register index inside one peripheral.
  typedef struct packed {
    logic        sel;
    logic        we;
    logic [3:0]  addr;
    logic [31:0] wdata;
  } pbus_req_t;

  // Peripheral slots (upper address nibble).
  localparam int unsigned NSLAVES    = 9;
  localparam logic [3:0] SLOT_SWEEP  = 4'd0;
  localparam logic [3:0] SLOT_TIMER0 = 4'd1;
  localparam logic [3:0] SLOT_TIMER1 = 4'd2;
  localparam logic [3:0] SLOT_GPIO   = 4'd3;
  localparam logic [3:0] SLOT_ROTARY = 4'd4;
  localparam logic [3:0] SLOT_INTC   = 4'd5;
  localparam logic [3:0] SLOT_UART   = 4'd6;
  localparam logic [3:0] SLOT_ADC    = 4'd7;
  localparam logic [3:0] SLOT_DAC    = 4'd8;

  // Interrupt source numbering at the interrupt controller.
  localparam int unsigned NIRQ     = 6;
  localparam int unsigned IRQ_TMR0 = 0;
  localparam int unsigned IRQ_TMR1 = 1;
  localparam int unsigned IRQ_GPIO = 2;
  localparam int unsigned IRQ_ROT  = 3;
  localparam int unsigned IRQ_UART = 4;
  localparam int unsigned IRQ_ADC  = 5;

  // LTC2624 24-bit command word fields (command, address).
  localparam logic [3:0] LTC_CMD_WRITE_N          = 4'b0000;
  localparam logic [3:0] LTC_CMD_WRITE_N_UPD_ALL  = 4'b0010;
  localparam logic [3:0] LTC_ADDR_C               = 4'b0010;
  localparam logic [3:0] LTC_ADDR_D               = 4'b0011;

endpackage
