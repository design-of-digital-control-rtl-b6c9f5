// uart_lite: RS232 serial port for the PC connection (8 data bits, no
// parity, 1 stop bit, LSB first).
//
// Transmit: writing TXDATA while the transmitter is idle sends the byte as a
// start bit, 8 data bits and a stop bit, each BIT_CLKS = CLK_HZ/BAUD clocks
// long; a write while busy is dropped (STATUS bit 1 says busy). Receive: the
// line is synchronised, a falling edge starts a frame, the start bit is
// checked half a bit later and the data and stop bits are then sampled at
// their middles. A complete byte lands in RXDATA and sets rx_valid; reading
// RXDATA clears it. A byte that arrives while rx_valid is still set is lost
// and sets the overrun flag; a low stop bit sets the framing-error flag.
//
// Registers: 0 RXDATA (read pops), 1 TXDATA (write), 2 STATUS (RO: bit 0
// rx_valid, 1 tx_busy, 2 overrun, 3 framing error), 3 CTRL (bit 0 interrupt
// enable, R/W; write bit 1 = clear error flags). irq_o = rx_valid & enable.
// The document only names a UART for the PC link; the frame format and the
// default 9600 baud are this design's choices.
module uart_lite
  import sa_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic        clk,
  input  logic        rst,
  input  pbus_req_t   req,
  output logic [31:0] rdata,
  input  logic        rxd,
  output logic        txd,
  output logic        irq_o
);
  localparam int unsigned BIT_CLKS = CLK_HZ / BAUD;
  localparam int unsigned CW = $clog2(BIT_CLKS + 1);

  // ---------------- transmitter ----------------
  logic [9:0]    tx_sh;
  logic [3:0]    tx_left;
  logic [CW-1:0] tx_cnt;
  logic          tx_busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_sh <= '1; tx_left <= '0; tx_cnt <= '0; tx_busy <= 1'b0;
    end else if (!tx_busy) begin
      if (req.sel && req.we && req.addr == 4'd1) begin
        tx_sh   <= {1'b1, req.wdata[7:0], 1'b0};
        tx_left <= 4'd10;
        tx_cnt  <= CW'(BIT_CLKS - 1);
        tx_busy <= 1'b1;
      end
    end else if (tx_cnt != '0) begin
      tx_cnt <= tx_cnt - 1'b1;
    end else begin
      tx_cnt  <= CW'(BIT_CLKS - 1);
      tx_sh   <= {1'b1, tx_sh[9:1]};
      tx_left <= tx_left - 1'b1;
      if (tx_left == 4'd1) tx_busy <= 1'b0;
    end
  end
  assign txd = tx_busy ? tx_sh[0] : 1'b1;

  // ---------------- receiver ----------------
  logic [2:0]    rx_s;
  logic          rx_act;
  logic [3:0]    rx_bit;
  logic [CW-1:0] rx_cnt;
  logic [7:0]    rx_sh, rx_data;
  logic          rx_valid, overrun, ferr, ie;
  logic          pop;

  assign pop = req.sel && !req.we && req.addr == 4'd0;

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_s <= '1; rx_act <= 1'b0; rx_bit <= '0; rx_cnt <= '0;
      rx_sh <= '0; rx_data <= '0; rx_valid <= 1'b0;
      overrun <= 1'b0; ferr <= 1'b0; ie <= 1'b0;
    end else begin
      rx_s <= {rx_s[1:0], rxd};
      if (pop) rx_valid <= 1'b0;
      if (!rx_act) begin
        if (rx_s[2] && !rx_s[1]) begin
          rx_act <= 1'b1;
          rx_bit <= '0;
          rx_cnt <= CW'(BIT_CLKS / 2 - 1);
        end
      end else if (rx_cnt != '0) begin
        rx_cnt <= rx_cnt - 1'b1;
      end else begin
        rx_cnt <= CW'(BIT_CLKS - 1);
        rx_bit <= rx_bit + 1'b1;
        if (rx_bit == 4'd0) begin
          if (rx_s[1]) rx_act <= 1'b0;       // false start
        end else if (rx_bit <= 4'd8) begin
          rx_sh <= {rx_s[1], rx_sh[7:1]};
        end else begin
          rx_act <= 1'b0;
          if (!rx_s[1]) ferr <= 1'b1;
          if (rx_valid && !pop) overrun <= 1'b1;
          else begin
            rx_data  <= rx_sh;
            rx_valid <= 1'b1;
          end
        end
      end
      if (req.sel && req.we && req.addr == 4'd3) begin
        ie <= req.wdata[0];
        if (req.wdata[1]) begin
          overrun <= 1'b0;
          ferr    <= 1'b0;
        end
      end
    end
  end

  always_comb begin
    unique case (req.addr)
      4'd0:    rdata = {24'd0, rx_data};
      4'd2:    rdata = {28'd0, ferr, overrun, tx_busy, rx_valid};
      4'd3:    rdata = {31'd0, ie};
      default: rdata = '0;
    endcase
  end

  assign irq_o = rx_valid & ie;
endmodule
