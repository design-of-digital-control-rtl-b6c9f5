// spi_master: SPI shift engine (mode 0, MSB first) for the converter links.
//
// A start_i pulse begins a transfer of nbits_i bits (1..MAX_BITS) taken from
// the low nbits_i bits of tx_i, most significant first. cs_n_o is low for the
// whole transfer. Each bit takes 2*HALF clocks: SCK low for HALF clocks with
// MOSI already set, then high for HALF clocks; MISO is sampled on the rising
// SCK edge and shifted into rx_o from the right. done_o pulses for one clock
// after the last falling edge, when busy_o drops and rx_o is final.
// A transfer of n bits takes 2*HALF*n + 1 clocks from start_i to done_o.
//
// The document names the SPI peripheral and its use for the DAC and ADC;
// mode 0 suits both converters on the board. HALF is this design's choice.
module spi_master #(
  parameter int unsigned MAX_BITS = 34,
  parameter int unsigned HALF     = 2
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         start_i,
  input  logic [$clog2(MAX_BITS+1)-1:0] nbits_i,
  input  logic [MAX_BITS-1:0]          tx_i,
  output logic [MAX_BITS-1:0]          rx_o,
  output logic                         busy_o,
  output logic                         done_o,
  output logic                         sck_o,
  output logic                         mosi_o,
  output logic                         cs_n_o,
  input  logic                         miso_i
);
  localparam int unsigned BW = $clog2(MAX_BITS+1);
  localparam int unsigned HW = (HALF > 1) ? $clog2(HALF) : 1;

  logic [MAX_BITS-1:0] sh;
  logic [BW-1:0]       left;
  logic [HW-1:0]       hcnt;

  assign mosi_o = sh[MAX_BITS-1];

  always_ff @(posedge clk) begin
    done_o <= 1'b0;
    if (rst) begin
      busy_o <= 1'b0;
      sck_o  <= 1'b0;
      cs_n_o <= 1'b1;
      sh     <= '0;
      rx_o   <= '0;
      left   <= '0;
      hcnt   <= '0;
    end else if (!busy_o) begin
      if (start_i && nbits_i != '0) begin
        busy_o <= 1'b1;
        cs_n_o <= 1'b0;
        sh     <= tx_i << (BW'(MAX_BITS) - nbits_i);
        left   <= nbits_i;
        hcnt   <= HW'(HALF - 1);
        rx_o   <= '0;
      end
    end else if (hcnt != '0) begin
      hcnt <= hcnt - 1'b1;
    end else begin
      hcnt <= HW'(HALF - 1);
      if (!sck_o) begin
        sck_o <= 1'b1;
        rx_o  <= {rx_o[MAX_BITS-2:0], miso_i};
      end else begin
        sck_o <= 1'b0;
        sh    <= sh << 1;
        left  <= left - 1'b1;
        if (left == BW'(1)) begin
          busy_o <= 1'b0;
          cs_n_o <= 1'b1;
          done_o <= 1'b1;
        end
      end
    end
  end

  // A start request while busy is dropped; the users never issue one.
  always_ff @(posedge clk)
    if (!rst && busy_o)
      a_no_start_busy: assert (!start_i) else $error("spi_master: start_i while busy");
endmodule
