// adc_ctrl: analog capture front end, LTC6912-1 preamplifier and LTC1407A-1 ADC.
//
// Both parts share one SPI engine. Writing GAIN sends an 8-bit frame
// {gain B[3:0], gain A[3:0]} to the preamplifier with amp_cs_n low. Writing
// CTRL bit 0 starts a conversion: ad_conv is pulsed high for one clock, then
// 34 SCK cycles clock the result in on spi_miso. Of the 34 bits (first one
// received is bit 33), bits 31:18 are channel 0 and bits 15:2 channel 1, each
// a 14-bit two's complement value; the remaining bits are idle time.
// A gain write or start request that arrives while the engine is busy is
// ignored (STATUS bit 0 tells).
//
// Registers: 0 GAIN (write: [3:0] A, [7:4] B; read: last gain sent),
// 1 CTRL (write bit 0: start conversion), 2 DATA (RO: ch1 in [29:16],
// ch0 in [13:0], each sign-extended to 16 bits), 3 STATUS (bit 0 busy,
// bit 1 done, write 1 to clear; bit 2 interrupt enable, writable).
// irq_o = done & interrupt enable. amp_shdn is held low (amplifier on).
// The document names the parts, the 14-bit two's complement result and
// serial control by the FPGA; frame layouts follow the parts, and the
// register set and one-shot conversion are this design's.
module adc_ctrl
  import sa_pkg::*;
#(
  parameter int unsigned HALF = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  pbus_req_t   req,
  output logic [31:0] rdata,
  output logic        irq_o,
  output logic        sample_done_o,
  output logic        spi_sck,
  output logic        spi_mosi,
  input  logic        spi_miso,
  output logic        amp_cs_n,
  output logic        amp_shdn,
  output logic        ad_conv
);
  typedef enum logic [1:0] {A_IDLE, A_GAIN, A_CONV, A_READ} state_t;
  state_t state;

  logic        start;
  logic [5:0]  nbits;
  logic [33:0] tx, rx;
  logic        busy, done, cs_n;
  logic [7:0]  gain;
  logic [13:0] ch0, ch1;
  logic        done_flag, ie;

  always_ff @(posedge clk) begin
    start         <= 1'b0;
    ad_conv       <= 1'b0;
    sample_done_o <= 1'b0;
    if (rst) begin
      state     <= A_IDLE;
      nbits     <= '0;
      tx        <= '0;
      gain      <= '0;
      ch0       <= '0;
      ch1       <= '0;
      done_flag <= 1'b0;
      ie        <= 1'b0;
    end else begin
      unique case (state)
        A_IDLE: if (req.sel && req.we) begin
          if (req.addr == 4'd0) begin
            gain  <= req.wdata[7:0];
            tx    <= 34'(req.wdata[7:0]);
            nbits <= 6'd8;
            start <= 1'b1;
            state <= A_GAIN;
          end else if (req.addr == 4'd1 && req.wdata[0]) begin
            ad_conv <= 1'b1;
            state   <= A_CONV;
          end
        end
        A_GAIN: if (done) state <= A_IDLE;
        A_CONV: begin
          tx    <= '0;
          nbits <= 6'd34;
          start <= 1'b1;
          state <= A_READ;
        end
        A_READ: if (done) begin
          ch0           <= rx[31:18];
          ch1           <= rx[15:2];
          done_flag     <= 1'b1;
          sample_done_o <= 1'b1;
          state         <= A_IDLE;
        end
        default: state <= A_IDLE;
      endcase
      if (req.sel && req.we && req.addr == 4'd3) begin
        ie <= req.wdata[2];
        if (req.wdata[1]) done_flag <= 1'b0;
      end
    end
  end

  spi_master #(.MAX_BITS(34), .HALF(HALF)) u_spi (
    .clk, .rst,
    .start_i(start), .nbits_i(nbits), .tx_i(tx),
    .rx_o(rx), .busy_o(busy), .done_o(done),
    .sck_o(spi_sck), .mosi_o(spi_mosi), .cs_n_o(cs_n), .miso_i(spi_miso)
  );

  assign amp_cs_n = (state == A_GAIN) ? cs_n : 1'b1;
  assign amp_shdn = 1'b0;
  assign irq_o    = done_flag & ie;

  always_comb begin
    unique case (req.addr)
      4'd0:    rdata = {24'd0, gain};
      4'd2:    rdata = {{2{ch1[13]}}, ch1, {2{ch0[13]}}, ch0};
      4'd3:    rdata = {29'd0, ie, done_flag, (state != A_IDLE) | busy};
      default: rdata = '0;
    endcase
  end
endmodule
