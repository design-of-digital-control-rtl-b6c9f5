// dac_ltc2624_ctrl: streams the DDS sine and cosine into an LTC2624 quad DAC.
//
// This is the "transfer DDS data to DAC" loop of the control program, done
// in logic. While enabled it repeatedly samples sin_i and cos_i in the same
// clock, turns each 14-bit two's complement value into a 12-bit offset-binary
// code (drop the two low bits, invert the sign bit), and sends two 32-bit SPI
// frames: the sine to channel C with "write input register", then the cosine
// to channel D with "write input register, update all". Both outputs thus
// change together on the second frame. Channels C and D are the ones
// referenced to 2.5 V, so the outputs swing 0..2.5 V around 1.25 V.
//
// Frame layout (MSB first): 8 don't-care bits (sent as 0), command[3:0],
// address[3:0], data[11:0], 4 don't-care bits. dac_clr_n is held high.
//
// Registers: 0 CTRL (bit 0 enable), 1 number of sample pairs sent (RO),
// 2 codes of the pair being sent (cosine in [27:16], sine in [11:0], RO).
// Timing: one pair takes 2 * (2*HALF*32 + 1) + 3 clocks (261 at HALF=2,
// about 191 k pairs/s at 50 MHz).
// The document fixes the DAC part, its 12-bit unsigned input and the use of
// the 2.5 V channels; the frame format is the part's; the command choice and
// the continuous streaming are this design's.
module dac_ltc2624_ctrl
  import sa_pkg::*;
#(
  parameter int unsigned OUT_W = 14,
  parameter int unsigned HALF  = 2
) (
  input  logic                    clk,
  input  logic                    rst,
  input  pbus_req_t               req,
  output logic [31:0]             rdata,
  input  logic signed [OUT_W-1:0] sin_i,
  input  logic signed [OUT_W-1:0] cos_i,
  input  logic                    valid_i,
  output logic                    pair_done_o,
  output logic                    dac_sck,
  output logic                    dac_mosi,
  output logic                    dac_cs_n,
  output logic                    dac_clr_n,
  input  logic                    dac_miso
);
  typedef enum logic [1:0] {S_IDLE, S_SIN, S_COS} state_t;
  state_t state;

  logic        en;
  logic [31:0] npairs;
  logic [11:0] code_s, code_c;
  logic        start, busy, done;
  logic [31:0] frame;
  logic [31:0] rx_unused;

  function automatic logic [11:0] to_code(input logic signed [OUT_W-1:0] v);
    return {~v[OUT_W-1], v[OUT_W-2 -: 11]};
  endfunction

  always_ff @(posedge clk) begin
    start       <= 1'b0;
    pair_done_o <= 1'b0;
    if (rst) begin
      state  <= S_IDLE;
      en     <= 1'b0;
      npairs <= '0;
      code_s <= '0;
      code_c <= '0;
      frame  <= '0;
    end else begin
      if (req.sel && req.we && req.addr == 4'd0) en <= req.wdata[0];
      unique case (state)
        S_IDLE: if (en && valid_i && !busy) begin
          code_s <= to_code(sin_i);
          code_c <= to_code(cos_i);
          frame  <= {8'h00, LTC_CMD_WRITE_N, LTC_ADDR_C, to_code(sin_i), 4'h0};
          start  <= 1'b1;
          state  <= S_SIN;
        end
        S_SIN: if (done) begin
          frame <= {8'h00, LTC_CMD_WRITE_N_UPD_ALL, LTC_ADDR_D, code_c, 4'h0};
          start <= 1'b1;
          state <= S_COS;
        end
        S_COS: if (done) begin
          npairs      <= npairs + 1;
          pair_done_o <= 1'b1;
          state       <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  spi_master #(.MAX_BITS(32), .HALF(HALF)) u_spi (
    .clk, .rst,
    .start_i(start), .nbits_i(6'd32), .tx_i(frame),
    .rx_o(rx_unused), .busy_o(busy), .done_o(done),
    .sck_o(dac_sck), .mosi_o(dac_mosi), .cs_n_o(dac_cs_n), .miso_i(dac_miso)
  );

  assign dac_clr_n = ~rst;

  always_comb begin
    unique case (req.addr)
      4'd0:    rdata = {31'd0, en};
      4'd1:    rdata = npairs;
      4'd2:    rdata = {4'd0, code_c, 4'd0, code_s};
      default: rdata = '0;
    endcase
  end
endmodule
