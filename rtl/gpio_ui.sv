// gpio_ui: general-purpose I/O for the user-interface devices.
//
// Drives the LEDs and the character LCD pins from registers written by the
// processor (the LCD is driven pin by pin from software), and reads the push
// buttons through a two-flip-flop synchroniser. A button that changes level
// sets its bit in the change register, which raises irq_o while enabled.
//
// Registers: 0 LED (R/W, N_LED bits), 1 LCD (R/W: [3:0] data nibble, bit 4 E,
// bit 5 RS, bit 6 RW), 2 BUTTONS (RO, synchronised levels), 3 CHANGE
// (bit per button, write 1 to clear), 4 IER (bit 0 change-interrupt enable).
// A button edge appears in CHANGE 3 clocks after the pin moves.
// The document lists buttons, LCD and LEDs on this block; the pin grouping
// (4-bit LCD data bus) and registers are this design's.
module gpio_ui
  import sa_pkg::*;
#(
  parameter int unsigned N_BTN = 5,
  parameter int unsigned N_LED = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  pbus_req_t        req,
  output logic [31:0]      rdata,
  input  logic [N_BTN-1:0] btn_i,
  output logic [N_LED-1:0] led_o,
  output logic [3:0]       lcd_d_o,
  output logic             lcd_e_o,
  output logic             lcd_rs_o,
  output logic             lcd_rw_o,
  output logic             irq_o
);
  logic [N_BTN-1:0] s0, s1, s2, chg;
  logic [6:0]       lcd;
  logic             ie;

  always_ff @(posedge clk) begin
    if (rst) begin
      s0 <= '0; s1 <= '0; s2 <= '0; chg <= '0;
      led_o <= '0; lcd <= '0; ie <= 1'b0;
    end else begin
      s0 <= btn_i;
      s1 <= s0;
      s2 <= s1;
      if (req.sel && req.we) begin
        unique case (req.addr)
          4'd0: led_o <= req.wdata[N_LED-1:0];
          4'd1: lcd   <= req.wdata[6:0];
          4'd4: ie    <= req.wdata[0];
          default: ;
        endcase
      end
      // New edges win over a clear in the same clock.
      if (req.sel && req.we && req.addr == 4'd3)
        chg <= (chg & ~req.wdata[N_BTN-1:0]) | (s1 ^ s2);
      else
        chg <= chg | (s1 ^ s2);
    end
  end

  always_comb begin
    unique case (req.addr)
      4'd0:    rdata = 32'(led_o);
      4'd1:    rdata = 32'(lcd);
      4'd2:    rdata = 32'(s2);
      4'd3:    rdata = 32'(chg);
      4'd4:    rdata = {31'd0, ie};
      default: rdata = '0;
    endcase
  end

  assign lcd_d_o  = lcd[3:0];
  assign lcd_e_o  = lcd[4];
  assign lcd_rs_o = lcd[5];
  assign lcd_rw_o = lcd[6];
  assign irq_o    = ie & (|chg);
endmodule
