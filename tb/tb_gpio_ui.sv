// tb_gpio_ui: checks the user-interface GPIO.
//
// Writes random LED and LCD register values and checks the pins (LCD data
// nibble, E, RS, RW); presses and releases buttons and checks the
// synchronised levels, the change bits (set 3 clocks after a pin moves),
// their write-1-to-clear, and the interrupt with and without enable.
module tb_gpio_ui;
  import sa_pkg::*;
  logic clk = 0, rst = 1;
  pbus_req_t req;
  logic [31:0] rdata;
  logic [4:0] btn = '0;
  logic [7:0] led;
  logic [3:0] lcd_d;
  logic lcd_e, lcd_rs, lcd_rw, irq;
  int checks = 0, failures = 0;

  gpio_ui dut (.clk, .rst, .req, .rdata, .btn_i(btn), .led_o(led), .lcd_d_o(lcd_d),
    .lcd_e_o(lcd_e), .lcd_rs_o(lcd_rs), .lcd_rw_o(lcd_rw), .irq_o(irq));

  always #10 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic wr(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); req = '{sel: 1'b1, we: 1'b1, addr: a, wdata: d};
    @(negedge clk); req.sel = 1'b0; req.we = 1'b0;
  endtask
  task automatic rd(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk); req = '{sel: 1'b1, we: 1'b0, addr: a, wdata: '0};
    #1 d = rdata;
    @(negedge clk); req.sel = 1'b0;
  endtask

  initial begin
    logic [31:0] v;
    req = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 20; k++) begin
      logic [7:0] l;
      logic [6:0] d;
      l = 8'($urandom); d = 7'($urandom);
      wr(4'd0, 32'(l)); wr(4'd1, 32'(d));
      chk(led == l, "led pins");
      chk({lcd_rw, lcd_rs, lcd_e, lcd_d} == d, "lcd pins");
      rd(4'd0, v); chk(v[7:0] == l, "led read-back");
    end
    rd(4'd3, v); chk(v == 0, "no change yet");
    chk(irq == 0, "no irq yet");
    wr(4'd4, 1);
    for (int k = 0; k < 20; k++) begin
      logic [4:0] nb, diff;
      nb = 5'($urandom);
      if (nb == btn) nb = ~btn;
      diff = nb ^ btn;
      @(negedge clk); btn = nb;
      @(negedge clk); @(negedge clk);
      @(negedge clk);
      rd(4'd3, v); chk(v[4:0] == diff, $sformatf("change %b exp %b", v[4:0], diff));
      rd(4'd2, v); chk(v[4:0] == nb, "levels");
      chk(irq == 1, "irq on change");
      wr(4'd3, 32'(diff));
      rd(4'd3, v); chk(v[4:0] == 0, "cleared");
      chk(irq == 0, "irq cleared");
    end
    wr(4'd4, 0);
    @(negedge clk); btn = ~btn;
    repeat (5) @(negedge clk);
    chk(irq == 0, "irq masked");
    rd(4'd3, v); chk(v[4:0] == 5'h1F, "change recorded while masked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
