// tb_uart_lite: checks the UART at its default 9600 baud on a 50 MHz clock.
//
// Transmit: for random bytes, samples txd in the middle of each bit period
// (5208 clocks, computed here) and checks start bit, data LSB first, stop
// bit, the busy flag and the frame length. Receive: drives frames into rxd,
// one of them 2% fast, and checks RXDATA, rx_valid, the interrupt and that
// reading pops the byte; then provokes an overrun (second byte while the
// first is unread: first byte kept, flag set) and a framing error (low stop
// bit), and clears both flags.
module tb_uart_lite;
  import sa_pkg::*;
  localparam int BIT = 50_000_000 / 9600;
  logic clk = 0, rst = 1;
  pbus_req_t req;
  logic [31:0] rdata;
  logic rxd = 1, txd, irq;
  int checks = 0, failures = 0;

  uart_lite dut (.clk, .rst, .req, .rdata, .rxd, .txd, .irq_o(irq));

  always #10 clk = ~clk;
  initial begin
    repeat (3_000_000) @(posedge clk);
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

  task automatic send(input logic [7:0] d, input int bitlen, input bit stop);
    logic [9:0] f;
    f = {stop, d, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = f[i];
      repeat (bitlen) @(negedge clk);
    end
    rxd = 1;
    repeat (BIT) @(negedge clk);
  endtask

  initial begin
    logic [31:0] v;
    req = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    chk(txd == 1, "line idle high");
    // ---- transmit ----
    for (int k = 0; k < 4; k++) begin
      logic [7:0] d;
      d = (k == 0) ? 8'h55 : 8'($urandom);
      @(negedge clk); req = '{sel: 1'b1, we: 1'b1, addr: 4'd1, wdata: 32'(d)};
      @(negedge clk); req.sel = 1'b0; req.we = 1'b0;
      // txd went low at the write edge, half a clock ago
      repeat (BIT / 2 - 1) @(negedge clk);
      chk(txd == 0, "start bit");
      rd(4'd2, v); chk(v[1] == 1, "tx busy");
      repeat (BIT - 2) @(negedge clk);
      for (int i = 0; i < 8; i++) begin
        chk(txd == d[i], $sformatf("tx bit %0d of %h", i, d));
        repeat (BIT) @(negedge clk);
      end
      chk(txd == 1, "stop bit");
      repeat (BIT / 2 + 2) @(negedge clk);
      rd(4'd2, v); chk(v[1] == 0, "tx idle after frame");
    end
    // ---- receive ----
    wr(4'd3, 1);   // interrupt enable
    for (int k = 0; k < 5; k++) begin
      logic [7:0] d;
      d = 8'($urandom);
      send(d, (k == 2) ? BIT * 98 / 100 : BIT, 1);
      rd(4'd2, v); chk(v[0] == 1, "rx valid");
      chk(irq == 1, "rx irq");
      rd(4'd0, v); chk(v[7:0] == d, $sformatf("rx %h exp %h", v[7:0], d));
      rd(4'd2, v); chk(v[0] == 0, "popped");
      chk(irq == 0, "irq cleared by read");
    end
    // ---- overrun ----
    send(8'hA5, BIT, 1);
    send(8'h3C, BIT, 1);
    rd(4'd2, v); chk(v[2] == 1 && v[0] == 1, "overrun flagged");
    rd(4'd0, v); chk(v[7:0] == 8'hA5, "first byte kept");
    // ---- framing error ----
    send(8'h0F, BIT, 0);
    rd(4'd2, v); chk(v[3] == 1, "framing error flagged");
    rd(4'd0, v);
    wr(4'd3, 32'b11);
    rd(4'd2, v); chk(v[3:2] == 0, "errors cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
