// tb_adc_ctrl: checks preamplifier programming and ADC reads against a model.
//
// Writes random gains and checks that the preamplifier model received them
// (and that no conversion was triggered); starts conversions with random
// analog codes at the model and checks both channels in the DATA register
// (sign-extended), the done flag, its clear, the interrupt, the busy bit and
// the conversion time: 139 clocks from the CTRL write edge to sample_done.
module tb_adc_ctrl;
  import sa_pkg::*;
  logic clk = 0, rst = 1;
  pbus_req_t req;
  logic [31:0] rdata;
  logic irq, sdone, sck, mosi, miso, amp_cs_n, amp_shdn, ad_conv;
  logic [13:0] ch0, ch1;
  logic [3:0] ga, gb;
  int n_conv, n_gain;
  int checks = 0, failures = 0;

  adc_ctrl dut (.clk, .rst, .req, .rdata, .irq_o(irq), .sample_done_o(sdone),
    .spi_sck(sck), .spi_mosi(mosi), .spi_miso(miso), .amp_cs_n, .amp_shdn, .ad_conv);
  adc_frontend_model fe (.sck, .sdi(mosi), .amp_cs_n, .ad_conv, .ch0_in(ch0), .ch1_in(ch1),
    .sdo(miso), .gain_a(ga), .gain_b(gb), .n_conv, .n_gain);

  always #10 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
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
  task automatic wait_idle();
    logic [31:0] v;
    do rd(4'd3, v); while (v[0]);
  endtask

  initial begin
    logic [31:0] v;
    req = '0; ch0 = '0; ch1 = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    chk(amp_shdn == 0, "amplifier enabled");
    for (int k = 0; k < 8; k++) begin
      logic [7:0] g;
      g = 8'($urandom);
      wr(4'd0, 32'(g));
      wait_idle();
      chk(ga == g[3:0] && gb == g[7:4], $sformatf("gain %h -> A=%h B=%h", g, ga, gb));
      rd(4'd0, v); chk(v[7:0] == g, "gain read-back");
    end
    chk(n_conv == 0, "no conversion during gain writes");
    wr(4'd3, 32'b100);    // interrupt enable
    for (int k = 0; k < 20; k++) begin
      int t0, t1;
      logic signed [13:0] s0, s1;
      ch0 = (k == 0) ? 14'h2000 : (k == 1) ? 14'h1FFF : 14'($urandom);
      ch1 = (k == 0) ? 14'h1FFF : (k == 1) ? 14'h2000 : 14'($urandom);
      s0 = $signed(ch0); s1 = $signed(ch1);
      @(negedge clk); req = '{sel: 1'b1, we: 1'b1, addr: 4'd1, wdata: 32'd1};
      t0 = $time / 20;
      @(negedge clk); req.sel = 1'b0; req.we = 1'b0;
      @(posedge sdone); t1 = $time / 20;
      chk(t1 - t0 == 139, $sformatf("conversion time %0d", t1 - t0));
      rd(4'd2, v);
      chk($signed(v[15:0]) == 16'(s0) && $signed(v[31:16]) == 16'(s1),
          $sformatf("data %h vs ch0 %h ch1 %h", v, ch0, ch1));
      rd(4'd3, v); chk(v[1] == 1 && v[0] == 0, "done, not busy");
      chk(irq == 1, "irq on done");
      wr(4'd3, 32'b110);
      rd(4'd3, v); chk(v[1] == 0, "done cleared");
      chk(irq == 0, "irq cleared");
    end
    chk(n_conv == 20 && n_gain == 8, "conversion and gain counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
