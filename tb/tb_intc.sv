// tb_intc: checks the interrupt controller.
//
// Raises random sources (as level requests), and checks that each rising
// edge sets its pending bit, that irq follows two clocks after an enabled
// edge only with the master enable set, that IPR shows pending & enabled,
// that acknowledging through IAR clears exactly the written bits, and that a
// source held high does not re-trigger until it has dropped.
module tb_intc;
  import sa_pkg::*;
  logic clk = 0, rst = 1;
  pbus_req_t req;
  logic [31:0] rdata;
  logic [5:0] src = '0;
  logic irq;
  int checks = 0, failures = 0;

  intc dut (.clk, .rst, .req, .rdata, .src_i(src), .irq_o(irq));

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
    logic [5:0] pend, en;
    req = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    pend = '0;
    wr(4'd4, 1);
    for (int k = 0; k < 40; k++) begin
      logic [5:0] ns;
      en = 6'($urandom);
      wr(4'd1, 32'(en));
      ns = 6'($urandom);
      pend |= ns & ~src;
      @(negedge clk); src = ns;
      @(negedge clk);
      @(negedge clk);
      chk(irq == ((pend & en) != 0), $sformatf("irq k=%0d", k));
      rd(4'd0, v); chk(v[5:0] == pend, $sformatf("ISR %b exp %b", v[5:0], pend));
      rd(4'd3, v); chk(v[5:0] == (pend & en), "IPR");
      // acknowledge a random subset
      begin
        logic [5:0] ack;
        ack = 6'($urandom);
        wr(4'd2, 32'(ack));
        pend &= ~ack;
        rd(4'd0, v); chk(v[5:0] == pend, "after IAR");
      end
    end
    // master enable off masks the output
    wr(4'd2, 32'h3F); pend = '0;
    @(negedge clk); src = '0;
    wr(4'd1, 32'h3F);
    wr(4'd4, 0);
    @(negedge clk); src = 6'b000001;
    repeat (4) @(negedge clk);
    chk(irq == 0, "masked by MER");
    wr(4'd4, 1);
    @(negedge clk); @(negedge clk);
    chk(irq == 1, "MER enables");
    // held level does not re-trigger after acknowledge
    wr(4'd2, 1);
    repeat (4) @(negedge clk);
    chk(irq == 0, "no retrigger on held level");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
