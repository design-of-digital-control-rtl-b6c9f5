// tb_rotary_filter: checks the rotary-switch filter with bouncing contacts.
//
// Turns the switch detent by detent in both directions. Every contact
// change is preceded by a random burst of bounce (the changing contact
// flips back and forth for 1..3 clocks at a time). Each detent must give
// exactly one step_o pulse with the right direction; the position register
// must follow the count kept here, and the step flag, its clear and the
// interrupt are checked. A run of pure glitches that returns to the rest
// position must give no step.
module tb_rotary_filter;
  import sa_pkg::*;
  logic clk = 0, rst = 1;
  pbus_req_t req;
  logic [31:0] rdata;
  logic a = 0, b = 0;
  logic step, dir, irq;
  int checks = 0, failures = 0;

  rotary_filter dut (.clk, .rst, .req, .rdata, .rot_a(a), .rot_b(b), .step_o(step), .dir_o(dir), .irq_o(irq));

  always #10 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic wr(input logic [3:0] ad, input logic [31:0] d);
    @(negedge clk); req = '{sel: 1'b1, we: 1'b1, addr: ad, wdata: d};
    @(negedge clk); req.sel = 1'b0; req.we = 1'b0;
  endtask
  task automatic rd(input logic [3:0] ad, output logic [31:0] d);
    @(negedge clk); req = '{sel: 1'b1, we: 1'b0, addr: ad, wdata: '0};
    #1 d = rdata;
    @(negedge clk); req.sel = 1'b0;
  endtask

  int nsteps = 0, nup = 0, ndown = 0;
  always @(posedge clk) if (step) begin
    nsteps++;
    if (dir) nup++; else ndown++;
  end

  // move one contact to a new level, bouncing first
  task automatic move(input bit which_b, input bit lvl, input int nb);
    for (int i = 0; i < nb; i++) begin
      if (which_b) b = lvl; else a = lvl;
      repeat (1 + $urandom % 3) @(negedge clk);
      if (which_b) b = !lvl; else a = !lvl;
      repeat (1 + $urandom % 3) @(negedge clk);
    end
    if (which_b) b = lvl; else a = lvl;
    repeat (10) @(negedge clk);
  endtask

  // one detent: up = B leads (00 -> 10 -> 11 -> 01 -> 00 as {B,A})
  task automatic detent(input bit up);
    int nb;
    nb = $urandom % 4;
    if (up) begin
      move(1, 1, nb); move(0, 1, nb); move(1, 0, nb); move(0, 0, nb);
    end else begin
      move(0, 1, nb); move(1, 1, nb); move(0, 0, nb); move(1, 0, nb);
    end
  endtask

  initial begin
    logic [31:0] v;
    int pos, s0, u0, d0;
    req = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    wr(4'd1, 32'b100);
    pos = 0;
    for (int k = 0; k < 60; k++) begin
      bit up;
      up = (k < 20) ? 1'b1 : (k < 35) ? 1'b0 : 1'($urandom);
      s0 = nsteps; u0 = nup; d0 = ndown;
      detent(up);
      pos += up ? 1 : -1;
      chk(nsteps == s0 + 1, $sformatf("detent %0d: %0d steps", k, nsteps - s0));
      chk(up ? (nup == u0 + 1) : (ndown == d0 + 1), $sformatf("detent %0d direction", k));
      rd(4'd0, v);
      chk($signed(v) == pos, $sformatf("position %0d exp %0d", $signed(v), pos));
      chk(irq == 1, "irq after step");
      rd(4'd1, v); chk(v[0] == 1 && v[1] == up, "status");
      wr(4'd1, 32'b101);
      chk(irq == 0, "irq cleared");
    end
    // glitches only: A flickers and returns to rest
    s0 = nsteps;
    move(0, 0, 5); move(1, 0, 5);
    chk(nsteps == s0, "no step from glitches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
