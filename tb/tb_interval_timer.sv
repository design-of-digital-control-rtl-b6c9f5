// tb_interval_timer: checks the interval timer's period, modes and flags.
//
// In auto-reload mode the ticks must come every LOAD+1 clocks, for several
// LOAD values; in one-shot mode exactly one tick comes LOAD+1 clocks after
// enabling and the timer then disables itself. Also checks the expired flag
// and its write-1-to-clear, the interrupt output gating and register
// read-back.
module tb_interval_timer;
  import sa_pkg::*;
  logic clk = 0, rst = 1;
  pbus_req_t req;
  logic [31:0] rdata;
  logic tick, irq;
  int checks = 0, failures = 0;

  interval_timer dut (.clk, .rst, .req, .rdata, .tick_o(tick), .irq_o(irq));

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

  int t = 0;
  int ticks[$];
  always @(posedge clk) begin
    t++;
    if (tick) ticks.push_back(t);
  end

  initial begin
    logic [31:0] v;
    int ten;
    req = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    foreach (ticks[i]) ;
    for (int L = 0; L < 40; L += 7) begin
      wr(4'd1, L);
      ticks.delete();
      wr(4'd0, 32'b011);          // enable, auto-reload
      repeat (6 * (L + 1) + 5) @(negedge clk);
      wr(4'd0, 0);
      chk(ticks.size() >= 5, $sformatf("L=%0d ticks %0d", L, ticks.size()));
      for (int i = 1; i < ticks.size(); i++)
        chk(ticks[i] - ticks[i-1] == L + 1, $sformatf("L=%0d period %0d", L, ticks[i] - ticks[i-1]));
    end
    // one-shot
    wr(4'd3, 1);
    rd(4'd3, v); chk(v[0] == 0, "expired cleared");
    wr(4'd1, 20);
    ticks.delete();
    @(negedge clk); req = '{sel: 1'b1, we: 1'b1, addr: 4'd0, wdata: 32'b101};
    ten = t;   // the write edge is ten+1; tick_o is high after edge ten+1+LOAD+1
    @(negedge clk); req.sel = 1'b0; req.we = 1'b0;
    repeat (100) @(negedge clk);
    chk(ticks.size() == 1, $sformatf("one-shot ticks %0d", ticks.size()));
    if (ticks.size() > 0) chk(ticks[0] - ten == 23, $sformatf("one-shot delay %0d", ticks[0] - ten));
    rd(4'd0, v); chk(v[0] == 0 && v[2] == 1, "one-shot disabled itself");
    rd(4'd3, v); chk(v[0] == 1, "expired set");
    chk(irq == 1, "irq with enable");
    wr(4'd0, 0);
    chk(irq == 0, "irq masked");
    wr(4'd3, 1);
    rd(4'd3, v); chk(v[0] == 0, "w1c");
    rd(4'd1, v); chk(v == 20, "load read-back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
