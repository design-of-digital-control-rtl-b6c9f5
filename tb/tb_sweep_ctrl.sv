// tb_sweep_ctrl: checks the linear sweep of the tuning word.
//
// Programs MIN/MAX/STEP over the register bus, drives delta-t ticks from the
// testbench at irregular spacing, and compares FTW after each tick with a
// model of the flow chart (add STEP, back to MIN once MAX is reached). Also
// checks that FTW is held at MIN while disabled, that it only changes in the
// clock after a tick, the sweep counter and the register read-back.
module tb_sweep_ctrl;
  import sa_pkg::*;
  logic clk = 0, rst = 1;
  pbus_req_t req;
  logic [31:0] rdata;
  logic tick = 0;
  logic [24:0] ftw;
  logic en, wrap;
  int checks = 0, failures = 0;

  sweep_ctrl dut (.clk, .rst, .req, .rdata, .tick_i(tick), .ftw_o(ftw), .enable_o(en), .wrap_o(wrap));

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

  task automatic one_tick(input int gap);
    repeat (gap) @(negedge clk);
    tick = 1; @(negedge clk); tick = 0;
  endtask

  int wraps_seen = 0;
  always @(posedge clk) if (wrap) wraps_seen++;

  task automatic sweep(input int mn, input int mx, input int st, input int nticks);
    int m;
    logic [31:0] v;
    int w0;
    wr(4'd0, 0);
    wr(4'd1, mn); wr(4'd2, mx); wr(4'd3, st);
    @(negedge clk);
    chk(ftw == 25'(mn), "held at MIN while disabled");
    wr(4'd0, 1);
    m = mn;
    w0 = wraps_seen;
    for (int k = 0; k < nticks; k++) begin
      int w;
      one_tick(1 + (k * 7) % 5);
      w = 0;
      if (m + st >= mx) begin m = mn; w = 1; end else m = m + st;
      chk(ftw == 25'(m), $sformatf("ftw after tick %0d: %0d exp %0d", k, ftw, m));
    end
    // no change without a tick
    repeat (10) @(negedge clk);
    chk(ftw == 25'(m), "no change without tick");
    rd(4'd4, v); chk(v == 32'(m), "FTW read-back");
    rd(4'd2, v); chk(v == 32'(mx), "MAX read-back");
  endtask

  initial begin
    logic [31:0] v;
    req = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    sweep(100, 160, 20, 12);      // MAX reached exactly: 100,120,140,100...
    sweep(0, 50, 20, 10);         // STEP does not divide: 0,20,40,0...
    sweep(1000, 33_554_431, 4_000_000, 20);  // near the top of the 25-bit range
    rd(4'd5, v);
    chk(v == 32'(wraps_seen) && wraps_seen > 5, $sformatf("sweep count %0d vs %0d", v, wraps_seen));
    // latency: FTW changes on the clock after the tick
    wr(4'd0, 0); wr(4'd1, 5); wr(4'd2, 1000); wr(4'd3, 3); wr(4'd0, 1);
    @(negedge clk); tick = 1;
    @(posedge clk); #1 chk(ftw == 25'd8, "one clock after tick");
    @(negedge clk); tick = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
