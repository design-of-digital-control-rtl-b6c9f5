// tb_proc_sys_reset: checks the reset generator.
//
// Checks that reset is asserted at once (without a clock edge) by the
// external reset and by loss of lock, and that it is released exactly
// 3 + HOLD clock edges after the later of the two requests went away,
// including a request that comes back during the hold time.
module tb_proc_sys_reset;
  logic clk = 0, ext_rst = 1, locked = 0, rst;
  int checks = 0, failures = 0;

  proc_sys_reset dut (.clk, .ext_rst, .locked, .rst_o(rst));

  always #10 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // count edges until rst falls; expect 3 + 16 = 19
  task automatic release_time(input string what);
    int n;
    n = 0;
    while (rst) begin @(posedge clk); n++; #1; end
    chk(n == 19, $sformatf("%s: released after %0d edges", what, n));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    chk(rst == 1, "in reset at start");
    ext_rst = 0;
    repeat (5) @(negedge clk);
    chk(rst == 1, "held while not locked");
    locked = 1;
    #1 release_time("lock");
    repeat (5) @(negedge clk);
    #3 ext_rst = 1;
    #1 chk(rst == 1, "asynchronous assert by ext_rst");
    @(negedge clk); ext_rst = 0;
    #1 release_time("ext_rst");
    repeat (3) @(negedge clk);
    #3 locked = 0;
    #1 chk(rst == 1, "asynchronous assert by lock loss");
    @(negedge clk); locked = 1;
    repeat (8) @(negedge clk);
    ext_rst = 1; @(negedge clk); ext_rst = 0;
    #1 release_time("request during hold");
    repeat (40) @(negedge clk);
    chk(rst == 0, "stays released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
