// tb_lmb_bram: checks the 32 kB dual-port local memory at full size.
//
// Fills all 8192 words through the data port with a pattern computed here,
// reads them back through both ports (one clock latency), then runs random
// byte-enable writes against a reference array and checks read-first
// behaviour on a port-D write and that a port without enable holds its
// output.
module tb_lmb_bram;
  localparam int WORDS = 8192;
  logic clk = 0;
  logic i_en = 0, d_en = 0;
  logic [12:0] i_addr = '0, d_addr = '0;
  logic [3:0] d_we = '0;
  logic [31:0] d_wdata = '0, i_rdata, d_rdata;
  logic [31:0] ref_mem [WORDS];
  int checks = 0, failures = 0;

  lmb_bram dut (.clk, .i_en, .i_addr, .i_rdata, .d_en, .d_we, .d_addr, .d_wdata, .d_rdata);

  always #10 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic logic [31:0] pat(input int a);
    return 32'(a) * 32'h9E3779B1 ^ 32'h5A5A0000;
  endfunction

  initial begin
    @(negedge clk);
    for (int a = 0; a < WORDS; a++) begin
      d_en = 1; d_we = 4'hF; d_addr = 13'(a); d_wdata = pat(a); ref_mem[a] = pat(a);
      @(negedge clk);
    end
    d_we = 0;
    for (int a = 0; a < WORDS; a++) begin
      i_en = 1; i_addr = 13'(a); d_addr = 13'(WORDS - 1 - a);
      @(negedge clk);
      chk(i_rdata == ref_mem[a], $sformatf("I port %0d", a));
      chk(d_rdata == ref_mem[WORDS - 1 - a], $sformatf("D port %0d", a));
    end
    for (int k = 0; k < 3000; k++) begin
      int a;
      logic [31:0] old;
      a = $urandom % 64;
      d_en = 1; d_we = 4'($urandom); d_addr = 13'(a); d_wdata = $urandom;
      old = ref_mem[a];
      for (int b = 0; b < 4; b++) if (d_we[b]) ref_mem[a][8*b +: 8] = d_wdata[8*b +: 8];
      i_addr = 13'($urandom % 64);
      @(negedge clk);
      chk(d_rdata == old, "read-first");
      d_we = 0;
      @(negedge clk);
      chk(d_rdata == ref_mem[a], "byte-enable write");
    end
    i_en = 0; d_en = 0;
    begin
      logic [31:0] hold;
      hold = i_rdata;
      i_addr = i_addr + 1;
      @(negedge clk);
      chk(i_rdata == hold, "hold without enable");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
