// tb_spi_master: checks the SPI shift engine against a slave written here.
//
// The slave captures MOSI on each rising SCK edge while CS is low and drives
// MISO from its own pattern, changing it on falling edges. For random words
// of several lengths the test compares the captured bits with tx, rx with
// the slave's pattern, the number of SCK pulses, and the transfer time of
// 2*HALF*n + 1 clocks from start to done.
module tb_spi_master;
  logic clk = 0, rst = 1;
  logic start = 0;
  logic [5:0] nbits;
  logic [33:0] tx, rx;
  logic busy, done, sck, mosi, cs_n, miso;
  int checks = 0, failures = 0;

  spi_master dut (.clk, .rst, .start_i(start), .nbits_i(nbits), .tx_i(tx), .rx_o(rx),
                  .busy_o(busy), .done_o(done), .sck_o(sck), .mosi_o(mosi), .cs_n_o(cs_n),
                  .miso_i(miso));

  always #10 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // slave model
  logic [33:0] got, pat;
  int nedges, sent;
  always @(posedge sck) if (!cs_n) begin got = {got[32:0], mosi}; nedges++; end
  always @(negedge sck) if (!cs_n) begin sent++; miso = pat[33 - sent]; end
  always @(negedge cs_n) begin sent = 0; miso = pat[33]; end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic xfer(input int n);
    int t;
    logic [33:0] m;
    m = (n == 34) ? '1 : ((34'd1 << n) - 1);
    tx = {$urandom, $urandom} & m;
    pat = {$urandom, $urandom};
    got = '0; nedges = 0;
    nbits = 6'(n);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    t = 1;
    while (!done) begin @(negedge clk); t++; end
    chk(got == tx, $sformatf("mosi bits n=%0d got %h tx %h", n, got, tx));
    chk(rx == ((pat >> (34 - n)) & m), $sformatf("rx n=%0d %h", n, rx));
    chk(nedges == n, $sformatf("sck pulses %0d", nedges));
    chk(t == 4 * n + 1, $sformatf("cycles %0d expected %0d", t, 4 * n + 1));
    @(negedge clk);
    chk(cs_n && !busy && !sck, "idle after transfer");
  endtask

  initial begin
    miso = 0; pat = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    chk(cs_n && !sck, "idle after reset");
    for (int i = 0; i < 20; i++) xfer(32);
    for (int i = 0; i < 20; i++) xfer(34);
    for (int i = 0; i < 20; i++) xfer(8);
    xfer(1);
    for (int i = 0; i < 20; i++) xfer(1 + $urandom % 34);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
