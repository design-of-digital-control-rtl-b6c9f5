// tb_dac_ltc2624_ctrl: checks the DDS-to-DAC stream through an LTC2624 model.
//
// Feeds known sine/cosine sample values (changed by the testbench after
// each pair), enables streaming, and for each completed pair checks that
// DAC channel C holds the sine and channel D the cosine as 12-bit offset
// binary, that A and B are never written, that both outputs change together
// (one model update per channel per pair, on the second frame), the frame
// length of 32 bits, the pair time of 261 clocks, the pair counter and that
// streaming stops when disabled.
module tb_dac_ltc2624_ctrl;
  import sa_pkg::*;
  logic clk = 0, rst = 1;
  pbus_req_t req;
  logic [31:0] rdata;
  logic signed [13:0] s, c;
  logic valid = 0;
  logic pair_done, sck, mosi, cs_n, clr_n;
  logic [11:0] code [4];
  int n_frames, n_updates, last_nbits;
  int checks = 0, failures = 0;

  dac_ltc2624_ctrl dut (.clk, .rst, .req, .rdata, .sin_i(s), .cos_i(c), .valid_i(valid),
    .pair_done_o(pair_done), .dac_sck(sck), .dac_mosi(mosi), .dac_cs_n(cs_n),
    .dac_clr_n(clr_n), .dac_miso(1'b0));
  ltc2624_model dac (.sck, .sdi(mosi), .cs_n, .clr_n, .code, .n_frames, .n_updates, .last_nbits);

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
  task automatic wr(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); req = '{sel: 1'b1, we: 1'b1, addr: a, wdata: d};
    @(negedge clk); req.sel = 1'b0; req.we = 1'b0;
  endtask

  function automatic logic [11:0] offs(input logic signed [13:0] v);
    int u;
    u = (int'(v) + 8192) / 4;    // 14-bit signed -> 12-bit unsigned
    return 12'(u);
  endfunction

  // The inputs change right after each pair_done, so the next pair sends
  // exactly the values set then.
  logic signed [13:0] lat_s, lat_c;

  int pairs = 0, last_t = 0, t = 0;
  always @(posedge clk) t++;

  initial begin
    logic [31:0] v;
    int upd0;
    req = '0; s = 14'sd1000; c = -14'sd3000; lat_s = s; lat_c = c;
    repeat (3) @(negedge clk);
    rst = 0; valid = 1;
    repeat (50) @(negedge clk);
    chk(n_frames == 0, "nothing sent while disabled");
    wr(4'd0, 1);
    for (int k = 0; k < 40; k++) begin
      int f0;
      logic [11:0] c_before, d_before;
      @(posedge pair_done);
      #1;
      pairs++;
      chk(code[2] == offs(lat_s), $sformatf("C=%h exp %h (sin %0d)", code[2], offs(lat_s), lat_s));
      chk(code[3] == offs(lat_c), $sformatf("D=%h exp %h (cos %0d)", code[3], offs(lat_c), lat_c));
      chk(code[0] == 0 && code[1] == 0, "A/B untouched");
      chk(last_nbits == 32, "32-bit frame");
      chk(n_updates == 4 * pairs, $sformatf("updates %0d", n_updates));
      if (k > 0) chk(t - last_t == 261, $sformatf("pair period %0d", t - last_t));
      last_t = t;
      // new sample values for the next pair, including the extremes
      case (k % 4)
        0: begin s = 14'sd8191;  c = -14'sd8191; end
        1: begin s = -14'sd8192; c = 14'sd0;     end
        default: begin s = 14'($urandom); c = 14'($urandom); end
      endcase
      lat_s = s; lat_c = c;
    end
    // sine written first without update: after frame 1 only the input register moves
    @(negedge cs_n); @(posedge cs_n); #1;
    chk(n_updates == 4 * pairs, "first frame of a pair does not update outputs");
    @(posedge pair_done); #1; pairs++;
    @(negedge clk); req = '{sel: 1'b1, we: 1'b0, addr: 4'd1, wdata: '0}; #1 v = rdata;
    @(negedge clk); req.sel = 0;
    chk(v == 32'(pairs), $sformatf("pair counter %0d vs %0d", v, pairs));
    wr(4'd0, 0);
    repeat (600) @(negedge clk);
    upd0 = n_frames;
    repeat (600) @(negedge clk);
    chk(n_frames == upd0, "stops when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
