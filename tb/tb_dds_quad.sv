// tb_dds_quad: self-checking test of the quadrature DDS at its default size.
//
// Keeps its own phase accumulator and compares, every clock, the DDS phase
// with it and the sine/cosine outputs (two clocks later) with
// 8191*sin/cos(2*pi*(p+0.5)/4096) computed here in real arithmetic, where p
// is the top 12 phase bits; one LSB of rounding is allowed. It also checks
// the tuning resolution (< 2 Hz) and the output frequency from counted
// sine zero crossings (also at 5 kHz, where the cosine must peak as the
// sine rises through zero), and changes the tuning word while running.
module tb_dds_quad;
  localparam int unsigned PW = 25;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst = 1;
  logic [PW-1:0] ftw;
  logic signed [13:0] s, c;
  logic valid;
  logic [PW-1:0] phase;
  int checks = 0, failures = 0;

  dds_quad dut (.clk, .rst, .ftw, .sin_o(s), .cos_o(c), .valid_o(valid), .phase_o(phase));

  always #10 clk = ~clk;

  initial begin
    repeat (1300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [PW-1:0] model, hist1, hist2;
  int nerr_s = 0, nerr_c = 0, ncmp = 0;

  function automatic int expect_sin(input logic [PW-1:0] p, input bit cosine);
    real a;
    a = 2.0 * PI * (real'(p[PW-1 -: 12]) + 0.5) / 4096.0;
    return cosine ? int'($rtoi(8191.0 * $cos(a) + (($cos(a) >= 0) ? 0.5 : -0.5)))
                  : int'($rtoi(8191.0 * $sin(a) + (($sin(a) >= 0) ? 0.5 : -0.5)));
  endfunction

  task automatic run(input int cycles);
    for (int k = 0; k < cycles; k++) begin
      @(posedge clk);
      #1;
      model = model + ftw;
      checks++;
      if (phase != model) begin
        failures++;
        if (failures < 10) $display("phase mismatch %h vs %h", phase, model);
      end
      if (valid) begin
        int es, ec;
        es = expect_sin(hist2, 0);
        ec = expect_sin(hist2, 1);
        ncmp++;
        checks += 2;
        if (int'(s) - es > 1 || es - int'(s) > 1) begin nerr_s++; failures++; end
        if (int'(c) - ec > 1 || ec - int'(c) > 1) begin nerr_c++; failures++; end
      end
      hist2 = hist1;
      hist1 = model;
    end
  endtask

  int zc;
  logic signed [13:0] prev;

  initial begin
    ftw = PW'(33554);            // ~50 kHz at 50 MHz
    model = '0; hist1 = '0; hist2 = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // after reset the accumulator holds 0 at this point
    checks++;
    if (real'(50_000_000) / (2.0 ** PW) >= 2.0) failures++;
    run(5000);
    ftw = PW'(1234567);
    run(5000);
    ftw = PW'(1);                // tiny step: slow phase walk
    run(2000);
    ftw = PW'(2 ** (PW - 1) - 5); // near Nyquist
    run(2000);
    if (nerr_s != 0 || nerr_c != 0) begin
      $display("sample errors sin=%0d cos=%0d of %0d", nerr_s, nerr_c, ncmp);
    end
    // frequency: count rising zero crossings over 2**16 clocks at FTW=2**15
    ftw = PW'(2 ** 15);
    repeat (4) @(posedge clk);
    zc = 0; prev = s;
    for (int k = 0; k < 65536; k++) begin
      @(posedge clk);
      if (prev < 0 && s >= 0) zc++;
      prev = s;
    end
    // expected 2**15 * 2**16 / 2**25 = 64 cycles
    checks++;
    if (zc < 63 || zc > 65) begin
      failures++;
      $display("zero crossings %0d, expected 64", zc);
    end
    // a sweep frequency in the low-kHz range the analyser targets: 5 kHz
    // needs FTW = round(5000 * 2**25 / 50e6) = 3355 (4999.3 Hz). Over 2**20
    // clocks that is 3355 * 2**20 / 2**25 = 104.8 cycles. At every rising
    // sine crossing the cosine must be near its positive peak (quadrature).
    ftw = PW'(3355);
    repeat (4) @(posedge clk);
    zc = 0; prev = s;
    for (int k = 0; k < 2 ** 20; k++) begin
      @(posedge clk);
      if (prev < 0 && s >= 0) begin
        zc++;
        checks++;
        if (c < 14'sd8180) begin
          failures++;
          $display("cosine %0d at a rising sine crossing", c);
        end
      end
      prev = s;
    end
    checks++;
    if (zc < 104 || zc > 105) begin
      failures++;
      $display("zero crossings at 5 kHz %0d, expected 104..105", zc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
