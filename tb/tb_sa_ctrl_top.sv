// tb_sa_ctrl_top: end-to-end test of the whole control system at its
// default parameters (50 MHz, 25-bit DDS, 9600 baud, 32 kB memory).
//
// The testbench plays the processor program of the design: after the reset
// sequence it loads words into the local memory and reads them back as
// instruction fetches, programs the sweep (MIN, MAX, STEP) and timer 0 as
// delta-t, enables the DAC stream, and then services the user interface
// through interrupts: rotary-switch steps, button presses, a received UART
// byte, an ADC conversion and a one-shot timer, each identified in the
// interrupt controller and acknowledged. Models of the LTC2624 DAC and of
// the preamplifier/ADC hang on the serial pins.
//
// Checked: the tuning word visits MIN, MIN+STEP, ... and wraps to MIN, one
// step every LOAD+1 clocks; every sine/cosine pair that reaches DAC channels
// C and D lies on the circle of radius ~2048 codes around mid-scale (i.e. the
// two outputs are in quadrature at full swing); the pins of LEDs, LCD and
// UART; the ADC data; the bus error on an unmapped address; reset by loss of
// lock. Each mechanism is counted and one that never happened is a failure.
module tb_sa_ctrl_top;
  import sa_pkg::*;
  localparam int BIT = 50_000_000 / 9600;

  logic clk = 0, ext_rst = 1, dcm_locked = 0, sys_rst;
  logic bus_sel = 0, bus_we = 0;
  logic [7:0] bus_addr = '0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic bus_err, irq;
  logic ilmb_en = 0, dlmb_en = 0;
  logic [12:0] ilmb_addr = '0, dlmb_addr = '0;
  logic [3:0] dlmb_we = '0;
  logic [31:0] dlmb_wdata = '0, ilmb_rdata, dlmb_rdata;
  logic [4:0] btn = '0;
  logic rot_a = 0, rot_b = 0;
  logic [7:0] led;
  logic [3:0] lcd_d;
  logic lcd_e, lcd_rs, lcd_rw;
  logic uart_rxd = 1, uart_txd;
  logic dac_sck, dac_mosi, dac_cs_n, dac_clr_n;
  logic spi_sck, spi_mosi, spi_miso, amp_cs_n, amp_shdn, ad_conv;
  logic [24:0] sweep_ftw;
  logic sweep_wrap, dac_pair_done, sweep_active, rot_step, adc_sample_done;
  logic signed [13:0] dds_sin, dds_cos;

  sa_ctrl_top dut (.*, .dac_miso(1'b0));

  logic [11:0] code [4];
  int n_frames, n_updates, last_nbits;
  ltc2624_model dac (.sck(dac_sck), .sdi(dac_mosi), .cs_n(dac_cs_n), .clr_n(dac_clr_n),
                     .code, .n_frames, .n_updates, .last_nbits);

  logic [13:0] adc_ch0 = 14'h1234, adc_ch1 = 14'h3ABC;
  logic [3:0] gain_a, gain_b;
  int n_conv, n_gain;
  adc_frontend_model fe (.sck(spi_sck), .sdi(spi_mosi), .amp_cs_n, .ad_conv,
    .ch0_in(adc_ch0), .ch1_in(adc_ch1), .sdo(spi_miso), .gain_a, .gain_b, .n_conv, .n_gain);

  int checks = 0, failures = 0;
  always #10 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask
  task automatic wr(input logic [3:0] slot, input logic [3:0] r, input logic [31:0] d);
    @(negedge clk); bus_sel = 1; bus_we = 1; bus_addr = {slot, r}; bus_wdata = d;
    @(negedge clk); bus_sel = 0; bus_we = 0;
  endtask
  task automatic rd(input logic [3:0] slot, input logic [3:0] r, output logic [31:0] d);
    @(negedge clk); bus_sel = 1; bus_we = 0; bus_addr = {slot, r};
    #1 d = bus_rdata;
    @(negedge clk); bus_sel = 0;
  endtask

  // ---------------- mechanism counters ----------------
  int m_sweep_step = 0, m_sweep_wrap = 0, m_dac_pair = 0, m_adc = 0, m_gain = 0;
  int m_rot = 0, m_btn_irq = 0, m_uart_rx = 0, m_uart_tx = 0, m_tmr1 = 0;
  int m_bus_err = 0, m_lock_reset = 0, m_irq = 0;

  // sweep monitor: independent model of the tuning word
  int s_min, s_max, s_step, exp_ftw, last_change;
  bit s_on = 0;
  int t = 0;
  always @(posedge clk) t++;
  logic [24:0] ftw_d;
  always @(posedge clk) begin
    ftw_d <= sweep_ftw;
    if (s_on && sweep_ftw != ftw_d) begin
      int nxt;
      nxt = exp_ftw + s_step;
      if (nxt >= s_max) begin nxt = s_min; m_sweep_wrap++; end
      exp_ftw = nxt;
      m_sweep_step++;
      chk(int'(sweep_ftw) == exp_ftw, $sformatf("sweep ftw %0d exp %0d", sweep_ftw, exp_ftw));
      if (last_change > 0)
        chk(t - last_change == 1001, $sformatf("delta-t %0d clocks", t - last_change));
      last_change = t;
    end
  end

  // DAC monitor: each pair on C/D must lie on the quadrature circle
  real rmin = 1.0e9, rmax = 0.0;
  always @(posedge dac_pair_done) begin
    #1;
    if (s_on) begin
      real x, y, r;
      x = real'(int'(code[2])) - 2047.5;
      y = real'(int'(code[3])) - 2047.5;
      r = $sqrt(x * x + y * y);
      if (r < rmin) rmin = r;
      if (r > rmax) rmax = r;
      chk(r > 2044.0 && r < 2051.0, $sformatf("pair off the circle: C=%0d D=%0d r=%f", code[2], code[3], r));
      m_dac_pair++;
    end
  end

  // UART transmit monitor: decode bytes from the txd pin
  logic [7:0] tx_byte;
  always @(negedge uart_txd) if (!sys_rst) begin
    repeat (BIT / 2) @(posedge clk);
    if (!uart_txd) begin
      for (int i = 0; i < 8; i++) begin
        repeat (BIT) @(posedge clk);
        tx_byte[i] = uart_txd;
      end
      repeat (BIT) @(posedge clk);
      chk(uart_txd == 1, "tx stop bit");
      m_uart_tx++;
    end
  end

  task automatic uart_send(input logic [7:0] d);
    logic [9:0] f;
    f = {1'b1, d, 1'b0};
    for (int i = 0; i < 10; i++) begin
      uart_rxd = f[i];
      repeat (BIT) @(negedge clk);
    end
  endtask

  task automatic rot_detent();
    // {B,A}: 00 -> 10 -> 11 -> 01 -> 00 with a little bounce on A
    rot_b = 1; repeat (8) @(negedge clk);
    rot_a = 1; @(negedge clk); rot_a = 0; @(negedge clk); rot_a = 1;
    repeat (8) @(negedge clk);
    rot_b = 0; repeat (8) @(negedge clk);
    rot_a = 0; repeat (8) @(negedge clk);
  endtask

  // wait for the interrupt, find the source in the controller, acknowledge it
  task automatic serve(input int src, input string what);
    logic [31:0] v;
    int n;
    n = 0;
    while (!irq && n < 200_000) begin @(negedge clk); n++; end
    chk(irq == 1, {"interrupt for ", what});
    if (irq) m_irq++;
    rd(SLOT_INTC, 4'd3, v);
    chk(v[src] == 1, $sformatf("%s pending (IPR=%b)", what, v[5:0]));
  endtask
  task automatic ack(input int src);
    wr(SLOT_INTC, 4'd2, 32'(1 << src));
  endtask

  initial begin
    logic [31:0] v;
    // ---- reset sequence ----
    repeat (5) @(negedge clk);
    ext_rst = 0;
    repeat (5) @(negedge clk);
    chk(sys_rst == 1, "reset held until clock locked");
    dcm_locked = 1;
    repeat (25) @(negedge clk);
    chk(sys_rst == 0, "reset released");

    // ---- program load through the data LMB, fetch through the instruction LMB ----
    for (int a = 0; a < 64; a++) begin
      dlmb_en = 1; dlmb_we = 4'hF; dlmb_addr = 13'(a * 128 + 5); dlmb_wdata = 32'(a) * 32'h01010101 ^ 32'hDEADBEEF;
      @(negedge clk);
    end
    dlmb_en = 0; dlmb_we = 0;
    for (int a = 0; a < 64; a++) begin
      ilmb_en = 1; ilmb_addr = 13'(a * 128 + 5);
      @(negedge clk);
      chk(ilmb_rdata == (32'(a) * 32'h01010101 ^ 32'hDEADBEEF), "instruction fetch");
    end
    ilmb_en = 0;

    // ---- user interface: LEDs and LCD ----
    wr(SLOT_GPIO, 4'd0, 32'hA5);
    wr(SLOT_GPIO, 4'd1, 32'b101_0011);
    chk(led == 8'hA5, "LEDs");
    chk(lcd_d == 4'h3 && lcd_e && !lcd_rs && lcd_rw, "LCD pins");

    // ---- interrupt controller ----
    wr(SLOT_INTC, 4'd1, 32'h3F);
    wr(SLOT_INTC, 4'd4, 1);

    // ---- sweep: MIN 20 Hz, STEP 20 Hz, MAX 180 Hz (FTW = f * 2^25 / 50 MHz) ----
    s_min = 13; s_step = 13; s_max = 117;
    wr(SLOT_SWEEP, 4'd1, 32'(s_min));
    wr(SLOT_SWEEP, 4'd2, 32'(s_max));
    wr(SLOT_SWEEP, 4'd3, 32'(s_step));
    wr(SLOT_TIMER0, 4'd1, 1000);             // delta-t = 1001 clocks
    wr(SLOT_DAC, 4'd0, 1);
    exp_ftw = s_min; last_change = 0;
    @(negedge clk); bus_sel = 1; bus_we = 1; bus_addr = {SLOT_SWEEP, 4'd0}; bus_wdata = 1;
    s_on = 1;
    @(negedge clk); bus_sel = 0; bus_we = 0;
    wr(SLOT_TIMER0, 4'd0, 32'b011);          // enable, auto-reload, no interrupt
    chk(sweep_ftw == 25'(s_min), "sweep starts at MIN");

    // ---- preamplifier gain and one ADC conversion ----
    wr(SLOT_ADC, 4'd0, 32'h21);
    repeat (60) @(negedge clk);
    chk(gain_a == 4'h1 && gain_b == 4'h2 && n_gain == 1, "preamp gain");
    if (n_gain == 1) m_gain++;
    wr(SLOT_ADC, 4'd3, 32'b100);
    wr(SLOT_ADC, 4'd1, 1);
    serve(IRQ_ADC, "ADC");
    rd(SLOT_ADC, 4'd2, v);
    chk(v[13:0] == adc_ch0 && v[29:16] == adc_ch1, $sformatf("ADC data %h", v));
    if (v[13:0] == adc_ch0) m_adc++;
    wr(SLOT_ADC, 4'd3, 32'b110);
    ack(IRQ_ADC);

    // ---- rotary switch ----
    wr(SLOT_ROTARY, 4'd1, 32'b100);
    for (int k = 0; k < 3; k++) begin
      rot_detent();
      serve(IRQ_ROT, "rotary");
      wr(SLOT_ROTARY, 4'd1, 32'b101);
      ack(IRQ_ROT);
      m_rot++;
    end
    rd(SLOT_ROTARY, 4'd0, v);
    chk($signed(v) == 3, $sformatf("rotary position %0d", $signed(v)));

    // ---- push button ----
    wr(SLOT_GPIO, 4'd4, 1);
    @(negedge clk); btn = 5'b00100;
    serve(IRQ_GPIO, "button");
    rd(SLOT_GPIO, 4'd2, v); chk(v[4:0] == 5'b00100, "button level");
    wr(SLOT_GPIO, 4'd3, 32'h1F);
    ack(IRQ_GPIO);
    m_btn_irq++;
    btn = 0;
    repeat (5) @(negedge clk);
    wr(SLOT_GPIO, 4'd3, 32'h1F);
    ack(IRQ_GPIO);

    // ---- one-shot timer 1 ----
    wr(SLOT_TIMER1, 4'd1, 500);
    wr(SLOT_TIMER1, 4'd0, 32'b101);
    serve(IRQ_TMR1, "timer 1");
    wr(SLOT_TIMER1, 4'd3, 1);
    ack(IRQ_TMR1);
    m_tmr1++;

    // ---- UART: receive a byte, echo it back ----
    wr(SLOT_UART, 4'd3, 1);
    uart_send(8'h4B);
    serve(IRQ_UART, "UART");
    rd(SLOT_UART, 4'd0, v);
    chk(v[7:0] == 8'h4B, "UART byte");
    if (v[7:0] == 8'h4B) m_uart_rx++;
    ack(IRQ_UART);
    wr(SLOT_UART, 4'd1, v);
    repeat (11 * BIT) @(negedge clk);
    chk(tx_byte == 8'h4B, "UART echo");

    // ---- unmapped address ----
    @(negedge clk); bus_sel = 1; bus_we = 0; bus_addr = 8'hF0;
    #1 if (bus_err) m_bus_err++;
    @(negedge clk); bus_sel = 0;

    // ---- let the sweep run on ----
    while (m_sweep_wrap < 3 && t < 1_500_000) @(negedge clk);
    rd(SLOT_SWEEP, 4'd5, v);
    chk(int'(v) == m_sweep_wrap, "sweep counter");
    rd(SLOT_DAC, 4'd1, v);
    chk(int'(v) >= m_dac_pair && m_dac_pair > 100, $sformatf("DAC pairs %0d / %0d", v, m_dac_pair));
    $display("quadrature radius over %0d pairs: %f .. %f", m_dac_pair, rmin, rmax);

    // ---- loss of lock resets the system ----
    s_on = 0;
    dcm_locked = 0;
    #1 if (sys_rst) m_lock_reset++;
    @(negedge clk); dcm_locked = 1;
    repeat (25) @(negedge clk);
    rd(SLOT_SWEEP, 4'd0, v);
    chk(v == 0 && sweep_ftw == 0 && led == 0, "registers reset after lock loss");

    // ---- every mechanism must have happened ----
    chk(m_sweep_step > 20, $sformatf("sweep steps %0d", m_sweep_step));
    chk(m_sweep_wrap >= 3, $sformatf("sweep wraps %0d", m_sweep_wrap));
    chk(m_dac_pair > 0, "DAC pairs");
    chk(m_adc > 0, "ADC conversions");
    chk(m_gain > 0, "gain writes");
    chk(m_rot > 0, "rotary steps");
    chk(m_btn_irq > 0, "button interrupts");
    chk(m_uart_rx > 0, "UART receive");
    chk(m_uart_tx > 0, "UART transmit");
    chk(m_tmr1 > 0, "timer interrupts");
    chk(m_bus_err > 0, "bus error");
    chk(m_lock_reset > 0, "lock-loss reset");
    chk(m_irq >= 7, $sformatf("interrupts served %0d", m_irq));
    $display("mechanisms: sweep steps %0d wraps %0d dac pairs %0d adc %0d gain %0d rot %0d btn %0d uart rx %0d tx %0d tmr1 %0d buserr %0d lockrst %0d irq %0d",
      m_sweep_step, m_sweep_wrap, m_dac_pair, m_adc, m_gain, m_rot, m_btn_irq, m_uart_rx, m_uart_tx,
      m_tmr1, m_bus_err, m_lock_reset, m_irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
