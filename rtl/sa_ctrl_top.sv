// sa_ctrl_top: FPGA part of the digital control system of a swept
// spectrum analyser built around an analog synchronous detector.
//
// The analyser needs a quadrature reference (sine and cosine) whose
// frequency sweeps linearly. Here a DDS makes the two waves, sweep_ctrl steps
// its tuning word every delta-t (timer 0 supplies delta-t), and
// dac_ltc2624_ctrl streams each sine/cosine pair to the board DAC over SPI.
// adc_ctrl programs the preamplifier and reads the ADC. The user-interface
// peripherals (GPIO for buttons/LCD/LEDs, rotary-encoder filter, UART),
// a second timer, the interrupt controller, the 32 kB local memory and the
// reset generator complete the processor subsystem.
//
// The soft processor itself is not part of this RTL: its peripheral bus
// (single-cycle requests, see sa_pkg), its interrupt line, its reset and its
// two local memory ports are brought out as ports, so a processor model or a
// testbench acting as the program drives them. The clock is taken as already
// generated (no clock manager inside); dcm_locked holds the design in reset.
//
// Address map (upper nibble of bus_addr): 0 sweep, 1 timer 0 (delta-t),
// 2 timer 1, 3 GPIO, 4 rotary encoder, 5 interrupt controller, 6 UART,
// 7 ADC, 8 DAC stream. Interrupt sources: 0 timer 0, 1 timer 1, 2 GPIO,
// 3 encoder, 4 UART, 5 ADC.
// The blocks and their connections follow the document's block diagrams;
// bus protocol, addresses and pin grouping are this design's. The DAC and the
// ADC front end use separate SPI pin sets here, where the board shares one.
module sa_ctrl_top
  import sa_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned PHASE_W   = 25,
  parameter int unsigned OUT_W     = 14,
  parameter int unsigned BAUD      = 9600,
  parameter int unsigned SPI_HALF  = 2,
  parameter int unsigned RST_HOLD  = 16,
  parameter int unsigned MEM_BYTES = 32768
) (
  input  logic        clk,
  input  logic        ext_rst,
  input  logic        dcm_locked,
  output logic        sys_rst,
  // processor peripheral bus
  input  logic        bus_sel,
  input  logic        bus_we,
  input  logic [7:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        bus_err,
  output logic        irq,
  // processor local memory buses
  input  logic        ilmb_en,
  input  logic [$clog2(MEM_BYTES/4)-1:0] ilmb_addr,
  output logic [31:0] ilmb_rdata,
  input  logic        dlmb_en,
  input  logic [3:0]  dlmb_we,
  input  logic [$clog2(MEM_BYTES/4)-1:0] dlmb_addr,
  input  logic [31:0] dlmb_wdata,
  output logic [31:0] dlmb_rdata,
  // user interface
  input  logic [4:0]  btn,
  input  logic        rot_a,
  input  logic        rot_b,
  output logic [7:0]  led,
  output logic [3:0]  lcd_d,
  output logic        lcd_e,
  output logic        lcd_rs,
  output logic        lcd_rw,
  input  logic        uart_rxd,
  output logic        uart_txd,
  // DAC (LTC2624)
  output logic        dac_sck,
  output logic        dac_mosi,
  output logic        dac_cs_n,
  output logic        dac_clr_n,
  input  logic        dac_miso,
  // preamplifier (LTC6912-1) and ADC (LTC1407A-1)
  output logic        spi_sck,
  output logic        spi_mosi,
  input  logic        spi_miso,
  output logic        amp_cs_n,
  output logic        amp_shdn,
  output logic        ad_conv,
  // observation of the generator
  output logic [PHASE_W-1:0]      sweep_ftw,
  output logic                    sweep_wrap,
  output logic signed [OUT_W-1:0] dds_sin,
  output logic signed [OUT_W-1:0] dds_cos,
  output logic                    dac_pair_done,
  output logic                    sweep_active,
  output logic                    rot_step,
  output logic                    adc_sample_done
);
  logic rst;
  proc_sys_reset #(.HOLD(RST_HOLD)) u_rst (
    .clk, .ext_rst, .locked(dcm_locked), .rst_o(rst)
  );
  assign sys_rst = rst;

  pbus_mreq_t             mreq;
  pbus_req_t [NSLAVES-1:0] sreq;
  logic [NSLAVES-1:0][31:0] srdata;
  assign mreq = '{sel: bus_sel, we: bus_we, addr: bus_addr, wdata: bus_wdata};

  pbus_decoder #(.NS(NSLAVES)) u_bus (
    .mreq, .mrdata(bus_rdata), .err_o(bus_err), .sreq, .srdata
  );

  logic [NIRQ-1:0] irq_src;
  logic            dt_tick, tmr1_tick_unused;
  logic            rot_dir_unused;
  logic            dds_valid;

  interval_timer u_tmr0 (
    .clk, .rst, .req(sreq[SLOT_TIMER0]), .rdata(srdata[SLOT_TIMER0]),
    .tick_o(dt_tick), .irq_o(irq_src[IRQ_TMR0])
  );
  interval_timer u_tmr1 (
    .clk, .rst, .req(sreq[SLOT_TIMER1]), .rdata(srdata[SLOT_TIMER1]),
    .tick_o(tmr1_tick_unused), .irq_o(irq_src[IRQ_TMR1])
  );

  sweep_ctrl #(.PHASE_W(PHASE_W)) u_sweep (
    .clk, .rst, .req(sreq[SLOT_SWEEP]), .rdata(srdata[SLOT_SWEEP]),
    .tick_i(dt_tick), .ftw_o(sweep_ftw), .enable_o(sweep_active), .wrap_o(sweep_wrap)
  );

  dds_quad #(.CLK_HZ(CLK_HZ), .PHASE_W(PHASE_W), .OUT_W(OUT_W)) u_dds (
    .clk, .rst, .ftw(sweep_ftw),
    .sin_o(dds_sin), .cos_o(dds_cos), .valid_o(dds_valid), .phase_o()
  );

  dac_ltc2624_ctrl #(.OUT_W(OUT_W), .HALF(SPI_HALF)) u_dac (
    .clk, .rst, .req(sreq[SLOT_DAC]), .rdata(srdata[SLOT_DAC]),
    .sin_i(dds_sin), .cos_i(dds_cos), .valid_i(dds_valid),
    .pair_done_o(dac_pair_done),
    .dac_sck, .dac_mosi, .dac_cs_n, .dac_clr_n, .dac_miso
  );

  adc_ctrl #(.HALF(SPI_HALF)) u_adc (
    .clk, .rst, .req(sreq[SLOT_ADC]), .rdata(srdata[SLOT_ADC]),
    .irq_o(irq_src[IRQ_ADC]), .sample_done_o(adc_sample_done),
    .spi_sck, .spi_mosi, .spi_miso, .amp_cs_n, .amp_shdn, .ad_conv
  );

  gpio_ui u_gpio (
    .clk, .rst, .req(sreq[SLOT_GPIO]), .rdata(srdata[SLOT_GPIO]),
    .btn_i(btn), .led_o(led), .lcd_d_o(lcd_d), .lcd_e_o(lcd_e),
    .lcd_rs_o(lcd_rs), .lcd_rw_o(lcd_rw), .irq_o(irq_src[IRQ_GPIO])
  );

  rotary_filter u_rot (
    .clk, .rst, .req(sreq[SLOT_ROTARY]), .rdata(srdata[SLOT_ROTARY]),
    .rot_a, .rot_b, .step_o(rot_step), .dir_o(rot_dir_unused), .irq_o(irq_src[IRQ_ROT])
  );

  uart_lite #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk, .rst, .req(sreq[SLOT_UART]), .rdata(srdata[SLOT_UART]),
    .rxd(uart_rxd), .txd(uart_txd), .irq_o(irq_src[IRQ_UART])
  );

  intc #(.N(NIRQ)) u_intc (
    .clk, .rst, .req(sreq[SLOT_INTC]), .rdata(srdata[SLOT_INTC]),
    .src_i(irq_src), .irq_o(irq)
  );

  lmb_bram #(.BYTES(MEM_BYTES)) u_mem (
    .clk,
    .i_en(ilmb_en), .i_addr(ilmb_addr), .i_rdata(ilmb_rdata),
    .d_en(dlmb_en), .d_we(dlmb_we), .d_addr(dlmb_addr),
    .d_wdata(dlmb_wdata), .d_rdata(dlmb_rdata)
  );
endmodule
