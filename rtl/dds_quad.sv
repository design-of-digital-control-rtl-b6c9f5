// dds_quad: quadrature direct digital synthesiser (sine and cosine at once).
//
// A PHASE_W-bit phase accumulator adds the frequency tuning word (FTW) on
// every clock, so f_out = FTW * CLK_HZ / 2**PHASE_W. The top LUT_AW+2 phase
// bits address a quarter-wave sine table of 2**LUT_AW magnitudes; the two
// quadrant bits fold the address and pick the sign. The cosine is the same
// lookup a quarter turn ahead (phase + 2**LUT_AW), read from a second port of
// the same table. Outputs are OUT_W-bit two's complement, full scale
// +/-(2**(OUT_W-1)-1).
//
// Timing: ftw is taken on every clock; sin_o/cos_o show the accumulator
// value of two clocks earlier (table read, then sign). valid_o rises two
// clocks after reset is released.
//
// From the document: sine and cosine outputs, 14-bit output width, tuning
// resolution below 2 Hz. Own choices: a 50 MHz clock (the board oscillator),
// hence a 25-bit accumulator (50 MHz / 2**25 = 1.49 Hz), a 1024-entry
// quarter-wave table with half-step sample offset, and no phase dithering.
module dds_quad #(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned PHASE_W = 25,
  parameter int unsigned OUT_W   = 14,
  parameter int unsigned LUT_AW  = 10
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [PHASE_W-1:0]       ftw,
  output logic signed [OUT_W-1:0]  sin_o,
  output logic signed [OUT_W-1:0]  cos_o,
  output logic                     valid_o,
  output logic [PHASE_W-1:0]       phase_o
);
  localparam int unsigned TAB_N = 2 ** LUT_AW;
  localparam int unsigned MAG_W = OUT_W - 1;
  localparam real AMPL = real'((2 ** MAG_W) - 1);
  localparam real PI = 3.14159265358979323846;

  // Resolution check against the document's "< 2 Hz" requirement.
  initial assert (real'(CLK_HZ) / (2.0 ** PHASE_W) < 2.0)
    else $error("dds_quad: tuning resolution not below 2 Hz");

  // Quarter-wave table: T[i] = round(AMPL * sin(pi/2 * (i + 0.5) / TAB_N)).
  logic [MAG_W-1:0] qtab [TAB_N];
  initial begin
    for (int i = 0; i < TAB_N; i++)
      qtab[i] = MAG_W'(int'(AMPL * $sin(PI / 2.0 * (real'(i) + 0.5) / real'(TAB_N))));
  end

  logic [PHASE_W-1:0] acc;
  always_ff @(posedge clk) begin
    if (rst) acc <= '0;
    else     acc <= acc + ftw;
  end
  assign phase_o = acc;

  // Stage 1: fold phase into table address, read, remember sign.
  logic [LUT_AW+1:0] ps, pc;
  logic [LUT_AW-1:0] as, ac;
  assign ps = acc[PHASE_W-1 -: LUT_AW+2];
  assign pc = ps + (LUT_AW+2)'(TAB_N);
  assign as = ps[LUT_AW] ? ~ps[LUT_AW-1:0] : ps[LUT_AW-1:0];
  assign ac = pc[LUT_AW] ? ~pc[LUT_AW-1:0] : pc[LUT_AW-1:0];

  logic [MAG_W-1:0] mag_s, mag_c;
  logic             neg_s, neg_c;
  logic [1:0]       vpipe;
  always_ff @(posedge clk) begin
    mag_s <= qtab[as];
    mag_c <= qtab[ac];
    neg_s <= ps[LUT_AW+1];
    neg_c <= pc[LUT_AW+1];
  end

  // Stage 2: apply sign.
  always_ff @(posedge clk) begin
    sin_o <= neg_s ? -$signed({1'b0, mag_s}) : $signed({1'b0, mag_s});
    cos_o <= neg_c ? -$signed({1'b0, mag_c}) : $signed({1'b0, mag_c});
  end

  always_ff @(posedge clk) begin
    if (rst) vpipe <= '0;
    else     vpipe <= {vpipe[0], 1'b1};
  end
  assign valid_o = vpipe[1];
endmodule
