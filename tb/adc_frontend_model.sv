// adc_frontend_model: behavioural model of the board's analog capture
// serial interface (LTC6912-1 preamplifier and LTC1407A-1 ADC), for
// testbenches only.
//
// Preamplifier: while amp_cs_n is low, SDI is shifted in on rising SCK; at
// the rising edge of amp_cs_n the last 8 bits become {gain B, gain A}.
// ADC: a rising edge of ad_conv samples ch0_in and ch1_in. The 34-bit result
// frame {2 idle bits, ch0[13:0], 2 idle bits, ch1[13:0], 2 idle bits} is then
// presented MSB first on sdo: the first bit at once, each next one after a
// falling SCK edge. Idle bits are driven as 1 so that a wrong bit window
// shows up in the data.
module adc_frontend_model (
  input  logic        sck,
  input  logic        sdi,
  input  logic        amp_cs_n,
  input  logic        ad_conv,
  input  logic [13:0] ch0_in,
  input  logic [13:0] ch1_in,
  output logic        sdo,
  output logic [3:0]  gain_a,
  output logic [3:0]  gain_b,
  output int          n_conv,
  output int          n_gain
);
  logic [7:0]  ash;
  logic [33:0] frame;
  int          idx;

  initial begin
    gain_a = '0; gain_b = '0; n_conv = 0; n_gain = 0; sdo = 1'b1;
    ash = '0; frame = '1; idx = 0;
  end

  always @(posedge sck) if (!amp_cs_n) ash = {ash[6:0], sdi};
  always @(posedge amp_cs_n) begin
    gain_b = ash[7:4]; gain_a = ash[3:0]; n_gain++;
  end

  always @(posedge ad_conv) begin
    frame = {2'b11, ch0_in, 2'b11, ch1_in, 2'b11};
    idx = 33;
    sdo = frame[idx];
    n_conv++;
  end
  always @(negedge sck) if (amp_cs_n && idx > 0) begin
    idx--;
    sdo = frame[idx];
  end
endmodule
