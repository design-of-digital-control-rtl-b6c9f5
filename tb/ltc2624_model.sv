// ltc2624_model: behavioural model of the LTC2624 quad 12-bit DAC serial
// interface, for testbenches only (not synthesizable logic).
//
// While cs_n is low the model shifts SDI in on each rising SCK edge. When
// cs_n rises it decodes the last 24 bits received as command[3:0],
// address[3:0], data[11:0], 4 don't-care bits, and acts on the commands:
// 0000 write input register n, 0001 update DAC n, 0010 write input register
// n and update all, 0011 write and update n (address 1111 = all channels).
// code[i] is the value on DAC output i (0=A .. 3=D); n_updates counts each
// time an output register is loaded and nbits the SCK pulses of the frame.
module ltc2624_model (
  input  logic        sck,
  input  logic        sdi,
  input  logic        cs_n,
  input  logic        clr_n,
  output logic [11:0] code   [4],
  output int          n_frames,
  output int          n_updates,
  output int          last_nbits
);
  logic [31:0] sh;
  logic [11:0] inreg [4];
  int          nb;

  initial begin
    for (int i = 0; i < 4; i++) begin code[i] = '0; inreg[i] = '0; end
    n_frames = 0; n_updates = 0; last_nbits = 0; nb = 0; sh = '0;
  end

  always @(negedge cs_n) nb = 0;
  always @(posedge sck) if (!cs_n) begin sh = {sh[30:0], sdi}; nb++; end

  always @(posedge cs_n) if (nb != 0) decode();

  task automatic decode();
    logic [3:0] cmd, adr;
    logic [11:0] d;
    cmd = sh[23:20]; adr = sh[19:16]; d = sh[15:4];
    n_frames++;
    last_nbits = nb;
    for (int i = 0; i < 4; i++) begin
      if (adr == 4'hF || adr == 4'(i)) begin
        if (cmd == 4'b0000 || cmd == 4'b0010 || cmd == 4'b0011) inreg[i] = d;
        if (cmd == 4'b0001 || cmd == 4'b0011) begin code[i] = inreg[i]; n_updates++; end
      end
    end
    if (cmd == 4'b0010)
      for (int i = 0; i < 4; i++) begin code[i] = inreg[i]; n_updates++; end
  endtask

  always @(negedge clr_n)
    for (int i = 0; i < 4; i++) code[i] = '0;
endmodule
