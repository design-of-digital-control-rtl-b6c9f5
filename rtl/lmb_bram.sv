// lmb_bram: the processor's 32 kB local instruction and data memory.
//
// One block RAM seen through two local memory bus ports, as a Harvard
// processor uses it: port I (instruction side) reads words, port D (data
// side) reads and writes words with a byte-enable per byte. Both ports are
// synchronous: the word at the address given in one clock appears on rdata
// in the next. A write on port D returns the old word (read-first).
// Addresses are word addresses (byte address >> 2).
// Size 32 kB follows the document; the single shared memory, dual-port
// organisation and read-first behaviour are this design's choices.
module lmb_bram #(
  parameter int unsigned BYTES = 32768
) (
  input  logic                           clk,
  input  logic                           i_en,
  input  logic [$clog2(BYTES/4)-1:0]     i_addr,
  output logic [31:0]                    i_rdata,
  input  logic                           d_en,
  input  logic [3:0]                     d_we,
  input  logic [$clog2(BYTES/4)-1:0]     d_addr,
  input  logic [31:0]                    d_wdata,
  output logic [31:0]                    d_rdata
);
  localparam int unsigned WORDS = BYTES / 4;

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (i_en) i_rdata <= mem[i_addr];
  end

  always_ff @(posedge clk) begin
    if (d_en) begin
      d_rdata <= mem[d_addr];
      for (int b = 0; b < 4; b++)
        if (d_we[b]) mem[d_addr][8*b +: 8] <= d_wdata[8*b +: 8];
    end
  end
endmodule
