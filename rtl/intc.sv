// intc: interrupt controller gathering the peripheral requests.
//
// Each source is a level request from a peripheral (held until the program
// clears it there). A rising edge of a source sets its pending bit; the
// processor interrupt irq_o is high while the master enable is set and any
// pending bit is also enabled. The handler reads IPR to find the source and
// writes IAR to acknowledge it.
//
// Registers: 0 ISR (RO, pending bits), 1 IER (R/W enable bits), 2 IAR (write
// 1s to clear pending bits), 3 IPR (RO, pending & enabled), 4 MER (bit 0
// master enable). irq_o follows a source edge by 2 clocks.
// The document asks for an interrupt system serving the GPIO, encoder and
// timers; edge capture and this register set are this design's.
module intc
  import sa_pkg::*;
#(
  parameter int unsigned N = 6
) (
  input  logic         clk,
  input  logic         rst,
  input  pbus_req_t    req,
  output logic [31:0]  rdata,
  input  logic [N-1:0] src_i,
  output logic         irq_o
);
  logic [N-1:0] src_d, isr, ier;
  logic         mer;

  always_ff @(posedge clk) begin
    if (rst) begin
      src_d <= '0; isr <= '0; ier <= '0; mer <= 1'b0;
    end else begin
      src_d <= src_i;
      if (req.sel && req.we && req.addr == 4'd2)
        isr <= (isr & ~req.wdata[N-1:0]) | (src_i & ~src_d);
      else
        isr <= isr | (src_i & ~src_d);
      if (req.sel && req.we && req.addr == 4'd1) ier <= req.wdata[N-1:0];
      if (req.sel && req.we && req.addr == 4'd4) mer <= req.wdata[0];
    end
  end

  always_comb begin
    unique case (req.addr)
      4'd0:    rdata = 32'(isr);
      4'd1:    rdata = 32'(ier);
      4'd3:    rdata = 32'(isr & ier);
      4'd4:    rdata = {31'd0, mer};
      default: rdata = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) irq_o <= 1'b0;
    else     irq_o <= mer & (|(isr & ier));
  end
endmodule
