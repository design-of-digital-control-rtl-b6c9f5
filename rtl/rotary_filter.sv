// rotary_filter: glitch filter and decoder for the mechanical rotary switch.
//
// The two contacts A and B are first synchronised with two flip-flops. The
// filter then keeps two state bits: q1 is set only when A and B are both
// closed-high and cleared only when both are low; q2 is set when A=0, B=1
// and cleared when A=1, B=0. Any other input holds them, so contact bounce on
// one line (which only ever flips between a "hold" pattern and its neighbour)
// cannot make q1 chatter. Each rising edge of q1 is one detent step, and q2
// at that moment gives the direction. This takes the debouncing off the
// processor, as the document asks of this block.
//
// Outputs: step_o pulses one clock per detent, dir_o is its direction
// (1 = q2 set). Registers: 0 POSITION (RO, signed count, +1 per dir=1 step),
// 1 STATUS (bit 0 step seen, write 1 to clear; bit 1 last direction;
// bit 2 interrupt enable, writable). irq_o = step seen & interrupt enable.
// Latency from a clean input change to step_o: 4 clocks.
// The filter scheme, the direction naming and the register set are this
// design's choices; the document gives only the block's purpose.
module rotary_filter
  import sa_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  pbus_req_t   req,
  output logic [31:0] rdata,
  input  logic        rot_a,
  input  logic        rot_b,
  output logic        step_o,
  output logic        dir_o,
  output logic        irq_o
);
  logic [1:0]  sync_a, sync_b;
  logic        q1, q2, q1_d;
  logic signed [31:0] pos;
  logic        seen, ie;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync_a <= '0; sync_b <= '0;
      q1 <= 1'b0; q2 <= 1'b0; q1_d <= 1'b0;
    end else begin
      sync_a <= {sync_a[0], rot_a};
      sync_b <= {sync_b[0], rot_b};
      unique case ({sync_b[1], sync_a[1]})
        2'b00: q1 <= 1'b0;
        2'b11: q1 <= 1'b1;
        2'b10: q2 <= 1'b1;   // B=1, A=0
        2'b01: q2 <= 1'b0;   // B=0, A=1
        default: ;
      endcase
      q1_d <= q1;
    end
  end

  always_ff @(posedge clk) begin
    step_o <= 1'b0;
    if (rst) begin
      dir_o <= 1'b0; pos <= '0; seen <= 1'b0; ie <= 1'b0;
    end else begin
      if (q1 && !q1_d) begin
        step_o <= 1'b1;
        dir_o  <= q2;
        pos    <= q2 ? pos + 1 : pos - 1;
        seen   <= 1'b1;
      end
      if (req.sel && req.we && req.addr == 4'd1) begin
        ie <= req.wdata[2];
        if (req.wdata[0]) seen <= 1'b0;
      end
    end
  end

  always_comb begin
    unique case (req.addr)
      4'd0:    rdata = pos;
      4'd1:    rdata = {29'd0, ie, dir_o, seen};
      default: rdata = '0;
    endcase
  end

  assign irq_o = seen & ie;
endmodule
