// interval_timer: programmable down-counting interval timer.
//
// Used for the sweep interval delta-t and for other program time intervals.
// Writing CTRL with enable set loads COUNT from LOAD. COUNT then decrements
// once per clock; in the clock where it is zero the timer raises tick_o for
// one clock, sets the expired flag and, in auto-reload mode, reloads LOAD,
// so ticks come every LOAD+1 clocks. In one-shot mode it stops at zero.
//
// Registers (word index): 0 CTRL (bit 0 enable, bit 1 auto-reload,
// bit 2 interrupt enable), 1 LOAD, 2 COUNT (read only), 3 STATUS (bit 0
// expired; write 1 to clear). irq_o = expired & interrupt enable.
// The document only names the timers; this register set is this design's own.
module interval_timer
  import sa_pkg::*;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic        clk,
  input  logic        rst,
  input  pbus_req_t   req,
  output logic [31:0] rdata,
  output logic        tick_o,
  output logic        irq_o
);
  logic             en, arl, ie, expired;
  logic [CNT_W-1:0] load, cnt;

  always_ff @(posedge clk) begin
    tick_o <= 1'b0;
    if (rst) begin
      en <= 1'b0; arl <= 1'b0; ie <= 1'b0; expired <= 1'b0;
      load <= '0; cnt <= '0;
    end else begin
      if (en) begin
        if (cnt == '0) begin
          tick_o  <= 1'b1;
          expired <= 1'b1;
          if (arl) cnt <= load;
          else     en  <= 1'b0;
        end else begin
          cnt <= cnt - 1'b1;
        end
      end
      if (req.sel && req.we) begin
        unique case (req.addr)
          4'd0: begin
            en  <= req.wdata[0];
            arl <= req.wdata[1];
            ie  <= req.wdata[2];
            if (req.wdata[0]) cnt <= load;
          end
          4'd1: load <= req.wdata[CNT_W-1:0];
          4'd3: if (req.wdata[0]) expired <= 1'b0;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (req.addr)
      4'd0:    rdata = {29'd0, ie, arl, en};
      4'd1:    rdata = 32'(load);
      4'd2:    rdata = 32'(cnt);
      4'd3:    rdata = {31'd0, expired};
      default: rdata = '0;
    endcase
  end

  assign irq_o = expired & ie;
endmodule
