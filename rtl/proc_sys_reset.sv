// proc_sys_reset: system reset generator.
//
// Combines the external reset input (active high, asynchronous) with the
// clock generator's lock signal. While either asks for reset, rst_o is high
// at once; after both have been released, the request passes a two-stage
// synchroniser and rst_o stays high for HOLD further clocks before it falls
// synchronously, so every block leaves reset on the same clock edge.
// Release latency: rst_o falls on the (3 + HOLD)-th clock edge after the last of ext_rst going low and
// locked going high.
// The document names this block only; the hold count and polarity are this
// design's choices.
module proc_sys_reset #(
  parameter int unsigned HOLD = 16
) (
  input  logic clk,
  input  logic ext_rst,
  input  logic locked,
  output logic rst_o
);
  localparam int unsigned HW = $clog2(HOLD + 1);

  logic          req_a;
  logic [1:0]    sync;
  logic [HW-1:0] cnt;

  assign req_a = ext_rst | ~locked;

  always_ff @(posedge clk or posedge req_a) begin
    if (req_a) begin
      sync  <= 2'b11;
      cnt   <= HW'(HOLD);
      rst_o <= 1'b1;
    end else begin
      sync <= {sync[0], 1'b0};
      if (sync[1]) begin
        cnt   <= HW'(HOLD);
        rst_o <= 1'b1;
      end else if (cnt != '0) begin
        cnt   <= cnt - 1'b1;
        rst_o <= 1'b1;
      end else begin
        rst_o <= 1'b0;
      end
    end
  end
endmodule
