// sweep_ctrl: linear frequency sweep of the DDS tuning word.
//
// Holds the sweep constants MIN, MAX and STEP in bus registers and produces
// the frequency tuning word (FTW) for the DDS. The loop is the one of the
// sweep flow chart: set the DDS frequency to FTW, wait one interval, add
// STEP, and when FTW has reached MAX load MIN again. The interval (delta-t)
// comes from an interval timer as a one-clock tick_i pulse.
//
// Registers (word index): 0 CTRL (bit 0 enable), 1 MIN, 2 MAX, 3 STEP,
// 4 FTW (read only), 5 number of completed sweeps (read only).
// While disabled FTW is held at MIN. When enabled, each tick_i updates FTW on
// the following clock; wrap_o pulses in the clock in which FTW returns to MIN.
//
// The flow chart tests FTW == MAX. This design restarts when FTW + STEP is
// at or beyond MAX, which is the same whenever MAX - MIN is a multiple of
// STEP and cannot run past MAX otherwise. So the values put out are MIN,
// MIN+STEP, ... up to the last one below MAX; MAX itself is never sent.
// The sweep is done in logic here instead of in processor software.
module sweep_ctrl
  import sa_pkg::*;
#(
  parameter int unsigned PHASE_W = 25
) (
  input  logic               clk,
  input  logic               rst,
  input  pbus_req_t          req,
  output logic [31:0]        rdata,
  input  logic               tick_i,
  output logic [PHASE_W-1:0] ftw_o,
  output logic               enable_o,
  output logic               wrap_o
);
  logic               en;
  logic [PHASE_W-1:0] fmin, fmax, fstep, ftw;
  logic [31:0]        nsweeps;
  logic [PHASE_W:0]   nxt;

  assign nxt = {1'b0, ftw} + {1'b0, fstep};

  always_ff @(posedge clk) begin
    wrap_o <= 1'b0;
    if (rst) begin
      en      <= 1'b0;
      fmin    <= '0;
      fmax    <= '0;
      fstep   <= '0;
      ftw     <= '0;
      nsweeps <= '0;
    end else begin
      if (req.sel && req.we) begin
        unique case (req.addr)
          4'd0: en    <= req.wdata[0];
          4'd1: fmin  <= req.wdata[PHASE_W-1:0];
          4'd2: fmax  <= req.wdata[PHASE_W-1:0];
          4'd3: fstep <= req.wdata[PHASE_W-1:0];
          default: ;
        endcase
      end
      if (!en) begin
        ftw <= fmin;
      end else if (tick_i) begin
        if (nxt >= {1'b0, fmax}) begin
          ftw     <= fmin;
          wrap_o  <= 1'b1;
          nsweeps <= nsweeps + 1;
        end else begin
          ftw <= nxt[PHASE_W-1:0];
        end
      end
    end
  end

  always_comb begin
    unique case (req.addr)
      4'd0:    rdata = {31'd0, en};
      4'd1:    rdata = 32'(fmin);
      4'd2:    rdata = 32'(fmax);
      4'd3:    rdata = 32'(fstep);
      4'd4:    rdata = 32'(ftw);
      4'd5:    rdata = nsweeps;
      default: rdata = '0;
    endcase
  end

  assign ftw_o    = ftw;
  assign enable_o = en;
endmodule
