// pbus_decoder: peripheral bus address decoder and read-data multiplexer.
//
// Stands where the processor's peripheral bus meets the peripherals. The
// upper nibble of the 8-bit word address picks one of NS slaves; that slave
// alone sees sel, and every slave gets the lower nibble as its register
// index together with we and wdata. Read data of the selected slave is
// returned in the same cycle; an address with no slave reads as zero and
// sets err_o for that cycle. Purely combinational.
// The document shows a shared peripheral bus; this single-cycle protocol is a
// simplified stand-in of this design's own.
module pbus_decoder
  import sa_pkg::*;
#(
  parameter int unsigned NS = NSLAVES
) (
  input  pbus_mreq_t        mreq,
  output logic [31:0]       mrdata,
  output logic              err_o,
  output pbus_req_t [NS-1:0] sreq,
  input  logic [NS-1:0][31:0] srdata
);
  logic [3:0] slot;
  assign slot = mreq.addr[7:4];

  always_comb begin
    mrdata = '0;
    err_o  = mreq.sel && (int'(slot) >= NS);
    for (int i = 0; i < NS; i++) begin
      sreq[i].sel   = mreq.sel && (int'(slot) == i);
      sreq[i].we    = mreq.we;
      sreq[i].addr  = mreq.addr[3:0];
      sreq[i].wdata = mreq.wdata;
      if (int'(slot) == i) mrdata = srdata[i];
    end
  end
endmodule
