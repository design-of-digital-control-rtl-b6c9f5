// tb_pbus_decoder: checks address decoding and read multiplexing.
//
// For random requests: exactly the slave named by the upper address nibble
// sees sel (none for an unmapped slot, which must raise err), every slave
// gets the register index, we and wdata, and the read data returned is the
// selected slave's (zero when unmapped). Slave read data are random values
// set here.
module tb_pbus_decoder;
  import sa_pkg::*;
  pbus_mreq_t mreq;
  logic [31:0] mrdata;
  logic err;
  pbus_req_t [NSLAVES-1:0] sreq;
  logic [NSLAVES-1:0][31:0] srdata;
  int checks = 0, failures = 0;

  pbus_decoder dut (.mreq, .mrdata, .err_o(err), .sreq, .srdata);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 500; k++) begin
      int slot;
      for (int i = 0; i < NSLAVES; i++) srdata[i] = $urandom;
      mreq.sel = 1'($urandom);
      mreq.we = 1'($urandom);
      mreq.addr = 8'($urandom);
      mreq.wdata = $urandom;
      #1;
      slot = int'(mreq.addr[7:4]);
      for (int i = 0; i < NSLAVES; i++) begin
        chk(sreq[i].sel == (mreq.sel && slot == i), $sformatf("sel %0d addr %h", i, mreq.addr));
        chk(sreq[i].addr == mreq.addr[3:0] && sreq[i].we == mreq.we && sreq[i].wdata == mreq.wdata,
            "fan-out");
      end
      chk(mrdata == ((slot < NSLAVES) ? srdata[slot] : 32'd0), "read mux");
      chk(err == (mreq.sel && slot >= NSLAVES), "err");
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
