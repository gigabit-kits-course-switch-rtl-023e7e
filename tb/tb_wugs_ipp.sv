// tb_wugs_ipp: exercises the input port processor through its link and
// recycling inputs. Control cells on the recycling path program the VXT
// and registers and must come back as replies; link cells must be
// translated (VP switching, VC lookup, SC, STG), stamped, counted, dropped
// on HEC errors, unknown connections, RCO entries and RCB overflow; link
// control cells must become internal control cells to the target port; a
// RESET cell must raise the reset request; transitional stamps must be
// inflated after a VXT write.
module tb_wugs_ipp;
  import wugs_pkg::*;
  localparam logic [PORT_W-1:0] ME = 6'd9;
  logic clk = 0, rst = 1;
  logic rx_valid, rcy_valid, rcy_ready, sw_grant, sw_reset_req;
  link_cell_t rx_cell;
  cell_t rcy_cell, sw_cell;
  int checks = 0, failures = 0, cyc = 0;
  cell_t got [$];
  int    got_t [$];

  wugs_ipp #(.PORT_ID(ME)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) cyc <= cyc + 1;
  always @(posedge clk)
    if (!rst && sw_cell.bi && sw_grant) begin got.push_back(sw_cell); got_t.push_back(cyc); end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s t=%0t", msg, $time); end
  endtask

  initial begin
    #2000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic link_cell_t lcell(int vpi, int vci, int id, bit bad_hec = 0);
    link_cell_t l;
    l.hdr.vpi = VPI_W'(vpi); l.hdr.vci = VCI_W'(vci); l.hdr.pt = 3'd0; l.hdr.clp = 0;
    l.hdr.hec = hec_calc({l.hdr.vpi, l.hdr.vci, l.hdr.pt, l.hdr.clp}) ^ (bad_hec ? 8'h01 : 8'h00);
    l.payload = PAYLOAD_W'(id);
    return l;
  endfunction

  function automatic ctl_payload_t ctl(opc_e op, int addr, logic [127:0] data);
    ctl_payload_t c;
    c = '0; c.opc = op; c.unit = 0; c.tgt_port = ME; c.ret_port = 6'd33;
    c.ret_vpi = 12'd1; c.ret_vci = 16'd77; c.addr = 16'(addr); c.data = data;
    return c;
  endfunction

  task automatic send_rcy(cell_t c);
    @(negedge clk);
    rcy_valid = 1; rcy_cell = c;
    do @(posedge clk); while (!rcy_ready);
    #1 rcy_valid = 0;
  endtask

  // control cell on the recycling path; returns the reply payload
  task automatic ctl_op(opc_e op, int addr, logic [127:0] data, output ctl_payload_t rep);
    cell_t c;
    c = '0; c.bi = 1; c.d = 0; c.payload = PAYLOAD_W'(ctl(op, addr, data));
    got.delete(); got_t.delete();
    send_rcy(c);
    repeat (3) @(posedge clk);
    check(got.size() == 1, "one reply");
    if (got.size() == 1) begin
      check(got[0].d && got[0].adr1 == 9'd33 && got[0].vxi1 == {12'd1, 16'd77}, "reply routing");
      rep = ctl_payload_t'(got[0].payload);
      check(rep.done, "reply marked done");
    end else rep = '0;
  endtask

  task automatic send_link(link_cell_t l);
    @(negedge clk);
    rx_valid = 1; rx_cell = l;
    @(posedge clk);
    #1 rx_valid = 0;
  endtask

  function automatic vxt_entry_t ent(int port, int vpi_o, int vci_o, bit vpt, bit sc, bit rco);
    vxt_entry_t e;
    e = '0; e.valid = 1; e.rc = RC_UNICAST; e.adr1 = ADR_W'(port);
    e.vxi1 = {VPI_W'(vpi_o), VCI_W'(vci_o)}; e.vpt = vpt; e.sc = sc; e.rco = rco; e.cc = 1;
    e.cs1 = 1; e.bdi1 = 10'd5;
    return e;
  endfunction

  initial begin
    ctl_payload_t rep;
    int t0;
    rx_valid = 0; rcy_valid = 0; rx_cell = '0; rcy_cell = '0; sw_grant = 1;
    repeat (3) @(posedge clk);
    rst <= 0;
    // registers and VXT
    ctl_op(OPC_RD_REG, IREG_VXT_BOUND, '0, rep);
    check(rep.data == 256, "default VXT bound");
    ctl_op(OPC_WR_REG, IREG_VXT_BOUND, 128'd16, rep);
    ctl_op(OPC_WR_REG, IREG_TT_EN, 128'd0, rep);
    ctl_op(OPC_WR_VXT, 2, 128'(ent(40, 300, 0, 0, 0, 0)), rep);      // VP 2 switched
    ctl_op(OPC_WR_VXT, 3, 128'(ent(0, 0, 0, 1, 0, 0)), rep);         // VP 3 terminates
    ctl_op(OPC_WR_VXT, 16 + 50, 128'(ent(17, 8, 900, 0, 1, 0)), rep); // VC 50, SC
    ctl_op(OPC_WR_VXT, 16 + 51, 128'(ent(18, 8, 901, 0, 0, 1)), rep); // VC 51, RCO
    ctl_op(OPC_RD_VXT, 16 + 50, '0, rep);
    check(vxt_entry_t'(rep.data[VXT_ENTRY_W-1:0]) == ent(17, 8, 900, 0, 1, 0), "VXT read back");
    // data cells
    got.delete(); got_t.delete();
    t0 = cyc;
    send_link(lcell(2, 1234, 1001));
    send_link(lcell(3, 50, 1002));
    send_link(lcell(3, 51, 1003));        // RCO: dropped
    send_link(lcell(3, 52, 1004));        // unknown VC: dropped
    send_link(lcell(2, 1, 1005, 1));      // HEC error
    repeat (4) @(posedge clk);
    check(got.size() == 2, "two data cells forwarded");
    if (got.size() == 2) begin
      check(got[0].adr1 == 40 && got[0].vxi1 == {12'd300, 16'd1234} && got[0].stg == ME &&
            got[0].d && got[0].payload == 1001 && got[0].cs1 && got[0].bdi1 == 5, "VP switched cell");
      check(got[1].adr1 == 17 && got[1].vxi1 == {12'd8, 16'd900} && got[1].clp, "VC cell with SC");
      check(got[0].ts == TS_W'(2 * (t0 + 1)), "stamp equals entry time");
      check(got_t[0] - t0 <= 2, "one-cycle pass through the IPP");
    end
    ctl_op(OPC_RD_REG, IREG_HEC_ERR, '0, rep);  check(rep.data == 1, "HEC error count");
    ctl_op(OPC_RD_REG, IREG_BAD_VC, '0, rep);   check(rep.data == 2, "bad VC count");
    ctl_op(OPC_RD_REG, IREG_CELLS, '0, rep);    check(rep.data == 4, "cells received");
    ctl_op(OPC_RD_CNT, 16 + 50, '0, rep);       check(rep.data == 1, "VXT cell counter");
    // recycled data cell: looked up with VXI1, RCO accepted, STG kept
    begin
      cell_t r;
      r = '0; r.bi = 1; r.d = 1; r.vxi1 = {12'd3, 16'd51}; r.stg = 6'd44; r.payload = 2001;
      got.delete();
      send_rcy(r);
      repeat (3) @(posedge clk);
      check(got.size() == 1 && got[0].adr1 == 18 && got[0].stg == 44 && got[0].payload == 2001,
            "recycled cell looked up again, STG kept");
    end
    // link control cell becomes an internal control cell
    begin
      link_cell_t l;
      ctl_payload_t c;
      c = ctl(OPC_RD_REG, 0, '0); c.tgt_port = 6'd21; c.unit = 1;
      l = lcell(0, 32, 0); l.payload = PAYLOAD_W'(c);
      got.delete();
      send_link(l);
      repeat (3) @(posedge clk);
      check(got.size() == 1 && !got[0].d && got[0].adr1 == 21 && got[0].br, "link control cell to target");
      // reset request
      c.opc = OPC_RESET; l.payload = PAYLOAD_W'(c);
      @(negedge clk); rx_valid = 1; rx_cell = l; #1;
      check(sw_reset_req, "reset request");
      @(posedge clk); #1 rx_valid = 0;
    end
    // link has priority: recycled cell waits while link cells arrive
    @(negedge clk);
    rx_valid = 1; rx_cell = lcell(2, 5, 3001);
    rcy_valid = 1; rcy_cell = '0; rcy_cell.bi = 1; rcy_cell.d = 1; rcy_cell.vxi1 = {12'd2, 16'd6};
    #1 check(!rcy_ready, "recycled cell waits for the link");
    @(posedge clk); #1 rx_valid = 0;
    #1 check(rcy_ready, "recycled cell taken when the link is idle");
    @(posedge clk); #1 rcy_valid = 0;
    // RCB overflow: stop the switch side and send 70 cells, threshold 64
    repeat (4) @(posedge clk);
    sw_grant = 0;
    for (int i = 0; i < 70; i++) send_link(lcell(2, i, 4000 + i));
    got.delete();
    sw_grant = 1;
    repeat (80) @(posedge clk);
    check(got.size() == 64, "RCB holds 64 cells");
    if (got.size() == 64) check(got[0].payload == 4000 && got[63].payload == 4063, "FIFO order");
    ctl_op(OPC_RD_REG, IREG_RCB_OVF, '0, rep);  check(rep.data == 6, "overflow count");
    // transitional stamping: enable, change the VXT, stamps are inflated
    ctl_op(OPC_WR_REG, IREG_TT_PARAM, 128'd20, rep);
    ctl_op(OPC_WR_REG, IREG_TT_EN, 128'd1, rep);
    ctl_op(OPC_WR_VXT, 2, 128'(ent(40, 300, 0, 0, 0, 0)), rep);
    got.delete();
    t0 = cyc;
    send_link(lcell(2, 9, 5001));
    repeat (3) @(posedge clk);
    check(got.size() == 1 && got[0].ts > TS_W'(2 * (t0 + 1)) && got[0].ts <= TS_W'(2 * (t0 + 1) + 40),
          "transitional stamp inflated by at most T");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
