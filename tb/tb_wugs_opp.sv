// tb_wugs_opp: exercises the output port processor. Checks that cells are
// released to the link in stamp order and not before they are T cell times
// old, that BR cells skip the wait, that CYC1 cells and control cells go
// to the recycling path, that control cells addressed to the OPP read and
// write its registers, that UD cells from this port are dropped, that the
// link header carries VXI1 and a correct HEC, that continuous-stream cells
// overtake others in the XMB, that the store refuses cells when full and
// that a full resequencer releases early.
module tb_wugs_opp;
  import wugs_pkg::*;
  localparam logic [PORT_W-1:0] ME = 6'd12;
  localparam int T = 39;
  logic clk = 0, rst = 1;
  cell_t net_cell, rcy_cell;
  logic net_grant, tx_ready, tx_valid, rcy_valid, rcy_ready;
  link_cell_t tx_cell;
  int checks = 0, failures = 0, cyc = 0;
  link_cell_t txq [$];  int txt [$];
  cell_t rcq [$];

  wugs_opp #(.PORT_ID(ME)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) cyc <= cyc + 1;
  always @(posedge clk) if (!rst && tx_valid) begin txq.push_back(tx_cell); txt.push_back(cyc); end
  always @(posedge clk) if (!rst && rcy_valid && rcy_ready) rcq.push_back(rcy_cell);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s t=%0t", msg, $time); end
  endtask

  initial begin
    #5000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic cell_t dcell(int id, int ts, int vpi, int vci);
    cell_t c;
    c = '0; c.bi = 1; c.d = 1; c.ts = TS_W'(ts); c.vxi1 = {VPI_W'(vpi), VCI_W'(vci)};
    c.pt = 3'd0; c.payload = PAYLOAD_W'(id);
    return c;
  endfunction

  task automatic put(cell_t c);
    @(negedge clk);
    net_cell = c;
    #1 check(net_grant, "grant while room");
    @(posedge clk);
    #1 net_cell = '0;
  endtask

  task automatic ctl_op(opc_e op, int addr, logic [127:0] data, output ctl_payload_t rep);
    cell_t c;
    ctl_payload_t p;
    p = '0; p.opc = op; p.unit = 1; p.addr = 16'(addr); p.data = data; p.tgt_port = ME;
    c = '0; c.bi = 1; c.d = 0; c.payload = PAYLOAD_W'(p);
    rcq.delete();
    put(c);
    // a new age threshold applies to the cell that carried it
    for (int i = 0; i < 500 && rcq.size() == 0; i++) @(posedge clk);
    check(rcq.size() == 1, "control cell recycled");
    rep = (rcq.size() == 1) ? ctl_payload_t'(rcq[0].payload) : '0;
    check(rep.done, "executed");
  endtask

  initial begin
    ctl_payload_t rep;
    int base;
    net_cell = '0; tx_ready = 1; rcy_ready = 1;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    // ---- resequencing: stamps out of order ----
    base = cyc;
    put(dcell(1, 2 * (base + 0) - 6, 5, 100));
    put(dcell(2, 2 * (base + 0) - 10, 5, 100));
    put(dcell(3, 2 * (base + 0) - 2, 5, 100));
    put(dcell(4, 2 * (base + 0) - 8, 5, 100));
    repeat (T + 10) @(posedge clk);
    check(txq.size() == 4, "four cells sent");
    if (txq.size() == 4) begin
      check(txq[0].payload == 2 && txq[1].payload == 4 && txq[2].payload == 1 && txq[3].payload == 3,
            "stamp order");
      // cell 2 stamped at base-5 cell times: leaves at base-5+T at the earliest
      check(txt[0] >= base - 5 + T - 1, "held for the age threshold");
      check(txq[0].hdr.vpi == 5 && txq[0].hdr.vci == 100, "header from VXI1");
      check(txq[0].hdr.hec == hec_calc({txq[0].hdr.vpi, txq[0].hdr.vci, txq[0].hdr.pt, txq[0].hdr.clp}),
            "HEC");
    end
    // ---- bypass ----
    txq.delete(); txt.delete();
    base = cyc;
    put(dcell(10, 2 * base, 1, 1));
    begin cell_t c; c = dcell(11, 2 * base, 1, 1); c.br = 1; put(c); end
    repeat (5) @(posedge clk);
    check(txq.size() == 1 && txq[0].payload == 11, "BR cell leaves at once");
    repeat (T) @(posedge clk);
    check(txq.size() == 2, "normal cell after T");
    // ---- recycling and UD ----
    rcq.delete(); txq.delete();
    begin
      cell_t c;
      c = dcell(20, 2 * cyc, 2, 2); c.cyc1 = 1; c.br = 1; put(c);
      c = dcell(21, 2 * cyc, 2, 2); c.ud = 1; c.stg = ME; c.br = 1; put(c);
      c = dcell(22, 2 * cyc, 2, 2); c.ud = 1; c.stg = ME + 1; c.br = 1; put(c);
    end
    repeat (6) @(posedge clk);
    check(rcq.size() == 1 && rcq[0].payload == 20, "CYC1 cell recycled");
    check(txq.size() == 1 && txq[0].payload == 22, "UD drops own-port cell only");
    ctl_op(OPC_RD_REG, OREG_UD_DROP, '0, rep);  check(rep.data == 1, "UD counter");
    // ---- registers ----
    ctl_op(OPC_RD_REG, OREG_AGE_T, '0, rep);     check(rep.data == T, "default age threshold");
    ctl_op(OPC_WR_REG, OREG_AGE_T, 128'd5, rep);
    ctl_op(OPC_RD_REG, OREG_AGE_T, '0, rep);     check(rep.data == 5, "age threshold written");
    txq.delete(); txt.delete();
    base = cyc;
    put(dcell(30, 2 * base, 1, 1));
    repeat (12) @(posedge clk);
    check(txq.size() == 1 && txt[0] - base <= 8, "new threshold used");
    ctl_op(OPC_WR_REG, OREG_AGE_T, 128'(T), rep);
    // ---- XMB class priority ----
    tx_ready = 0;
    txq.delete();
    begin
      cell_t c;
      c = dcell(40, 2 * cyc, 1, 1); c.br = 1; put(c);
      c = dcell(41, 2 * cyc, 1, 1); c.br = 1; c.cs1 = 1; put(c);
    end
    repeat (3) @(posedge clk);
    tx_ready = 1;
    repeat (3) @(posedge clk);
    check(txq.size() == 2 && txq[0].payload == 41 && txq[1].payload == 40, "CS cell first");
    // ---- full store and forced release (long threshold) ----
    ctl_op(OPC_WR_REG, OREG_AGE_T, 128'd200, rep);
    repeat (5) @(posedge clk);
    tx_ready = 0;
    txq.delete();
    for (int i = 0; i < 256; i++) put(dcell(100 + i, 2 * cyc, 1, 1));
    @(negedge clk);
    net_cell = dcell(999, 2 * cyc, 1, 1);
    #1 check(!net_grant, "no grant when the store is full");
    @(posedge clk); #1 net_cell = '0;
    tx_ready = 1;
    repeat (400) @(posedge clk);
    check(txq.size() == 256, "all stored cells sent");
    ctl_op(OPC_RD_REG, OREG_RSQ_OVF, '0, rep);
    check(rep.data > 0, "resequencer forced releases when full");
    $display("forced releases %0d", rep.data);
    ctl_op(OPC_RD_REG, OREG_CELLS, '0, rep);
    $display("cells sent %0d", rep.data);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
