// tb_wugs_switch: end-to-end test of the 64-port switch at its default
// size. A control processor on link 0 configures every IPP through in-band
// control cells and checks each reply. Then:
//   * unicast traffic on all ports (a fixed permutation) checks delivery,
//     header translation and per-connection order through the dynamic-routing
//     network and the resequencers, while a VXT rewrite in mid-traffic
//     triggers transitional time stamping;
//   * a binary multicast tree with one recycling node (input 10 -> 20, and
//     via port 30's recycling path -> 40, 41) checks copying and recycling;
//   * a range copy (input 11 -> ports 48..55), a shared-tree connection with
//     upstream discard (input 12 -> 12, 13; the copy to 12 must vanish) and
//     four packet connections into a slow link (port 60) that must lose
//     whole packets (early packet discard) rather than scattered cells;
//   * a hot spot (16 inputs -> port 61) fills switch elements so that grants
//     must rotate; no cell may be lost;
//   * an HEC error is counted and read back from the IPP, and a RESET control
//     cell resets the switch, after which the old connections are gone.
// Each mechanism is counted and a mechanism that never happened is a failure.
module tb_wugs_switch;
  import wugs_pkg::*;
  logic clk = 0, rst = 1;
  logic       rx_valid [N_PORTS];
  link_cell_t rx_cell  [N_PORTS];
  logic       tx_ready [N_PORTS];
  logic       tx_valid [N_PORTS];
  link_cell_t tx_cell  [N_PORTS];
  logic       reset_active;
  int checks = 0, failures = 0, cyc = 0;

  wugs_switch dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s cycle=%0d", msg, cyc); end
  endtask

  initial begin
    #20000000;
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- cell helpers ----------------
  function automatic link_cell_t lcell(int vpi, int vci, logic [PAYLOAD_W-1:0] pl, int pt = 0, bit bad = 0);
    link_cell_t l;
    l.hdr.vpi = VPI_W'(vpi); l.hdr.vci = VCI_W'(vci); l.hdr.pt = 3'(pt); l.hdr.clp = 0;
    l.hdr.hec = hec_calc({l.hdr.vpi, l.hdr.vci, l.hdr.pt, l.hdr.clp}) ^ {7'd0, bad};
    l.payload = pl;
    return l;
  endfunction

  function automatic logic [PAYLOAD_W-1:0] data_pl(int tag, int src, int seq);
    return PAYLOAD_W'({8'(tag), 8'(src), 32'(seq)});
  endfunction

  function automatic vxt_entry_t ent(rc_e rc, int a1, int a2, int vpi1, int vpi2);
    vxt_entry_t e;
    e = '0; e.valid = 1; e.rc = rc; e.adr1 = ADR_W'(a1); e.adr2 = ADR_W'(a2);
    e.vxi1 = {VPI_W'(vpi1), VCI_W'(0)}; e.vxi2 = {VPI_W'(vpi2), VCI_W'(0)};
    e.cc = 1;
    return e;
  endfunction

  // ---------------- link drivers ----------------
  link_cell_t pend [N_PORTS][$];     // cells waiting to enter on each link
  always @(negedge clk) begin
    for (int p = 0; p < N_PORTS; p++) begin
      rx_valid[p] = 1'b0;
      if (pend[p].size() > 0) begin
        rx_valid[p] = 1'b1;
        rx_cell[p]  = pend[p].pop_front();
      end
    end
  end

  int ctl_sent = 0;
  ctl_payload_t replies [$];
  task automatic ctl_send(opc_e op, int tgt, bit unit, int addr, logic [127:0] data);
    ctl_payload_t c;
    c = '0; c.opc = op; c.unit = unit; c.tgt_port = PORT_W'(tgt); c.ret_port = 0;
    c.ret_vpi = 0; c.ret_vci = 33; c.addr = 16'(addr); c.data = data;
    pend[0].push_back(lcell(0, 32, PAYLOAD_W'(c)));
    ctl_sent++;
  endtask
  task automatic ctl_wait(int n);
    for (int i = 0; i < 3000 && replies.size() < n; i++) @(posedge clk);
    check(replies.size() == n, "control replies received");
  endtask

  // ---------------- output monitors ----------------
  int uc_next [N_PORTS];         // next unicast sequence number per source
  int uc_got = 0, uc_sent = 0, uc_misorder = 0;
  int mc_cnt [N_PORTS];          // multicast copies per port (tag 2)
  int rg_cnt [N_PORTS];          // range copies per port (tag 3)
  int ud_cnt [N_PORTS];          // shared-tree copies (tag 4)
  int hs_cnt = 0;                // hot-spot cells (tag 6)
  int pk_idx [4];                // EPD flows: next cell index in packet
  int pk_whole = 0, pk_cut = 0, pk_cells = 0;
  localparam int PKT_LEN = 5;

  always @(posedge clk) begin
    if (!reset_active)
    for (int q = 0; q < N_PORTS; q++) begin
      if (tx_valid[q]) begin
        automatic link_cell_t l = tx_cell[q];
        automatic int tag = int'(l.payload[47:40]);
        automatic int src = int'(l.payload[39:32]);
        automatic int seq = int'(l.payload[31:0]);
        check(l.hdr.hec == hec_calc({l.hdr.vpi, l.hdr.vci, l.hdr.pt, l.hdr.clp}), "HEC on output");
        if (l.hdr.vpi == 0 && l.hdr.vci == 33) begin
          check(q == 0, "reply on the return port");
          replies.push_back(ctl_payload_t'(l.payload));
        end else begin
          case (tag)
            1: begin
              uc_got++;
              check(q == (src * 7 + 3) % 64 && l.hdr.vpi == 12'(100 + src % 8) && l.hdr.vci == 16'(src),
                    "unicast port and header");
              if (seq != uc_next[src]) begin
                uc_misorder++;
                $display("order: src %0d got %0d expected %0d", src, seq, uc_next[src]);
              end
              uc_next[src] = seq + 1;
            end
            2: begin
              mc_cnt[q]++;
              check((q == 20 && l.hdr.vpi == 5) || (q == 40 && l.hdr.vpi == 6) ||
                    (q == 41 && l.hdr.vpi == 7), "multicast leaf and header");
            end
            3: begin rg_cnt[q]++; check(q >= 48 && q <= 55 && l.hdr.vpi == 9, "range copy port"); end
            4: begin ud_cnt[q]++; check(q == 13, "shared tree: only port 13"); end
            5: begin
              automatic int f = src - 14;
              check(q == 60 && f >= 0 && f < 4, "packet flow port");
              pk_cells++;
              if (seq % PKT_LEN == 0) begin
                if (pk_idx[f] != 0) pk_cut++;
                pk_idx[f] = 1;
              end else if (seq % PKT_LEN == pk_idx[f]) begin
                pk_idx[f]++;
              end else pk_cut++;
              if (l.hdr.pt == 3'd1) begin
                check(seq % PKT_LEN == PKT_LEN - 1, "end of packet marker");
                if (pk_idx[f] == PKT_LEN) pk_whole++;
                pk_idx[f] = 0;
              end
            end
            6: begin hs_cnt++; check(q == 61, "hot spot port"); end
            default: check(0, "unexpected cell");
          endcase
        end
      end
    end
  end

  // ---------------- mechanism probes ----------------
  int m_recycle = 0, m_ud = 0, m_epd = 0, m_trans = 0, m_rot = 0, m_netmis = 0, m_reset = 0;
  int m_bsplit = 0, m_dist = 0;
  int last_net_seq [N_PORTS][N_PORTS];
  for (genvar p = 0; p < N_PORTS; p++) begin : g_probe
    always @(posedge clk) if (!reset_active) begin
      if (dut.rcy_valid[p] && dut.rcy_ready[p] && dut.rcy_cell[p].d) m_recycle++;
      if (dut.g_port[p].u_opp.ud_drop) m_ud++;
      if (dut.g_port[p].u_opp.to_xmb && dut.g_port[p].u_opp.xb_drop_epd) m_epd++;
      if (dut.g_port[p].u_ipp.ts_trans && dut.g_port[p].u_ipp.st_alloc) m_trans++;
    end
  end
  always @(posedge clk) if (dut.reset_active && !rst) m_reset++;
  always @(posedge clk) if (!reset_active) begin
    for (int s = 0; s < N_STAGES; s++)
      for (int e = 0; e < RADIX; e++) if (dut.se_occ[s][e] > 32) m_rot++;
    for (int p = 0; p < N_PORTS; p++) begin
      // network output: unicast cells arriving out of order before resequencing
      if (dut.from_net[p].bi && dut.net_gout[p] && dut.from_net[p].d &&
          dut.from_net[p].payload[47:40] == 8'd1) begin
        automatic int src = int'(dut.from_net[p].payload[39:32]);
        automatic int seq = int'(dut.from_net[p].payload[31:0]);
        if (seq < last_net_seq[p][src]) m_netmis++;
        last_net_seq[p][src] = seq;
      end
      if (dut.to_net[p].bi && dut.net_gin[p] && dut.to_net[p].rc == RC_BCOPY) m_bsplit++;
    end
  end

  // ---------------- test sequence ----------------
  initial begin
    int useq [N_PORTS];
    int mc_sent = 0, rg_sent = 0, ud_sent = 0, hs_sent = 0, pk_sent = 0;
    int nrep;
    foreach (tx_ready[p]) tx_ready[p] = 1'b1;
    foreach (rx_valid[p]) begin rx_valid[p] = 0; rx_cell[p] = '0; uc_next[p] = 0; useq[p] = 0;
      mc_cnt[p] = 0; rg_cnt[p] = 0; ud_cnt[p] = 0; end
    foreach (pk_idx[f]) pk_idx[f] = 0;
    foreach (last_net_seq[a, b]) last_net_seq[a][b] = 0;
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);

    // ---- configuration through in-band control cells ----
    for (int p = 0; p < N_PORTS; p++) begin
      vxt_entry_t e;
      e = ent(RC_UNICAST, (p * 7 + 3) % 64, 0, 100 + p % 8, 0);
      e.vpt = 0;
      ctl_send(OPC_WR_VXT, p, 0, 1, 128'(e));           // VP 1: unicast
    end
    begin
      vxt_entry_t e;
      e = ent(RC_BCOPY, 20, 30, 5, 4); e.cyc2 = 1;
      ctl_send(OPC_WR_VXT, 10, 0, 3, 128'(e));          // tree root at port 10
      e = ent(RC_BCOPY, 40, 41, 6, 7); e.rco = 1;
      ctl_send(OPC_WR_VXT, 30, 0, 4, 128'(e));          // recycling node at port 30
      e = ent(RC_RANGE, 48, 55, 9, 0);
      ctl_send(OPC_WR_VXT, 11, 0, 8, 128'(e));          // range copy
      e = ent(RC_BCOPY, 12, 13, 12, 12); e.ud = 1;
      ctl_send(OPC_WR_VXT, 12, 0, 10, 128'(e));         // shared tree with UD
      for (int f = 0; f < 4; f++) begin
        e = ent(RC_UNICAST, 60, 0, 13, 0); e.bdi1 = BDI_W'(f + 1);
        ctl_send(OPC_WR_VXT, 14 + f, 0, 11, 128'(e));   // packet flows to port 60
      end
      for (int p = 32; p < 48; p++) begin
        e = ent(RC_UNICAST, 61, 0, 14, 0);
        ctl_send(OPC_WR_VXT, p, 0, 15, 128'(e));        // hot spot
      end
      ctl_send(OPC_WR_REG, 60, 1, int'(OREG_EPD_HI), 128'd24);  // small EPD marks at port 60
      ctl_send(OPC_WR_REG, 60, 1, int'(OREG_EPD_LO), 128'd8);
      ctl_send(OPC_RD_VXT, 30, 0, 4, '0);
    end
    ctl_wait(ctl_sent);
    for (int i = 0; i < replies.size(); i++) check(replies[i].done, "reply executed");
    begin
      vxt_entry_t rb;
      rb = vxt_entry_t'(replies[replies.size() - 1].data[VXT_ENTRY_W-1:0]);
      check(rb.rco && rb.adr1 == 40, "VXT read back via control cell");
    end
    nrep = replies.size();

    // ---- traffic ----
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      tx_ready[60] = ($urandom % 4 == 0);
      for (int p = 1; p < N_PORTS; p++) begin
        if (pend[p].size() > 0 || p == 63) continue;
        if (p >= 14 && p < 18) begin
          if ($urandom % 6 == 0) begin
            pend[p].push_back(lcell(11, 0, data_pl(5, p, useq[p]),
                                    (useq[p] % PKT_LEN == PKT_LEN - 1) ? 1 : 0));
            useq[p]++; pk_sent++;
          end
        end else if (p == 10 && $urandom % 8 == 0) begin
          pend[p].push_back(lcell(3, 0, data_pl(2, p, mc_sent))); mc_sent++;
        end else if (p == 11 && $urandom % 8 == 0) begin
          pend[p].push_back(lcell(8, 0, data_pl(3, p, rg_sent))); rg_sent++;
        end else if (p == 12 && $urandom % 8 == 0) begin
          pend[p].push_back(lcell(10, 0, data_pl(4, p, ud_sent))); ud_sent++;
        end else if ($urandom % 5 < 2) begin
          pend[p].push_back(lcell(1, p, data_pl(1, p, useq[p]))); useq[p]++; uc_sent++;
        end
      end
      if (t == 600) begin
        // rewrite port 1's VXT entry in mid-traffic: transitional stamping
        vxt_entry_t e;
        e = ent(RC_UNICAST, (1 * 7 + 3) % 64, 0, 100 + 1, 0);
        ctl_send(OPC_WR_VXT, 1, 0, 1, 128'(e));
      end
    end
    tx_ready[60] = 1;
    repeat (600) @(posedge clk);
    ctl_wait(ctl_sent);
    check(uc_got == uc_sent, "every unicast cell delivered");
    check(uc_misorder == 0, "unicast order kept");
    check(mc_cnt[20] == mc_sent && mc_cnt[40] == mc_sent && mc_cnt[41] == mc_sent, "multicast tree copies");
    for (int q = 48; q <= 55; q++) begin
      check(rg_cnt[q] == rg_sent, "range copies");
      if (rg_cnt[q] != rg_sent) $display("range port %0d got %0d of %0d", q, rg_cnt[q], rg_sent);
    end
    check(ud_cnt[13] == ud_sent, "shared tree copy");
    if (ud_cnt[13] != ud_sent) $display("shared tree got %0d of %0d", ud_cnt[13], ud_sent);
    check(pk_whole > 0, "whole packets delivered on the congested link");

    // ---- hot spot ----
    for (int p = 32; p < 48; p++)
      for (int i = 0; i < 48; i++) begin pend[p].push_back(lcell(15, 0, data_pl(6, p, i))); hs_sent++; end
    repeat (1200) @(posedge clk);
    check(hs_cnt == hs_sent, "hot spot: no cell lost");

    // ---- HEC error and register reads ----
    pend[5].push_back(lcell(1, 5, data_pl(1, 5, 0), 0, 1));
    repeat (5) @(posedge clk);
    nrep = replies.size();
    ctl_send(OPC_RD_REG, 5, 0, int'(IREG_HEC_ERR), '0);
    ctl_send(OPC_RD_REG, 60, 1, int'(OREG_EPD_DROP), '0);
    ctl_send(OPC_RD_CNT, 10, 0, 3, '0);
    ctl_wait(ctl_sent);
    // replies may come back in any order: match them by target
    for (int i = nrep; i < replies.size(); i++) begin
      if (replies[i].tgt_port == 5)  check(replies[i].data == 1, "HEC error counted");
      if (replies[i].tgt_port == 60) check(replies[i].data == 128'(m_epd), "EPD counter matches drops seen");
      if (replies[i].tgt_port == 10) check(replies[i].data == 128'(mc_sent), "VXT cell counter of the tree root");
      if (replies[i].tgt_port == 10) $display("tree root counter %0d, cells sent %0d", replies[i].data, mc_sent);
    end

    // ---- reset by control cell ----
    begin
      ctl_payload_t c;
      c = '0; c.opc = OPC_RESET;
      pend[7].push_back(lcell(0, 32, PAYLOAD_W'(c)));
    end
    repeat (10) @(posedge clk);
    check(m_reset > 0, "switch reset by control cell");
    uc_got = 0;
    pend[2].push_back(lcell(1, 2, data_pl(1, 2, 0)));
    repeat (100) @(posedge clk);
    check(uc_got == 0, "connections cleared by reset");

    // ---- mechanisms ----
    $display("unicast %0d, multicast %0d, range %0d, shared-tree %0d, hot-spot %0d, packet cells %0d",
             uc_sent, mc_sent, rg_sent, ud_sent, hs_sent, pk_sent);
    $display("recycled %0d, binary-copy cells %0d, UD drops %0d, EPD/PPD drops %0d, whole packets %0d, cut packets %0d",
             m_recycle, m_bsplit, m_ud, m_epd, pk_whole, pk_cut);
    $display("transitional stamps %0d, SE near-full cycles %0d, network misorders fixed %0d, resets %0d",
             m_trans, m_rot, m_netmis, m_reset);
    check(m_recycle > 0, "recycling happened");
    check(m_bsplit > 0, "binary copy happened");
    check(m_ud > 0, "upstream discard happened");
    check(m_epd > 0, "packet discard happened");
    check(m_trans > 0, "transitional stamping happened");
    check(m_rot > 0, "grant rotation (SE nearly full) happened");
    check(m_netmis > 0, "network misordering (fixed by resequencer) happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
