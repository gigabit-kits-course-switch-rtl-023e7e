// tb_wugs_xmb: random packet and stream traffic against a reference model
// of the transmit buffer. The model keeps two queues, the congestion state
// (set at epd_hi, cleared at epd_lo) and per-BDI packet state, and predicts
// every drop and every cell sent. Directed phases make sure that
// continuous-stream priority, tail drop, early packet discard, hysteresis
// and partial packet discard each occur.
module tb_wugs_xmb;
  import wugs_pkg::*;
  localparam int DEPTH = 16, PW = 6;
  logic clk = 0, rst = 1;
  logic [PW:0] thr, epd_hi, epd_lo, occupancy;
  logic in_valid, in_cs, in_eop, drop, drop_epd, tx_ready, out_valid, congested;
  logic [PW-1:0] in_ptr, out_ptr;
  logic [BDI_W-1:0] in_bdi;
  int checks = 0, failures = 0;
  int n_epd = 0, n_tail = 0, n_ppd = 0, n_prio = 0, n_hyst = 0;

  int hq [$], lq [$];
  bit m_cong;
  bit m_inpkt [4], m_drop [4];

  wugs_xmb #(.DEPTH(DEPTH), .PW(PW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s t=%0t", msg, $time); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int cur_bdi_len [4];
  initial begin
    int nxt = 0;
    thr = 12; epd_hi = 8; epd_lo = 3;
    in_valid = 0; in_cs = 0; in_eop = 0; in_bdi = 0; in_ptr = 0; tx_ready = 0;
    foreach (m_inpkt[i]) begin m_inpkt[i] = 0; m_drop[i] = 0; cur_bdi_len[i] = 0; end
    m_cong = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 6000; t++) begin
      int occ, b;
      bit e_drop, e_epd, first, was_cong;
      @(negedge clk);
      // traffic: phases of light and heavy load
      tx_ready = ((t / 400) % 2 == 0) ? ($urandom % 4 != 0) : ($urandom % 4 == 0);
      in_valid = ($urandom % 3 != 0);
      in_cs    = ($urandom % 5 == 0);
      b        = $urandom % 4;          // BDI 0 = no packet discard
      in_bdi   = BDI_W'(b);
      cur_bdi_len[b]++;
      in_eop   = (cur_bdi_len[b] >= 4) || ($urandom % 6 == 0);
      if (in_valid && in_eop) cur_bdi_len[b] = 0;
      in_ptr   = PW'(nxt % 64);
      #1;
      // model decision
      occ = hq.size() + lq.size();
      check(occupancy == (PW+1)'(occ), "occupancy");
      check(congested == m_cong, "congestion state");
      first = (b != 0) && !m_inpkt[b];
      e_drop = 0; e_epd = 0;
      if (in_valid) begin
        if (b != 0 && !in_cs && (first ? m_cong : m_drop[b])) begin e_drop = 1; e_epd = 1; end
        else if (b != 0 && !first && m_drop[b]) begin e_drop = 1; e_epd = 1; end
        else if (occ >= thr || (in_cs ? hq.size() == DEPTH : lq.size() == DEPTH)) e_drop = 1;
        check(drop == e_drop && drop_epd == e_epd, "drop decision");
        if (e_epd && first) n_epd++;
        if (e_epd && !first && m_drop[b] && !m_cong) n_ppd++;
        if (e_drop && !e_epd) n_tail++;
      end
      // output
      if (tx_ready && (hq.size() + lq.size()) > 0) begin
        check(out_valid, "sends when it can");
        if (hq.size() > 0) begin
          check(out_ptr == PW'(hq[0]), "CS queue first");
          if (lq.size() > 0) n_prio++;
        end else check(out_ptr == PW'(lq[0]), "ABR/UBR queue");
      end else check(!out_valid, "no send");
      was_cong = m_cong;
      @(posedge clk);
      if (tx_ready && hq.size() > 0) void'(hq.pop_front());
      else if (tx_ready && lq.size() > 0) void'(lq.pop_front());
      if (in_valid && !e_drop) begin
        if (in_cs) hq.push_back(nxt % 64); else lq.push_back(nxt % 64);
      end
      if (occ >= epd_hi) m_cong = 1; else if (occ <= epd_lo) m_cong = 0;
      if (was_cong && m_cong && occ < epd_hi) n_hyst++;
      if (in_valid && b != 0) begin
        if (in_eop) begin m_inpkt[b] = 0; m_drop[b] = 0; end
        else begin m_inpkt[b] = 1; m_drop[b] = e_drop; end
      end
      nxt++;
    end
    $display("EPD packets %0d, PPD cells %0d, tail drops %0d, CS-first %0d, hysteresis cycles %0d",
             n_epd, n_ppd, n_tail, n_prio, n_hyst);
    check(n_epd > 0, "EPD happened");
    check(n_ppd > 0, "PPD happened");
    check(n_tail > 0, "tail drop happened");
    check(n_prio > 0, "CS priority happened");
    check(n_hyst > 0, "hysteresis band used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
