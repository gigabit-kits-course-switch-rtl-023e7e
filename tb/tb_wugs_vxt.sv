// tb_wugs_vxt: fills VP and VC entries and checks lookups: VP switching
// keeps the VCI, a terminating VP selects the VC entry at bound + VCI,
// VPIs at or above the bound and invalid entries miss, moving the bound
// moves the VC table, and cell counters count only entries with CC set.
module tb_wugs_vxt;
  import wugs_pkg::*;
  logic clk = 0, rst = 1;
  logic [8:0] bound;
  logic [VPI_W-1:0] vpi;
  logic [VCI_W-1:0] vci;
  logic hit;
  logic [VXT_AW-1:0] hit_idx;
  vxt_entry_t hit_entry;
  logic count_en;
  logic [VXT_AW-1:0] count_idx;
  logic wr_en;
  logic [VXT_AW-1:0] wr_addr;
  vxt_entry_t wr_entry;
  logic [VXT_AW-1:0] rd_addr;
  vxt_entry_t rd_entry;
  logic [31:0] rd_count;
  int checks = 0, failures = 0;

  wugs_vxt #(.CNT_W(32)) dut (.*);
  always #5 clk = ~clk;
  assign count_idx = hit_idx;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic write(int a, vxt_entry_t e);
    @(negedge clk);
    wr_en = 1; wr_addr = VXT_AW'(a); wr_entry = e;
    @(negedge clk);
    wr_en = 0;
  endtask

  function automatic vxt_entry_t mk(int port, int vpi_o, int vci_o, bit vpt, bit cc);
    vxt_entry_t e;
    e = '0;
    e.valid = 1; e.rc = RC_UNICAST; e.adr1 = ADR_W'(port);
    e.vxi1 = {VPI_W'(vpi_o), VCI_W'(vci_o)};
    e.vpt = vpt; e.cc = cc;
    return e;
  endfunction

  task automatic look(int p, int c);
    vpi = VPI_W'(p); vci = VCI_W'(c);
    #1;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bound = 9'd16; vpi = 0; vci = 0; count_en = 0; wr_en = 0; wr_addr = 0; wr_entry = '0; rd_addr = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    write(3, mk(5, 77, 0, 0, 1));    // VP 3 switched to port 5, new VPI 77
    write(4, mk(0, 0, 0, 1, 0));     // VP 4 terminates here
    write(16 + 100, mk(9, 12, 345, 0, 1)); // VC 100 in the VC table
    @(negedge clk);
    look(3, 1234);
    check(hit && hit_idx == 3 && hit_entry.adr1 == 5, "VP switched hit");
    check(hit_entry.vxi1 == {12'd77, 16'd1234}, "VP switching translates VPI only");
    look(4, 100);
    check(hit && hit_idx == 116 && hit_entry.adr1 == 9 && hit_entry.vxi1 == {12'd12, 16'd345}, "VC lookup");
    look(4, 101);
    check(!hit, "unwritten VC misses");
    look(5, 100);
    check(!hit, "unwritten VP misses");
    look(20, 100);
    check(!hit, "VPI above bound misses");
    // counters: entry 3 has CC, entry 116 too, counting 3 and 2 cells
    for (int i = 0; i < 5; i++) begin
      @(negedge clk);
      if (i < 3) look(3, i); else look(4, 100);
      count_en = 1;
    end
    @(negedge clk); count_en = 0;
    rd_addr = 3; #1;
    check(rd_count == 3, "counter of entry 3");
    check(rd_entry.vxi1[VXI_W-1 -: VPI_W] == 77, "read port");
    rd_addr = 116; #1;
    check(rd_count == 2, "counter of entry 116");
    // CC clear: no counting
    write(3, mk(5, 77, 0, 0, 0));
    @(negedge clk); look(3, 0); count_en = 1;
    @(negedge clk); count_en = 0;
    rd_addr = 3; #1;
    check(rd_count == 0, "no counting without CC");
    // move the boundary: VC 100 now at 32+100
    bound = 9'd32;
    write(132, mk(11, 1, 2, 0, 0));
    look(4, 100);
    check(hit && hit_idx == 132 && hit_entry.adr1 == 11, "bound moves the VC table");
    look(20, 0);
    check(!hit, "VP 20 inside bound but invalid");
    write(356, mk(12, 1, 2, 0, 0));
    bound = 9'd300;  // clamps to 256
    look(4, 100);
    check(hit && hit_idx == 356, "bound clamped to 256");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
