// wugs_vxt: virtual path / virtual circuit table (VXT) of an IPP.
//
// One table of VXT_N (1024) entries is split by an adjustable boundary:
// entries [0, bound) are the virtual path table, indexed by VPI (bound is
// at most 256); entries [bound, VXT_N) form one virtual circuit table
// shared by all terminating paths, indexed by bound + VCI. A VP entry with
// VPT=0 switches the whole path (only the VPI is translated); with VPT=1
// the path ends here and the VCI selects a VC entry, which translates both
// VPI and VCI. Because the VC table is shared, terminating paths must use
// disjoint VCIs.
//
// Each entry has a cell counter that counts hits while the entry's CC bit
// is set. Lookup is combinational (hit/idx/entry in the same cycle);
// count_en with count_idx increments a counter at the clock edge. One write
// port and one combinational read port serve the maintenance logic.
//
// The split, the VPT/CC/SC/RCO flags and the sizes follow the document; the
// exact index arithmetic and the counter width are this design's choice.
module wugs_vxt
  import wugs_pkg::*;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [8:0]         bound,       // VP table size, 0..256
  // lookup
  input  logic [VPI_W-1:0]   vpi,
  input  logic [VCI_W-1:0]   vci,
  output logic               hit,
  output logic [VXT_AW-1:0]  hit_idx,
  output vxt_entry_t         hit_entry,
  // counting
  input  logic               count_en,
  input  logic [VXT_AW-1:0]  count_idx,
  // maintenance access
  input  logic               wr_en,
  input  logic [VXT_AW-1:0]  wr_addr,
  input  vxt_entry_t         wr_entry,
  input  logic [VXT_AW-1:0]  rd_addr,
  output vxt_entry_t         rd_entry,
  output logic [CNT_W-1:0]   rd_count
);
  vxt_entry_t       tbl [VXT_N];
  logic [CNT_W-1:0] cnt [VXT_N];

  logic [8:0]        bnd;
  vxt_entry_t        vp_e, vc_e;
  logic [VCI_W:0]    vc_idx;

  assign bnd    = (bound > 9'(VP_MAX)) ? 9'(VP_MAX) : bound;
  assign vp_e   = tbl[VXT_AW'(vpi)];
  assign vc_idx = {1'b0, vci} + (VCI_W+1)'(bnd);
  assign vc_e   = tbl[VXT_AW'(vc_idx)];

  always_comb begin
    hit       = 1'b0;
    hit_idx   = '0;
    hit_entry = '0;
    if (vpi < VPI_W'(bnd) && vp_e.valid) begin
      if (!vp_e.vpt) begin
        hit       = 1'b1;
        hit_idx   = VXT_AW'(vpi);
        hit_entry = vp_e;
        // VP switching: keep the VCI
        hit_entry.vxi1[VCI_W-1:0] = vci;
        hit_entry.vxi2[VCI_W-1:0] = vci;
      end else if (vc_idx < (VCI_W+1)'(VXT_N) && vc_e.valid) begin
        hit       = 1'b1;
        hit_idx   = VXT_AW'(vc_idx);
        hit_entry = vc_e;
      end
    end
  end

  assign rd_entry = tbl[rd_addr];
  assign rd_count = cnt[rd_addr];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < VXT_N; i++) tbl[i].valid <= 1'b0;
    end else if (wr_en) begin
      tbl[wr_addr] <= wr_entry;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < VXT_N; i++) cnt[i] <= '0;
    end else begin
      if (wr_en) cnt[wr_addr] <= '0;
      else if (count_en && tbl[count_idx].cc) cnt[count_idx] <= cnt[count_idx] + 1'b1;
    end
  end
endmodule
