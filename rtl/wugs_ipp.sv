// wugs_ipp: input port processor.
//
// Takes cells from the link (after the input transmission interface) and
// from the recycling path of the matching OPP, translates them through the
// VXT, stamps them and queues them in the receive cell buffer (RCB) until
// the first-stage switch element grants them.
//
//  * Link cells: the HEC is checked (bad cells are counted and dropped);
//    cells on the reserved control connection (VPI 0, VCI 32) become
//    internal control cells addressed to the target port when control
//    reception is enabled; other cells are looked up in the VXT. Cells with
//    no valid entry, or whose entry only accepts recycled cells (RCO), are
//    counted and dropped. SC forces CLP=1. STG is set to this port.
//  * Recycled cells have priority below link cells (the link cannot be
//    held back) and are accepted only when the RCB has room. Data cells are
//    looked up again using their outgoing VPI/VCI (VXI1) and keep STG.
//    Control cells that target this IPP are executed here; every control
//    cell arriving on the recycling path is then turned into a reply that
//    carries the result to the return port and connection named in it.
//  * Cells are written once into a 64-cell common store; the RCB queue holds
//    pointers. A link cell is discarded (and counted) when the RCB holds
//    rcb_thr cells or more.
//  * A RESET control cell arriving from the link asks the switch to reset
//    (sw_reset_req pulses for one cycle).
//
// Maintenance registers (see wugs_pkg): link enable, RCB discard threshold,
// VXT bound, transitional stamping parameter and enable, control reception
// enable, and counters of received cells, HEC errors, RCB overflows and
// unknown connections. A VXT write starts transitional time stamping.
//
// Timing: a cell accepted in cycle t can leave towards the network in
// cycle t+1 at the earliest. sw_cell.bi is high whenever the RCB is not
// empty; the head leaves in a cycle where sw_grant is high.
//
// From the document: cell store size, VXT size and split, register list,
// recycling, in-band control, transitional stamping, RCO/SC/STG. This
// design's choices: the control connection, the control payload layout,
// the register map, link-over-recycle priority and the reply mechanism.
module wugs_ipp
  import wugs_pkg::*;
#(
  parameter logic [PORT_W-1:0] PORT_ID   = '0,
  parameter int unsigned       RCB_CELLS = 64,
  parameter int unsigned       TT_T      = 39,  // default transitional T
  parameter int unsigned       VP_BOUND  = 256  // default VP table size
) (
  input  logic       clk,
  input  logic       rst,
  // link side
  input  logic       rx_valid,
  input  link_cell_t rx_cell,
  // recycling path from the OPP
  input  logic       rcy_valid,
  input  cell_t      rcy_cell,
  output logic       rcy_ready,
  // switch side
  output cell_t      sw_cell,
  input  logic       sw_grant,
  // whole-switch reset request
  output logic       sw_reset_req
);
  localparam int unsigned PW = $clog2(RCB_CELLS);
  localparam int unsigned CW = $clog2(RCB_CELLS+1);

  // ---------------- maintenance registers ----------------
  logic        link_en, tt_en, ctl_en;
  logic [CW-1:0] rcb_thr;
  logic [8:0]  vxt_bound;
  logic [11:0] tt_param;
  logic [31:0] cnt_cells, cnt_hec, cnt_ovf, cnt_badvc;

  // ---------------- sub-blocks ----------------
  logic            vxt_hit;
  logic [VXT_AW-1:0] vxt_idx;
  vxt_entry_t      vxt_e, vxt_rd_e;
  logic [31:0]     vxt_rd_cnt;
  logic [VPI_W-1:0] lk_vpi;
  logic [VCI_W-1:0] lk_vci;
  logic            vxt_wr;
  logic [VXT_AW-1:0] vxt_waddr;
  vxt_entry_t      vxt_wentry;
  logic [VXT_AW-1:0] vxt_raddr;
  logic            count_en;

  logic [TS_W-1:0] ts_now, ts_stamp;
  logic            ts_trans;

  wugs_vxt #(.CNT_W(32)) u_vxt (
    .clk, .rst, .bound(vxt_bound),
    .vpi(lk_vpi), .vci(lk_vci),
    .hit(vxt_hit), .hit_idx(vxt_idx), .hit_entry(vxt_e),
    .count_en(count_en), .count_idx(vxt_idx),
    .wr_en(vxt_wr), .wr_addr(vxt_waddr), .wr_entry(vxt_wentry),
    .rd_addr(vxt_raddr), .rd_entry(vxt_rd_e), .rd_count(vxt_rd_cnt)
  );

  wugs_timestamp u_ts (
    .clk, .rst, .change(vxt_wr), .enable(tt_en), .t_param(tt_param),
    .now(ts_now), .stamp(ts_stamp), .transitional(ts_trans)
  );

  logic          st_alloc, st_full;
  cell_t         st_wdata;
  logic [PW-1:0] st_aptr;
  logic [PW-1:0] st_rptr [1];
  cell_t         st_rdata [1];
  logic          st_free [1];
  logic [PW-1:0] st_fptr [1];
  logic [CW-1:0] st_used;

  wugs_cell_store #(.DEPTH(RCB_CELLS), .NRD(1), .NFREE(1)) u_store (
    .clk, .rst, .alloc(st_alloc), .wdata(st_wdata), .alloc_ptr(st_aptr),
    .full(st_full), .rd_ptr(st_rptr), .rd_data(st_rdata),
    .free_en(st_free), .free_ptr(st_fptr), .used(st_used)
  );

  logic          q_pop, q_empty, q_full;
  logic [PW-1:0] q_head;
  logic [CW-1:0] q_count;

  wugs_ptr_fifo #(.W(PW), .DEPTH(RCB_CELLS)) u_rcb (
    .clk, .rst, .push(st_alloc), .din(st_aptr), .pop(q_pop),
    .dout(q_head), .empty(q_empty), .full(q_full), .count(q_count)
  );

  // ---------------- input processing ----------------
  ctl_payload_t lk_ctl, rc_ctl, ctl_out;
  logic         room;
  logic         lk_hec_ok, lk_is_ctl;
  logic         take_link_cell, take_rcy;
  logic         ev_hec, ev_ovf, ev_badvc, ev_cell;
  logic         reg_wr;
  logic [15:0]  reg_addr;
  logic [127:0] reg_wdata;

  assign lk_ctl = ctl_payload_t'(rx_cell.payload);
  assign rc_ctl = ctl_payload_t'(rcy_cell.payload);
  assign room   = (q_count < rcb_thr) && !st_full;
  assign lk_hec_ok = (rx_cell.hdr.hec == hec_calc({rx_cell.hdr.vpi, rx_cell.hdr.vci,
                                                   rx_cell.hdr.pt, rx_cell.hdr.clp}));
  assign lk_is_ctl = (rx_cell.hdr.vpi == CTL_VPI) && (rx_cell.hdr.vci == CTL_VCI);
  assign rcy_ready = !rx_valid && room;
  assign take_rcy  = rcy_valid && rcy_ready;

  always_comb begin
    lk_vpi = rx_cell.hdr.vpi;
    lk_vci = rx_cell.hdr.vci;
    if (!rx_valid) begin
      lk_vpi = rcy_cell.vxi1[VXI_W-1 -: VPI_W];
      lk_vci = rcy_cell.vxi1[VCI_W-1:0];
    end
  end

  function automatic cell_t from_entry(input vxt_entry_t e, input logic [TS_W-1:0] ts,
                                       input logic [PORT_W-1:0] stg, input logic [2:0] pt,
                                       input logic clp, input logic [PAYLOAD_W-1:0] pl);
    cell_t c;
    c         = '0;
    c.bi      = 1'b1;
    c.rc      = e.rc;
    c.adr1    = e.adr1;
    c.adr2    = e.adr2;
    c.ts      = ts;
    c.stg     = stg;
    c.vxi1    = e.vxi1;
    c.vxi2    = e.vxi2;
    c.bdi1    = e.bdi1;
    c.bdi2    = e.bdi2;
    c.d       = 1'b1;
    c.cyc1    = e.cyc1;
    c.cyc2    = e.cyc2;
    c.cs1     = e.cs1;
    c.cs2     = e.cs2;
    c.br      = e.br;
    c.ud      = e.ud;
    c.pt      = pt;
    c.clp     = clp | e.sc;
    c.payload = pl;
    return c;
  endfunction

  function automatic logic [127:0] reg_read(input logic [15:0] a);
    case (a)
      IREG_LINK_EN:   return 128'(link_en);
      IREG_RCB_THR:   return 128'(rcb_thr);
      IREG_VXT_BOUND: return 128'(vxt_bound);
      IREG_TT_PARAM:  return 128'(tt_param);
      IREG_TT_EN:     return 128'(tt_en);
      IREG_CTL_EN:    return 128'(ctl_en);
      IREG_CELLS:     return 128'(cnt_cells);
      IREG_HEC_ERR:   return 128'(cnt_hec);
      IREG_RCB_OVF:   return 128'(cnt_ovf);
      IREG_BAD_VC:    return 128'(cnt_badvc);
      default:        return '0;
    endcase
  endfunction

  always_comb begin
    st_alloc     = 1'b0;
    st_wdata     = '0;
    count_en     = 1'b0;
    ev_hec       = 1'b0;
    ev_ovf       = 1'b0;
    ev_badvc     = 1'b0;
    ev_cell      = 1'b0;
    sw_reset_req = 1'b0;
    vxt_wr       = 1'b0;
    vxt_waddr    = rc_ctl.addr[VXT_AW-1:0];
    vxt_wentry   = vxt_entry_t'(rc_ctl.data[VXT_ENTRY_W-1:0]);
    vxt_raddr    = rc_ctl.addr[VXT_AW-1:0];
    reg_wr       = 1'b0;
    reg_addr     = rc_ctl.addr;
    reg_wdata    = rc_ctl.data;
    ctl_out      = rc_ctl;
    take_link_cell = 1'b0;

    if (rx_valid && link_en) begin
      if (!lk_hec_ok) begin
        ev_hec = 1'b1;
      end else begin
        ev_cell = 1'b1;
        if (lk_is_ctl) begin
          if (!ctl_en) begin
            ev_badvc = 1'b1;
          end else if (lk_ctl.opc == OPC_RESET) begin
            sw_reset_req = 1'b1;
          end else begin
            take_link_cell    = 1'b1;
            st_wdata          = '0;
            st_wdata.bi       = 1'b1;
            st_wdata.rc       = RC_UNICAST;
            st_wdata.adr1     = ADR_W'(lk_ctl.tgt_port);
            st_wdata.ts       = ts_stamp;
            st_wdata.stg      = PORT_ID;
            st_wdata.d        = 1'b0;
            st_wdata.br       = 1'b1;
            st_wdata.payload  = rx_cell.payload;
          end
        end else if (vxt_hit && !vxt_e.rco) begin
          take_link_cell = 1'b1;
          st_wdata = from_entry(vxt_e, ts_stamp, PORT_ID, rx_cell.hdr.pt,
                                rx_cell.hdr.clp, rx_cell.payload);
        end else begin
          ev_badvc = 1'b1;
        end
        if (take_link_cell) begin
          if (room) begin
            st_alloc = 1'b1;
            count_en = !lk_is_ctl;
          end else begin
            ev_ovf = 1'b1;
          end
        end
      end
    end else if (take_rcy) begin
      if (!rcy_cell.d) begin
        // control cell: execute if it targets this IPP, then reply
        if (!rc_ctl.unit && !rc_ctl.done) begin
          ctl_out.done = 1'b1;
          case (rc_ctl.opc)
            OPC_RD_REG: ctl_out.data = reg_read(rc_ctl.addr);
            OPC_WR_REG: reg_wr = 1'b1;
            OPC_RD_VXT: ctl_out.data = 128'(vxt_rd_e);
            OPC_WR_VXT: vxt_wr = 1'b1;
            OPC_RD_CNT: ctl_out.data = 128'(vxt_rd_cnt);
            default: ;
          endcase
        end
        st_alloc         = 1'b1;
        st_wdata         = '0;
        st_wdata.bi      = 1'b1;
        st_wdata.rc      = RC_UNICAST;
        st_wdata.adr1    = ADR_W'(rc_ctl.ret_port);
        st_wdata.vxi1    = {rc_ctl.ret_vpi, rc_ctl.ret_vci};
        st_wdata.ts      = ts_stamp;
        st_wdata.stg     = PORT_ID;
        st_wdata.d       = 1'b1;
        st_wdata.br      = 1'b1;
        st_wdata.payload = PAYLOAD_W'(ctl_out);
      end else if (vxt_hit) begin
        st_alloc = 1'b1;
        count_en = 1'b1;
        st_wdata = from_entry(vxt_e, ts_stamp, rcy_cell.stg, rcy_cell.pt,
                              rcy_cell.clp, rcy_cell.payload);
      end else begin
        ev_badvc = 1'b1;
      end
    end
  end

  // ---------------- output to the switch ----------------
  assign st_rptr[0] = q_head;
  always_comb begin
    sw_cell    = st_rdata[0];
    sw_cell.bi = !q_empty;
  end
  assign q_pop      = !q_empty && sw_grant;
  assign st_free[0] = q_pop;
  assign st_fptr[0] = q_head;

  // ---------------- register file ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      link_en   <= 1'b1;
      tt_en     <= 1'b1;
      ctl_en    <= 1'b1;
      rcb_thr   <= CW'(RCB_CELLS);
      vxt_bound <= 9'(VP_BOUND);
      tt_param  <= 12'(TT_T);
      cnt_cells <= '0;
      cnt_hec   <= '0;
      cnt_ovf   <= '0;
      cnt_badvc <= '0;
    end else begin
      cnt_cells <= cnt_cells + 32'(ev_cell);
      cnt_hec   <= cnt_hec   + 32'(ev_hec);
      cnt_ovf   <= cnt_ovf   + 32'(ev_ovf);
      cnt_badvc <= cnt_badvc + 32'(ev_badvc);
      if (reg_wr) begin
        case (reg_addr)
          IREG_LINK_EN:   link_en   <= reg_wdata[0];
          IREG_RCB_THR:   rcb_thr   <= CW'(reg_wdata);
          IREG_VXT_BOUND: vxt_bound <= reg_wdata[8:0];
          IREG_TT_PARAM:  tt_param  <= reg_wdata[11:0];
          IREG_TT_EN:     tt_en     <= reg_wdata[0];
          IREG_CTL_EN:    ctl_en    <= reg_wdata[0];
          IREG_CELLS:     cnt_cells <= '0;
          IREG_HEC_ERR:   cnt_hec   <= '0;
          IREG_RCB_OVF:   cnt_ovf   <= '0;
          IREG_BAD_VC:    cnt_badvc <= '0;
          default: ;
        endcase
      end
    end
  end
endmodule
