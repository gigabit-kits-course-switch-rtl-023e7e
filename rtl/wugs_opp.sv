// wugs_opp: output port processor.
//
// Cells from the last network stage are written once into a 256-cell
// common store; the resequencer, the transmit buffer (XMB) and the
// recycling queue handle pointers only.
//
//  * A data cell with UD set whose source port (STG) is this port is
//    dropped on arrival (upstream discard, for shared multicast trees).
//  * Cells go through the resequencer and leave it in stamp order once
//    they are T cell times old. Cells with BR set and control cells are
//    given a stamp that makes them eligible at once.
//  * A released cell with CYC1 set, and every control cell, goes to the
//    recycling queue and from there back to the IPP of this port. Other
//    cells go to the XMB, which applies its class separation and packet
//    discard, and then to the link with a fresh ATM header (VPI/VCI from
//    VXI1, PT, CLP, computed HEC).
//  * A control cell addressed to this OPP is executed on arrival
//    (maintenance register read or write) and its result travels on with
//    it: the IPP turns it into the reply.
//
// Maintenance registers: resequencer age threshold, XMB discard threshold,
// EPD high and low marks, and counters of transmitted cells, forced
// resequencer releases, XMB overflows, EPD/PPD drops and upstream discards.
//
// Interface: net_grant tells the last-stage SE that a cell may be
// delivered in this cycle (the store has a free slot). tx_valid marks a
// cell handed to the link in a cycle where tx_ready is high. The recycling
// path uses valid/ready. Time counts half cell times and starts together
// with the IPPs' clocks at reset, so stamps and ages agree.
//
// Store and resequencer sizes, recycling, UD, BR, the XMB and the register
// list follow the document; the register map and default thresholds are
// this design's choices.
module wugs_opp
  import wugs_pkg::*;
#(
  parameter logic [PORT_W-1:0] PORT_ID     = '0,
  parameter int unsigned       STORE_CELLS = 256,
  parameter int unsigned       RSQ_CELLS   = 80,
  parameter int unsigned       AGE_T       = 39,
  parameter int unsigned       EPD_HI      = 192,
  parameter int unsigned       EPD_LO      = 128
) (
  input  logic       clk,
  input  logic       rst,
  // from the network
  input  cell_t      net_cell,
  output logic       net_grant,
  // to the link
  input  logic       tx_ready,
  output logic       tx_valid,
  output link_cell_t tx_cell,
  // recycling path to the IPP
  output logic       rcy_valid,
  output cell_t      rcy_cell,
  input  logic       rcy_ready
);
  localparam int unsigned PW = $clog2(STORE_CELLS);
  localparam int unsigned CW = $clog2(STORE_CELLS+1);

  // ---------------- registers ----------------
  logic [11:0]   age_t;
  logic [PW:0]   xmb_thr, epd_hi, epd_lo;
  logic [31:0]   cnt_cells, cnt_forced, cnt_ovf, cnt_epd, cnt_ud;
  logic [TS_W-1:0] now;

  // ---------------- cell store ----------------
  logic          st_alloc, st_full;
  cell_t         st_wdata;
  logic [PW-1:0] st_aptr;
  logic [PW-1:0] st_rptr [3];
  cell_t         st_rdata [3];
  logic          st_free [3];
  logic [PW-1:0] st_fptr [3];
  logic [CW-1:0] st_used;

  wugs_cell_store #(.DEPTH(STORE_CELLS), .NRD(3), .NFREE(3)) u_store (
    .clk, .rst, .alloc(st_alloc), .wdata(st_wdata), .alloc_ptr(st_aptr),
    .full(st_full), .rd_ptr(st_rptr), .rd_data(st_rdata),
    .free_en(st_free), .free_ptr(st_fptr), .used(st_used)
  );

  // ---------------- arrival ----------------
  ctl_payload_t ctl_in, ctl_out;
  logic         arr, ud_drop, reg_wr;
  logic [TS_W-1:0] rs_ts;

  assign net_grant = !st_full;
  assign arr       = net_cell.bi && net_grant;
  assign ctl_in    = ctl_payload_t'(net_cell.payload);

  function automatic logic [127:0] reg_read(input logic [15:0] a);
    case (a)
      OREG_AGE_T:    return 128'(age_t);
      OREG_XMB_THR:  return 128'(xmb_thr);
      OREG_EPD_HI:   return 128'(epd_hi);
      OREG_EPD_LO:   return 128'(epd_lo);
      OREG_CELLS:    return 128'(cnt_cells);
      OREG_RSQ_OVF:  return 128'(cnt_forced);
      OREG_XMB_OVF:  return 128'(cnt_ovf);
      OREG_EPD_DROP: return 128'(cnt_epd);
      OREG_UD_DROP:  return 128'(cnt_ud);
      default:       return '0;
    endcase
  endfunction

  always_comb begin
    ctl_out  = ctl_in;
    reg_wr   = 1'b0;
    st_wdata = net_cell;
    ud_drop  = arr && net_cell.d && net_cell.ud && (net_cell.stg == PORT_ID);
    if (arr && !net_cell.d && ctl_in.unit && !ctl_in.done) begin
      ctl_out.done = 1'b1;
      case (ctl_in.opc)
        OPC_RD_REG: ctl_out.data = reg_read(ctl_in.addr);
        OPC_WR_REG: reg_wr = 1'b1;
        default: ;
      endcase
      st_wdata.payload = PAYLOAD_W'(ctl_out);
    end
    st_alloc = arr && !ud_drop;
    // bypass: a stamp that is exactly T old
    rs_ts = (net_cell.br || !net_cell.d) ? (now - TS_W'({age_t, 1'b0})) : net_cell.ts;
  end

  // ---------------- resequencer ----------------
  logic          rs_out, rs_forced;
  logic [PW-1:0] rs_ptr;
  logic [$clog2(RSQ_CELLS+1)-1:0] rs_count;

  wugs_reseq #(.ENTRIES(RSQ_CELLS), .PW(PW)) u_rsq (
    .clk, .rst, .now, .age_t,
    .in_valid(st_alloc), .in_ptr(st_aptr), .in_ts(rs_ts),
    .out_valid(rs_out), .out_ptr(rs_ptr), .forced(rs_forced), .count(rs_count)
  );

  // ---------------- dispatch ----------------
  cell_t rel;
  logic  to_rcy, to_xmb, rq_full, rq_empty, rq_pop;
  logic  xb_drop, xb_drop_epd, xb_out, xb_cong;
  logic [PW-1:0] xb_ptr, rq_head;
  logic [PW:0]   xb_occ;
  logic [CW-1:0] rq_count;

  assign st_rptr[0] = rs_ptr;
  assign rel        = st_rdata[0];
  assign to_rcy     = rs_out && (!rel.d || rel.cyc1);
  assign to_xmb     = rs_out && !to_rcy;

  wugs_ptr_fifo #(.W(PW), .DEPTH(STORE_CELLS)) u_rcyq (
    .clk, .rst, .push(to_rcy && !rq_full), .din(rs_ptr), .pop(rq_pop),
    .dout(rq_head), .empty(rq_empty), .full(rq_full), .count(rq_count));

  wugs_xmb #(.DEPTH(STORE_CELLS), .PW(PW)) u_xmb (
    .clk, .rst, .thr(xmb_thr), .epd_hi, .epd_lo,
    .in_valid(to_xmb), .in_ptr(rs_ptr), .in_cs(rel.cs1), .in_bdi(rel.bdi1),
    .in_eop(!rel.pt[2] && rel.pt[0]),
    .drop(xb_drop), .drop_epd(xb_drop_epd),
    .tx_ready, .out_valid(xb_out), .out_ptr(xb_ptr),
    .congested(xb_cong), .occupancy(xb_occ)
  );

  // ---------------- link output ----------------
  cell_t txc;
  assign st_rptr[1] = xb_ptr;
  assign txc        = st_rdata[1];
  assign tx_valid   = xb_out;
  always_comb begin
    tx_cell.hdr.vpi = txc.vxi1[VXI_W-1 -: VPI_W];
    tx_cell.hdr.vci = txc.vxi1[VCI_W-1:0];
    tx_cell.hdr.pt  = txc.pt;
    tx_cell.hdr.clp = txc.clp;
    tx_cell.hdr.hec = hec_calc({tx_cell.hdr.vpi, tx_cell.hdr.vci, txc.pt, txc.clp});
    tx_cell.payload = txc.payload;
  end

  // ---------------- recycling output ----------------
  assign st_rptr[2] = rq_head;
  always_comb begin
    rcy_cell    = st_rdata[2];
    rcy_cell.bi = !rq_empty;
  end
  assign rcy_valid = !rq_empty;
  assign rq_pop    = rcy_valid && rcy_ready;

  // ---------------- slot release ----------------
  assign st_free[0] = xb_out;
  assign st_fptr[0] = xb_ptr;
  assign st_free[1] = rq_pop;
  assign st_fptr[1] = rq_head;
  assign st_free[2] = (to_xmb && xb_drop) || (to_rcy && rq_full);
  assign st_fptr[2] = rs_ptr;

  // ---------------- register file ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      now        <= '0;
      age_t      <= 12'(AGE_T);
      xmb_thr    <= (PW+1)'(STORE_CELLS);
      epd_hi     <= (PW+1)'(EPD_HI);
      epd_lo     <= (PW+1)'(EPD_LO);
      cnt_cells  <= '0;
      cnt_forced <= '0;
      cnt_ovf    <= '0;
      cnt_epd    <= '0;
      cnt_ud     <= '0;
    end else begin
      now        <= now + TS_W'(2);
      cnt_cells  <= cnt_cells  + 32'(xb_out);
      cnt_forced <= cnt_forced + 32'(rs_forced);
      cnt_ovf    <= cnt_ovf    + 32'((to_xmb && xb_drop && !xb_drop_epd) || (to_rcy && rq_full));
      cnt_epd    <= cnt_epd    + 32'(to_xmb && xb_drop_epd);
      cnt_ud     <= cnt_ud     + 32'(ud_drop);
      if (reg_wr) begin
        case (ctl_in.addr)
          OREG_AGE_T:    age_t   <= ctl_in.data[11:0];
          OREG_XMB_THR:  xmb_thr <= ctl_in.data[PW:0];
          OREG_EPD_HI:   epd_hi  <= ctl_in.data[PW:0];
          OREG_EPD_LO:   epd_lo  <= ctl_in.data[PW:0];
          OREG_CELLS:    cnt_cells  <= '0;
          OREG_RSQ_OVF:  cnt_forced <= '0;
          OREG_XMB_OVF:  cnt_ovf    <= '0;
          OREG_EPD_DROP: cnt_epd    <= '0;
          OREG_UD_DROP:  cnt_ud     <= '0;
          default: ;
        endcase
      end
    end
  end
endmodule
