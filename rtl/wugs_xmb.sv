// wugs_xmb: transmit buffer of an OPP, with packet-level discard.
//
// Two pointer queues separate continuous-stream traffic (CS=1: CBR and
// VBR) from the rest (ABR and UBR). When the link takes a cell (tx_ready)
// the continuous-stream queue is served first.
//
// Discard rules for an arriving cell, with occ the number of cells held:
//  * occ >= thr: the cell is dropped (overflow). For a packet connection
//    (non-zero BDI) the rest of its packet is dropped too (partial packet
//    discard).
//  * Early packet discard with hysteresis, for CS=0 cells with non-zero
//    BDI: the buffer enters a congested state when occ reaches epd_hi and
//    leaves it when occ falls to epd_lo. A packet whose first cell arrives
//    while congested is dropped whole. Packets follow AAL5 framing: the
//    last cell has PT = 0x1 (user cell, end of SDU indication).
// Per-BDI state (in packet, dropping) lives in two bit vectors.
//
// Interface: in_valid/in_ptr/in_cs/in_bdi/in_eop offer one cell; drop
// says in the same cycle that it was discarded (the caller frees its
// slot); drop_epd marks drops made by EPD or PPD. out_valid/out_ptr give
// the cell sent when tx_ready is high.
//
// The two classes and EPD with hysteresis for non-zero BDI follow the
// document; the thresholds' meaning, the PPD rule and the queue depth are
// this design's choices.
module wugs_xmb
  import wugs_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned PW    = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [PW:0]     thr,
  input  logic [PW:0]     epd_hi,
  input  logic [PW:0]     epd_lo,
  input  logic            in_valid,
  input  logic [PW-1:0]   in_ptr,
  input  logic            in_cs,
  input  logic [BDI_W-1:0] in_bdi,
  input  logic            in_eop,
  output logic            drop,
  output logic            drop_epd,
  input  logic            tx_ready,
  output logic            out_valid,
  output logic [PW-1:0]   out_ptr,
  output logic            congested,
  output logic [PW:0]     occupancy
);
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [(1<<BDI_W)-1:0] in_pkt, dropping;
  logic hi_push, lo_push, hi_pop, lo_pop, hi_empty, lo_empty, hi_full, lo_full;
  logic [PW-1:0] hi_head, lo_head;
  logic [CW-1:0] hi_cnt, lo_cnt;

  wugs_ptr_fifo #(.W(PW), .DEPTH(DEPTH)) u_hi (
    .clk, .rst, .push(hi_push), .din(in_ptr), .pop(hi_pop), .dout(hi_head),
    .empty(hi_empty), .full(hi_full), .count(hi_cnt));
  wugs_ptr_fifo #(.W(PW), .DEPTH(DEPTH)) u_lo (
    .clk, .rst, .push(lo_push), .din(in_ptr), .pop(lo_pop), .dout(lo_head),
    .empty(lo_empty), .full(lo_full), .count(lo_cnt));

  assign occupancy = (PW+1)'(hi_cnt) + (PW+1)'(lo_cnt);

  logic pkt, first, ovf;
  always_comb begin
    pkt      = in_bdi != '0;
    first    = pkt && !in_pkt[in_bdi];
    ovf      = occupancy >= thr || (in_cs ? hi_full : lo_full);
    drop     = 1'b0;
    drop_epd = 1'b0;
    if (in_valid) begin
      if (pkt && !in_cs && (first ? congested : dropping[in_bdi])) begin
        drop     = 1'b1;
        drop_epd = 1'b1;
      end else if (pkt && !first && dropping[in_bdi]) begin
        drop     = 1'b1;
        drop_epd = 1'b1;
      end else if (ovf) begin
        drop = 1'b1;
      end
    end
    hi_push   = in_valid && !drop && in_cs;
    lo_push   = in_valid && !drop && !in_cs;
    hi_pop    = tx_ready && !hi_empty;
    lo_pop    = tx_ready && hi_empty && !lo_empty;
    out_valid = hi_pop || lo_pop;
    out_ptr   = hi_empty ? lo_head : hi_head;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      in_pkt    <= '0;
      dropping  <= '0;
      congested <= 1'b0;
    end else begin
      if (occupancy >= epd_hi)      congested <= 1'b1;
      else if (occupancy <= epd_lo) congested <= 1'b0;
      if (in_valid && pkt) begin
        if (in_eop) begin
          in_pkt[in_bdi]   <= 1'b0;
          dropping[in_bdi] <= 1'b0;
        end else begin
          in_pkt[in_bdi]   <= 1'b1;
          // whole-packet drop decided on the first cell, or PPD after overflow
          dropping[in_bdi] <= drop;
        end
      end
    end
  end
endmodule
