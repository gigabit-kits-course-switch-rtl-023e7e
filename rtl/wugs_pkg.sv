// wugs_pkg: types and constants shared by the gigabit switch RTL.
//
// The switch is a three-stage Benes network of 8-port switch elements (SEs)
// with one input port processor (IPP) and one output port processor (OPP)
// per external port, which gives 64 ports. Port numbers are two octal
// digits {d1,d0}: the middle stage routes on d1 and the last stage on d0.
// The first stage only spreads traffic (dynamic routing).
//
// Cells move through the switch as one wide word per cell time: every
// clock cycle is one cell time. The internal header follows the field list
// of the switch's internal cell format (BI, RC, ADR, TS, STG, VXI1/2,
// BDI1/2, D, CYC, CS, BR, UD, PT, CLP); the field widths and the routing
// control encoding are this design's choice. Control (maintenance) cells
// are internal cells with D=0 whose payload holds a ctl_payload_t.
package wugs_pkg;

  // ---------------- network geometry ----------------
  localparam int unsigned RADIX    = 8;            // SE ports
  localparam int unsigned DIG_W    = 3;            // bits per octal digit
  localparam int unsigned N_STAGES = 3;            // 2k+1 stages, k = 1
  localparam int unsigned N_PORTS  = RADIX * RADIX; // 64 external ports
  localparam int unsigned PORT_W   = 6;            // port number width
  localparam int unsigned ADR_W    = DIG_W * N_STAGES; // complete path = 9 bits

  // ---------------- cell fields ----------------
  localparam int unsigned TS_W      = 16;  // time stamp, LSB = half a cell time
  localparam int unsigned VPI_W     = 12;
  localparam int unsigned VCI_W     = 16;
  localparam int unsigned VXI_W     = VPI_W + VCI_W;
  localparam int unsigned BDI_W     = 10;
  localparam int unsigned PAYLOAD_W = 384; // 48 byte ATM payload
  localparam int unsigned VXT_AW    = 10;  // 1024 VXT entries
  localparam int unsigned VXT_N     = 1 << VXT_AW;
  localparam int unsigned VP_MAX    = 256; // VP part of the VXT is at most 256

  // Routing control.
  typedef enum logic [1:0] {
    RC_UNICAST = 2'd0,  // route on destination port number in ADR1
    RC_PATH    = 2'd1,  // ADR1 holds one digit per stage, first stage included
    RC_BCOPY   = 2'd2,  // binary copy to ports ADR1 and ADR2
    RC_RANGE   = 2'd3   // copy to every port in the range ADR1..ADR2
  } rc_e;

  // Internal cell: header plus payload. bi=1 means the slot holds a cell.
  typedef struct packed {
    logic                 bi;
    rc_e                  rc;
    logic [ADR_W-1:0]     adr1;
    logic [ADR_W-1:0]     adr2;
    logic [TS_W-1:0]      ts;
    logic [PORT_W-1:0]    stg;    // port where the cell first entered
    logic [VXI_W-1:0]     vxi1;   // outgoing VPI/VCI of copy 1 ({vpi,vci})
    logic [VXI_W-1:0]     vxi2;   // outgoing VPI/VCI of copy 2
    logic [BDI_W-1:0]     bdi1;
    logic [BDI_W-1:0]     bdi2;
    logic                 d;      // 1 = data cell, 0 = control cell
    logic                 cyc1;   // recycle copy 1 at the output
    logic                 cyc2;
    logic                 cs1;    // continuous stream (CBR/VBR) copy 1
    logic                 cs2;
    logic                 br;     // bypass the resequencer
    logic                 ud;     // upstream discard
    logic [2:0]           pt;
    logic                 clp;
    logic [PAYLOAD_W-1:0] payload;
  } cell_t;

  // External ATM cell (NNI header) as seen by the transmission interfaces.
  typedef struct packed {
    logic [VPI_W-1:0] vpi;
    logic [VCI_W-1:0] vci;
    logic [2:0]       pt;
    logic             clp;
    logic [7:0]       hec;
  } atm_hdr_t;

  typedef struct packed {
    atm_hdr_t             hdr;
    logic [PAYLOAD_W-1:0] payload;
  } link_cell_t;

  // Virtual path / circuit table entry.
  typedef struct packed {
    logic              valid;
    rc_e               rc;
    logic [ADR_W-1:0]  adr1;
    logic [ADR_W-1:0]  adr2;
    logic [VXI_W-1:0]  vxi1;
    logic [VXI_W-1:0]  vxi2;
    logic [BDI_W-1:0]  bdi1;
    logic [BDI_W-1:0]  bdi2;
    logic              cyc1;
    logic              cyc2;
    logic              cs1;
    logic              cs2;
    logic              br;
    logic              ud;
    logic              cc;   // count cells on this entry
    logic              sc;   // set CLP
    logic              vpt;  // virtual path terminates here: look up VCI too
    logic              rco;  // entry accepts recycled cells only
  } vxt_entry_t;

  localparam int unsigned VXT_ENTRY_W = $bits(vxt_entry_t);

  // ---------------- in-band control ----------------
  typedef enum logic [3:0] {
    OPC_NOP    = 4'd0,
    OPC_RD_REG = 4'd1,
    OPC_WR_REG = 4'd2,
    OPC_RD_VXT = 4'd3,
    OPC_WR_VXT = 4'd4,
    OPC_RD_CNT = 4'd5,   // read the cell counter of a VXT entry
    OPC_RESET  = 4'd6    // reset the whole switch
  } opc_e;

  typedef struct packed {
    opc_e              opc;
    logic              unit;      // 0 = IPP, 1 = OPP of tgt_port
    logic              done;      // set once the operation has been executed
    logic [PORT_W-1:0] tgt_port;
    logic [PORT_W-1:0] ret_port;  // where the reply leaves the switch
    logic [VPI_W-1:0]  ret_vpi;
    logic [VCI_W-1:0]  ret_vci;
    logic [15:0]       addr;
    logic [127:0]      data;
    logic [PAYLOAD_W-4-1-1-2*PORT_W-VPI_W-VCI_W-16-128-1:0] pad;
  } ctl_payload_t;

  // Reserved connection on which a link delivers control cells.
  localparam logic [VPI_W-1:0] CTL_VPI = '0;
  localparam logic [VCI_W-1:0] CTL_VCI = 16'd32;

  // IPP maintenance register map (addr field of RD_REG / WR_REG).
  localparam logic [15:0] IREG_LINK_EN   = 16'h0; // link enable
  localparam logic [15:0] IREG_RCB_THR   = 16'h1; // RCB discard threshold
  localparam logic [15:0] IREG_VXT_BOUND = 16'h2; // VP/VC boundary in the VXT
  localparam logic [15:0] IREG_TT_PARAM  = 16'h3; // transitional stamping T
  localparam logic [15:0] IREG_TT_EN     = 16'h4; // inflate stamps after VXT writes
  localparam logic [15:0] IREG_CTL_EN    = 16'h5; // accept control cells from link
  localparam logic [15:0] IREG_CELLS     = 16'h8; // cells received
  localparam logic [15:0] IREG_HEC_ERR   = 16'h9; // HEC errors
  localparam logic [15:0] IREG_RCB_OVF   = 16'hA; // RCB overflow discards
  localparam logic [15:0] IREG_BAD_VC    = 16'hB; // cells with no valid VXT entry

  // OPP maintenance register map.
  localparam logic [15:0] OREG_AGE_T     = 16'h0; // resequencer age threshold
  localparam logic [15:0] OREG_XMB_THR   = 16'h1; // XMB discard threshold
  localparam logic [15:0] OREG_EPD_HI    = 16'h2; // EPD: start discarding packets
  localparam logic [15:0] OREG_EPD_LO    = 16'h3; // EPD: stop discarding packets
  localparam logic [15:0] OREG_CELLS     = 16'h8; // cells transmitted
  localparam logic [15:0] OREG_RSQ_OVF   = 16'h9; // resequencer forced releases
  localparam logic [15:0] OREG_XMB_OVF   = 16'hA; // XMB overflow discards
  localparam logic [15:0] OREG_EPD_DROP  = 16'hB; // cells dropped by EPD / PPD
  localparam logic [15:0] OREG_UD_DROP   = 16'hC; // upstream discards

  // ---------------- helpers ----------------
  // HEC: CRC-8 (x^8 + x^2 + x + 1) over the first four header bytes,
  // XORed with 0x55 (ITU-T I.432).
  function automatic logic [7:0] hec_calc(input logic [31:0] h);
    logic [7:0] crc;
    crc = 8'h00;
    for (int i = 31; i >= 0; i--) begin
      logic fb;
      fb  = crc[7] ^ h[i];
      crc = {crc[6:0], 1'b0};
      if (fb) crc = crc ^ 8'h07;
    end
    return crc ^ 8'h55;
  endfunction

  // Octal digit of a port number / path word used at a stage.
  function automatic logic [DIG_W-1:0] digit(input logic [ADR_W-1:0] a, input int unsigned idx);
    return a[idx*DIG_W +: DIG_W];
  endfunction

endpackage
