// wugs_reseq: time-based resequencer of an OPP.
//
// Holds pointers to cells that have crossed the network, each with the
// time stamp the cell got on entry. A cell becomes eligible once its age
// (now - stamp) reaches the age threshold T, which is set to the largest
// delay expected in the network. Among eligible cells the oldest is
// released, one per cycle, so cells leave in the order in which they
// entered the switch. Stamps may lie in the future (transitional stamps),
// so ages are compared as signed numbers.
//
// When all ENTRIES (80) are in use the oldest cell is released at once
// even if it is younger than T; forced counts these releases. An arriving
// cell then takes the slot freed in the same cycle.
//
// Interface: in_valid/in_ptr/in_ts add a cell (always accepted); out_valid/
// out_ptr name the cell released in this cycle (combinational). age_t is T
// in cell times; now and the stamps count half cell times.
//
// Release at age T in stamp order and the 80-entry size follow the
// document; forced release when full is this design's choice.
module wugs_reseq
  import wugs_pkg::*;
#(
  parameter int unsigned ENTRIES = 80,
  parameter int unsigned PW      = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [TS_W-1:0] now,
  input  logic [11:0]     age_t,
  input  logic            in_valid,
  input  logic [PW-1:0]   in_ptr,
  input  logic [TS_W-1:0] in_ts,
  output logic            out_valid,
  output logic [PW-1:0]   out_ptr,
  output logic            forced,
  output logic [$clog2(ENTRIES+1)-1:0] count
);
  localparam int unsigned EW = $clog2(ENTRIES);

  logic [ENTRIES-1:0] v;
  logic [PW-1:0]      ptr [ENTRIES];
  logic [TS_W-1:0]    ts  [ENTRIES];

  logic              full;
  logic [EW-1:0]     sel, ins;
  logic              ins_ok;
  logic signed [TS_W:0] thr;

  assign full = &v;
  assign thr  = (TS_W+1)'({age_t, 1'b0});

  always_comb begin
    logic signed [TS_W-1:0] best, a;
    logic found;
    found = 1'b0;
    best  = '0;
    sel   = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      a = $signed(now - ts[i]);
      if (v[i] && (!found || a > best)) begin
        found = 1'b1;
        best  = a;
        sel   = EW'(i);
      end
    end
    out_valid = found && (full || (TS_W+1)'(best) >= thr);
    forced    = found && full && !((TS_W+1)'(best) >= thr);
    out_ptr   = ptr[sel];
  end

  always_comb begin
    ins_ok = 1'b0;
    ins    = '0;
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (!v[i]) begin
        ins_ok = 1'b1;
        ins    = EW'(i);
      end
    if (!ins_ok && out_valid) begin
      ins_ok = 1'b1;
      ins    = sel;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v <= '0;
    end else begin
      if (out_valid) v[sel] <= 1'b0;
      if (in_valid && ins_ok) begin
        v[ins]   <= 1'b1;
        ptr[ins] <= in_ptr;
        ts[ins]  <= in_ts;
      end
    end
  end

  always_comb begin
    count = '0;
    for (int i = 0; i < ENTRIES; i++) count = count + v[i];
  end
endmodule
