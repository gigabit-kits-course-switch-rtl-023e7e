// wugs_se: 8-port shared-buffer switch element.
//
// Arriving cells are written into a shared buffer of BUF_CELLS slots (40, as
// in the switch element chip set). Each slot keeps the cell, a mask of the
// outputs that still owe it a copy and an age counter. The output crossbar
// (OXBAR) lets every output whose downstream grant is high take, among the
// slots that want it, the one that has waited longest: priority grows with
// waiting time. A slot is freed when its last copy has left, so a multicast
// cell uses one slot however many copies it makes.
//
// Where a cell goes depends on the stage:
//   * DIST=1 (first stage): unicast, binary-copy and range cells are spread
//     over the outputs in round-robin order (dynamic routing); path cells
//     follow their path digit.
//   * DIST=0: the cell is routed on octal digit N_STAGES-1-STAGE of its
//     address. A binary-copy cell whose two addresses differ in that digit
//     is copied here; each copy leaves as a unicast cell carrying its own
//     VXI/BDI/CYC/CS fields in slot 1. A range cell is copied to every output
//     whose sub-tree meets the range, and each copy's range is cut down to
//     that sub-tree.
//
// Flow control uses grants. grant_o[i] high in a cycle allows input i to
// deliver a cell in that same cycle. With at least RADIX free slots every
// input is granted; with fewer, only as many inputs as there are free slots
// are granted, starting at a pointer that rotates by that number each cycle
// so that every input gets its turn. Grants depend only on registered
// state; cells leave one cycle after arrival at the earliest.
//
// Behaviour from the document: buffer size, grant rotation, round-robin
// distribution, age-based OXBAR priority, copy points. This design's
// choices: one cell per clock, the mask/age slot organisation, the copy
// field convention and the 8-bit saturating age.
module wugs_se
  import wugs_pkg::*;
#(
  parameter int unsigned STAGE     = 1,
  parameter bit          DIST      = 1'b0,
  parameter int unsigned BUF_CELLS = 40
) (
  input  logic  clk,
  input  logic  rst,
  input  cell_t in_cell  [RADIX],   // in_cell[i].bi = cell present
  output logic  grant_o  [RADIX],   // to upstream: may send now
  output cell_t out_cell [RADIX],
  input  logic  grant_i  [RADIX],   // from downstream
  output logic [$clog2(BUF_CELLS+1)-1:0] occupancy
);
  localparam int unsigned SW  = $clog2(BUF_CELLS);
  localparam int unsigned CW  = $clog2(BUF_CELLS+1);
  localparam int unsigned IDX = N_STAGES - 1 - STAGE; // digit used here

  cell_t             buf_cell [BUF_CELLS];
  logic [RADIX-1:0]  buf_mask [BUF_CELLS];
  logic [7:0]        buf_age  [BUF_CELLS];

  logic [CW-1:0]     free_cnt;
  logic [DIG_W-1:0]  gptr;     // grant rotation pointer
  logic [DIG_W-1:0]  dptr;     // distribution pointer

  // ---------------- grants ----------------
  always_comb begin
    for (int i = 0; i < RADIX; i++) grant_o[i] = 1'b0;
    if (free_cnt >= CW'(RADIX)) begin
      for (int i = 0; i < RADIX; i++) grant_o[i] = 1'b1;
    end else begin
      for (int j = 0; j < RADIX; j++)
        if (CW'(j) < free_cnt) grant_o[DIG_W'(int'(gptr) + j)] = 1'b1;
    end
  end

  // ---------------- destination masks ----------------
  logic [RADIX-1:0] in_mask [RADIX];
  logic [DIG_W-1:0] dptr_next;

  always_comb begin
    logic [DIG_W-1:0] p;
    logic [DIG_W-1:0] lo_d, hi_d;
    p = dptr;
    for (int i = 0; i < RADIX; i++) begin
      in_mask[i] = '0;
      if (in_cell[i].bi && grant_o[i]) begin
        if (in_cell[i].rc == RC_PATH) begin
          in_mask[i][digit(in_cell[i].adr1, IDX)] = 1'b1;
        end else if (DIST) begin
          in_mask[i][p] = 1'b1;
          p = p + 1'b1;
        end else begin
          case (in_cell[i].rc)
            RC_BCOPY: begin
              in_mask[i][digit(in_cell[i].adr1, IDX)] = 1'b1;
              in_mask[i][digit(in_cell[i].adr2, IDX)] = 1'b1;
            end
            RC_RANGE: begin
              lo_d = digit(in_cell[i].adr1, IDX);
              hi_d = digit(in_cell[i].adr2, IDX);
              for (int o = 0; o < RADIX; o++)
                if (DIG_W'(o) >= lo_d && DIG_W'(o) <= hi_d) in_mask[i][o] = 1'b1;
            end
            default: in_mask[i][digit(in_cell[i].adr1, IDX)] = 1'b1;
          endcase
        end
      end
    end
    dptr_next = p;
  end

  // ---------------- slot allocation ----------------
  // Input i takes the i-th free slot among those granted.
  logic [SW-1:0] alloc_slot [RADIX];
  logic          alloc_ok   [RADIX];

  always_comb begin
    logic [BUF_CELLS-1:0] taken;
    taken = '0;
    for (int i = 0; i < RADIX; i++) begin
      alloc_ok[i]   = 1'b0;
      alloc_slot[i] = '0;
      if (in_mask[i] != '0) begin
        for (int s = BUF_CELLS - 1; s >= 0; s--)
          if (buf_mask[s] == '0 && !taken[s]) begin
            alloc_slot[i] = SW'(s);
            alloc_ok[i]   = 1'b1;
          end
        if (alloc_ok[i]) taken[alloc_slot[i]] = 1'b1;
      end
    end
  end

  // ---------------- OXBAR: oldest cell first ----------------
  logic [SW-1:0] sel_slot [RADIX];
  logic          sel_ok   [RADIX];

  always_comb begin
    for (int o = 0; o < RADIX; o++) begin
      logic [7:0] best_age;
      sel_ok[o]   = 1'b0;
      sel_slot[o] = '0;
      best_age    = '0;
      if (grant_i[o]) begin
        for (int s = 0; s < BUF_CELLS; s++)
          if (buf_mask[s][o] && (!sel_ok[o] || buf_age[s] > best_age)) begin
            sel_ok[o]   = 1'b1;
            sel_slot[o] = SW'(s);
            best_age    = buf_age[s];
          end
      end
    end
  end

  // Header of the copy that leaves on output o.
  function automatic cell_t copy_for(input cell_t c, input int unsigned o);
    cell_t r;
    logic [ADR_W-1:0] lo, hi;
    logic [DIG_W-1:0] od;
    r  = c;
    od = DIG_W'(o);
    if (!DIST && c.rc == RC_BCOPY &&
        digit(c.adr1, IDX) != digit(c.adr2, IDX)) begin
      r.rc = RC_UNICAST;
      if (digit(c.adr2, IDX) == od) begin
        r.adr1 = c.adr2;
        r.vxi1 = c.vxi2;
        r.bdi1 = c.bdi2;
        r.cyc1 = c.cyc2;
        r.cs1  = c.cs2;
      end
    end else if (!DIST && c.rc == RC_RANGE) begin
      lo = c.adr1;
      hi = c.adr2;
      if (digit(c.adr1, IDX) != od) begin
        lo[IDX*DIG_W +: DIG_W] = od;
        for (int b = 0; b < IDX*DIG_W; b++) lo[b] = 1'b0;
      end
      if (digit(c.adr2, IDX) != od) begin
        hi[IDX*DIG_W +: DIG_W] = od;
        for (int b = 0; b < IDX*DIG_W; b++) hi[b] = 1'b1;
      end
      r.adr1 = lo;
      r.adr2 = hi;
    end
    return r;
  endfunction

  always_comb begin
    for (int o = 0; o < RADIX; o++) begin
      out_cell[o] = '0;
      if (sel_ok[o]) begin
        out_cell[o]    = copy_for(buf_cell[sel_slot[o]], o);
        out_cell[o].bi = 1'b1;
      end
    end
  end

  // ---------------- state ----------------
  logic [CW-1:0] n_free_next;
  always_comb begin
    n_free_next = '0;
    for (int s = 0; s < BUF_CELLS; s++) begin
      logic [RADIX-1:0] m;
      m = buf_mask[s];
      for (int o = 0; o < RADIX; o++)
        if (sel_ok[o] && sel_slot[o] == SW'(s)) m[o] = 1'b0;
      for (int i = 0; i < RADIX; i++)
        if (alloc_ok[i] && alloc_slot[i] == SW'(s)) m = in_mask[i];
      if (m == '0) n_free_next = n_free_next + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < BUF_CELLS; s++) begin
        buf_mask[s] <= '0;
        buf_age[s]  <= '0;
      end
      free_cnt <= CW'(BUF_CELLS);
      gptr     <= '0;
      dptr     <= '0;
    end else begin
      for (int s = 0; s < BUF_CELLS; s++)
        if (buf_mask[s] != '0 && buf_age[s] != 8'hFF) buf_age[s] <= buf_age[s] + 1'b1;
      for (int o = 0; o < RADIX; o++)
        if (sel_ok[o]) buf_mask[sel_slot[o]][o] <= 1'b0;
      for (int i = 0; i < RADIX; i++)
        if (alloc_ok[i]) begin
          buf_cell[alloc_slot[i]] <= in_cell[i];
          buf_mask[alloc_slot[i]] <= in_mask[i];
          buf_age[alloc_slot[i]]  <= '0;
        end
      free_cnt <= n_free_next;
      if (free_cnt < CW'(RADIX)) gptr <= gptr + DIG_W'(free_cnt);
      dptr <= dptr_next;
    end
  end

  assign occupancy = CW'(BUF_CELLS) - free_cnt;

  // A granted cell always finds a slot.
  always_ff @(posedge clk)
    if (!rst)
      for (int i = 0; i < RADIX; i++)
        assert (!(in_mask[i] != '0 && !alloc_ok[i]))
          else $error("wugs_se: granted cell found no free slot");

endmodule
