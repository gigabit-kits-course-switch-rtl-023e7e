// wugs_cell_store: common cell store of a port processor.
//
// Cells are written once on entry; the rest of the port processor passes
// only slot pointers around. A slot is taken from a free bitmap (lowest
// free slot first) and returned when its cell leaves or is discarded, so
// up to NFREE slots may be returned in one cycle. Reads are combinational
// on NRD ports.
//
// Timing: alloc_ptr/full are valid in the cycle; asserting alloc writes
// wdata into alloc_ptr at the clock edge and marks it used. free_en[k]
// releases free_ptr[k] at the edge.
//
// The common store and pointer passing follow the document; the free
// bitmap is this design's choice.
module wugs_cell_store
  import wugs_pkg::*;
#(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned NRD   = 1,
  parameter int unsigned NFREE = 1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     alloc,
  input  cell_t                    wdata,
  output logic [$clog2(DEPTH)-1:0] alloc_ptr,
  output logic                     full,
  input  logic [$clog2(DEPTH)-1:0] rd_ptr  [NRD],
  output cell_t                    rd_data [NRD],
  input  logic                     free_en  [NFREE],
  input  logic [$clog2(DEPTH)-1:0] free_ptr [NFREE],
  output logic [$clog2(DEPTH+1)-1:0] used
);
  localparam int unsigned PW = $clog2(DEPTH);

  cell_t            mem [DEPTH];
  logic [DEPTH-1:0] busy;

  always_comb begin
    full      = 1'b1;
    alloc_ptr = '0;
    for (int s = DEPTH - 1; s >= 0; s--)
      if (!busy[s]) begin
        full      = 1'b0;
        alloc_ptr = PW'(s);
      end
  end

  for (genvar r = 0; r < NRD; r++) begin : g_rd
    assign rd_data[r] = mem[rd_ptr[r]];
  end

  always_ff @(posedge clk) begin
    if (alloc && !full) mem[alloc_ptr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= '0;
    end else begin
      logic [DEPTH-1:0] b;
      b = busy;
      for (int k = 0; k < NFREE; k++)
        if (free_en[k]) b[free_ptr[k]] = 1'b0;
      if (alloc && !full) b[alloc_ptr] = 1'b1;
      busy <= b;
    end
  end

  always_comb begin
    used = '0;
    for (int s = 0; s < DEPTH; s++) used = used + busy[s];
  end

  always_ff @(posedge clk)
    if (!rst) assert (!(alloc && full)) else $error("wugs_cell_store: alloc while full");
endmodule
