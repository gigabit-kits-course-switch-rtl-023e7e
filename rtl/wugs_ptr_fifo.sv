// wugs_ptr_fifo: first-in first-out queue of cell-store pointers.
//
// Used for the receive buffer queue of the IPP and for the transmit and
// recycling queues of the OPP. push and pop may happen in the same cycle;
// the head is visible combinationally when !empty. count is the number of
// entries held.
module wugs_ptr_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 64
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       push,
  input  logic [W-1:0]               din,
  input  logic                       pop,
  output logic [W-1:0]               dout,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rp, wp;

  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));
  assign dout  = mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push && !full) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rp    <= '0;
      wp    <= '0;
      count <= '0;
    end else begin
      if (push && !full) wp <= inc(wp);
      if (pop && !empty) rp <= inc(rp);
      count <= count + CW'(push && !full) - CW'(pop && !empty);
    end
  end

  always_ff @(posedge clk)
    if (!rst) assert (!(push && full && !pop)) else $error("wugs_ptr_fifo: push while full");
endmodule
