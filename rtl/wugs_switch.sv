// wugs_switch: 64-port gigabit ATM switch.
//
// Every external port has an input port processor (IPP) and an output port
// processor (OPP). IPPs translate cells through their VXTs, stamp them and
// feed the three-stage Benes network of 8-port shared-buffer switch
// elements; OPPs resequence the cells, queue them for their links and send
// cells marked for recycling (multicast tree nodes, control replies) back to
// the IPP of the same port over the recycling path.
//
// The link-side ports stand where the input and output transmission
// interfaces (optics, line coding, framing) would connect: rx_valid/rx_cell
// deliver one whole cell per cycle, tx_ready/tx_valid/tx_cell take one.
// Time stamps count half cell times from reset in every port processor.
//
// A RESET control cell received on any link resets the whole switch: the
// request is registered and applied as a synchronous reset in the next
// cycle, together with the external rst.
module wugs_switch
  import wugs_pkg::*;
#(
  parameter int unsigned SE_CELLS    = 40,
  parameter int unsigned RCB_CELLS   = 64,
  parameter int unsigned OPP_CELLS   = 256,
  parameter int unsigned RSQ_CELLS   = 80,
  parameter int unsigned AGE_T       = 39
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx_valid [N_PORTS],
  input  link_cell_t rx_cell  [N_PORTS],
  input  logic       tx_ready [N_PORTS],
  output logic       tx_valid [N_PORTS],
  output link_cell_t tx_cell  [N_PORTS],
  output logic       reset_active
);
  logic  sw_rst, reset_req_q;
  logic  reset_req [N_PORTS];
  cell_t to_net    [N_PORTS];
  logic  net_gin   [N_PORTS];
  cell_t from_net  [N_PORTS];
  logic  net_gout  [N_PORTS];
  logic  rcy_valid [N_PORTS];
  cell_t rcy_cell  [N_PORTS];
  logic  rcy_ready [N_PORTS];
  logic [$clog2(SE_CELLS+1)-1:0] se_occ [N_STAGES][RADIX];

  always_ff @(posedge clk) begin
    if (rst) reset_req_q <= 1'b0;
    else begin
      reset_req_q <= 1'b0;
      for (int p = 0; p < N_PORTS; p++) if (reset_req[p]) reset_req_q <= 1'b1;
    end
  end
  assign sw_rst       = rst || reset_req_q;
  assign reset_active = sw_rst;

  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    wugs_ipp #(
      .PORT_ID(PORT_W'(p)), .RCB_CELLS(RCB_CELLS), .TT_T(AGE_T)
    ) u_ipp (
      .clk, .rst(sw_rst),
      .rx_valid(rx_valid[p]), .rx_cell(rx_cell[p]),
      .rcy_valid(rcy_valid[p]), .rcy_cell(rcy_cell[p]), .rcy_ready(rcy_ready[p]),
      .sw_cell(to_net[p]), .sw_grant(net_gin[p]),
      .sw_reset_req(reset_req[p])
    );

    wugs_opp #(
      .PORT_ID(PORT_W'(p)), .STORE_CELLS(OPP_CELLS), .RSQ_CELLS(RSQ_CELLS),
      .AGE_T(AGE_T)
    ) u_opp (
      .clk, .rst(sw_rst),
      .net_cell(from_net[p]), .net_grant(net_gout[p]),
      .tx_ready(tx_ready[p]), .tx_valid(tx_valid[p]), .tx_cell(tx_cell[p]),
      .rcy_valid(rcy_valid[p]), .rcy_cell(rcy_cell[p]), .rcy_ready(rcy_ready[p])
    );
  end

  wugs_network #(.BUF_CELLS(SE_CELLS)) u_net (
    .clk, .rst(sw_rst),
    .in_cell(to_net), .grant_o(net_gin),
    .out_cell(from_net), .grant_i(net_gout),
    .occupancy(se_occ)
  );
endmodule
