// wugs_network: three-stage Benes interconnection network of 8-port switch
// elements (64 ports).
//
// Stage 0 distributes arriving cells over its outputs to balance the load,
// stage 1 routes on the first (high) octal digit of the destination port and
// stage 2 on the second digit. Output j of first-stage SE i feeds input i of
// middle SE j; output d of middle SE j feeds input j of last-stage SE d;
// output e of last-stage SE d is network port 8*d+e. Grants travel the
// opposite way along the same links.
//
// Interface: in_cell/grant_o on the input side (a port may send a cell in
// a cycle in which its grant is high), out_cell/grant_i on the output side.
// Latency is at least one cycle per stage.
//
// The topology, the role of each stage and the digit order follow the
// document; the SE buffer size is a parameter.
module wugs_network
  import wugs_pkg::*;
#(
  parameter int unsigned BUF_CELLS = 40
) (
  input  logic  clk,
  input  logic  rst,
  input  cell_t in_cell  [N_PORTS],
  output logic  grant_o  [N_PORTS],
  output cell_t out_cell [N_PORTS],
  input  logic  grant_i  [N_PORTS],
  output logic [$clog2(BUF_CELLS+1)-1:0] occupancy [N_STAGES][RADIX]
);
  // link[s][n]: cells entering stage s on flat input n (SE n/8, port n%8)
  cell_t link_c [N_STAGES+1][N_PORTS];
  logic  link_g [N_STAGES+1][N_PORTS];

  for (genvar n = 0; n < N_PORTS; n++) begin : g_io
    assign link_c[0][n] = in_cell[n];
    assign grant_o[n]   = link_g[0][n];
    assign out_cell[n]  = link_c[N_STAGES][n];
    assign link_g[N_STAGES][n] = grant_i[n];
  end

  for (genvar s = 0; s < N_STAGES; s++) begin : g_stage
    for (genvar e = 0; e < RADIX; e++) begin : g_se
      cell_t se_in  [RADIX];
      logic  se_gi  [RADIX];
      cell_t se_out [RADIX];
      logic  se_go  [RADIX];
      for (genvar p = 0; p < RADIX; p++) begin : g_port
        assign se_in[p] = link_c[s][e*RADIX+p];
        assign link_g[s][e*RADIX+p] = se_gi[p];
        if (s == N_STAGES - 1) begin : g_last
          // last stage: output p is port e*8+p
          assign link_c[s+1][e*RADIX+p] = se_out[p];
          assign se_go[p] = link_g[s+1][e*RADIX+p];
        end else begin : g_mid
          // output p of SE e goes to input e of SE p in the next stage
          assign link_c[s+1][p*RADIX+e] = se_out[p];
          assign se_go[p] = link_g[s+1][p*RADIX+e];
        end
      end
      wugs_se #(
        .STAGE(s), .DIST(s == 0), .BUF_CELLS(BUF_CELLS)
      ) u_se (
        .clk, .rst,
        .in_cell(se_in), .grant_o(se_gi),
        .out_cell(se_out), .grant_i(se_go),
        .occupancy(occupancy[s][e])
      );
    end
  end
endmodule
