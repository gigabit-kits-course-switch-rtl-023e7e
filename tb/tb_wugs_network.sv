// tb_wugs_network: random unicast, path, binary-copy and range traffic on
// all 64 inputs of the three-stage network with random back-pressure at
// the outputs. Every copy that leaves must be one the test expects at that
// port with the expected header (copies become unicast with their own
// fields; range copies end with a one-port range) and must have taken at
// least one cycle per stage; nothing may be lost or duplicated.
module tb_wugs_network;
  import wugs_pkg::*;
  logic clk = 0, rst = 1;
  cell_t in_cell [N_PORTS];
  logic  grant_o [N_PORTS];
  cell_t out_cell [N_PORTS];
  logic  grant_i [N_PORTS];
  logic [$clog2(41)-1:0] occupancy [N_STAGES][RADIX];
  int checks = 0, failures = 0;

  wugs_network #(.BUF_CELLS(40)) dut (.*);
  always #5 clk = ~clk;

  typedef struct { cell_t c; int t; } exp_t;
  exp_t exp_q [N_PORTS][$];
  int n_bcopy = 0, n_range = 0, n_path = 0, n_full = 0, n_out = 0;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s t=%0t", msg, $time); end
  endtask

  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic cell_t rand_cell(int id);
    cell_t c;
    int lo, hi;
    c = '0; c.bi = 1; c.payload = PAYLOAD_W'(id);
    c.vxi1 = VXI_W'($urandom); c.vxi2 = VXI_W'($urandom);
    c.bdi1 = BDI_W'($urandom); c.bdi2 = BDI_W'($urandom);
    c.cyc1 = 1'($urandom); c.cyc2 = 1'($urandom);
    case ($urandom % 8)
      0: begin c.rc = RC_PATH; c.adr1 = ADR_W'($urandom); end
      1: begin c.rc = RC_BCOPY; c.adr1 = ADR_W'($urandom % 64); c.adr2 = ADR_W'($urandom % 64);
               if (c.adr1 == c.adr2) c.adr2 = c.adr1 ^ 9'd1; end
      2: begin lo = $urandom % 64; hi = lo + ($urandom % 3) * ($urandom % 16);
               if (hi > 63) hi = 63;
               c.rc = RC_RANGE; c.adr1 = ADR_W'(lo); c.adr2 = ADR_W'(hi); end
      default: begin c.rc = RC_UNICAST; c.adr1 = ADR_W'($urandom % 64); end
    endcase
    return c;
  endfunction

  task automatic expect_cell(cell_t c, int t);
    exp_t e;
    e.t = t;
    case (c.rc)
      RC_PATH: begin n_path++; e.c = c; exp_q[int'(c.adr1) % 64].push_back(e); end
      RC_BCOPY: begin
        n_bcopy++;
        e.c = c; e.c.rc = RC_UNICAST; exp_q[int'(c.adr1)].push_back(e);
        e.c = c; e.c.rc = RC_UNICAST; e.c.adr1 = c.adr2; e.c.vxi1 = c.vxi2;
        e.c.bdi1 = c.bdi2; e.c.cyc1 = c.cyc2; e.c.cs1 = c.cs2;
        exp_q[int'(c.adr2)].push_back(e);
      end
      RC_RANGE: begin
        n_range++;
        for (int p = int'(c.adr1); p <= int'(c.adr2); p++) begin
          e.c = c; e.c.adr1 = ADR_W'(p); e.c.adr2 = ADR_W'(p);
          exp_q[p].push_back(e);
        end
      end
      default: begin e.c = c; exp_q[int'(c.adr1)].push_back(e); end
    endcase
  endtask

  initial begin
    int id = 0;
    for (int p = 0; p < N_PORTS; p++) begin in_cell[p] = '0; grant_i[p] = 0; end
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 2500; t++) begin
      @(negedge clk);
      for (int p = 0; p < N_PORTS; p++) begin
        grant_i[p] = (t >= 2000) || ((t / 250) % 2 == 0) || ($urandom % 3 == 0);
        if (!in_cell[p].bi && t < 2000 && ($urandom % 4 == 0)) begin
          in_cell[p] = rand_cell(id); id++;
        end
      end
      #1;
      for (int p = 0; p < N_PORTS; p++) begin
        if (out_cell[p].bi) begin
          int k;
          n_out++;
          check(grant_i[p], "output only with grant");
          k = -1;
          foreach (exp_q[p][j]) if (k < 0 && exp_q[p][j].c.payload == out_cell[p].payload) k = j;
          check(k >= 0, "copy expected at this port");
          if (k >= 0) begin
            check(out_cell[p] == exp_q[p][k].c, "copy header");
            check(t - exp_q[p][k].t >= N_STAGES, "one cycle per stage at least");
            exp_q[p].delete(k);
          end
        end
        if (in_cell[p].bi && grant_o[p]) expect_cell(in_cell[p], t);
      end
      for (int s = 0; s < N_STAGES; s++)
        for (int e = 0; e < RADIX; e++) if (occupancy[s][e] >= 33) n_full++;
      @(posedge clk);
      #1;
      for (int p = 0; p < N_PORTS; p++) if (in_cell[p].bi && grant_o[p]) in_cell[p].bi = 0;
    end
    for (int p = 0; p < N_PORTS; p++) check(exp_q[p].size() == 0, "all copies delivered");
    check(n_full > 0, "an SE ran out of room for 8 cells (grant rotation)");
    check(n_bcopy > 0 && n_range > 0 && n_path > 0, "all routing kinds used");
    $display("cells %0d, copies out %0d, bcopy %0d, range %0d, path %0d, SE-near-full cycles %0d",
             id, n_out, n_bcopy, n_range, n_path, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
