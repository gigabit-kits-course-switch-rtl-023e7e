// tb_wugs_se_bench: drives one switch element with random unicast, path,
// binary-copy and range cells under random downstream back-pressure and
// checks each copy that leaves against an independently computed list of
// expected copies. Also checks: grants never exceed free slots, all inputs
// are granted when 8 or more slots are free, every input is granted while
// the buffer is nearly full (rotation), per-output departures follow
// arrival order (oldest first), and, in the distribution stage, the exact
// round-robin output sequence.
module tb_wugs_se_bench
  import wugs_pkg::*;
#(
  parameter bit DIST = 1'b0
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int STAGE = DIST ? 0 : 1;
  localparam int BUF = 40;
  logic clk = 0, rst = 1;
  cell_t in_cell [RADIX];
  logic  grant_o [RADIX];
  cell_t out_cell [RADIX];
  logic  grant_i [RADIX];
  logic [$clog2(BUF+1)-1:0] occupancy;

  wugs_se #(.STAGE(STAGE), .DIST(DIST), .BUF_CELLS(BUF)) dut (.*);
  always #5 clk = ~clk;

  typedef struct { cell_t c; int arr; } exp_t;
  exp_t exp_q [RADIX][$];   // per output: expected copies
  int   last_arr [RADIX];
  int   rr;
  int   n_copy = 0, n_range = 0, n_rot = 0, n_part = 0;
  bit   granted_while_full [RADIX];

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL(DIST=%0d): %s t=%0t", DIST, msg, $time); end
  endtask

  function automatic cell_t rand_cell(int id);
    cell_t c;
    int lo, hi;
    c = '0;
    c.bi = 1;
    c.payload = PAYLOAD_W'(id);
    c.vxi1 = VXI_W'($urandom); c.vxi2 = VXI_W'($urandom);
    c.bdi1 = BDI_W'($urandom); c.bdi2 = BDI_W'($urandom);
    c.cyc1 = 1'($urandom); c.cyc2 = 1'($urandom);
    c.cs1 = 1'($urandom); c.cs2 = 1'($urandom);
    c.ts = TS_W'($urandom);
    case ($urandom % 4)
      0: begin c.rc = RC_UNICAST; c.adr1 = ADR_W'($urandom % 64); end
      1: begin c.rc = RC_PATH; c.adr1 = ADR_W'($urandom); end
      2: begin c.rc = RC_BCOPY; c.adr1 = ADR_W'($urandom % 64); c.adr2 = ADR_W'($urandom % 64);
               if (c.adr1 == c.adr2) c.adr2 = c.adr1 ^ 9'd1; end
      default: begin
        lo = $urandom % 64; hi = lo + ($urandom % (64 - lo));
        c.rc = RC_RANGE; c.adr1 = ADR_W'(lo); c.adr2 = ADR_W'(hi);
      end
    endcase
    return c;
  endfunction

  // expected copies of a cell accepted in the middle stage (routes on port/8)
  task automatic expect_route(cell_t c, int arr);
    exp_t e;
    int o1, o2, lo, hi;
    e.arr = arr;
    case (c.rc)
      RC_PATH: begin e.c = c; exp_q[int'(c.adr1) / 8 % 8].push_back(e); end
      RC_UNICAST: begin e.c = c; exp_q[int'(c.adr1) / 8].push_back(e); end
      RC_BCOPY: begin
        o1 = int'(c.adr1) / 8; o2 = int'(c.adr2) / 8;
        if (o1 == o2) begin e.c = c; exp_q[o1].push_back(e); end
        else begin
          n_copy++;
          e.c = c; e.c.rc = RC_UNICAST; exp_q[o1].push_back(e);
          e.c = c; e.c.rc = RC_UNICAST; e.c.adr1 = c.adr2; e.c.vxi1 = c.vxi2;
          e.c.bdi1 = c.bdi2; e.c.cyc1 = c.cyc2; e.c.cs1 = c.cs2;
          exp_q[o2].push_back(e);
        end
      end
      default: begin
        lo = int'(c.adr1); hi = int'(c.adr2);
        if (lo / 8 != hi / 8) n_range++;
        for (int o = lo / 8; o <= hi / 8; o++) begin
          e.c = c;
          e.c.adr1 = ADR_W'((lo > o * 8) ? lo : o * 8);
          e.c.adr2 = ADR_W'((hi < o * 8 + 7) ? hi : o * 8 + 7);
          exp_q[o].push_back(e);
        end
      end
    endcase
  endtask

  initial begin
    int id = 0;
    int free_slots;
    checks = 0; failures = 0; done = 0; rr = 0;
    for (int i = 0; i < RADIX; i++) begin
      in_cell[i] = '0; grant_i[i] = 0; last_arr[i] = -1; granted_while_full[i] = 0;
    end
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 4000; t++) begin
      int ng;
      bit load;
      @(negedge clk);
      load = (t < 3000);
      for (int o = 0; o < RADIX; o++)
        grant_i[o] = (t >= 3000) || ((t / 300) % 2 == 0) ? 1'b1 : ($urandom % 4 == 0);
      for (int i = 0; i < RADIX; i++)
        if (!in_cell[i].bi && load && ($urandom % 2)) begin
          in_cell[i] = rand_cell(id); id++;
        end
      #1;
      // grant rules
      free_slots = BUF - int'(occupancy);
      ng = 0;
      for (int i = 0; i < RADIX; i++) ng += grant_o[i];
      check(ng <= free_slots, "grants within free slots");
      if (free_slots >= RADIX) check(ng == RADIX, "all inputs granted");
      if (free_slots < RADIX && free_slots > 0) n_part++;
      if (free_slots < RADIX)
        for (int i = 0; i < RADIX; i++) if (grant_o[i]) granted_while_full[i] = 1;
      check(int'(occupancy) <= BUF, "buffer bound");
      // departures
      for (int o = 0; o < RADIX; o++) begin
        if (out_cell[o].bi) begin
          int k;
          check(grant_i[o], "send only with grant");
          k = -1;
          foreach (exp_q[o][j])
            if (k < 0 && exp_q[o][j].c.payload == out_cell[o].payload) k = j;
          check(k >= 0, "copy expected on this output");
          if (k >= 0) begin
            check(out_cell[o] == exp_q[o][k].c, "copy header");
            check(exp_q[o][k].arr >= last_arr[o], "oldest first");
            last_arr[o] = exp_q[o][k].arr;
            exp_q[o].delete(k);
          end
        end
      end
      // arrivals (accepted at the coming edge)
      for (int i = 0; i < RADIX; i++) begin
        if (in_cell[i].bi && grant_o[i]) begin
          if (DIST) begin
            exp_t e;
            e.c = in_cell[i]; e.arr = t;
            if (in_cell[i].rc == RC_PATH) exp_q[int'(in_cell[i].adr1) / 64].push_back(e);
            else begin exp_q[rr].push_back(e); rr = (rr + 1) % RADIX; end
          end else expect_route(in_cell[i], t);
        end
      end
      @(posedge clk);
      #1;
      for (int i = 0; i < RADIX; i++) if (in_cell[i].bi && grant_o[i]) in_cell[i].bi = 0;
    end
    for (int o = 0; o < RADIX; o++) check(exp_q[o].size() == 0, "all copies delivered");
    for (int i = 0; i < RADIX; i++) check(granted_while_full[i], "rotation reaches every input");
    check(n_part > 0, "partial grants happened");
    if (!DIST) check(n_copy > 0 && n_range > 0, "copies and ranges happened");
    $display("SE DIST=%0d: cells %0d, binary copies split %0d, ranges split %0d, partial-grant cycles %0d",
             DIST, id, n_copy, n_range, n_part);
    done = 1;
  end
endmodule
