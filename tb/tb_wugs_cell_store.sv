// tb_wugs_cell_store: random allocation and release against a model of the
// busy slots; checks that the lowest free slot is handed out, that full
// and used are right and that every read returns what was written.
module tb_wugs_cell_store;
  import wugs_pkg::*;
  localparam int DEPTH = 16, PW = 4;
  logic clk = 0, rst = 1;
  logic alloc, full;
  cell_t wdata;
  logic [PW-1:0] alloc_ptr;
  logic [PW-1:0] rd_ptr [1];
  cell_t rd_data [1];
  logic free_en [2];
  logic [PW-1:0] free_ptr [2];
  logic [$clog2(DEPTH+1)-1:0] used;
  int checks = 0, failures = 0;
  bit   busy [DEPTH];
  logic [PAYLOAD_W-1:0] content [DEPTH];

  wugs_cell_store #(.DEPTH(DEPTH), .NRD(1), .NFREE(2)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int exp_free, n_used;
    logic [PW-1:0] ap;
    alloc = 0; wdata = '0; rd_ptr[0] = '0;
    free_en[0] = 0; free_en[1] = 0; free_ptr[0] = '0; free_ptr[1] = '0;
    foreach (busy[i]) busy[i] = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      exp_free = -1; n_used = 0;
      for (int s = DEPTH - 1; s >= 0; s--) if (!busy[s]) exp_free = s;
      foreach (busy[s]) n_used += busy[s];
      check(full == (exp_free < 0), "full flag");
      check(used == $bits(used)'(n_used), "used count");
      if (exp_free >= 0) check(alloc_ptr == PW'(exp_free), "lowest free slot");
      // read a random busy slot
      rd_ptr[0] = PW'($urandom % DEPTH);
      #1;
      if (busy[rd_ptr[0]]) check(rd_data[0].payload == content[rd_ptr[0]], "read data");
      alloc = !full && ($urandom % 2);
      wdata = '0;
      wdata.payload = {12{$urandom}};
      for (int k = 0; k < 2; k++) begin
        free_ptr[k] = PW'($urandom % DEPTH);
        free_en[k]  = busy[free_ptr[k]] && ($urandom % 3 == 0) && !(alloc && free_ptr[k] == alloc_ptr);
      end
      ap = alloc_ptr;
      @(posedge clk);
      for (int k = 0; k < 2; k++) if (free_en[k]) busy[free_ptr[k]] = 0;
      if (alloc) begin busy[ap] = 1; content[ap] = wdata.payload; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
