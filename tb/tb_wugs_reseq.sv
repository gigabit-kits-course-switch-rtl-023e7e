// tb_wugs_reseq: inserts cells with out-of-order stamps and checks, every
// cycle, that exactly the cell a reference model picks is released: the
// oldest cell once it is T cell times old, or the oldest at once when the
// table is full. Also checks that released cells come out in stamp order
// when nothing is forced, and that each cell is held at least T.
module tb_wugs_reseq;
  import wugs_pkg::*;
  localparam int ENTRIES = 8, PW = 8, T = 10;
  logic clk = 0, rst = 1;
  logic [TS_W-1:0] now;
  logic [11:0] age_t;
  logic in_valid, out_valid, forced;
  logic [PW-1:0] in_ptr, out_ptr;
  logic [TS_W-1:0] in_ts;
  logic [$clog2(ENTRIES+1)-1:0] count;
  int checks = 0, failures = 0, n_forced = 0, n_out = 0;

  typedef struct { int ptr; int ts; } ent_t;
  ent_t model [$];

  wugs_reseq #(.ENTRIES(ENTRIES), .PW(PW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s @%0d", msg, now); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int nxt = 0;
    age_t = 12'(T); now = 0; in_valid = 0; in_ptr = 0; in_ts = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 3000; t++) begin
      int best, bi;
      bit exp_out;
      int bi_hit;
      bi_hit = -1;
      @(negedge clk);
      // reference choice
      bi = -1; best = 0;
      foreach (model[i]) begin
        int a;
        a = int'($signed(now - TS_W'(model[i].ts)));
        if (bi < 0 || a > best) begin bi = i; best = a; end
      end
      exp_out = (bi >= 0) && (model.size() == ENTRIES || best >= 2 * T);
      check(out_valid == exp_out, "release decision");
      check(count == $bits(count)'(model.size()), "count");
      if (exp_out && out_valid) begin
        // among equally old cells any may go first
        for (int i = 0; i < model.size(); i++)
          if (PW'(model[i].ptr) == out_ptr) bi_hit = i;
        check(bi_hit >= 0 && int'($signed(now - TS_W'(model[bi_hit].ts))) == best, "released the oldest cell");
        if (bi_hit >= 0) bi = bi_hit;
        check(forced == (best < 2 * T), "forced flag");
        if (forced) n_forced++;
        n_out++;
      end
      // new cell: stamp up to 6 cell times in the past, light or heavy load
      in_valid = (t < 1500) ? ($urandom % 3 == 0) : ($urandom % 4 != 0);
      in_ptr   = PW'(nxt);
      in_ts    = now - TS_W'($urandom % 12);
      @(posedge clk);
      if (exp_out) model.delete(bi);
      if (in_valid) begin model.push_back('{nxt, int'(in_ts)}); nxt++; end
      #1 now = now + 2;
    end
    check(n_forced > 0 && n_out > n_forced, "both normal and forced releases happened");
    $display("released %0d, forced %0d", n_out, n_forced);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
