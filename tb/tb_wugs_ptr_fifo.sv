// tb_wugs_ptr_fifo: random push/pop against a queue model; checks order,
// count, empty and full.
module tb_wugs_ptr_fifo;
  localparam int W = 6, DEPTH = 8;
  logic clk = 0, rst = 1;
  logic push, pop, empty, full;
  logic [W-1:0] din, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  wugs_ptr_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      push = (($urandom % 3) != 0) && !full;
      pop  = ($urandom % 3) != 0;
      din  = W'($urandom);
      checks++;
      if (count != $bits(count)'(model.size()) || empty != (model.size() == 0) || full != (model.size() == DEPTH)) begin
        failures++; $display("status mismatch t=%0d count=%0d model=%0d", t, count, model.size());
      end
      if (pop && model.size() != 0) begin
        checks++;
        if (dout != model[0]) begin failures++; $display("data mismatch %0h %0h", dout, model[0]); end
      end
      begin
        bit do_push;
        do_push = push && (model.size() < DEPTH);
        @(posedge clk);
        if (pop && model.size() != 0) void'(model.pop_front());
        if (do_push) model.push_back(din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
