// tb_wugs_se: runs the switch element bench as a middle (routing) stage and
// as a first (distribution) stage.
module tb_wugs_se;
  logic d0, d1;
  int c0, c1, f0, f1;
  tb_wugs_se_bench #(.DIST(1'b0)) u_route (.done(d0), .checks(c0), .failures(f0));
  tb_wugs_se_bench #(.DIST(1'b1)) u_dist  (.done(d1), .checks(c1), .failures(f1));

  initial begin
    #200000;
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end

  initial begin
    wait (d0 && d1);
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1);
    $finish;
  end
endmodule
