// tb_pbs_concentrate_tree -- self-checking test of the concentrate tree in
// two configurations (see tb_ctree_harness for the checks):
//   binary H_3, bit-serial leaves, fat from the second link (flits 1,2,4 bits),
//   with a duplicated root (the primary copy is checked);
//   4-ary H_2, 4-bit leaves, fat from the second link (flits 4,8 bits).
module tb_pbs_concentrate_tree;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  bit d1, d2;
  int c1, c2, f1, f2;

  tb_ctree_harness #(.ALPHA(2), .LEVELS(3), .BASE_W(1), .FAT_FROM(1), .NMSG(3), .RED(1)) h1 (
    .clk, .rst, .done(d1), .checks(c1), .failures(f1));
  tb_ctree_harness #(.ALPHA(4), .LEVELS(2), .BASE_W(4), .FAT_FROM(1), .NMSG(4)) h2 (
    .clk, .rst, .done(d2), .checks(c2), .failures(f2));

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (d1 && d2);
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2 + 1);
    $finish;
  end
endmodule
