// tb_pbs_broadcast_tree -- self-checking test of the broadcast tree in two
// configurations (see tb_btree_harness for the checks):
//   4-ary H_3, 4-bit leaves, fat from the second link (flits 16, 8, 4 bits);
//   binary H_4, bit-serial leaves, fat from the third link (flits 4,2,1,1).
module tb_pbs_broadcast_tree;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  bit d1, d2;
  int c1, c2, f1, f2;

  tb_btree_harness #(.ALPHA(4), .LEVELS(3), .BASE_W(4), .FAT_FROM(1), .NMSG(20)) h1 (
    .clk, .rst, .done(d1), .checks(c1), .failures(f1));
  tb_btree_harness #(.ALPHA(2), .LEVELS(4), .BASE_W(1), .FAT_FROM(2), .NMSG(12)) h2 (
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
