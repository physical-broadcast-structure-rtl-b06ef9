// tb_pbs_dual_tree -- end-to-end test of a PBS broadcast domain in two
// reduced configurations (checks in tb_domain_driver):
//   4-ary H_2 (16 PNs), 4-bit PBS, fat from link 1, 32-bit messages;
//   binary H_3 (8 PNs), bit-serial, fat from link 1.
// The first domain duplicates its concentrate root: before the traffic, an
// initialisation phase has every PN send the test pattern, and both root
// copies must be marked OK with the domain not damaged.
// Every PN sends bursts of messages; every PN must receive every message in
// step with the others, at one message per 32/BASE_W cycles when saturated.
module tb_pbs_dual_tree;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  localparam int N1 = 16, N2 = 8;
  logic [N1-1:0] tv1, tr1, rv1;  logic [N1-1:0][31:0] tm1, rm1;
  logic [N1-1:0] dv1;             logic [N1-1:0][31:0] dm1;
  logic init_phase = 0, cfg_init = 0, drv_rst;
  logic [1:0] ok1, ok2;
  logic dmg1, dmg2;
  int   pat_sent = 0;
  assign drv_rst = rst || init_phase;
  always_comb
    for (int p = 0; p < N1; p++) begin
      tv1[p] = init_phase ? (pat_sent == 0) : dv1[p];
      tm1[p] = init_phase ? 32'hC3A5_5A3C : dm1[p];
    end
  always_ff @(posedge clk) if (!rst && init_phase && tr1[0] && tv1[0]) pat_sent <= 1;
  logic [N2-1:0] tv2, tr2, rv2;  logic [N2-1:0][31:0] tm2, rm2;
  bit d1, d2;
  int c1, c2, f1, f2, n1, n2, q1, q2, r1, r2;

  pbs_dual_tree #(.ALPHA(4), .LEVELS(2), .BASE_W(4), .RM(2), .FAT_FROM(1), .MSG_W(32), .TXQ(4)) dut1 (
    .clk, .rst, .cfg_init, .root_ok(ok1), .root_damaged(dmg1),
    .tx_valid(tv1), .tx_msg(tm1), .tx_ready(tr1), .rx_valid(rv1), .rx_msg(rm1));
  tb_domain_driver #(.NPN(N1), .MSG_W(32), .BASE_W(4), .NMSG(6)) drv1 (
    .clk, .rst(drv_rst), .tx_valid(dv1), .tx_msg(dm1), .tx_ready(tr1), .rx_valid(rv1), .rx_msg(rm1),
    .done(d1), .checks(c1), .failures(f1), .n_delivered(n1), .n_queue_full(q1), .n_rate_ok(r1));

  pbs_dual_tree #(.ALPHA(2), .LEVELS(3), .BASE_W(1), .RM(2), .FAT_FROM(1), .MSG_W(32), .TXQ(2), .REDUNDANT_ROOT(0)) dut2 (
    .clk, .rst, .cfg_init(1'b0), .root_ok(ok2), .root_damaged(dmg2),
    .tx_valid(tv2), .tx_msg(tm2), .tx_ready(tr2), .rx_valid(rv2), .rx_msg(rm2));
  tb_domain_driver #(.NPN(N2), .MSG_W(32), .BASE_W(1), .NMSG(4)) drv2 (
    .clk, .rst, .tx_valid(tv2), .tx_msg(tm2), .tx_ready(tr2), .rx_valid(rv2), .rx_msg(rm2),
    .done(d2), .checks(c2), .failures(f2), .n_delivered(n2), .n_queue_full(q2), .n_rate_ok(r2));

  int extra = 0, xf = 0;
  initial begin
    repeat (3) @(posedge clk);
    init_phase = 1;
    @(negedge clk) rst = 0;
    cfg_init = 1;
    repeat (N1 * 8 + 100) @(negedge clk);
    cfg_init = 0;
    @(negedge clk);
    extra++;
    if (ok1 != 2'b11 || dmg1) begin xf++; $display("FAIL: redundancy init: ok %b damaged %b", ok1, dmg1); end
    init_phase = 0;
    wait (d1 && d2);
    repeat (200) @(posedge clk);
    extra += 3;
    if (n1 != N1 * 6 || n2 != N2 * 4) begin xf++; $display("FAIL: extra deliveries"); end
    if (q1 == 0 || q2 == 0) begin xf++; $display("FAIL: transmit queues never filled"); end
    if (r1 == 0 || r2 == 0) begin xf++; $display("FAIL: saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + extra, f1 + f2 + xf);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2 + 1);
    $finish;
  end
endmodule
