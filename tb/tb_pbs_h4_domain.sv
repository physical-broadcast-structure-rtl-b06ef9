// tb_pbs_h4_domain -- end-to-end test of an H_4 broadcast domain: 256 PNs,
// alpha 4, 4-bit PBS, 32-bit messages, fat tree from the link between
// levels 3 and 4 (link widths 4, 4, 4, 8).  This is the domain size used to
// cover a wafer of 1024 PNs with two overlapping sets of four domains; one
// domain is simulated here.
//
// Root failover: the data lines of concentrate root copy 0 are held stuck at
// zero for the whole test, as if that SN were damaged.  The redundancy
// initialisation (every PN sends the test pattern) must then mark only copy
// 1 OK, and all traffic must flow through copy 1.
// Every PN sends three messages at once and two PNs send seven, more than
// their transmit queue holds (checks in tb_domain_driver): all 256 PNs must
// receive all 776 messages in step, in order per source, at one message per
// 8 cycles while the domain is saturated.
module tb_pbs_h4_domain;
  localparam int NPN = 256, NMSG = 3, NHOT = 2, NMSG_HOT = 7;
  localparam int TOTAL = (NPN - NHOT) * NMSG + NHOT * NMSG_HOT;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [NPN-1:0] tv, tr, rv, dv;
  logic [NPN-1:0][31:0] tm, rm, dm;
  logic cfg_init = 0, init_phase = 1, drv_rst;
  int pat_sent = 0;
  // redundancy initialisation: every PN sends the test pattern once
  assign drv_rst = rst || init_phase;
  always_comb
    for (int p = 0; p < NPN; p++) begin
      tv[p] = init_phase ? (pat_sent == 0) : dv[p];
      tm[p] = init_phase ? 32'hC3A5_5A3C : dm[p];
    end
  always_ff @(posedge clk) if (!rst && init_phase && tr[0] && tv[0]) pat_sent <= 1;
  logic [1:0] ok;
  logic dmg;
  bit d;
  int c, f, n, q, r;

  pbs_dual_tree #(.ALPHA(4), .LEVELS(4), .BASE_W(4), .RM(2), .FAT_FROM(3), .MSG_W(32)) dut (
    .clk, .rst, .cfg_init, .root_ok(ok), .root_damaged(dmg),
    .tx_valid(tv), .tx_msg(tm), .tx_ready(tr), .rx_valid(rv), .rx_msg(rm));
  tb_domain_driver #(.NPN(NPN), .MSG_W(32), .BASE_W(4), .NMSG(NMSG), .NHOT(NHOT), .NMSG_HOT(NMSG_HOT)) drv (
    .clk, .rst(drv_rst), .tx_valid(dv), .tx_msg(dm), .tx_ready(tr), .rx_valid(rv), .rx_msg(rm),
    .done(d), .checks(c), .failures(f), .n_delivered(n), .n_queue_full(q), .n_rate_ok(r));

  int xf = 0;
  initial begin
    force dut.u_ctree.g_lvl[4].g_sn[0].u_sn.out_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    cfg_init = 1;
    repeat (NPN * 8 + 200) @(negedge clk);
    cfg_init = 0;
    init_phase = 0;
    @(negedge clk);
    if (ok != 2'b10 || dmg) begin xf++; $display("FAIL: after initialisation: ok %b damaged %b", ok, dmg); end
    wait (d);
    repeat (200) @(posedge clk);
    if (n != TOTAL) begin xf++; $display("FAIL: %0d deliveries, expected %0d", n, TOTAL); end
    if (q == 0) begin xf++; $display("FAIL: transmit queues never filled"); end
    if (r == 0) begin xf++; $display("FAIL: saturation never reached"); end
    $display("deliveries %0d, rate-checked %0d, queue full %0d", n, r, q);
    $display("TB_RESULT checks=%0d failures=%0d", c + 4, f + xf);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c, f + 1);
    $finish;
  end
endmodule
