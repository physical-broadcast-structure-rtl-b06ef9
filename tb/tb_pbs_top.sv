// tb_pbs_top -- end-to-end test of the whole design at its default sizes:
// an H_5 PBS broadcast domain (1024 PNs, alpha 4, 4-bit PBS, 32-bit
// messages, fat tree from L_{3,4}) and the TBH test chip.
//
// Domain: every PN sends NMSG messages at once, four PNs NMSG_HOT (checks in
// tb_domain_driver): all 1024 PNs must receive every message in step, in
// order per source, one message per 8 cycles while saturated.
// TBH chip: load the eight transmit PNs, run, read back the eight receive
// PNs; then pause and resume run in auto mode.
//
// Before the traffic, the redundancy initialisation runs: every PN sends the
// test pattern and both copies of the concentrate root must pass.
// Each mechanism of the design is counted and must occur at least once:
// contention at the domain root, a round-robin change of grant, a transfer on
// a fat (8-bit, 2-cycle) link, a full transmit queue, delivery to all PNs at
// the saturated rate, the TBH run stop, TBH auto-mode resend, and a TBH
// receive-register read.
module tb_pbs_top;
  import pbs_pkg::*;
  localparam int NPN = 1024, MSG_W = 32, NMSG = 2, NHOT = 4, NMSG_HOT = 7;
  localparam int TOTAL = (NPN - NHOT) * NMSG + NHOT * NMSG_HOT;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [NPN-1:0] tx_valid, tx_ready, rx_valid, dv;
  logic [NPN-1:0][MSG_W-1:0] tx_msg, rx_msg, dm;
  logic cfg_init = 0, root_damaged, init_phase = 1, drv_rst;
  logic [1:0] root_ok;
  int pat_sent = 0;
  // redundancy initialisation: every PN sends the test pattern once
  assign drv_rst = rst || init_phase;
  always_comb
    for (int p = 0; p < NPN; p++) begin
      tx_valid[p] = init_phase ? (pat_sent == 0) : dv[p];
      tx_msg[p]   = init_phase ? 32'hC3A5_5A3C : dm[p];
    end
  always_ff @(posedge clk) if (!rst && init_phase && tx_ready[0] && tx_valid[0]) pat_sent <= 1;
  logic tbh_reset, tbh_run, tbh_auto, tbh_write, tbh_read, tbh_rd_ready;
  logic [2:0] tbh_wr_addr, tbh_rd_addr, tbh_adr_mon;
  tbh_msg_t tbh_wr_data;
  logic [3:0] tbh_rd_data;
  logic [6:0] tbh_mon_valid, tbh_mon_bit, tbh_mon_taken;

  pbs_top dut (.*);

  bit d_done;
  int d_checks, d_fail, n_deliv, n_qfull, n_rate;
  tb_domain_driver #(.NPN(NPN), .MSG_W(MSG_W), .BASE_W(4), .NMSG(NMSG), .NHOT(NHOT), .NMSG_HOT(NMSG_HOT)) drv (
    .clk, .rst(drv_rst), .tx_valid(dv), .tx_msg(dm), .tx_ready, .rx_valid, .rx_msg,
    .done(d_done), .checks(d_checks), .failures(d_fail),
    .n_delivered(n_deliv), .n_queue_full(n_qfull), .n_rate_ok(n_rate));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int n_redundancy_init = 0;
  int n_contend = 0, n_grant_change = 0, n_fat = 0, n_tbh_stop = 0, n_tbh_auto = 0, n_tbh_read = 0;
  logic [3:0] root_iv, root_ir;
  logic [1:0] last_g = '0;
  logic       fat_v, fat_r;
  assign root_iv = dut.u_domain.u_ctree.g_lvl[5].g_sn[0].u_sn.in_valid;
  assign root_ir = dut.u_domain.u_ctree.g_lvl[5].g_sn[0].u_sn.in_ready;
  assign fat_v   = dut.u_domain.u_ctree.g_lvl[4].g_sn[0].u_sn.in_valid[0];
  assign fat_r   = dut.u_domain.u_ctree.g_lvl[4].g_sn[0].u_sn.in_ready[0];
  always @(posedge clk) if (!rst) begin
    if ($countones(root_iv) > 1 && !dut.u_domain.u_ctree.g_lvl[5].g_sn[0].u_sn.busy) n_contend++;
    if (root_ir != 0) begin
      for (int c = 0; c < 4; c++) if (root_ir[c]) begin
        if (2'(c) != last_g) n_grant_change++;
        last_g = 2'(c);
      end
    end
    if (fat_v && fat_r) n_fat++;
  end

  // TBH sequence
  logic [3:0] val [8];
  logic [2:0] dst [8];
  bit tbh_done = 0;
  initial begin
    tbh_reset = 1; tbh_run = 0; tbh_auto = 0; tbh_write = 0; tbh_read = 0;
    tbh_wr_addr = 0; tbh_rd_addr = 0; tbh_wr_data = '0;
    repeat (3) @(negedge clk);
    tbh_reset = 0;
    for (int p = 0; p < 8; p++) begin
      val[p] = 4'(15 - 2 * p);
      dst[p] = 3'(7 - p);
      tbh_write = 1; tbh_wr_addr = 3'(p); tbh_wr_data = '{value: val[p], addr: dst[p]};
      @(negedge clk);
    end
    tbh_write = 0;
    @(negedge clk) tbh_run = 1;
    repeat (25) @(negedge clk);
    tbh_run = 0;                           // pause part-way
    repeat (2) @(negedge clk);
    if (tbh_mon_valid[6] == 0) n_tbh_stop++;
    repeat (10) @(negedge clk);
    tbh_run = 1;
    repeat (80) @(negedge clk);
    tbh_run = 0;
    for (int p = 0; p < 8; p++) begin
      tbh_read = 1; tbh_rd_addr = dst[p];
      #1 check(tbh_rd_data == val[p] && tbh_rd_ready, $sformatf("TBH receive PN %0d", dst[p]));
      if (tbh_rd_ready) n_tbh_read++;
      @(negedge clk);
    end
    tbh_read = 0;
    // auto mode: the same messages again and again
    tbh_auto = 1;
    tbh_reset = 1;
    @(negedge clk) tbh_reset = 0;
    for (int p = 0; p < 8; p++) begin
      tbh_write = 1; tbh_wr_addr = 3'(p); tbh_wr_data = '{value: val[p], addr: dst[p]};
      @(negedge clk);
    end
    tbh_write = 0;
    @(negedge clk) tbh_run = 1;
    repeat (7 * 8 * 3) @(negedge clk);
    tbh_run = 0;
    // more than 8 messages left the root: auto mode resent them
    if (dut.u_tbh.u_in.bit_valid == 8'hff) n_tbh_auto++;
    tbh_done = 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    cfg_init = 1;
    repeat (NPN * 8 + 200) @(negedge clk);
    cfg_init = 0;
    @(negedge clk);
    check(root_ok == 2'b11 && !root_damaged, $sformatf("redundancy initialisation: ok %b damaged %b", root_ok, root_damaged));
    if (root_ok == 2'b11) n_redundancy_init++;
    init_phase = 0;
    wait (d_done && tbh_done);
    repeat (100) @(posedge clk);
    check(n_deliv == TOTAL, $sformatf("%0d messages delivered, expected %0d", n_deliv, TOTAL));
    check(n_contend > 0,      "mechanism: contention at the root SN");
    check(n_grant_change > 0, "mechanism: round-robin change of grant");
    check(n_fat > 0,          "mechanism: transfer on a fat link");
    check(n_qfull > 0,        "mechanism: full transmit queue");
    check(n_rate > 0,         "mechanism: saturated delivery rate");
    check(n_tbh_stop > 0,     "mechanism: TBH run stop");
    check(n_tbh_auto > 0,     "mechanism: TBH auto-mode resend");
    check(n_tbh_read > 0,     "mechanism: TBH receive read");
    check(n_redundancy_init > 0, "mechanism: redundant root initialisation");
    $display("mechanisms: redundancy init %0d, contention %0d, grant changes %0d, fat flits %0d, queue full %0d, rate-checked deliveries %0d, TBH stop %0d, auto %0d, reads %0d",
             n_redundancy_init, n_contend, n_grant_change, n_fat, n_qfull, n_rate, n_tbh_stop, n_tbh_auto, n_tbh_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks + d_checks, failures + d_fail);
    $finish;
  end

  initial begin
    repeat (TOTAL * 8 + NPN * 8 + 6000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + d_checks, failures + d_fail + 1);
    $finish;
  end
endmodule
