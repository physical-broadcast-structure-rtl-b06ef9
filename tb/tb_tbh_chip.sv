// tb_tbh_chip -- end-to-end test of the TBH test chip, following its
// operating sequence: reset, load the transmit PNs, run, read the receive
// PNs.
//
// Round 1: transmit PN p sends value v_p to receive PN (5*p+3) mod 8 (a
// permutation); after run every receive PN must hold its value with ready
// set.  Round 2 (auto mode): all PNs resend forever; the messages seen on
// the root switch's monitor lines must be shared equally, each transmit PN
// getting one message in eight, as the alternating priority at every switch
// gives.  Then run is dropped and the root must go quiet.
module tb_tbh_chip;
  import pbs_pkg::*;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic run, auto_mode, write, read, rd_ready;
  logic [2:0] wr_addr, rd_addr, adr_mon;
  tbh_msg_t wr_data;
  logic [3:0] rd_data;
  logic [6:0] mon_valid, mon_bit, mon_taken;

  tbh_chip dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // message counter on the switch 6 monitor lines
  logic [6:0] am;
  int rb = 0, per_src [8], nmon = 0;
  logic [3:0] src_of_val [16];
  always @(posedge clk) if (!reset && mon_valid[6] && mon_taken[6]) begin
    am = {mon_bit[6], am[6:1]};
    if (rb == 6) begin
      rb = 0;
      nmon++;
      per_src[src_of_val[am[6:3]]]++;
    end else rb++;
  end

  logic [3:0] val [8];
  logic [2:0] dst [8];

  initial begin
    run = 0; auto_mode = 0; write = 0; read = 0; wr_addr = 0; rd_addr = 0; wr_data = '0;
    for (int p = 0; p < 8; p++) per_src[p] = 0;
    repeat (2) @(negedge clk);
    reset = 0;
    // round 1: load
    for (int p = 0; p < 8; p++) begin
      val[p] = 4'(p * 3 + 1);
      dst[p] = 3'((5 * p + 3) % 8);
      src_of_val[val[p]] = 4'(p);
      write = 1; wr_addr = 3'(p); wr_data = '{value: val[p], addr: dst[p]};
      @(negedge clk);
    end
    write = 0;
    @(negedge clk) run = 1;
    repeat (80) @(negedge clk);
    run = 0;
    check(nmon == 8, $sformatf("8 messages through the root, saw %0d", nmon));
    for (int p = 0; p < 8; p++) begin
      read = 1; rd_addr = dst[p];
      #1 check(rd_data == val[p] && rd_ready, $sformatf("receive PN %0d holds %h ready %b, expected %h", dst[p], rd_data, rd_ready, val[p]));
      @(negedge clk);
    end
    read = 0;
    // round 2: auto mode
    reset = 1;
    @(negedge clk) reset = 0;
    rb = 0;
    for (int p = 0; p < 8; p++) begin
      write = 1; wr_addr = 3'(p); wr_data = '{value: val[p], addr: dst[p]};
      @(negedge clk);
    end
    write = 0; auto_mode = 1;
    for (int p = 0; p < 8; p++) per_src[p] = 0;
    nmon = 0;
    @(negedge clk) run = 1;
    wait (nmon == 80);
    for (int p = 0; p < 8; p++)
      check(per_src[p] >= 9 && per_src[p] <= 11, $sformatf("auto mode: PN %0d sent %0d of 80", p, per_src[p]));
    run = 0;
    @(negedge clk);
    repeat (2) @(negedge clk);
    check(mon_valid[6] == 1'b0, "root quiet after run drops");
    read = 1; rd_addr = dst[2];
    #1 check(rd_data == val[2] && rd_ready, "auto mode keeps delivering");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
