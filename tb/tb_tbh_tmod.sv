// tb_tbh_tmod -- self-checking test of the TBH concentrate tree.
//
// Eight transmit-PN models (shift register, bit counter, valid/taken) each
// load one 7-bit message.  Checks:
//  * every message leaves the root whole;
//  * the order follows from each switch alternating between its children,
//    high child first: PNs 7,3,5,1,6,2,4,0;
//  * the root sustains one bit per cycle: 56 bits in 56 consecutive cycles;
//  * when run drops, the root stops the next cycle and nothing is lost;
//  * the monitor lines of switch 6 equal the global receive line.
module tb_tbh_tmod;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic run;
  logic [7:0] pn_valid, pn_bit, pn_taken;
  logic s6v, s6b, s6t;
  logic [6:0] mon_valid, mon_bit, mon_taken;

  tbh_tmod dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // transmit PN models: message = {value = PN + 8*round, address = PN}
  logic [6:0] m [8];
  int nb [8];
  always_comb
    for (int p = 0; p < 8; p++) begin
      pn_valid[p] = (nb[p] < 7);
      pn_bit[p]   = m[p][nb[p] % 7];
    end
  always_ff @(posedge clk)
    if (!rst) for (int p = 0; p < 8; p++) if (pn_valid[p] && pn_taken[p]) nb[p] <= nb[p] + 1;

  assign s6t = s6v;     // receive PNs always take

  logic [6:0] am;
  int rb = 0, t0 = -1, t1 = 0, nbits = 0;
  int order [$];
  always @(posedge clk) if (!rst && s6v) begin
    check(mon_valid[6] && mon_bit[6] == s6b && mon_taken[6], "switch 6 monitor lines");
    am = {s6b, am[6:1]};
    nbits++;
    if (t0 < 0) t0 = cyc;
    t1 = cyc;
    if (rb == 6) begin
      rb = 0;
      order.push_back(int'(am[2:0]));
      check(am == m[am[2:0]], $sformatf("message from PN %0d intact", am[2:0]));
    end else rb++;
  end

  localparam int EXP [8] = '{7, 3, 5, 1, 6, 2, 4, 0};

  initial begin
    run = 0;
    for (int p = 0; p < 8; p++) begin m[p] = {4'(p + 5), 3'(p)}; nb[p] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (3) @(negedge clk);
    check(!s6v, "nothing leaves the root while run is low");
    run = 1;
    wait (order.size() == 8);
    for (int k = 0; k < 8; k++) check(order[k] == EXP[k], $sformatf("order[%0d] = %0d, expected %0d", k, order[k], EXP[k]));
    check(nbits == 56 && t1 - t0 == 55, $sformatf("%0d bits in %0d cycles", nbits, t1 - t0 + 1));
    // second round with run pulsed low in the middle
    @(negedge clk);
    for (int p = 0; p < 8; p++) begin m[p] = {4'(15 - p), 3'(p)}; nb[p] = 0; end
    order.delete();
    repeat (20) @(negedge clk);
    run = 0;
    @(negedge clk);
    check(!s6v, "root stops when run drops");
    repeat (10) @(negedge clk);
    check(!s6v, "root stays stopped");
    run = 1;
    wait (order.size() == 8);
    repeat (10) @(negedge clk);
    check(order.size() == 8, "exactly eight messages after restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
