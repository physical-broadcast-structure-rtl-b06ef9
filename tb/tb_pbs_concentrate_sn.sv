// tb_pbs_concentrate_sn -- self-checking test of one concentrate switch node
// on a fat link (4 children, 4-bit flits in, 8-bit flits out, 2-cycle
// outgoing flit time, 32-bit messages).
//
// Each child sends a queue of messages tagged with its number and a
// sequence number.  The test reassembles messages from the output flits and
// checks that every message arrives whole and unchanged, that messages are
// never interleaved, that with all children loaded the grants go round robin
// starting with the highest child (3,2,1,0,3,...), that a saturated output
// delivers one 8-bit flit every 2 cycles (the fat-tree rate), and that
// integrity holds under random backpressure.
module tb_pbs_concentrate_sn;
  localparam int ALPHA = 4, IN_W = 4, OUT_W = 8, OCYC = 2, MSG_W = 32;
  localparam int NMSG = 6;                 // messages per child per phase
  localparam int IN_FL = MSG_W / IN_W, OUT_FL = MSG_W / OUT_W;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [ALPHA-1:0]           in_valid, in_ready;
  logic [ALPHA-1:0][IN_W-1:0] in_data;
  logic                       out_valid, out_ready;
  logic [OUT_W-1:0]           out_data;

  pbs_concentrate_sn #(.ALPHA(ALPHA), .IN_W(IN_W), .OUT_W(OUT_W), .OUT_CYC(OCYC), .MSG_W(MSG_W)) dut (
    .clk, .rst, .run(1'b1), .in_valid, .in_data, .in_ready, .out_valid, .out_data, .out_ready);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [MSG_W-1:0] mk(input int c, input int s);
    return {4'(c), 12'(s), 16'((c * 7919 + s * 104729) ^ 16'ha5c3)};
  endfunction

  // child senders
  int sent_cnt [ALPHA];     // messages completely sent
  int fl_idx   [ALPHA];     // flit index inside current message
  int quota    [ALPHA];     // messages allowed so far
  always_comb begin
    for (int c = 0; c < ALPHA; c++) begin
      in_valid[c] = (sent_cnt[c] < quota[c]);
      in_data[c]  = IN_W'(mk(c, sent_cnt[c]) >> (fl_idx[c] * IN_W));
    end
  end
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int c = 0; c < ALPHA; c++) begin
        sent_cnt[c] <= 0;
        fl_idx[c]   <= 0;
      end
    end else begin
      for (int c = 0; c < ALPHA; c++)
        if (in_valid[c] && in_ready[c]) begin
          if (fl_idx[c] == IN_FL - 1) begin
            fl_idx[c]   <= 0;
            sent_cnt[c] <= sent_cnt[c] + 1;
          end else fl_idx[c] <= fl_idx[c] + 1;
        end
    end
  end

  // receiver
  logic [MSG_W-1:0] asm_msg;
  int  ofl = 0, nrx = 0, exp_seq [ALPHA];
  int  order [$];
  int  t_first = -1, t_last = 0, cyc = 0, nflits = 0;
  bit  rand_bp = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;
  always_ff @(posedge clk) out_ready <= rand_bp ? ($urandom_range(0, 2) != 0) : 1'b1;

  always @(posedge clk) if (!rst && out_valid && out_ready) begin
    logic [MSG_W-1:0] m;
    m = MSG_W'({out_data, asm_msg} >> OUT_W);
    asm_msg = m;
    nflits++;
    if (t_first < 0) t_first = cyc;
    t_last = cyc;
    if (ofl == OUT_FL - 1) begin
      int c, s;
      c = int'(m[31:28]);
      s = int'(m[27:16]);
      ofl = 0;
      nrx++;
      order.push_back(c);
      check(c < ALPHA && s == exp_seq[c], $sformatf("child %0d seq %0d expected %0d", c, s, exp_seq[c]));
      if (c < ALPHA) begin
        check(m == mk(c, s), $sformatf("message body child %0d seq %0d", c, s));
        exp_seq[c] = s + 1;
      end
    end else ofl++;
  end

  // a new message from another child may only start after a whole one
  int cur_child = -1, in_fl = 0;
  always @(posedge clk) if (!rst) begin
    for (int c = 0; c < ALPHA; c++) if (in_valid[c] && in_ready[c]) begin
      if (in_fl != 0) check(c == cur_child, "grant changed inside a message");
      cur_child = c;
      in_fl = (in_fl + 1) % IN_FL;
    end
  end

  initial begin
    for (int c = 0; c < ALPHA; c++) begin quota[c] = 0; exp_seq[c] = 0; end
    out_ready = 1;
    repeat (3) @(posedge clk);
    // phase 1: all children loaded, no backpressure
    for (int c = 0; c < ALPHA; c++) quota[c] = NMSG;
    @(negedge clk) rst = 0;
    wait (nrx == ALPHA * NMSG);
    for (int k = 0; k < ALPHA * NMSG; k++)
      check(order[k] == ALPHA - 1 - (k % ALPHA), $sformatf("round robin: message %0d from child %0d", k, order[k]));
    check(t_last - t_first == (nflits - 1) * OCYC,
          $sformatf("rate: %0d flits in %0d cycles, expected one per %0d", nflits, t_last - t_first + 1, OCYC));
    // phase 2: uneven load, random backpressure
    rand_bp = 1;
    quota[0] = NMSG + 9; quota[2] = NMSG + 3; quota[3] = NMSG + 1;
    wait (nrx == ALPHA * NMSG + 13);
    repeat (20) @(posedge clk);
    check(nrx == ALPHA * NMSG + 13, "no extra messages");
    for (int c = 0; c < ALPHA; c++) check(exp_seq[c] == quota[c], $sformatf("child %0d delivered all", c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
