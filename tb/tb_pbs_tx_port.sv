// tb_pbs_tx_port -- self-checking test of the PN transmit port.
//
// Random 32-bit messages are offered by the PN side; the flit side is
// reassembled, low flit first, and compared in order with what was
// accepted.  Checks: the queue takes exactly DEPTH messages while the tree
// is stalled and then refuses more; a ready tree receives one flit per
// cycle back to back across messages; random stalls lose nothing.
module tb_pbs_tx_port;
  localparam int MSG_W = 32, FLIT_W = 4, DEPTH = 4, NFL = MSG_W / FLIT_W;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic msg_valid, msg_ready, flit_valid, flit_ready;
  logic [MSG_W-1:0] msg;
  logic [FLIT_W-1:0] flit;

  pbs_tx_port #(.MSG_W(MSG_W), .FLIT_W(FLIT_W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [MSG_W-1:0] sent [$];
  logic [MSG_W-1:0] asm_m;
  int fl = 0, nrx = 0, nflit = 0, t0 = -1, t1 = 0;

  always @(posedge clk) if (!rst) begin
    if (msg_valid && msg_ready) sent.push_back(msg);
    if (flit_valid && flit_ready) begin
      asm_m = MSG_W'({flit, asm_m} >> FLIT_W);
      nflit++;
      if (t0 < 0) t0 = cyc;
      t1 = cyc;
      if (fl == NFL - 1) begin
        fl = 0;
        nrx++;
        check(sent.size() != 0 && sent[0] == asm_m, $sformatf("message %0d: got %h", nrx, asm_m));
        if (sent.size() != 0) void'(sent.pop_front());
      end else fl++;
    end
  end

  int accepted;
  initial begin
    msg_valid = 0; msg = 0; flit_ready = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // fill the queue with the tree stalled
    accepted = 0;
    for (int k = 0; k < DEPTH + 3; k++) begin
      msg_valid = 1; msg = MSG_W'($urandom);
      @(posedge clk);
      if (msg_ready) accepted++;
      @(negedge clk);
    end
    msg_valid = 0;
    check(accepted == DEPTH, $sformatf("queue took %0d messages, expected %0d", accepted, DEPTH));
    check(!msg_ready, "queue full refuses");
    // drain at full rate
    flit_ready = 1;
    wait (nrx == DEPTH);
    check(t1 - t0 == nflit - 1, $sformatf("rate: %0d flits over %0d cycles", nflit, t1 - t0 + 1));
    // random traffic and stalls
    for (int k = 0; k < 600; k++) begin
      @(negedge clk);
      if (!(msg_valid && !msg_ready)) begin
        msg_valid = ($urandom_range(0, 5) == 0);
        msg = MSG_W'($urandom);
      end
      flit_ready = ($urandom_range(0, 3) != 0);
    end
    @(negedge clk) begin msg_valid = 0; flit_ready = 1; end
    repeat (100) @(posedge clk);
    check(sent.size() == 0 && fl == 0, "all accepted messages delivered");
    check(nrx > DEPTH + 40, $sformatf("enough traffic (%0d messages)", nrx));
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
