// tb_pbs_rx_port -- self-checking test of the PN receive port.
//
// Random messages are sent as eight 4-bit flits, low flit first, with
// random idle cycles between flits; each must come out whole, one cycle
// after its last flit, as a single-cycle msg_valid pulse.
module tb_pbs_rx_port;
  localparam int MSG_W = 32, FLIT_W = 4, NFL = MSG_W / FLIT_W;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic flit_valid, msg_valid;
  logic [FLIT_W-1:0] flit;
  logic [MSG_W-1:0] msg;

  pbs_rx_port #(.MSG_W(MSG_W), .FLIT_W(FLIT_W)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  logic [MSG_W-1:0] exp_m [$];
  int exp_t [$];
  int nrx = 0;

  always @(posedge clk) if (!rst && msg_valid) begin
    checks++;
    nrx++;
    if (exp_m.size() == 0 || exp_m[0] != msg || exp_t[0] != cyc) begin
      failures++;
      $display("FAIL at %0d: got %h", cyc, msg);
    end
    if (exp_m.size() != 0) begin void'(exp_m.pop_front()); void'(exp_t.pop_front()); end
  end

  initial begin
    logic [MSG_W-1:0] m;
    flit_valid = 0; flit = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int k = 0; k < 60; k++) begin
      m = MSG_W'($urandom);
      for (int f = 0; f < NFL; f++) begin
        @(negedge clk);
        flit_valid = 1;
        flit = FLIT_W'(m >> (f * FLIT_W));
        if (f == NFL - 1) begin exp_m.push_back(m); exp_t.push_back(cyc + 1); end
        if (k >= 30 && $urandom_range(0, 2) == 0) begin
          @(negedge clk) flit_valid = 0;
        end
      end
    end
    @(negedge clk) flit_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (nrx != 60 || exp_m.size() != 0) begin failures++; $display("FAIL: %0d messages", nrx); end
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
