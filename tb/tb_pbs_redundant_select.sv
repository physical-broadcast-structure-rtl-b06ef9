// tb_pbs_redundant_select -- self-checking test of redundant-port selection.
//
// Two ports carry 16-bit flits of 32-bit messages.  Scenario checks:
//  1. after reset port 0 is used and forwarded straight through;
//  2. initialisation with both ports delivering the test pattern marks both
//     OK and port 0 is used;
//  3. initialisation with port 0 corrupt (one flit wrong) marks only port 1
//     OK; afterwards port 1's traffic is forwarded and port 0 is drained;
//  4. initialisation with both corrupt raises damaged and forwards nothing;
//  5. a port that delivers only part of the pattern is not marked OK.
module tb_pbs_redundant_select;
  localparam logic [31:0] PAT = 32'hC3A5_5A3C;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic init, out_valid, out_ready, damaged;
  logic [1:0] in_valid, in_ready, port_ok;
  logic [1:0][15:0] in_data;
  logic [15:0] out_data;
  logic sel;

  pbs_redundant_select #(.NPORT(2), .W(16), .MSG_W(32), .PATTERN(PAT)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // send one message on the given ports (mask), flit by flit
  task automatic send(input logic [1:0] mask, input logic [31:0] m0, input logic [31:0] m1);
    for (int f = 0; f < 2; f++) begin
      @(negedge clk);
      in_valid = mask;
      in_data[0] = 16'(m0 >> (16 * f));
      in_data[1] = 16'(m1 >> (16 * f));
    end
    @(negedge clk) in_valid = 0;
  endtask

  task automatic run_init(input logic [31:0] m0, input logic [31:0] m1, input logic [1:0] mask);
    @(negedge clk) init = 1;
    @(negedge clk);
    send(mask, m0, m1);
    send(mask, m0, m1);
    @(negedge clk) init = 0;
    @(negedge clk);
  endtask

  initial begin
    init = 0; in_valid = 0; in_data = '0; out_ready = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    // 1
    @(negedge clk);
    in_valid = 2'b01; in_data[0] = 16'h1234; in_data[1] = 16'h9999;
    #1 check(out_valid && out_data == 16'h1234 && in_ready[0] && port_ok == 2'b01, "reset: port 0 forwarded");
    out_ready = 0;
    #1 check(!in_ready[0] && in_ready[1], "ready follows the SN on the used port, other drained");
    out_ready = 1;
    @(negedge clk) in_valid = 0;
    // 2
    run_init(PAT, PAT, 2'b11);
    check(port_ok == 2'b11 && !damaged && sel == 1'b0, $sformatf("both pass: ok %b", port_ok));
    // 3
    run_init(PAT ^ 32'h0001_0000, PAT, 2'b11);
    check(port_ok == 2'b10 && !damaged && sel == 1'b1, $sformatf("port 0 corrupt: ok %b", port_ok));
    in_valid = 2'b11; in_data[0] = 16'h0bad; in_data[1] = 16'h600d;
    #1 check(out_valid && out_data == 16'h600d, "port 1 forwarded");
    check(in_ready[0], "unused port 0 drained");
    @(negedge clk) in_valid = 0;
    // 4
    run_init(~PAT, PAT ^ 32'h8000_0000, 2'b11);
    check(port_ok == 2'b00 && damaged, "both corrupt: damaged");
    in_valid = 2'b11;
    #1 check(!out_valid, "damaged: nothing forwarded");
    @(negedge clk) in_valid = 0;
    // 5: port 1 silent during init, port 0 sends only a first half
    @(negedge clk) init = 1;
    @(negedge clk);
    in_valid = 2'b01; in_data[0] = PAT[15:0];
    @(negedge clk) in_valid = 0;
    @(negedge clk) init = 0;
    @(negedge clk);
    check(port_ok == 2'b00 && damaged, "partial pattern does not pass");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
