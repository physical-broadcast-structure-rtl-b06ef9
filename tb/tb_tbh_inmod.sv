// tb_tbh_inmod -- self-checking test of the TBH transmit PN buffer.
//
// Loads all eight transmit PNs, takes their bits with random taken
// patterns and checks that each PN offers its 7-bit message LSB first
// (address bits, then value bits), that valid drops after the seventh bit,
// and that in auto mode the message is offered again and again.  Also checks
// that reset clears valid.
module tb_tbh_inmod;
  import pbs_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic write, auto_mode;
  logic [2:0] wr_addr;
  tbh_msg_t wr_data;
  logic [7:0] bit_valid, bit_data, bit_taken;

  tbh_inmod dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [6:0] msg [8];
  int nbit [8];

  always @(posedge clk) if (!rst)
    for (int p = 0; p < 8; p++)
      if (bit_valid[p] && bit_taken[p]) begin
        check(bit_data[p] == msg[p][nbit[p] % 7], $sformatf("PN %0d bit %0d", p, nbit[p]));
        nbit[p]++;
      end

  initial begin
    write = 0; auto_mode = 0; wr_addr = 0; wr_data = '0; bit_taken = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    check(bit_valid == 8'h00, "no valid after reset");
    for (int p = 0; p < 8; p++) begin
      msg[p] = 7'($urandom);
      nbit[p] = 0;
      write = 1; wr_addr = 3'(p); wr_data = msg[p];
      @(negedge clk);
    end
    write = 0;
    check(bit_valid == 8'hff, "all valid after loading");
    // take with random pattern until each PN sent 7 bits
    for (int k = 0; k < 200; k++) begin
      for (int p = 0; p < 8; p++) bit_taken[p] = ($urandom_range(0, 1) == 1);
      @(negedge clk);
    end
    bit_taken = 0;
    for (int p = 0; p < 8; p++) check(nbit[p] == 7, $sformatf("PN %0d sent %0d bits", p, nbit[p]));
    check(bit_valid == 8'h00, "valid dropped after 7 bits");
    // auto mode: PN 5 repeats its message
    auto_mode = 1;
    write = 1; wr_addr = 3'd5; msg[5] = 7'h5b; wr_data = msg[5]; nbit[5] = 0;
    @(negedge clk) write = 0;
    bit_taken = 8'h20;
    repeat (7 * 3) @(negedge clk);
    check(nbit[5] == 21, "auto mode sent the message three times");
    check(bit_valid[5], "auto mode keeps valid");
    bit_taken = 0;
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    check(bit_valid == 8'h00, "reset clears valid");
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
