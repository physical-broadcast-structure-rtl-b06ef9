// tb_tbh_outmod -- self-checking test of the TBH receive PN buffer.
//
// Sends serial 7-bit messages (address LSB first, then value LSB first) with
// gaps and run pauses, then reads every receive PN and checks its value and
// ready flag against a reference array.  Also checks the address monitor
// pins, that nothing is taken while run is low, and that read low gives 0.
module tb_tbh_outmod;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic run, s_valid, s_bit, s_taken, read, rd_ready;
  logic [2:0] adr_mon, rd_addr;
  logic [3:0] rd_data;

  tbh_outmod dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [3:0] ref_v [8];
  bit         ref_f [8];

  task automatic send(input logic [2:0] a, input logic [3:0] v);
    logic [6:0] m;
    m = {v, a};
    for (int b = 0; b < 7; b++) begin
      if ($urandom_range(0, 3) == 0) begin
        s_valid = 0; @(negedge clk);
      end
      if ($urandom_range(0, 5) == 0) begin       // run paused: nothing taken
        run = 0; s_valid = 1; s_bit = m[b];
        #1 check(!s_taken, "taken while run low");
        @(negedge clk);
        run = 1;
      end
      s_valid = 1; s_bit = m[b];
      #1 check(s_taken, "bit taken");
      @(negedge clk);
      if (b == 2) check(adr_mon == a, "address monitor");
    end
    s_valid = 0;
    ref_v[a] = v; ref_f[a] = 1;
  endtask

  initial begin
    run = 1; s_valid = 0; s_bit = 0; read = 0; rd_addr = 0;
    for (int p = 0; p < 8; p++) begin ref_v[p] = 0; ref_f[p] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int k = 0; k < 20; k++) send(3'($urandom_range(0, 6)), 4'($urandom));
    @(negedge clk);
    for (int p = 0; p < 8; p++) begin
      read = 1; rd_addr = 3'(p);
      #1 check(rd_data == ref_v[p] && rd_ready == ref_f[p],
               $sformatf("receive PN %0d: %h/%b expected %h/%b", p, rd_data, rd_ready, ref_v[p], ref_f[p]));
      @(negedge clk);
    end
    read = 0;
    #1 check(rd_data == 0 && !rd_ready, "no read, no data");
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
