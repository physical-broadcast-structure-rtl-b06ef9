// tb_pbs_broadcast_sn -- self-checking test of broadcast switch nodes.
//
// Two nodes are tested, each fed at its input link's rate with random flits:
//   A: 8-bit flits in, 4-bit flits out, 1-cycle outgoing flit time
//      (input one flit per 2 cycles);
//   B: 16-bit flits in, 8-bit flits out, 2-cycle outgoing flit time
//      (input one flit per 4 cycles).
// A scoreboard built from the inputs expects each input flit to leave as
// two parts, low part first, on all four children in the same cycle, the
// first part OUT_CYC+1 cycles after the input flit and the second OUT_CYC
// cycles later.
module tb_pbs_broadcast_sn;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  logic       a_iv;  logic [7:0]  a_id;  logic [3:0] a_ov;  logic [3:0][3:0] a_od;
  logic       b_iv;  logic [15:0] b_id;  logic [3:0] b_ov;  logic [3:0][7:0] b_od;

  pbs_broadcast_sn #(.ALPHA(4), .IN_W(8),  .OUT_W(4), .OUT_CYC(1)) dut_a (
    .clk, .rst, .in_valid(a_iv), .in_data(a_id), .out_valid(a_ov), .out_data(a_od));
  pbs_broadcast_sn #(.ALPHA(4), .IN_W(16), .OUT_W(8), .OUT_CYC(2)) dut_b (
    .clk, .rst, .in_valid(b_iv), .in_data(b_id), .out_valid(b_ov), .out_data(b_od));

  // expected (data, cycle) pairs
  int a_exp_d [$], a_exp_t [$], b_exp_d [$], b_exp_t [$];
  int a_seen = 0, b_seen = 0;

  always @(posedge clk) if (!rst) begin
    if (a_iv) begin
      a_exp_d.push_back(int'(a_id[3:0])); a_exp_t.push_back(cyc + 2);
      a_exp_d.push_back(int'(a_id[7:4])); a_exp_t.push_back(cyc + 3);
    end
    if (b_iv) begin
      b_exp_d.push_back(int'(b_id[7:0]));  b_exp_t.push_back(cyc + 3);
      b_exp_d.push_back(int'(b_id[15:8])); b_exp_t.push_back(cyc + 5);
    end
    if (a_ov != 4'b0000) begin
      checks++;
      if (a_ov != 4'b1111 || a_od[0] != a_od[1] || a_od[0] != a_od[2] || a_od[0] != a_od[3] ||
          a_exp_d.size() == 0 || a_exp_d[0] != int'(a_od[0]) || a_exp_t[0] != cyc) begin
        failures++;
        $display("FAIL A at %0d: valid %b data %h", cyc, a_ov, a_od[0]);
      end
      if (a_exp_d.size() != 0) begin void'(a_exp_d.pop_front()); void'(a_exp_t.pop_front()); end
      a_seen++;
    end
    if (b_ov != 4'b0000) begin
      checks++;
      if (b_ov != 4'b1111 || b_od[0] != b_od[1] || b_od[0] != b_od[2] || b_od[0] != b_od[3] ||
          b_exp_d.size() == 0 || b_exp_d[0] != int'(b_od[0]) || b_exp_t[0] != cyc) begin
        failures++;
        $display("FAIL B at %0d: valid %b data %h", cyc, b_ov, b_od[0]);
      end
      if (b_exp_d.size() != 0) begin void'(b_exp_d.pop_front()); void'(b_exp_t.pop_front()); end
      b_seen++;
    end
  end

  // drivers: a flit every 2 (A) / 4 (B) cycles, with occasional gaps
  initial begin
    a_iv = 0; b_iv = 0; a_id = 0; b_id = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      a_iv = (k % 2 == 0) && (k < 200 || $urandom_range(0, 3) != 0);
      a_id = 8'($urandom);
      b_iv = (k % 4 == 0) && (k < 200 || $urandom_range(0, 3) != 0);
      b_id = 16'($urandom);
    end
    @(negedge clk) begin a_iv = 0; b_iv = 0; end
    repeat (20) @(posedge clk);
    checks++;
    if (a_exp_d.size() != 0 || b_exp_d.size() != 0 || a_seen < 250 || b_seen < 120) begin
      failures++;
      $display("FAIL: leftover A %0d B %0d, seen A %0d B %0d", a_exp_d.size(), b_exp_d.size(), a_seen, b_seen);
    end
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
