// tb_ctree_harness -- drives one pbs_concentrate_tree configuration for
// tb_pbs_concentrate_tree and checks what leaves its root.
//
// Every leaf sends NMSG 32-bit messages tagged {leaf, sequence, hash}.  The
// root output is reassembled (low flit first) and each message must arrive
// whole, exactly once, and in sequence for its leaf.  While all leaves are
// still loaded the root must deliver one root flit every ROOT_CYC cycles,
// i.e. BASE_W bits per cycle, the rate the fat tree is built to keep.
module tb_ctree_harness #(
  parameter int ALPHA = 2, LEVELS = 3, BASE_W = 1, FAT_FROM = 1, NMSG = 3, RED = 0
) (
  input  logic clk,
  input  logic rst,
  output bit   done,
  output int   checks,
  output int   failures
);
  import pbs_pkg::*;
  localparam int MSG_W    = 32;
  localparam int NPN      = int'(ipow(ALPHA, LEVELS));
  localparam int ROOT_W   = int'(link_width(LEVELS - 1, BASE_W, 2, FAT_FROM));
  localparam int ROOT_CYC = int'(link_cycles(LEVELS - 1, BASE_W, 2, FAT_FROM));
  localparam int LEAF_FL  = MSG_W / BASE_W, ROOT_FL = MSG_W / ROOT_W;

  logic [NPN-1:0]             lv, lr;
  logic [NPN-1:0][BASE_W-1:0] ld;
  localparam int NR = (RED != 0) ? 2 : 1;
  logic [NR-1:0]              rv_all;
  logic [NR-1:0][ROOT_W-1:0]  rd_all;
  logic                       rv;
  logic [ROOT_W-1:0]          rd;
  assign rv = rv_all[0];
  assign rd = rd_all[0];

  pbs_concentrate_tree #(.ALPHA(ALPHA), .LEVELS(LEVELS), .BASE_W(BASE_W), .RM(2),
                         .FAT_FROM(FAT_FROM), .MSG_W(MSG_W), .REDUNDANT_ROOT(RED)) dut (
    .clk, .rst, .run(1'b1), .cfg_init(1'b0), .root_use(1'b0),
    .leaf_valid(lv), .leaf_data(ld), .leaf_ready(lr),
    .root_valid(rv_all), .root_data(rd_all), .root_ready('1));

  function automatic logic [MSG_W-1:0] mk(input int p, input int s);
    return {8'(p), 8'(s), 16'((p * 31 + s * 977) ^ 16'h3c5a)};
  endfunction

  int sent [NPN];
  int fi   [NPN];
  always_comb
    for (int p = 0; p < NPN; p++) begin
      lv[p] = (sent[p] < NMSG);
      ld[p] = BASE_W'(mk(p, sent[p]) >> (fi[p] * BASE_W));
    end
  always_ff @(posedge clk)
    if (rst) begin
      for (int p = 0; p < NPN; p++) begin sent[p] <= 0; fi[p] <= 0; end
    end else begin
      for (int p = 0; p < NPN; p++)
        if (lv[p] && lr[p]) begin
          if (fi[p] == LEAF_FL - 1) begin fi[p] <= 0; sent[p] <= sent[p] + 1; end
          else fi[p] <= fi[p] + 1;
        end
    end

  int cyc = 0, nrx = 0, rfl = 0, prev_t = -1, rate_bad = 0, rate_n = 0;
  int exp_seq [NPN];
  logic [MSG_W-1:0] am;
  always_ff @(posedge clk) cyc <= cyc + 1;

  initial begin
    checks = 0; failures = 0; done = 0;
    for (int p = 0; p < NPN; p++) exp_seq[p] = 0;
  end

  always @(posedge clk) if (!rst && rv) begin
    am = MSG_W'({rd, am} >> ROOT_W);
    // rate while every leaf still has messages waiting
    if (prev_t >= 0 && nrx < NPN * NMSG - NPN) begin
      rate_n++;
      if (cyc - prev_t != ROOT_CYC) rate_bad++;
    end
    prev_t = cyc;
    if (rfl == ROOT_FL - 1) begin
      int p, s;
      rfl = 0;
      nrx++;
      p = int'(am[31:24]);
      s = int'(am[23:16]);
      checks++;
      if (p >= NPN || s != exp_seq[p] || am != mk(p, s)) begin
        failures++;
        $display("FAIL ctree(%0d,%0d): message %h", ALPHA, LEVELS, am);
      end else exp_seq[p] = s + 1;
      if (nrx == NPN * NMSG) begin
        checks++;
        if (rate_bad != 0 || rate_n == 0) begin
          failures++;
          $display("FAIL ctree(%0d,%0d): %0d of %0d root flits off the %0d-cycle rate",
                   ALPHA, LEVELS, rate_bad, rate_n, ROOT_CYC);
        end
        done = 1;
      end
    end else rfl++;
  end
endmodule
