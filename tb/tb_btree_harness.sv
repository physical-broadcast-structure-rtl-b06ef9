// tb_btree_harness -- drives one pbs_broadcast_tree configuration for
// tb_pbs_broadcast_tree.  Random 32-bit messages are fed into the root at
// the root link's rate (one root flit per ROOT_CYC cycles, with random idle
// slots).  Every leaf reassembles its flits (low first); each message must
// reach all leaves, in the same cycle, unchanged and in order.
module tb_btree_harness #(
  parameter int ALPHA = 4, LEVELS = 3, BASE_W = 4, FAT_FROM = 1, NMSG = 20
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

  logic                       rv;
  logic [ROOT_W-1:0]          rd;
  logic [NPN-1:0]             lv;
  logic [NPN-1:0][BASE_W-1:0] ld;

  pbs_broadcast_tree #(.ALPHA(ALPHA), .LEVELS(LEVELS), .BASE_W(BASE_W), .RM(2),
                       .FAT_FROM(FAT_FROM), .MSG_W(MSG_W)) dut (
    .clk, .rst, .root_valid(rv), .root_data(rd), .leaf_valid(lv), .leaf_data(ld));

  logic [MSG_W-1:0] msgs [NMSG];
  logic [MSG_W-1:0] am [NPN];
  int lfl = 0, nrx = 0;

  initial begin
    checks = 0; failures = 0; done = 0;
    for (int k = 0; k < NMSG; k++) msgs[k] = MSG_W'($urandom);
    rv = 0; rd = '0;
    wait (!rst);
    for (int k = 0; k < NMSG; k++)
      for (int f = 0; f < ROOT_FL; f++) begin
        if (k > NMSG / 2 && $urandom_range(0, 2) == 0)
          repeat (ROOT_CYC) @(negedge clk);      // an idle root flit slot
        @(negedge clk);
        rv = 1;
        rd = ROOT_W'(msgs[k] >> (f * ROOT_W));
        @(negedge clk) rv = 0;
        if (ROOT_CYC > 2) repeat (ROOT_CYC - 2) @(negedge clk);
      end
  end

  always @(posedge clk) if (!rst && lv != '0) begin
    checks++;
    if (lv != '1) begin failures++; $display("FAIL btree: leaves not in step %b", lv); end
    for (int p = 0; p < NPN; p++) am[p] = MSG_W'({ld[p], am[p]} >> BASE_W);
    if (lfl == LEAF_FL - 1) begin
      lfl = 0;
      for (int p = 0; p < NPN; p++) begin
        checks++;
        if (am[p] != msgs[nrx]) begin
          failures++;
          $display("FAIL btree: leaf %0d message %0d got %h expected %h", p, nrx, am[p], msgs[nrx]);
        end
      end
      nrx++;
      if (nrx == NMSG) done = 1;
    end else lfl++;
  end
endmodule
