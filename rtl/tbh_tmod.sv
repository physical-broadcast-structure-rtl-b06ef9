// tbh_tmod -- interconnect of the TBH test chip: a three-level binary
// concentrate tree of seven switches feeding the global receive line.
//
// Switches 0..3 form the bottom level, switch k serving transmit PNs 2k
// (low child) and 2k+1 (high child); switches 4 and 5 serve switches 0,1
// and 2,3; switch 6 is the root and drives the global receive line.  Each
// switch is a pbs_concentrate_sn with two children, one-bit flits and 7-bit
// messages: one-bit receive and transmit buffers and the alternating "one
// high then one low" message priority.  The tree sustains one bit per cycle.
//
// Every switch output is qualified by run, while switch inputs are not, so
// when run drops the tree finishes the bit in flight and stops; messages may
// then be part-way up the tree.
//
// The valid, bit and taken lines of every switch output are brought out as
// the chip's monitor lines (index = switch address).  mon_taken[6] is the
// receive side's taken (s6t) looped straight back out: the root's taken line
// comes from outside the tree, so that output has no logic of its own.
module tbh_tmod (
  input  logic       clk,
  input  logic       rst,
  input  logic       run,
  input  logic [7:0] pn_valid,
  input  logic [7:0] pn_bit,
  output logic [7:0] pn_taken,
  output logic       s6v,
  output logic       s6b,
  input  logic       s6t,
  output logic [6:0] mon_valid,
  output logic [6:0] mon_bit,
  output logic [6:0] mon_taken
);
  logic [6:0] sv, sb, st;

  // Bottom level: switches 0..3 on the transmit PNs.
  for (genvar k = 0; k < 4; k++) begin : g_l1
    logic [1:0] tk;
    pbs_concentrate_sn #(.ALPHA(2), .IN_W(1), .OUT_W(1), .OUT_CYC(1), .MSG_W(7)) u_sw (
      .clk, .rst, .run,
      .in_valid(pn_valid[2*k +: 2]), .in_data(pn_bit[2*k +: 2]), .in_ready(tk),
      .out_valid(sv[k]), .out_data(sb[k]), .out_ready(st[k])
    );
    assign pn_taken[2*k +: 2] = tk;
  end

  // Second level: switch 4 on switches 0,1; switch 5 on switches 2,3.
  for (genvar k = 0; k < 2; k++) begin : g_l2
    logic [1:0] tk;
    pbs_concentrate_sn #(.ALPHA(2), .IN_W(1), .OUT_W(1), .OUT_CYC(1), .MSG_W(7)) u_sw (
      .clk, .rst, .run,
      .in_valid(sv[2*k +: 2]), .in_data(sb[2*k +: 2]), .in_ready(tk),
      .out_valid(sv[4+k]), .out_data(sb[4+k]), .out_ready(st[4+k])
    );
    assign st[2*k +: 2] = tk;
  end

  // Root: switch 6 on switches 4,5.
  logic [1:0] tk6;
  pbs_concentrate_sn #(.ALPHA(2), .IN_W(1), .OUT_W(1), .OUT_CYC(1), .MSG_W(7)) u_sw6 (
    .clk, .rst, .run,
    .in_valid(sv[5:4]), .in_data(sb[5:4]), .in_ready(tk6),
    .out_valid(sv[6]), .out_data(sb[6]), .out_ready(st[6])
  );
  assign st[5:4] = tk6;
  assign st[6]   = s6t;

  assign s6v       = sv[6];
  assign s6b       = sb[6];
  assign mon_valid = sv;
  assign mon_bit   = sb;
  assign mon_taken = st;

endmodule
