// pbs_broadcast_tree -- the broadcast half of a PBS dual tree for a
// broadcast domain H_LEVELS (ALPHA**LEVELS PNs).
//
// The root SN (level LEVELS) takes flits from the concentrate root over the
// root link; every SN copies each flit it sends to all ALPHA children, so a
// message entering the root reaches all ALPHA**LEVELS PN receive ports.
// Going down a fat link the SN splits each flit into r_m narrower flits, so
// flits shrink on the way down as they grew on the way up (see
// pbs_concentrate_tree for the link geometry).
//
// There is no flow control in this tree: all levels carry the same bit rate
// and every leaf sees every flit in the same cycle.
module pbs_broadcast_tree #(
  parameter int unsigned ALPHA    = 4,
  parameter int unsigned LEVELS   = 5,
  parameter int unsigned BASE_W   = 4,
  parameter int unsigned RM       = 2,
  parameter int unsigned FAT_FROM = 3,
  parameter int unsigned MSG_W    = 32,
  localparam int unsigned NPN     = pbs_pkg::ipow(ALPHA, LEVELS),
  localparam int unsigned ROOT_W  = pbs_pkg::link_width(LEVELS - 1, BASE_W, RM, FAT_FROM)
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        root_valid,
  input  logic [ROOT_W-1:0]           root_data,
  output logic [NPN-1:0]              leaf_valid,
  output logic [NPN-1:0][BASE_W-1:0]  leaf_data
);
  import pbs_pkg::*;

  localparam int unsigned NLINK = link_total(ALPHA, LEVELS);

  logic [NLINK-1:0]            lk_valid;
  logic [NLINK-1:0][MSG_W-1:0] lk_data;

  for (genvar p = 0; p < NPN; p++) begin : g_leaf
    assign leaf_valid[p] = lk_valid[p];
    assign leaf_data[p]  = lk_data[p][BASE_W-1:0];
  end

  for (genvar i = 1; i <= LEVELS; i++) begin : g_lvl
    localparam int unsigned NSN   = sns_on_level(i, ALPHA, LEVELS);
    localparam int unsigned IL    = (i == LEVELS) ? LEVELS - 1 : i;
    localparam int unsigned IN_W  = link_width(IL, BASE_W, RM, FAT_FROM);
    localparam int unsigned OUT_W = link_width(i - 1, BASE_W, RM, FAT_FROM);
    localparam int unsigned OCYC  = link_cycles(i - 1, BASE_W, RM, FAT_FROM);
    localparam int unsigned OB    = link_base(i - 1, ALPHA, LEVELS);

    for (genvar j = 0; j < NSN; j++) begin : g_sn
      logic                        i_valid;
      logic [IN_W-1:0]             i_data;
      logic [ALPHA-1:0]            o_valid;
      logic [ALPHA-1:0][OUT_W-1:0] o_data;

      if (i == LEVELS) begin : g_root
        assign i_valid = root_valid;
        assign i_data  = root_data;
      end else begin : g_down
        localparam int unsigned IB = link_base(i, ALPHA, LEVELS);
        assign i_valid = lk_valid[IB + j];
        assign i_data  = lk_data[IB + j][IN_W-1:0];
      end

      pbs_broadcast_sn #(
        .ALPHA(ALPHA), .IN_W(IN_W), .OUT_W(OUT_W), .OUT_CYC(OCYC)
      ) u_sn (
        .clk, .rst,
        .in_valid(i_valid), .in_data(i_data),
        .out_valid(o_valid), .out_data(o_data)
      );

      for (genvar c = 0; c < ALPHA; c++) begin : g_child
        assign lk_valid[OB + j*ALPHA + c] = o_valid[c];
        assign lk_data[OB + j*ALPHA + c]  = MSG_W'(o_data[c]);
      end
    end
  end

endmodule
