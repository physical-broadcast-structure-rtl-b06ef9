// pbs_concentrate_tree -- the concentrate half of a PBS dual tree for a
// broadcast domain H_LEVELS (ALPHA**LEVELS PNs).
//
// Level i (1..LEVELS) holds ALPHA**(LEVELS-i) concentrate SNs; SN j of level
// i serves children j*ALPHA .. j*ALPHA+ALPHA-1 of level i-1, the leaves
// (level 0) being the PN transmit ports.  Messages therefore flow up one
// level at a time, each SN passing one whole message per grant, until the
// root (level LEVELS) delivers them on the root link.
//
// Fat-tree geometry (pbs_pkg::link_width / link_cycles): link l, between
// levels l and l+1, is BASE_W bits wide and takes one cycle per flit below
// FAT_FROM; from FAT_FROM up both width and flit time double per level, so
// every level carries BASE_W bits per cycle.  The root repeats its input
// width and flit time on the root link, as the design's root SN moves each
// flit straight to its transmit buffer.
//
// Redundant root (REDUNDANT_ROOT = 1): the root SN is duplicated, both
// copies fed by the same level LEVELS-1 SNs, and both root links are brought
// out for a pbs_redundant_select at the broadcast root.  During
// initialisation (cfg_init) a child's flit counts as taken if either copy
// takes it, so a copy that misses flits fails the test pattern; afterwards
// the children follow the ready of the copy in use (root_use).
//
// Channels of all levels are kept in flat arrays MSG_W bits wide; a link
// uses only its own low link_width bits.
module pbs_concentrate_tree #(
  parameter int unsigned ALPHA    = 4,
  parameter int unsigned LEVELS   = 5,
  parameter int unsigned BASE_W   = 4,
  parameter int unsigned RM       = 2,
  parameter int unsigned FAT_FROM = 3,
  parameter int unsigned MSG_W    = 32,
  parameter int unsigned REDUNDANT_ROOT = 1,
  localparam int unsigned NR      = (REDUNDANT_ROOT != 0) ? 2 : 1,
  localparam int unsigned NPN     = pbs_pkg::ipow(ALPHA, LEVELS),
  localparam int unsigned ROOT_W  = pbs_pkg::link_width(LEVELS - 1, BASE_W, RM, FAT_FROM)
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        run,
  input  logic [NPN-1:0]              leaf_valid,
  input  logic [NPN-1:0][BASE_W-1:0]  leaf_data,
  output logic [NPN-1:0]              leaf_ready,
  input  logic                        cfg_init,
  input  logic                        root_use,
  output logic [NR-1:0]               root_valid,
  output logic [NR-1:0][ROOT_W-1:0]   root_data,
  input  logic [NR-1:0]               root_ready
);
  import pbs_pkg::*;

  localparam int unsigned NLINK = link_total(ALPHA, LEVELS);

  logic [NLINK-1:0]            lk_valid;
  logic [NLINK-1:0]            lk_ready;
  logic [NLINK-1:0][MSG_W-1:0] lk_data;

  for (genvar p = 0; p < NPN; p++) begin : g_leaf
    assign lk_valid[p]   = leaf_valid[p];
    assign lk_data[p]    = MSG_W'(leaf_data[p]);
    assign leaf_ready[p] = lk_ready[p];
  end

  for (genvar i = 1; i <= LEVELS; i++) begin : g_lvl
    localparam int unsigned NSN   = sns_on_level(i, ALPHA, LEVELS);
    localparam int unsigned IN_W  = link_width(i - 1, BASE_W, RM, FAT_FROM);
    localparam int unsigned OL    = (i == LEVELS) ? LEVELS - 1 : i;
    localparam int unsigned OUT_W = link_width(OL, BASE_W, RM, FAT_FROM);
    localparam int unsigned OCYC  = link_cycles(OL, BASE_W, RM, FAT_FROM);
    localparam int unsigned IB    = link_base(i - 1, ALPHA, LEVELS);

    for (genvar j = 0; j < NSN; j++) begin : g_sn
      logic [ALPHA-1:0]           c_valid, c_ready, c_ready0;
      logic [ALPHA-1:0][IN_W-1:0] c_data;
      logic                       o_valid, o_ready;
      logic [OUT_W-1:0]           o_data;

      for (genvar c = 0; c < ALPHA; c++) begin : g_child
        assign c_valid[c]                = lk_valid[IB + j*ALPHA + c];
        assign c_data[c]                 = lk_data[IB + j*ALPHA + c][IN_W-1:0];
        assign lk_ready[IB + j*ALPHA + c] = c_ready[c];
      end

      pbs_concentrate_sn #(
        .ALPHA(ALPHA), .IN_W(IN_W), .OUT_W(OUT_W), .OUT_CYC(OCYC), .MSG_W(MSG_W)
      ) u_sn (
        .clk, .rst, .run,
        .in_valid(c_valid), .in_data(c_data), .in_ready(c_ready0),
        .out_valid(o_valid), .out_data(o_data), .out_ready(o_ready)
      );

      if (i == LEVELS) begin : g_root
        assign root_valid[0] = o_valid;
        assign root_data[0]  = o_data;
        assign o_ready       = root_ready[0];
        if (REDUNDANT_ROOT != 0) begin : g_spare
          logic [ALPHA-1:0] c_ready1;
          pbs_concentrate_sn #(
            .ALPHA(ALPHA), .IN_W(IN_W), .OUT_W(OUT_W), .OUT_CYC(OCYC), .MSG_W(MSG_W)
          ) u_sn_r (
            .clk, .rst, .run,
            .in_valid(c_valid), .in_data(c_data), .in_ready(c_ready1),
            .out_valid(root_valid[1]), .out_data(root_data[1]), .out_ready(root_ready[1])
          );
          assign c_ready = cfg_init ? (c_ready0 | c_ready1)
                                    : (root_use ? c_ready1 : c_ready0);
        end else begin : g_single
          assign c_ready = c_ready0;
        end
      end else begin : g_up
        localparam int unsigned OB = link_base(i, ALPHA, LEVELS);
        assign c_ready = c_ready0;
        assign lk_valid[OB + j] = o_valid;
        assign lk_data[OB + j]  = MSG_W'(o_data);
        assign o_ready          = lk_ready[OB + j];
      end
    end
  end

endmodule
