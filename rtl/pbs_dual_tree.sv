// pbs_dual_tree -- one PBS broadcast domain H_LEVELS: every message sent by
// any of its ALPHA**LEVELS processing nodes (PNs) is delivered to all of them.
//
// The domain is a dual tree.  Each PN's transmit port (pbs_tx_port) is a
// leaf of the concentrate tree, which funnels messages up to its root,
// resolving contention message by message in every SN.  The concentrate
// root hands each flit over the root link to the broadcast root, and the
// broadcast tree copies it down to every PN's receive port (pbs_rx_port).
// Messages carry no destination address: each PN receives every message of
// the domain and keeps the ones its CNs listen to.
//
// Redundancy (REDUNDANT_ROOT = 1): the concentrate root SN, whose loss
// would silence the whole domain, is duplicated and the broadcast root takes
// its input through pbs_redundant_select.  Raising cfg_init starts the
// global initialisation: every PN should then send the test pattern
// message; each root copy that delivers it intact is marked OK (root_ok),
// and after cfg_init falls the first OK copy is used.  root_damaged is
// raised if neither passed.
//
// Interface: per PN, a message input with valid/ready (the PN's queue
// accepts while it has room) and a message output that pulses msg_valid
// for one cycle per delivered message, in the same cycle at all PNs.
//
// Throughput: BASE_W bits per cycle at every level, i.e. one MSG_W-bit
// message every MSG_W/BASE_W cycles for the whole domain.  With the default
// 4-bit PBS and 32-bit messages that is one message per 8 cycles, so the
// target of one message per 100 ns needs a clock period (one bottom-level
// flit time) of 12.5 ns or less.
module pbs_dual_tree #(
  parameter int unsigned ALPHA    = 4,   // branching ratio
  parameter int unsigned LEVELS   = 5,   // domain level h: H_5 = 1024 PNs
  parameter int unsigned BASE_W   = 4,   // bottom-level flit width (4-bit PBS)
  parameter int unsigned RM       = 2,   // multiplexing ratio r_m
  parameter int unsigned FAT_FROM = 3,   // lowest fat link (L_{3,4})
  parameter int unsigned MSG_W    = 32,  // uniform message size
  parameter int unsigned TXQ      = 4,   // PN transmit queue depth
  parameter int unsigned REDUNDANT_ROOT = 1,  // duplicate the concentrate root
  localparam int unsigned NPN     = pbs_pkg::ipow(ALPHA, LEVELS)
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       cfg_init,
  output logic [1:0]                 root_ok,
  output logic                       root_damaged,
  input  logic [NPN-1:0]             tx_valid,
  input  logic [NPN-1:0][MSG_W-1:0]  tx_msg,
  output logic [NPN-1:0]             tx_ready,
  output logic [NPN-1:0]             rx_valid,
  output logic [NPN-1:0][MSG_W-1:0]  rx_msg
);
  import pbs_pkg::*;

  localparam int unsigned ROOT_W = link_width(LEVELS - 1, BASE_W, RM, FAT_FROM);

  logic [NPN-1:0]             up_valid, up_ready, dn_valid;
  logic [NPN-1:0][BASE_W-1:0] up_data, dn_data;
  localparam int unsigned NR = (REDUNDANT_ROOT != 0) ? 2 : 1;

  logic [NR-1:0]              cr_valid, cr_ready;
  logic [NR-1:0][ROOT_W-1:0]  cr_data;
  logic                       root_valid;
  logic [ROOT_W-1:0]          root_data;
  logic                       root_sel;    // root copy in use

  for (genvar p = 0; p < NPN; p++) begin : g_pn
    pbs_tx_port #(.MSG_W(MSG_W), .FLIT_W(BASE_W), .DEPTH(TXQ)) u_tx (
      .clk, .rst,
      .msg_valid(tx_valid[p]), .msg(tx_msg[p]), .msg_ready(tx_ready[p]),
      .flit_valid(up_valid[p]), .flit(up_data[p]), .flit_ready(up_ready[p])
    );
    pbs_rx_port #(.MSG_W(MSG_W), .FLIT_W(BASE_W)) u_rx (
      .clk, .rst,
      .flit_valid(dn_valid[p]), .flit(dn_data[p]),
      .msg_valid(rx_valid[p]), .msg(rx_msg[p])
    );
  end

  pbs_concentrate_tree #(
    .ALPHA(ALPHA), .LEVELS(LEVELS), .BASE_W(BASE_W), .RM(RM),
    .FAT_FROM(FAT_FROM), .MSG_W(MSG_W), .REDUNDANT_ROOT(REDUNDANT_ROOT)
  ) u_ctree (
    .clk, .rst, .run(1'b1), .cfg_init, .root_use(root_sel),
    .leaf_valid(up_valid), .leaf_data(up_data), .leaf_ready(up_ready),
    .root_valid(cr_valid), .root_data(cr_data), .root_ready(cr_ready)
  );

  if (REDUNDANT_ROOT != 0) begin : g_red
    pbs_redundant_select #(.NPORT(2), .W(ROOT_W), .MSG_W(MSG_W)) u_sel (
      .clk, .rst, .init(cfg_init),
      .in_valid(cr_valid), .in_data(cr_data), .in_ready(cr_ready),
      .out_valid(root_valid), .out_data(root_data), .out_ready(1'b1),
      .port_ok(root_ok), .damaged(root_damaged), .sel(root_sel)
    );
  end else begin : g_single
    assign root_valid   = cr_valid[0];
    assign root_data    = cr_data[0];
    assign cr_ready     = 1'b1;
    assign root_ok      = 2'b01;
    assign root_damaged = 1'b0;
    assign root_sel     = 1'b0;
  end

  pbs_broadcast_tree #(
    .ALPHA(ALPHA), .LEVELS(LEVELS), .BASE_W(BASE_W), .RM(RM),
    .FAT_FROM(FAT_FROM), .MSG_W(MSG_W)
  ) u_btree (
    .clk, .rst,
    .root_valid(root_valid), .root_data(root_data),
    .leaf_valid(dn_valid), .leaf_data(dn_data)
  );

endmodule
