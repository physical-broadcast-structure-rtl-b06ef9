// pbs_top -- a Physical Broadcast Structure broadcast domain and the TBH
// test chip, side by side.
//
// u_domain is the design's main configuration: an H_5 domain of 1024 PNs
// (branching ratio 4), a 4-bit PBS (4-bit bottom-level flits) carrying
// uniform 32-bit messages, with fat-tree throughput maintenance (doubling
// flit width and flit time per level) from link L_{3,4} upward.  Its PN
// transmit and receive ports are brought out; the PNs themselves are
// outside this design.
//
// u_tbh is the TBH test chip: the concentrate half of an H_3 domain with
// branching ratio 2, bit-serial, between eight transmit and eight receive
// PN registers.  Its pins are brought out with a tbh_ prefix.
//
// The domain's concentrate root is duplicated (cfg_init runs the
// redundancy initialisation, root_ok/root_damaged report its result).
//
// Both parts share the clock; each has its own reset.
module pbs_top #(
  parameter int unsigned ALPHA    = 4,
  parameter int unsigned LEVELS   = 5,
  parameter int unsigned BASE_W   = 4,
  parameter int unsigned RM       = 2,
  parameter int unsigned FAT_FROM = 3,
  parameter int unsigned MSG_W    = 32,
  parameter int unsigned TXQ      = 4,
  parameter int unsigned REDUNDANT_ROOT = 1,
  localparam int unsigned NPN     = pbs_pkg::ipow(ALPHA, LEVELS)
) (
  input  logic                       clk,
  // PBS broadcast domain
  input  logic                       rst,
  input  logic                       cfg_init,
  output logic [1:0]                 root_ok,
  output logic                       root_damaged,
  input  logic [NPN-1:0]             tx_valid,
  input  logic [NPN-1:0][MSG_W-1:0]  tx_msg,
  output logic [NPN-1:0]             tx_ready,
  output logic [NPN-1:0]             rx_valid,
  output logic [NPN-1:0][MSG_W-1:0]  rx_msg,
  // TBH test chip
  input  logic                       tbh_reset,
  input  logic                       tbh_run,
  input  logic                       tbh_auto,
  input  logic                       tbh_write,
  input  logic [2:0]                 tbh_wr_addr,
  input  pbs_pkg::tbh_msg_t          tbh_wr_data,
  input  logic                       tbh_read,
  input  logic [2:0]                 tbh_rd_addr,
  output logic [3:0]                 tbh_rd_data,
  output logic                       tbh_rd_ready,
  output logic [2:0]                 tbh_adr_mon,
  output logic [6:0]                 tbh_mon_valid,
  output logic [6:0]                 tbh_mon_bit,
  output logic [6:0]                 tbh_mon_taken
);

  pbs_dual_tree #(
    .ALPHA(ALPHA), .LEVELS(LEVELS), .BASE_W(BASE_W), .RM(RM),
    .FAT_FROM(FAT_FROM), .MSG_W(MSG_W), .TXQ(TXQ), .REDUNDANT_ROOT(REDUNDANT_ROOT)
  ) u_domain (
    .clk, .rst, .cfg_init, .root_ok, .root_damaged, .tx_valid, .tx_msg, .tx_ready, .rx_valid, .rx_msg
  );

  tbh_chip u_tbh (
    .clk, .reset(tbh_reset), .run(tbh_run), .auto_mode(tbh_auto),
    .write(tbh_write), .wr_addr(tbh_wr_addr), .wr_data(tbh_wr_data),
    .read(tbh_read), .rd_addr(tbh_rd_addr), .rd_data(tbh_rd_data),
    .rd_ready(tbh_rd_ready), .adr_mon(tbh_adr_mon),
    .mon_valid(tbh_mon_valid), .mon_bit(tbh_mon_bit), .mon_taken(tbh_mon_taken)
  );

endmodule
