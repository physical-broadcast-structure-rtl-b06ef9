// tbh_chip -- the TBH ("The Broadcast Hierarchy") test chip: a demonstrator
// of the PBS concentrate tree.
//
// Eight transmit PNs (tbh_inmod) hold one 7-bit message each: a 3-bit
// receive-PN address and a 4-bit value.  While run is high their messages
// contend in a three-level binary concentrate tree (tbh_tmod); the root
// switch sends the winning message, one bit per cycle, on a global receive
// line to eight receive PNs (tbh_outmod), which store each value in the
// register the message addresses.  The chip has no broadcast tree.
//
// Use: reset; load the transmit PNs (write, wr_addr, wr_data, with run
// low); raise run and watch the switch monitor lines and the received
// address; read the receive PNs (read, rd_addr -> rd_data, rd_ready).  With
// auto_mode high the transmit PNs resend their messages forever, so the
// tree runs fully loaded.
//
// This model uses a single clock edge for each PH1/PH2 cycle of the chip's
// two-phase clock, and an active-high synchronous reset.
module tbh_chip (
  input  logic              clk,
  input  logic              reset,       // RESETINP
  input  logic              run,         // RUNINP
  input  logic              auto_mode,   // AUTOINP
  input  logic              write,       // WRITEIN
  input  logic [2:0]        wr_addr,     // ATIN_B
  input  pbs_pkg::tbh_msg_t wr_data,     // DTIN_B
  input  logic              read,        // READIN
  input  logic [2:0]        rd_addr,     // ARIN_B
  output logic [3:0]        rd_data,     // DROUT_B
  output logic              rd_ready,    // RRDYOUT
  output logic [2:0]        adr_mon,     // ADRB
  output logic [6:0]        mon_valid,   // SxVP
  output logic [6:0]        mon_bit,     // SxBP
  output logic [6:0]        mon_taken    // SxTP
);
  logic [7:0] pn_valid, pn_bit, pn_taken;
  logic       s6v, s6b, s6t;

  tbh_inmod u_in (
    .clk, .rst(reset), .write, .wr_addr, .wr_data, .auto_mode,
    .bit_valid(pn_valid), .bit_data(pn_bit), .bit_taken(pn_taken)
  );

  tbh_tmod u_t (
    .clk, .rst(reset), .run,
    .pn_valid, .pn_bit, .pn_taken,
    .s6v, .s6b, .s6t,
    .mon_valid, .mon_bit, .mon_taken
  );

  tbh_outmod u_out (
    .clk, .rst(reset), .run,
    .s_valid(s6v), .s_bit(s6b), .s_taken(s6t),
    .adr_mon, .read, .rd_addr, .rd_data, .rd_ready
  );

endmodule
