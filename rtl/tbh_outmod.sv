// tbh_outmod -- receive PN buffer of the TBH test chip: eight receive PNs on
// the global receive line driven by the root switch (switch 6).
//
// Every bit the root offers while run is high is taken at once.  A modulo-7
// counter frames the serial messages: the first three bits of a message are
// shifted into the 3-bit address buffer (also visible on the monitor pins),
// and the next four bits are shifted straight into the 4-bit register of the
// receive PN that address selects.  Both arrive least significant bit first,
// as the transmit PNs send them.
//
// Read port: with read high, the register selected by rd_addr is driven on
// rd_data and rd_ready tells whether a complete message has been written into
// it since reset.  Otherwise rd_data is zero.  The ready flag is this
// design's reading of the chip's "receive buffer ready" pin.
//
// Timing: one bit per cycle; a register holds its new value in the cycle
// after the seventh bit.  Reset clears all registers and flags.
module tbh_outmod (
  input  logic       clk,
  input  logic       rst,
  input  logic       run,        // RUNINP
  input  logic       s_valid,    // s6v: root switch bit valid
  input  logic       s_bit,      // s6b: root switch bit
  output logic       s_taken,    // s6t: bit taken
  output logic [2:0] adr_mon,    // ADRB: address buffer contents
  input  logic       read,       // READIN
  input  logic [2:0] rd_addr,    // ARIN_B
  output logic [3:0] rd_data,    // DROUT_B
  output logic       rd_ready    // RRDYOUT
);
  import pbs_pkg::*;

  logic [3:0]         rreg [TBH_PNS];
  logic [TBH_PNS-1:0] full;
  logic [2:0]         addr;
  logic [2:0]         cnt;       // bits of the current message received

  assign s_taken = s_valid && run;
  assign adr_mon = addr;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int p = 0; p < TBH_PNS; p++) rreg[p] <= '0;
      full <= '0;
      addr <= '0;
      cnt  <= '0;
    end else if (s_taken) begin
      if (cnt < 3'd3) begin
        addr <= {s_bit, addr[2:1]};
      end else begin
        rreg[addr] <= {s_bit, rreg[addr][3:1]};
      end
      if (cnt == 3'(TBH_MSG_BITS - 1)) begin
        cnt        <= '0;
        full[addr] <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  assign rd_data  = read ? rreg[rd_addr] : 4'd0;
  assign rd_ready = read && full[rd_addr];

endmodule
