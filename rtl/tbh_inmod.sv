// tbh_inmod -- transmit PN buffer of the TBH test chip: eight transmit PNs
// that feed the bottom switches of the concentrate tree.
//
// Each transmit PN is a 7-bit register holding one message (receive PN
// address in bits 2:0, value in bits 6:3), a counter of bits sent (0..6) and
// a control that drives the PN's Valid/Bit/Taken handshake.  Loading a
// register (write with wr_addr selecting the PN) clears its counter and
// raises its valid line; valid does not depend on run.  Bit 0 is on the bit
// line; each taken shifts the register one place towards bit 0 and
// recirculates bit 0 into bit 6, so after seven bits the register again
// holds the message.  After the seventh bit valid drops, unless auto is set:
// then the same message is queued again at once (used to exercise the
// priority scheme).
//
// Timing: one clock edge here stands for the chip's PH1/PH2 pair; a bit is
// taken in a cycle where valid and taken are both high, and the next bit is
// on the line in the following cycle.  Reset clears registers, counters and
// valid lines.  A write to a PN overrides a taken in the same cycle (the
// chip forbids writing while running).
module tbh_inmod (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 write,       // WRITEIN
  input  logic [2:0]           wr_addr,     // ATIN_B: transmit PN to load
  input  pbs_pkg::tbh_msg_t    wr_data,     // DTIN_B
  input  logic                 auto_mode,   // AUTOINP
  output logic [7:0]           bit_valid,   // Valid_1.x
  output logic [7:0]           bit_data,    // Bit.x
  input  logic [7:0]           bit_taken    // Taken_2.x
);
  import pbs_pkg::*;

  logic [TBH_MSG_BITS-1:0] sreg [TBH_PNS];
  logic [2:0]              cnt  [TBH_PNS];
  logic [TBH_PNS-1:0]      vld;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int p = 0; p < TBH_PNS; p++) begin
        sreg[p] <= '0;
        cnt[p]  <= '0;
      end
      vld <= '0;
    end else begin
      for (int p = 0; p < TBH_PNS; p++) begin
        if (write && wr_addr == 3'(p)) begin
          sreg[p] <= wr_data;
          cnt[p]  <= '0;
          vld[p]  <= 1'b1;
        end else if (vld[p] && bit_taken[p]) begin
          sreg[p] <= {sreg[p][0], sreg[p][TBH_MSG_BITS-1:1]};
          if (cnt[p] == 3'(TBH_MSG_BITS - 1)) begin
            cnt[p] <= '0;
            vld[p] <= auto_mode;
          end else begin
            cnt[p] <= cnt[p] + 1'b1;
          end
        end
      end
    end
  end

  always_comb begin
    for (int p = 0; p < TBH_PNS; p++) bit_data[p] = sreg[p][0];
  end
  assign bit_valid = vld;

endmodule
