// pbs_rx_port -- receive port of a processing node (PN): a leaf of a PBS
// broadcast tree.
//
// The broadcast tree delivers every message of the domain to every PN as
// MSG_W/FLIT_W consecutive flits of FLIT_W bits, least significant flit
// first.  The port reassembles them and presents each complete message for
// one cycle (msg_valid).  The time to receive one complete message is the
// design's message time slice.  Deciding whether a hosted CN listens to the
// sender is left to the PN.
//
// The broadcast tree has no flow control, so the PN must take a message in
// the cycle it is presented.  Timing: msg_valid rises the cycle after the
// last flit arrives.
module pbs_rx_port #(
  parameter int unsigned MSG_W  = 32,  // uniform message size
  parameter int unsigned FLIT_W = 4    // bottom-level flit width
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              flit_valid,
  input  logic [FLIT_W-1:0] flit,
  output logic              msg_valid,
  output logic [MSG_W-1:0]  msg
);
  import pbs_pkg::*;

  localparam int unsigned NFL = MSG_W / FLIT_W;
  localparam int unsigned FW  = clog2_min1(NFL);

  if (MSG_W % FLIT_W != 0) begin : g_bad_widths
    $error("pbs_rx_port: FLIT_W must divide MSG_W");
  end

  logic [MSG_W-1:0] sh;
  logic [FW-1:0]    fi;

  always_ff @(posedge clk) begin
    if (rst) begin
      sh        <= '0;
      fi        <= '0;
      msg_valid <= 1'b0;
      msg       <= '0;
    end else begin
      msg_valid <= 1'b0;
      if (flit_valid) begin
        sh <= MSG_W'({flit, sh} >> FLIT_W);
        if (fi == FW'(NFL - 1)) begin
          fi        <= '0;
          msg_valid <= 1'b1;
          msg       <= MSG_W'({flit, sh} >> FLIT_W);
        end else begin
          fi <= fi + 1'b1;
        end
      end
    end
  end

endmodule
