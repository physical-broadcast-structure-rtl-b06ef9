// pbs_tx_port -- transmit port of a processing node (PN): the leaf of a PBS
// concentrate tree.
//
// The PN hands over complete broadcast messages of MSG_W bits (in the
// design, the sending CN's address and its new output state).  The port
// queues them in a small FIFO, as the design has the PN queue each message
// until the channel is available, and sends the head message into the
// bottom-level SN as MSG_W/FLIT_W flits of FLIT_W bits, least significant
// flit first, using the valid/ready handshake of the tree.
//
// The FIFO depth is this design's choice (the document gives none).
// Timing: a message written in cycle t can present its first flit in cycle
// t+1; with a ready parent one flit leaves per cycle, back to back across
// messages.
module pbs_tx_port #(
  parameter int unsigned MSG_W  = 32,  // uniform message size
  parameter int unsigned FLIT_W = 4,   // bottom-level flit width
  parameter int unsigned DEPTH  = 4    // message queue depth
) (
  input  logic              clk,
  input  logic              rst,
  // from the PN
  input  logic              msg_valid,
  input  logic [MSG_W-1:0]  msg,
  output logic              msg_ready,
  // to the bottom-level concentrate SN
  output logic              flit_valid,
  output logic [FLIT_W-1:0] flit,
  input  logic              flit_ready
);
  import pbs_pkg::*;

  localparam int unsigned NFL = MSG_W / FLIT_W;
  localparam int unsigned AW  = clog2_min1(DEPTH);
  localparam int unsigned CW  = clog2_min1(DEPTH + 1);
  localparam int unsigned FW  = clog2_min1(NFL);

  if (MSG_W % FLIT_W != 0) begin : g_bad_widths
    $error("pbs_tx_port: FLIT_W must divide MSG_W");
  end

  logic [MSG_W-1:0] q [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic [CW-1:0]    cnt;
  logic [FW-1:0]    fi;          // flit index within the head message
  logic             push, pop, fire;

  assign msg_ready  = (cnt != CW'(DEPTH));
  assign push       = msg_valid && msg_ready;
  assign flit_valid = (cnt != '0);
  assign flit       = FLIT_W'(q[rp] >> (int'(fi) * FLIT_W));
  assign fire       = flit_valid && flit_ready;
  assign pop        = fire && (fi == FW'(NFL - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
      fi  <= '0;
    end else begin
      if (push) begin
        q[wp] <= msg;
        wp    <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      end
      if (fire) fi <= pop ? '0 : fi + 1'b1;
      if (pop) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + CW'(push) - CW'(pop);
    end
  end

  a_flit_hold: assert property (@(posedge clk) disable iff (rst)
                                flit_valid && !flit_ready |=> flit_valid);

endmodule
