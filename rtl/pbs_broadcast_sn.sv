// pbs_broadcast_sn -- one switch node (SN) of a PBS broadcast tree.
//
// The SN receives IN_W-bit flits from its parent into a receive buffer,
// moves each into a transmit buffer and sends it to its children as
// IN_W/OUT_W consecutive OUT_W-bit flits, low part first (on a fat link the
// flit narrows by r_m = 2 going down).  Every outgoing flit is copied to all
// ALPHA children at once: this copying is what makes the tree broadcast.
//
// There is a single input channel, so there is no contention and no flow
// control: the design keeps the bit rate of every level equal, so the
// transmit buffer is always free by the time the next flit has been
// received.  An assertion flags an overrun should parameters break that
// balance.
//
// Link timing: each outgoing flit is held OUT_CYC cycles on the link (the
// flit time of the level below) and in_valid/out_valid mark the single cycle
// in which a flit arrives at the far end.  One clock for all SNs is this
// design's choice, as in pbs_concentrate_sn.
//
// Latency: a flit received in cycle t is loaded into the transmit buffer in
// cycle t+1 and its first part arrives at the children in cycle
// t+1+OUT_CYC.
module pbs_broadcast_sn #(
  parameter int unsigned ALPHA   = 4,   // branching ratio
  parameter int unsigned IN_W    = 4,   // flit width on the link above
  parameter int unsigned OUT_W   = 4,   // flit width on the links below
  parameter int unsigned OUT_CYC = 1    // flit time of the links below, cycles
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        in_valid,
  input  logic [IN_W-1:0]             in_data,
  output logic [ALPHA-1:0]            out_valid,
  output logic [ALPHA-1:0][OUT_W-1:0] out_data
);
  import pbs_pkg::*;

  localparam int unsigned R  = IN_W / OUT_W;   // outgoing flits per incoming
  localparam int unsigned PW = clog2_min1(R);
  localparam int unsigned HW = clog2_min1(OUT_CYC);

  if (IN_W % OUT_W != 0 || R == 0) begin : g_bad_widths
    $error("pbs_broadcast_sn: OUT_W must divide IN_W");
  end

  logic [IN_W-1:0] rx_buf;
  logic            rx_full;
  logic [IN_W-1:0] tx_buf;
  logic            tx_full;
  logic [PW-1:0]   tx_part;    // part of tx_buf now on the link
  logic [HW-1:0]   tx_hold;    // cycles until that part arrives

  logic tx_arrive, tx_last, tx_free, rx_move;

  assign tx_arrive = tx_full && (tx_hold == '0);
  assign tx_last   = (tx_part == PW'(R - 1));
  assign tx_free   = !tx_full || (tx_arrive && tx_last);
  assign rx_move   = rx_full && tx_free;

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_buf  <= '0;
      rx_full <= 1'b0;
      tx_buf  <= '0;
      tx_full <= 1'b0;
      tx_part <= '0;
      tx_hold <= '0;
    end else begin
      if (in_valid) begin
        rx_buf  <= in_data;
        rx_full <= 1'b1;
      end else if (rx_move) begin
        rx_full <= 1'b0;
      end

      if (rx_move) begin
        tx_buf  <= rx_buf;
        tx_full <= 1'b1;
        tx_part <= '0;
        tx_hold <= HW'(OUT_CYC - 1);
      end else if (tx_arrive) begin
        if (tx_last) begin
          tx_full <= 1'b0;
        end else begin
          tx_part <= tx_part + 1'b1;
          tx_hold <= HW'(OUT_CYC - 1);
        end
      end else if (tx_full) begin
        tx_hold <= tx_hold - 1'b1;
      end
    end
  end

  logic [OUT_W-1:0] part;
  assign part = OUT_W'(tx_buf >> (int'(tx_part) * OUT_W));

  always_comb begin
    for (int c = 0; c < ALPHA; c++) begin
      out_valid[c] = tx_arrive;
      out_data[c]  = part;
    end
  end

  // A flit may only arrive when the receive buffer is empty or emptying.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst)
                                 in_valid |-> !rx_full || rx_move);

endmodule
