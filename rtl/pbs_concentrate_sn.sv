// pbs_concentrate_sn -- one switch node (SN) of a PBS concentrate tree.
//
// Up to ALPHA children offer message streams; the SN passes one whole
// message at a time up to its parent.  It follows the SN structure of the
// design: a receive buffer that builds one outgoing flit of OUT_W bits from
// OUT_W/IN_W consecutive incoming flits of the selected child (the fat-tree
// widening, r_m = 2 on fat links, 1 on non-fat links), and a transmit buffer
// that holds the flit while it crosses the link to the parent.  When the
// receive buffer is full it moves its flit into the transmit buffer, so both
// buffers work concurrently and the node sustains the full link rate.
//
// Contention: a child is granted for one whole message of MSG_W bits (a
// "message time slice").  Between messages the grant goes round robin (the
// equal-priority scheme), searching downwards from the child just below the
// last winner, so after reset the highest-numbered child has first call.  For
// ALPHA = 2 this is the TBH chip's "one high, then one low" bandwidth slice
// with fall-back to the other child when the chosen one has nothing pending.
//
// Link timing: OUT_CYC models the flit propagation delay of the outgoing
// link in clock cycles.  A flit loaded into the transmit buffer is presented
// (out_valid) only after OUT_CYC-1 further cycles, so a link of OUT_CYC
// cycles moves at most one flit per OUT_CYC cycles.  This per-level delay,
// and a single synchronous clock for all SNs, are this design's model of the
// physical wires; the document's SNs would need an asynchronous protocol.
//
// Handshake (both sides): a flit moves in a cycle where valid and ready are
// both high (the TBH chip's Valid / Taken pair).  in_ready is combinational
// from in_valid through the arbiter.  `run` qualifies only the output valid,
// as on the TBH chip; tie it high in a PBS domain.
//
// Latency: two cycles per non-fat SN for the first flit (receive, then
// transmit buffer), plus OUT_CYC-1 cycles of link delay.
module pbs_concentrate_sn #(
  parameter int unsigned ALPHA   = 4,   // branching ratio
  parameter int unsigned IN_W    = 4,   // incoming flit width (link below)
  parameter int unsigned OUT_W   = 4,   // outgoing flit width (link above)
  parameter int unsigned OUT_CYC = 1,   // outgoing link flit time, cycles
  parameter int unsigned MSG_W   = 32   // uniform message size in bits
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         run,
  input  logic [ALPHA-1:0]             in_valid,
  input  logic [ALPHA-1:0][IN_W-1:0]   in_data,
  output logic [ALPHA-1:0]             in_ready,
  output logic                         out_valid,
  output logic [OUT_W-1:0]             out_data,
  input  logic                         out_ready
);
  import pbs_pkg::*;

  localparam int unsigned R        = OUT_W / IN_W;          // flits per outgoing flit
  localparam int unsigned IN_FLITS = MSG_W / IN_W;          // incoming flits per message
  localparam int unsigned CW       = clog2_min1(ALPHA);
  localparam int unsigned FW       = clog2_min1(IN_FLITS + 1);
  localparam int unsigned RW       = clog2_min1(R + 1);
  localparam int unsigned HW       = clog2_min1(OUT_CYC);

  if (OUT_W % IN_W != 0 || MSG_W % OUT_W != 0 || R == 0) begin : g_bad_widths
    $error("pbs_concentrate_sn: widths must divide: IN_W | OUT_W | MSG_W");
  end

  // Arbitration state
  logic          busy;          // a message is being taken from child `cur`
  logic [CW-1:0] cur;           // granted child
  logic [CW-1:0] last;          // winner of the previous message
  logic [FW-1:0] left;          // incoming flits still to take of the message

  // Buffers
  logic [OUT_W-1:0] rx_buf;
  logic [RW-1:0]    rx_cnt;     // incoming flits now in rx_buf
  logic [OUT_W-1:0] tx_buf;
  logic             tx_full;
  logic [HW-1:0]    tx_hold;    // cycles until the flit reaches the parent

  logic          rx_full, rx_move, tx_fire, can_take, take;
  logic          pick_any;
  logic [CW-1:0] pick, sel;

  // Round robin: first child with a pending flit, searching downwards
  // starting just below the previous winner.
  always_comb begin
    pick_any = 1'b0;
    pick     = '0;
    for (int unsigned k = 1; k <= ALPHA; k++) begin
      logic [CW-1:0] c;
      c = CW'((int'(last) + ALPHA - k) % ALPHA);
      if (!pick_any && in_valid[c]) begin
        pick_any = 1'b1;
        pick     = c;
      end
    end
  end

  assign rx_full  = (rx_cnt == RW'(R));
  assign out_valid = tx_full && (tx_hold == '0) && run;
  assign out_data  = tx_buf;
  assign tx_fire   = out_valid && out_ready;
  assign rx_move   = rx_full && (!tx_full || tx_fire);
  assign can_take  = !rx_full || rx_move;
  assign sel       = busy ? cur : pick;
  assign take      = can_take && (busy ? in_valid[cur] : pick_any);

  always_comb begin
    in_ready = '0;
    if (can_take && (busy || pick_any)) in_ready[sel] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      cur     <= '0;
      last    <= '0;
      left    <= '0;
      rx_buf  <= '0;
      rx_cnt  <= '0;
      tx_buf  <= '0;
      tx_full <= 1'b0;
      tx_hold <= '0;
    end else begin
      // transmit buffer
      if (rx_move) begin
        tx_buf  <= rx_buf;
        tx_full <= 1'b1;
        tx_hold <= HW'(OUT_CYC - 1);
      end else if (tx_fire) begin
        tx_full <= 1'b0;
      end else if (tx_full && tx_hold != '0) begin
        tx_hold <= tx_hold - 1'b1;
      end

      // receive buffer: first incoming flit ends up in the low bits
      if (take) begin
        rx_buf <= OUT_W'({in_data[sel], rx_buf} >> IN_W);
        rx_cnt <= rx_move ? RW'(1) : rx_cnt + 1'b1;
      end else if (rx_move) begin
        rx_cnt <= '0;
      end

      // message framing and arbitration
      if (take) begin
        if (!busy) begin
          cur  <= sel;
          last <= sel;
        end
        if ((busy ? left : FW'(IN_FLITS)) == FW'(1)) begin
          busy <= 1'b0;
        end else begin
          busy <= 1'b1;
          left <= (busy ? left : FW'(IN_FLITS)) - 1'b1;
        end
      end
    end
  end

  // A granted child keeps the grant until its whole message has passed.
  a_one_hot_ready: assert property (@(posedge clk) disable iff (rst) (in_ready & (in_ready - 1'b1)) == '0);
  a_tx_hold: assert property (@(posedge clk) disable iff (rst)
                              out_valid && !out_ready |=> out_valid || !run);

endmodule
