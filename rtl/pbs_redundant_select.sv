// pbs_redundant_select -- input-port selection of an SN that is fed by
// redundant copies of the SN below it (coarse-grain redundancy).
//
// In the design, SNs high in a tree may be duplicated; the SN above then
// has NPORT input ports that should carry the same message stream.  When the
// global initialisation mode starts (init rises) every port is marked NOT
// OK.  While init is high the PNs send a known test pattern; every port is
// drained and each complete message of MSG_W bits is compared, flit by flit
// (W bits, low flit first), with PATTERN.  A port that delivers a whole
// message equal to the pattern is marked OK.  After init the lowest-numbered
// OK port is connected through to the SN (valid/data/ready pass straight
// through, no added latency); the other ports are drained.  If no port
// passed, `damaged` is raised and nothing is forwarded: that part of the
// domain is a damaged region.
//
// The test pattern value, taking the lowest OK port, reset to "port 0 OK"
// (so a domain that never runs the initialisation uses the primary copy)
// and draining the unused ports are this design's choices.
module pbs_redundant_select #(
  parameter int unsigned      NPORT   = 2,            // redundant copies
  parameter int unsigned      W       = 16,           // flit width
  parameter int unsigned      MSG_W   = 32,           // message size
  parameter logic [MSG_W-1:0] PATTERN = 32'hC3A5_5A3C // initialisation test pattern
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       init,
  input  logic [NPORT-1:0]           in_valid,
  input  logic [NPORT-1:0][W-1:0]    in_data,
  output logic [NPORT-1:0]           in_ready,
  output logic                       out_valid,
  output logic [W-1:0]               out_data,
  input  logic                       out_ready,
  output logic [NPORT-1:0]           port_ok,
  output logic                       damaged,
  output logic [pbs_pkg::clog2_min1(NPORT)-1:0] sel
);
  import pbs_pkg::*;

  localparam int unsigned NFL = MSG_W / W;
  localparam int unsigned FW  = clog2_min1(NFL);
  localparam int unsigned SW  = clog2_min1(NPORT);

  if (MSG_W % W != 0) begin : g_bad_widths
    $error("pbs_redundant_select: W must divide MSG_W");
  end

  logic              init_q;
  logic [NPORT-1:0]  ok, match;
  logic [FW-1:0]     fi [NPORT];
  logic              any_ok;

  always_comb begin
    any_ok = 1'b0;
    sel    = '0;
    for (int p = NPORT - 1; p >= 0; p--)
      if (ok[p]) begin
        any_ok = 1'b1;
        sel    = SW'(p);
      end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      init_q <= 1'b0;
      ok     <= NPORT'(1);
      match  <= '1;
      for (int p = 0; p < NPORT; p++) fi[p] <= '0;
    end else begin
      init_q <= init;
      if (init && !init_q) begin
        ok    <= '0;
        match <= '1;
        for (int p = 0; p < NPORT; p++) fi[p] <= '0;
      end else if (init) begin
        for (int p = 0; p < NPORT; p++)
          if (in_valid[p]) begin
            logic hit;
            hit = match[p] && (in_data[p] == W'(PATTERN >> (int'(fi[p]) * W)));
            if (fi[p] == FW'(NFL - 1)) begin
              fi[p]    <= '0;
              match[p] <= 1'b1;
              if (hit) ok[p] <= 1'b1;
            end else begin
              fi[p]    <= fi[p] + 1'b1;
              match[p] <= hit;
            end
          end
      end
    end
  end

  always_comb begin
    in_ready  = '1;
    out_valid = 1'b0;
    out_data  = in_data[sel];
    if (!init && any_ok) begin
      out_valid     = in_valid[sel];
      in_ready[sel] = out_ready;
    end
  end

  assign port_ok = ok;
  assign damaged = !init && !any_ok;

endmodule
