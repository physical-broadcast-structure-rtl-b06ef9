// tb_domain_driver -- traffic source and checker for a PBS broadcast domain
// (pbs_dual_tree, alone or inside pbs_top).
//
// Each PN offers NMSG messages {source PN, sequence, hash} (the first NHOT
// PNs NMSG_HOT messages), in a burst, so
// that transmit queues fill and the concentrate tree is saturated.  On the
// receive side every PN must see every message, all PNs in the same cycle
// with the same contents, in sequence order per source, each exactly once.
// While the domain is saturated consecutive deliveries must be exactly
// MSG_W/BASE_W cycles apart (BASE_W bits per cycle through every level).
// It also counts cycles in which a transmit queue was full (backpressure).
module tb_domain_driver #(
  parameter int NPN = 16, MSG_W = 32, BASE_W = 4, NMSG = 3, NHOT = 0, NMSG_HOT = 0
) (
  input  logic                      clk,
  input  logic                      rst,
  output logic [NPN-1:0]            tx_valid,
  output logic [NPN-1:0][MSG_W-1:0] tx_msg,
  input  logic [NPN-1:0]            tx_ready,
  input  logic [NPN-1:0]            rx_valid,
  input  logic [NPN-1:0][MSG_W-1:0] rx_msg,
  output bit                        done,
  output int                        checks,
  output int                        failures,
  output int                        n_delivered,
  output int                        n_queue_full,
  output int                        n_rate_ok
);
  localparam int SLICE = MSG_W / BASE_W;
  localparam int TOTAL = (NPN - NHOT) * NMSG + NHOT * NMSG_HOT;

  function automatic int quota(input int p);
    return (p < NHOT) ? NMSG_HOT : NMSG;
  endfunction

  function automatic logic [MSG_W-1:0] mk(input int p, input int s);
    return {16'(p), 8'(s), 8'((p * 13 + s * 101) ^ 8'h5a)};
  endfunction

  int sent [NPN];
  int exp_seq [NPN];
  int cyc = 0, prev_t = -1;

  always_comb
    for (int p = 0; p < NPN; p++) begin
      tx_valid[p] = (sent[p] < quota(p));
      tx_msg[p]   = mk(p, sent[p]);
    end

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst) begin
      for (int p = 0; p < NPN; p++) sent[p] <= 0;
    end else begin
      for (int p = 0; p < NPN; p++)
        if (tx_valid[p] && tx_ready[p]) sent[p] <= sent[p] + 1;
    end
  end

  initial begin
    checks = 0; failures = 0; done = 0; n_delivered = 0; n_queue_full = 0; n_rate_ok = 0;
    for (int p = 0; p < NPN; p++) exp_seq[p] = 0;
  end

  always @(posedge clk) if (!rst) begin
    for (int p = 0; p < NPN; p++)
      if (tx_valid[p] && !tx_ready[p]) n_queue_full++;
    if (rx_valid != '0) begin
      int src, s;
      bit same;
      src = int'(rx_msg[0][31:16]);
      s   = int'(rx_msg[0][15:8]);
      same = (rx_valid == '1);
      for (int p = 1; p < NPN; p++) if (rx_msg[p] != rx_msg[0]) same = 0;
      checks++;
      if (!same) begin failures++; $display("FAIL domain: PNs disagree at cycle %0d", cyc); end
      checks++;
      if (src >= NPN || s != exp_seq[src] || rx_msg[0] != mk(src, s)) begin
        failures++;
        $display("FAIL domain: unexpected message %h at cycle %0d", rx_msg[0], cyc);
      end else exp_seq[src] = s + 1;
      // saturation: sources still have messages beyond the ones in flight
      if (prev_t >= 0 && n_delivered < TOTAL - NPN - NHOT * NMSG_HOT) begin
        checks++;
        if (cyc - prev_t != SLICE) begin
          failures++;
          $display("FAIL domain: deliveries %0d cycles apart, expected %0d", cyc - prev_t, SLICE);
        end else n_rate_ok++;
      end
      prev_t = cyc;
      n_delivered++;
      if (n_delivered == TOTAL) done = 1;
    end
  end
endmodule
