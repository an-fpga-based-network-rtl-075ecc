// Packet dispatcher: splits every receive port's packets between the
// application plane and the management plane.
//
// The header identifier is the EtherType (frame bytes 12-13), which sits in
// the second 64-bit beat. Each port therefore holds the first beat of a packet
// in a one-beat register until the second beat is visible at its input, then
// decides the route, and from there on streams the packet through that
// register (one beat per cycle, one cycle of latency). A one-beat packet goes
// to the application plane. Application packets leave on the port's own
// output stream (app_*[p]); management packets from all ports are merged onto
// the single management stream by a packet-level round-robin arbiter. The
// decision costs one idle cycle at the head of each packet. Splitting by a
// header identifier follows the source architecture; using the EtherType as that
// identifier is this design's choice.
module pkt_dispatcher
  import mbox_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  // receive streams from the MACs
  input  logic  [NUM_PORTS-1:0]  rx_valid,
  output logic  [NUM_PORTS-1:0]  rx_ready,
  input  beat_t [NUM_PORTS-1:0]  rx_beat,
  // application plane, one stream per receive port
  output logic  [NUM_PORTS-1:0]  app_valid,
  input  logic  [NUM_PORTS-1:0]  app_ready,
  output beat_t [NUM_PORTS-1:0]  app_beat,
  // management plane
  output logic                   mgmt_valid,
  input  logic                   mgmt_ready,
  output beat_t                  mgmt_beat
);
  logic  [NUM_PORTS-1:0] hold_valid_q, decided_q, to_mgmt_q;
  beat_t [NUM_PORTS-1:0] hold_q;
  logic  [NUM_PORTS-1:0] m_valid, m_ready, pop;

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    assign app_valid[p] = hold_valid_q[p] && decided_q[p] && !to_mgmt_q[p];
    assign m_valid[p]   = hold_valid_q[p] && decided_q[p] &&  to_mgmt_q[p];
    assign app_beat[p]  = hold_q[p];
    assign pop[p]       = (app_valid[p] && app_ready[p]) || (m_valid[p] && m_ready[p]);
    assign rx_ready[p]  = !hold_valid_q[p] || (decided_q[p] && pop[p]);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        hold_valid_q[p] <= 1'b0;
        decided_q[p]    <= 1'b0;
        to_mgmt_q[p]    <= 1'b0;
        hold_q[p]       <= '0;
      end else begin
        // route decision for the held first beat
        if (hold_valid_q[p] && !decided_q[p]) begin
          if (hold_q[p].last) begin
            decided_q[p] <= 1'b1;
            to_mgmt_q[p] <= 1'b0;
          end else if (rx_valid[p]) begin
            decided_q[p] <= 1'b1;
            to_mgmt_q[p] <= (ethertype_of(rx_beat[p].data[47:32]) == MGMT_ETHERTYPE);
          end
        end
        if (pop[p] && hold_q[p].last) decided_q[p] <= 1'b0;
        // holding register
        if (rx_valid[p] && rx_ready[p]) begin
          hold_valid_q[p] <= 1'b1;
          hold_q[p]       <= rx_beat[p];
        end else if (pop[p]) begin
          hold_valid_q[p] <= 1'b0;
        end
      end
    end
  end

  pkt_rr_arbiter #(.N(NUM_PORTS)) u_mgmt_arb (
    .clk, .rst_n,
    .in_valid (m_valid),
    .in_ready (m_ready),
    .in_beat  (hold_q),
    .out_valid(mgmt_valid),
    .out_ready(mgmt_ready),
    .out_beat (mgmt_beat)
  );

endmodule
