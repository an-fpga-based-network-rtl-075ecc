// Plane arbiter: merges, on every transmit port, the application plane's
// packets with the management plane's.
//
// Each port has a two-input packet-level round-robin arbiter
// (pkt_rr_arbiter): input 0 is the port's stream from the egress allocator,
// input 1 is the management stream when its beat is addressed to that port.
// Management packets are addressed to exactly one port (a one-hot dst field);
// an assertion checks this. Whole packets are never interleaved and, when
// both planes wait, they take turns. The output is combinational from the
// inputs, one beat per cycle per port. Arbitrating between the two planes
// follows the source architecture; round robin is this design's choice.
module plane_arbiter
  import mbox_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic  [NUM_PORTS-1:0]  app_valid,
  output logic  [NUM_PORTS-1:0]  app_ready,
  input  beat_t [NUM_PORTS-1:0]  app_beat,
  input  logic                   mgmt_valid,
  output logic                   mgmt_ready,
  input  beat_t                  mgmt_beat,
  output logic  [NUM_PORTS-1:0]  tx_valid,
  input  logic  [NUM_PORTS-1:0]  tx_ready,
  output beat_t [NUM_PORTS-1:0]  tx_beat
);
  logic [NUM_PORTS-1:0] m_ready;

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    logic  [1:0] v, r;
    beat_t [1:0] b;
    assign v = {mgmt_valid && mgmt_beat.dst[p], app_valid[p]};
    assign b = {mgmt_beat, app_beat[p]};
    assign app_ready[p] = r[0];
    assign m_ready[p]   = r[1] && mgmt_beat.dst[p];

    pkt_rr_arbiter #(.N(2)) u_arb (
      .clk, .rst_n,
      .in_valid (v),
      .in_ready (r),
      .in_beat  (b),
      .out_valid(tx_valid[p]),
      .out_ready(tx_ready[p]),
      .out_beat (tx_beat[p])
    );
  end

  assign mgmt_ready = |m_ready;

  a_mgmt_one_port: assert property (@(posedge clk) disable iff (!rst_n)
    mgmt_valid |-> $onehot(mgmt_beat.dst));

endmodule
