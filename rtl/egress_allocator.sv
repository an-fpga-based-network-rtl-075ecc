// Egress allocator: moves processed packets from the two partitions onto the
// per-port streams toward the plane arbiter.
//
// A partition that presents the first beat of a packet requests the set of
// transmit ports in its dst field. The request is granted when none of those
// ports is held by the other partition's packet; when both partitions ask for
// overlapping ports in the same cycle the one with priority wins and priority
// then passes to the other. Two packets with disjoint port sets move at the
// same time. The grant takes one cycle and holds the ports until the last
// beat. A packet for several ports (a flood) is copied to all of them: each
// beat is offered on every held port, each port takes it when it is ready, and
// the partition's beat is consumed once every held port has taken it, so a
// slow port only stalls the packets that go to it. The function, carrying
// packets out when a module requests, is the source architecture's; the grant and copy
// rules are this design's.
module egress_allocator
  import mbox_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic  [NUM_RP-1:0]     rp_valid,
  output logic  [NUM_RP-1:0]     rp_ready,
  input  beat_t [NUM_RP-1:0]     rp_beat,
  output logic  [NUM_PORTS-1:0]  out_valid,
  input  logic  [NUM_PORTS-1:0]  out_ready,
  output beat_t [NUM_PORTS-1:0]  out_beat
);
  localparam int unsigned RW = (NUM_RP > 1) ? $clog2(NUM_RP) : 1;

  logic       [NUM_RP-1:0] granted_q;
  port_mask_t [NUM_RP-1:0] own_q;    // ports held by each partition's packet
  port_mask_t [NUM_RP-1:0] sent_q;   // held ports that already took this beat
  logic       [RW-1:0]     prio_q;   // partition served first on a conflict
  logic       [NUM_RP-1:0] grant;

  // grants
  always_comb begin
    port_mask_t busy;
    int unsigned r;
    busy  = '0;
    grant = '0;
    r     = 0;
    for (int i = 0; i < int'(NUM_RP); i++)
      if (granted_q[i]) busy |= own_q[i];
    for (int k = 0; k < int'(NUM_RP); k++) begin
      r = (int'(prio_q) + k) % NUM_RP;
      if (!granted_q[r] && rp_valid[r] && ((rp_beat[r].dst & busy) == '0)) begin
        grant[r] = 1'b1;
        busy    |= rp_beat[r].dst;
      end
    end
  end

  // per-port multiplexer and fork
  always_comb begin
    out_valid = '0;
    out_beat  = '0;
    for (int i = 0; i < int'(NUM_RP); i++)
      for (int p = 0; p < int'(NUM_PORTS); p++)
        if (granted_q[i] && own_q[i][p]) begin
          out_valid[p] = rp_valid[i] && !sent_q[i][p];
          out_beat[p]  = rp_beat[i];
        end
  end

  always_comb begin
    for (int i = 0; i < int'(NUM_RP); i++)
      rp_ready[i] = granted_q[i] &&
                    (((sent_q[i] | (out_valid & out_ready)) & own_q[i]) == own_q[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      granted_q <= '0;
      own_q     <= '0;
      sent_q    <= '0;
      prio_q    <= '0;
    end else begin
      for (int i = 0; i < int'(NUM_RP); i++) begin
        if (grant[i]) begin
          granted_q[i] <= 1'b1;
          own_q[i]     <= rp_beat[i].dst;
          sent_q[i]    <= '0;
          prio_q       <= RW'((i + 1) % NUM_RP);
        end else if (granted_q[i]) begin
          if (rp_valid[i] && rp_ready[i]) begin
            sent_q[i] <= '0;
            if (rp_beat[i].last) granted_q[i] <= 1'b0;
          end else begin
            sent_q[i] <= sent_q[i] | (out_valid & out_ready & own_q[i]);
          end
        end
      end
    end
  end

endmodule
