// Ingress allocator: hands application packets from the receive-port streams
// to the packet processing modules of the two reconfigurable partitions.
//
// There is one allocation lane per partition. A lane whose partition is
// enabled (rp_enable, cleared by the reconfiguration handler while that
// partition is being updated) and idle (rp_idle, reported by the module)
// claims the next receive stream with a packet waiting, round robin and never
// a stream the other lane already serves, and then forwards that whole packet
// to its partition. Both lanes work at once, so two packets from different
// ports are processed in parallel; when one partition is disabled the other
// carries all traffic. The claim takes one cycle, then beats pass
// combinationally (one per cycle). lane_busy tells the reconfiguration handler
// that a packet is still being delivered to a partition. Sending packets to
// whichever module is idle follows the source architecture; the lane structure and the
// round-robin choice are this design's.
module ingress_allocator
  import mbox_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic  [NUM_PORTS-1:0]  in_valid,
  output logic  [NUM_PORTS-1:0]  in_ready,
  input  beat_t [NUM_PORTS-1:0]  in_beat,
  output logic  [NUM_RP-1:0]     rp_valid,
  input  logic  [NUM_RP-1:0]     rp_ready,
  output beat_t [NUM_RP-1:0]     rp_beat,
  input  logic  [NUM_RP-1:0]     rp_enable,
  input  logic  [NUM_RP-1:0]     rp_idle,
  output logic  [NUM_RP-1:0]     lane_busy
);
  localparam int unsigned PW = $clog2(NUM_PORTS);

  logic [NUM_RP-1:0]          busy_q;
  logic [NUM_RP-1:0][PW-1:0]  src_q;
  logic [PW-1:0]              ptr_q;
  logic [NUM_RP-1:0]          grant;
  logic [NUM_RP-1:0][PW-1:0]  grant_src;
  logic [PW-1:0]              ptr_d;

  // claims for this cycle
  always_comb begin
    logic [NUM_PORTS-1:0] claimed;
    logic [PW-1:0]        idx;
    claimed   = '0;
    idx       = '0;
    grant     = '0;
    grant_src = '0;
    ptr_d     = ptr_q;
    for (int r = 0; r < int'(NUM_RP); r++)
      if (busy_q[r]) claimed[src_q[r]] = 1'b1;
    for (int r = 0; r < int'(NUM_RP); r++) begin
      if (!busy_q[r] && rp_enable[r] && rp_idle[r]) begin
        for (int k = 0; k < int'(NUM_PORTS); k++) begin
          idx = PW'(ptr_d + PW'(k));
          if (!grant[r] && in_valid[idx] && !claimed[idx]) begin
            grant[r]     = 1'b1;
            grant_src[r] = idx;
          end
        end
        if (grant[r]) begin
          claimed[grant_src[r]] = 1'b1;
          ptr_d = PW'(grant_src[r] + 1'b1);
        end
      end
    end
  end

  // data path
  always_comb begin
    in_ready = '0;
    for (int r = 0; r < int'(NUM_RP); r++) begin
      rp_valid[r] = busy_q[r] && in_valid[src_q[r]];
      rp_beat[r]  = in_beat[src_q[r]];
      if (busy_q[r]) in_ready[src_q[r]] = rp_ready[r];
    end
  end

  assign lane_busy = busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= '0;
      src_q  <= '0;
      ptr_q  <= '0;
    end else begin
      ptr_q <= ptr_d;
      for (int r = 0; r < int'(NUM_RP); r++) begin
        if (grant[r]) begin
          busy_q[r] <= 1'b1;
          src_q[r]  <= grant_src[r];
        end else if (rp_valid[r] && rp_ready[r] && rp_beat[r].last) begin
          busy_q[r] <= 1'b0;
        end
      end
    end
  end

endmodule
