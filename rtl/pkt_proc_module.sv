// Network packet processing module: the application datapath that fills each
// reconfigurable partition (RP_0 and RP_1 hold one instance each). This one is
// a learning switch built around a small content-addressable table of
// (MAC address, port) pairs.
//
// On the first beat of a packet the destination MAC (frame bytes 0-5) is
// matched against every valid table entry at once. A hit sends the packet to
// the learned port, a miss or a group address floods it to every port; the
// receive port is always removed from the set, and a packet whose set is then
// empty is dropped (its beats are accepted and discarded). On the second beat
// the source MAC (bytes 6-11) is learned: an existing entry has its port
// updated, otherwise the entry at the replacement pointer is overwritten
// (first in, first out). Group source addresses are not learned. The output
// is one register stage: one beat per cycle, one cycle of latency, with the
// port set in every beat's dst field. `idle` is high when no packet is inside
// the module; the allocator sends a new packet only then, and the
// reconfiguration handler waits for it before reloading the partition.
// Reset clears the table, which is what initialising the module after a
// reconfiguration amounts to. The learning switch as the partition's
// application follows the source architecture; the table size, replacement rule and
// drop rule are this design's choices.
module pkt_proc_module
  import mbox_pkg::*;
#(
  parameter int unsigned CAM_DEPTH = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  beat_t  in_beat,
  output logic   out_valid,
  input  logic   out_ready,
  output beat_t  out_beat,
  output logic   idle
);
  localparam int unsigned AW = (CAM_DEPTH > 1) ? $clog2(CAM_DEPTH) : 1;

  typedef struct packed {
    logic        valid;
    logic [47:0] mac;
    port_mask_t  port;
  } cam_entry_t;

  cam_entry_t [CAM_DEPTH-1:0] cam_q;
  logic [AW-1:0]              repl_q;

  logic        out_valid_q;
  beat_t       out_q;
  logic        in_pkt_q;     // inside a packet (first beat accepted)
  logic        second_q;     // next accepted beat is the packet's second
  port_mask_t  mask_q;       // port set of the current packet
  logic [15:0] src_hi_q;     // source MAC bytes 6-7

  logic        accept;
  logic        first_beat;
  logic [47:0] dst_mac, src_mac;
  logic        hit;
  port_mask_t  hit_port, lookup_mask, beat_mask;
  logic        src_hit;
  logic [AW-1:0] src_idx;

  assign accept     = in_valid && in_ready;
  assign first_beat = !in_pkt_q;
  assign in_ready   = !out_valid_q || out_ready;

  // frame bytes b0..b5 with b0 most significant
  assign dst_mac = {in_beat.data[7:0],   in_beat.data[15:8],  in_beat.data[23:16],
                    in_beat.data[31:24], in_beat.data[39:32], in_beat.data[47:40]};
  assign src_mac = {src_hi_q, in_beat.data[7:0], in_beat.data[15:8],
                    in_beat.data[23:16], in_beat.data[31:24]};

  // destination lookup
  always_comb begin
    hit      = 1'b0;
    hit_port = '0;
    for (int k = 0; k < int'(CAM_DEPTH); k++)
      if (cam_q[k].valid && cam_q[k].mac == dst_mac) begin
        hit      = 1'b1;
        hit_port = cam_q[k].port;
      end
    if (hit && !dst_mac[40]) lookup_mask = hit_port & ~in_beat.src;
    else                     lookup_mask = ~in_beat.src;
  end

  // source search for learning
  always_comb begin
    src_hit = 1'b0;
    src_idx = '0;
    for (int k = 0; k < int'(CAM_DEPTH); k++)
      if (cam_q[k].valid && cam_q[k].mac == src_mac) begin
        src_hit = 1'b1;
        src_idx = AW'(k);
      end
  end

  assign beat_mask = first_beat ? lookup_mask : mask_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cam_q       <= '0;
      repl_q      <= '0;
      out_valid_q <= 1'b0;
      out_q       <= '0;
      in_pkt_q    <= 1'b0;
      second_q    <= 1'b0;
      mask_q      <= '0;
      src_hi_q    <= '0;
    end else begin
      if (out_valid_q && out_ready) out_valid_q <= 1'b0;
      if (accept) begin
        if (beat_mask != '0) begin
          out_valid_q <= 1'b1;
          out_q       <= in_beat;
          out_q.dst   <= beat_mask;
        end
        if (first_beat) begin
          mask_q   <= lookup_mask;
          src_hi_q <= {in_beat.data[55:48], in_beat.data[63:56]};
        end
        in_pkt_q <= !in_beat.last;
        second_q <= first_beat && !in_beat.last;
        // learn the source address on the second beat
        if (second_q && !src_mac[40]) begin
          if (src_hit) begin
            cam_q[src_idx].port <= in_beat.src;
          end else begin
            cam_q[repl_q] <= '{valid: 1'b1, mac: src_mac, port: in_beat.src};
            repl_q        <= (int'(repl_q) == int'(CAM_DEPTH) - 1) ? '0 : repl_q + 1'b1;
          end
        end
      end
    end
  end

  assign out_valid = out_valid_q;
  assign out_beat  = out_q;
  assign idle      = !out_valid_q && !in_pkt_q;

endmodule
