// Management plane packet handler: unpacks management packets into bitstream
// words for the reconfiguration handler and answers a finished
// reconfiguration with a status packet.
//
// A management packet is an Ethernet frame with the management EtherType.
// Byte 14 is a flag byte (bit 0: first segment of a bitstream, bit 1: last
// segment, bit 7: a status reply, which the device ignores when it receives
// one) and byte 15 the index of the target partition. Bytes 16 onward are the
// payload: bitstream bytes in file order, whole 32-bit words. A bitstream may
// be split over any number of packets sent in order. Each 64-bit payload beat
// becomes up to two words (bytes 0-3, then 4-7, each packed most significant
// byte first) on the cfg stream, one word per cycle. The first word of a
// packet marked "first" carries cfg.first, the final word of a packet marked
// "last" carries cfg.last, which starts the reconfiguration; a "last" packet
// must carry at least one word. The requester's MAC address and receive port
// are kept, and when the reconfiguration handler reports completion (done_*)
// a three-beat status packet is sent to that port: destination MAC = the
// requester, source MAC = DEV_MAC, the management EtherType, flags = reply,
// the partition index, then the ICAP status word read back and the number of
// words loaded (both most significant byte first). Payload extraction and the
// path back to the plane arbiter follow the source architecture; the packet format is
// this design's own.
module mgmt_pkt_handler
  import mbox_pkg::*;
#(
  parameter logic [47:0] DEV_MAC = 48'h02_00_00_00_00_01
) (
  input  logic        clk,
  input  logic        rst_n,
  // management packets from the dispatcher
  input  logic        in_valid,
  output logic        in_ready,
  input  beat_t       in_beat,
  // bitstream words to the reconfiguration handler
  output logic        cfg_valid,
  input  logic        cfg_ready,
  output cfg_word_t   cfg,
  // completion report from the reconfiguration handler
  input  logic        done_valid,
  output logic        done_ready,
  input  logic        done_rp,
  input  logic [31:0] done_status,
  input  logic [31:0] done_words,
  // status packets to the plane arbiter
  output logic        rep_valid,
  input  logic        rep_ready,
  output beat_t       rep_beat
);
  typedef enum logic [1:0] {H_BEAT0, H_BEAT1, H_PAYLOAD, H_DISCARD} hstate_e;

  hstate_e     hstate_q;
  logic [7:0]  flags_q;
  logic        rp_q;
  logic        first_q;
  logic [47:0] req_mac_q;
  port_mask_t  req_port_q;

  logic        pay_valid_q;
  beat_t       pay_q;
  logic        half_q;       // low word already sent

  logic        lo_ok, hi_ok, cur_hi, word_ok, buf_final, buf_dead, word_fire, buf_free;

  assign lo_ok     = pay_q.keep[0];
  assign hi_ok     = pay_q.keep[4];
  assign cur_hi    = half_q || !lo_ok;
  assign word_ok   = pay_valid_q && (cur_hi ? hi_ok : 1'b1);
  assign buf_final = cur_hi || !hi_ok;
  assign buf_dead  = pay_valid_q && !lo_ok && !hi_ok;
  assign word_fire = cfg_valid && cfg_ready;
  assign buf_free  = !pay_valid_q || buf_dead || (word_fire && buf_final);

  assign cfg_valid = word_ok;
  assign cfg.word  = bytes_to_word(cur_hi ? pay_q.data[63:32] : pay_q.data[31:0]);
  assign cfg.first = first_q;
  assign cfg.last  = flags_q[FLAG_LAST] && pay_q.last && buf_final;
  assign cfg.rp    = rp_q;

  // header fields of the next packet wait until the last packet's words are out
  assign in_ready = (hstate_q == H_PAYLOAD || hstate_q == H_BEAT1) ? buf_free : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hstate_q    <= H_BEAT0;
      flags_q     <= '0;
      rp_q        <= 1'b0;
      first_q     <= 1'b0;
      req_mac_q   <= '0;
      req_port_q  <= '0;
      pay_valid_q <= 1'b0;
      pay_q       <= '0;
      half_q      <= 1'b0;
    end else begin
      // payload buffer drains one word per cycle
      if (word_fire) begin
        first_q <= 1'b0;
        half_q  <= 1'b1;
      end
      if (buf_free) pay_valid_q <= 1'b0;

      if (in_valid && in_ready) begin
        unique case (hstate_q)
          H_BEAT0: begin
            req_mac_q[47:32] <= {in_beat.data[55:48], in_beat.data[63:56]};
            req_port_q       <= in_beat.src;
            hstate_q         <= in_beat.last ? H_BEAT0 : H_BEAT1;
          end
          H_BEAT1: begin
            req_mac_q[31:0] <= bytes_to_word(in_beat.data[31:0]);
            flags_q         <= in_beat.data[55:48];
            rp_q            <= in_beat.data[56];
            first_q         <= in_beat.data[48 + FLAG_START];
            if (in_beat.last)                 hstate_q <= H_BEAT0;
            else if (in_beat.data[48 + FLAG_REPLY] ||
                     ethertype_of(in_beat.data[47:32]) != MGMT_ETHERTYPE)
                                              hstate_q <= H_DISCARD;
            else                              hstate_q <= H_PAYLOAD;
          end
          H_PAYLOAD: begin
            pay_valid_q <= 1'b1;
            pay_q       <= in_beat;
            half_q      <= 1'b0;
            if (in_beat.last) hstate_q <= H_BEAT0;
          end
          default: if (in_beat.last) hstate_q <= H_BEAT0;
        endcase
      end
    end
  end

  // ---------------------------------------------------------------- replies
  logic        rep_busy_q;
  logic [1:0]  rep_idx_q;
  logic        rep_rp_q;
  logic [31:0] rep_status_q, rep_words_q;

  assign done_ready = !rep_busy_q;

  function automatic logic [63:0] pack8(input logic [63:0] msb_first);
    logic [63:0] r;
    for (int k = 0; k < 8; k++) r[8*k +: 8] = msb_first[8*(7-k) +: 8];
    return r;
  endfunction

  always_comb begin
    rep_beat      = '0;
    rep_beat.keep = '1;
    rep_beat.dst  = req_port_q;
    unique case (rep_idx_q)
      2'd0:    rep_beat.data = pack8({req_mac_q, DEV_MAC[47:32]});
      2'd1:    rep_beat.data = pack8({DEV_MAC[31:0], MGMT_ETHERTYPE, 8'h80, 7'd0, rep_rp_q});
      default: begin
        rep_beat.data = pack8({rep_status_q, rep_words_q});
        rep_beat.last = 1'b1;
      end
    endcase
  end
  assign rep_valid = rep_busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rep_busy_q   <= 1'b0;
      rep_idx_q    <= '0;
      rep_rp_q     <= 1'b0;
      rep_status_q <= '0;
      rep_words_q  <= '0;
    end else if (!rep_busy_q) begin
      if (done_valid) begin
        rep_busy_q   <= 1'b1;
        rep_idx_q    <= '0;
        rep_rp_q     <= done_rp;
        rep_status_q <= done_status;
        rep_words_q  <= done_words;
      end
    end else if (rep_ready) begin
      if (rep_idx_q == 2'd2) rep_busy_q <= 1'b0;
      rep_idx_q <= rep_idx_q + 1'b1;
    end
  end

endmodule
