// Testbench of mgmt_pkt_handler: bitstreams for both partitions are split
// into management packets (odd and even word counts, first/last flags), mixed
// with status packets that must be ignored; the word consumer applies random
// back-pressure. Checks every word, its first/last/partition flags and the
// one-word-per-cycle rate, then checks the status packet built from a
// completion report byte for byte, including its port.
module tb_mgmt_pkt_handler;
  import mbox_pkg::*;
  import tb_pkt_pkg::*;

  localparam logic [47:0] DEV = 48'h02_00_00_00_00_01;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0, in_ready;
  beat_t       in_beat = '0;
  logic        cfg_valid, cfg_ready = 0;
  cfg_word_t   cfg;
  logic        done_valid = 0, done_ready, done_rp = 0;
  logic [31:0] done_status = '0, done_words = '0;
  logic        rep_valid, rep_ready = 0;
  beat_t       rep_beat;
  int checks = 0, failures = 0;
  bit full_rate = 0;

  mgmt_pkt_handler #(.DEV_MAC(DEV)) dut (.*);

  beat_q_t   drv_q;
  cfg_word_t exp_w[$];

  task automatic add_pkt(input logic [47:0] src_mac, input int port, input logic [7:0] flags,
                         input logic rp, input logic [31:0] words[$], input bit expect_words);
    automatic byte_q_t pl;
    automatic byte_q_t f;
    automatic beat_q_t b;
    pl.push_back(flags);
    pl.push_back({7'd0, rp});
    foreach (words[i]) begin
      for (int k = 3; k >= 0; k--) pl.push_back(words[i][8*k +: 8]);
      if (expect_words) exp_w.push_back('{word: words[i],
                                          first: flags[FLAG_START] && i == 0,
                                          last: flags[FLAG_LAST] && i == words.size() - 1,
                                          rp: rp});
    end
    f = frame(DEV, src_mac, MGMT_ETHERTYPE, pl);
    b = to_beats(f, port_mask_t'(1 << port), '0);
    foreach (b[i]) drv_q.push_back(b[i]);
  endtask

  function automatic void rand_words(ref logic [31:0] w[$], input int n);
    w.delete();
    for (int i = 0; i < n; i++) w.push_back($urandom);
  endfunction

  initial begin
    bit fired = 0;
    forever begin
      @(negedge clk);
      if (fired) void'(drv_q.pop_front());
      if (!in_valid || fired) begin
        in_valid = (drv_q.size() > 0) && (full_rate || $urandom % 4 != 0);
        if (drv_q.size() > 0) in_beat = drv_q[0];
      end
      #4 fired = in_valid && in_ready && rst_n;
    end
  end

  int n_words = 0, stalls_full = 0;
  initial forever begin
    @(negedge clk);
    cfg_ready = full_rate || ($urandom % 3 != 0);
    #4;
    if (rst_n && cfg_valid && cfg_ready) begin
      checks++;
      n_words++;
      if (exp_w.size() == 0) begin failures++; $display("unexpected word %h", cfg.word); end
      else begin
        if (cfg != exp_w[0]) begin
          failures++; $display("word %h f%b l%b rp%b, expected %h f%b l%b rp%b", cfg.word, cfg.first,
                               cfg.last, cfg.rp, exp_w[0].word, exp_w[0].first, exp_w[0].last, exp_w[0].rp);
        end
        void'(exp_w.pop_front());
      end
    end
  end

  byte_q_t rep_bytes;
  port_mask_t rep_dst;
  initial begin
    beat_q_t cur;
    forever begin
      @(negedge clk);
      rep_ready = ($urandom % 2 != 0);
      #4;
      if (rst_n && rep_valid && rep_ready) begin
        cur.push_back(rep_beat);
        rep_dst = rep_beat.dst;
        if (rep_beat.last) begin rep_bytes = from_beats(cur); cur.delete(); end
      end
    end
  end

  initial begin
    logic [31:0] w[$];
    int t0, t1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // RP_1 bitstream in three packets
    rand_words(w, 7);  add_pkt(48'h0a_0b_0c_0d_0e_01, 2, 8'h01, 1, w, 1);
    rand_words(w, 1);  add_pkt(48'h0a_0b_0c_0d_0e_01, 2, 8'h00, 1, w, 1);
    rand_words(w, 3);  add_pkt(48'h0a_0b_0c_0d_0e_01, 2, 8'h80, 1, w, 0); // a status packet
    rand_words(w, 10); add_pkt(48'h0a_0b_0c_0d_0e_01, 2, 8'h02, 1, w, 1);
    // RP_0 bitstream in one packet
    rand_words(w, 33); add_pkt(48'h0a_0b_0c_0d_0e_07, 3, 8'h03, 0, w, 1);
    wait (drv_q.size() == 0 && exp_w.size() == 0);
    repeat (5) @(posedge clk);
    // rate: 200 words in one packet, no back-pressure
    full_rate = 1;
    @(negedge clk);
    rand_words(w, 200); add_pkt(48'h0a_0b_0c_0d_0e_09, 1, 8'h03, 0, w, 1);
    @(posedge clk iff cfg_valid); t0 = $time;
    wait (exp_w.size() == 0); t1 = $time;
    checks++;
    if ((t1 - t0) / 10 > 200 + 2) begin failures++; $display("200 words took %0d cycles", (t1 - t0) / 10); end
    // completion report -> status packet to port 1
    @(negedge clk);
    done_valid = 1; done_rp = 0; done_status = 32'h1234_4000; done_words = 32'd200;
    @(posedge clk iff done_ready);
    @(negedge clk) done_valid = 0;
    repeat (30) @(posedge clk);
    begin
      automatic byte_q_t pl = '{8'h80, 8'h00, 8'h12, 8'h34, 8'h40, 8'h00, 8'h00, 8'h00, 8'h00, 8'hC8};
      automatic byte_q_t e = frame(48'h0a_0b_0c_0d_0e_09, DEV, MGMT_ETHERTYPE, pl);
      checks++;
      if (!same_bytes(rep_bytes, e)) begin failures++; $display("status packet bytes differ (%0d bytes)", rep_bytes.size()); end
      checks++;
      if (rep_dst != 4'b0010) begin failures++; $display("status packet to %b", rep_dst); end
    end
    $display("words=%0d", n_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
