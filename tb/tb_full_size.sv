// Full-size run of dmr_middlebox_top at its default parameters: the same
// checks as the end-to-end testbench, with bitstreams of the sizes reported
// for the two partitions, 3,666,884 bytes (916,721 words) for RP_0 and
// 2,241,540 bytes (560,385 words) for RP_1, carried in management packets of
// 374 words, while the eight hosts keep exchanging frames. Each partition
// must be out of service for its word count plus a small fixed overhead.
module tb_full_size;
  import mbox_pkg::*;
  import tb_pkt_pkg::*;

  localparam int N_WORDS[2] = '{916721, 560385}; // 3,666,884 and 2,241,540 bytes
  localparam int SEG_WORDS  = 374;  // 1,498-byte payloads, within a 1,500-byte MTU
  localparam int WATCHDOG   = 6000000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  [NUM_PORTS-1:0] rx_valid = '0, rx_ready, tx_valid, tx_ready = '0;
  beat_t [NUM_PORTS-1:0] rx_beat = '0, tx_beat;
  logic                  sram_we, sram_re, icap_csib, icap_rdwrb, reconfig_busy;
  logic  [20:0]          sram_addr;
  logic  [31:0]          sram_wdata, sram_rdata, icap_i, icap_o, load_cycles;
  logic  [NUM_RP-1:0]    rp_enable;
  int checks = 0, failures = 0;

  dmr_middlebox_top dut (.*);
  sram_model #(.ADDR_W(21), .DATA_W(32), .RD_LAT(2)) u_sram (.*);
  icap_model u_icap (.clk, .csib(icap_csib), .rdwrb(icap_rdwrb), .i(icap_i), .o(icap_o));

  localparam logic [47:0] DEV  = 48'h02_00_00_00_00_01;
  localparam logic [47:0] CTRL = 48'h02_00_00_00_02_00;
  function automatic logic [47:0] host_mac(input int h); return 48'h02_00_00_00_01_00 | 48'(h); endfunction
  function automatic int host_port(input int h); return h % NUM_PORTS; endfunction

  // ------------------------------------------------------------ stimulus
  beat_q_t drv_q[NUM_PORTS];
  bit      traffic_on = 1;
  int      next_id = 0;
  typedef struct { int src_port; int dst_port; byte_q_t bytes; int copies_dst; } pkt_rec_t;
  pkt_rec_t pk[int];
  int       n_sent = 0, n_same_port = 0;

  function automatic logic [31:0] bs_word(input int rp, input int i);
    return 32'(i) * 32'h9E37_79B1 ^ (rp ? 32'h5A5A_0000 : 32'h0000_A5A5);
  endfunction

  task automatic add_app(input int sh, input int dh);
    automatic byte_q_t pl = rand_bytes(46 + $urandom % 90);
    automatic byte_q_t f;
    automatic int      id = next_id++;
    automatic pkt_rec_t r;
    for (int k = 0; k < 4; k++) pl[k] = id[8*k +: 8];
    f = frame(host_mac(dh), host_mac(sh), 16'h0800, pl);
    r.src_port = host_port(sh); r.dst_port = host_port(dh); r.bytes = f; r.copies_dst = 0;
    pk[id] = r;
    if (r.src_port == r.dst_port) n_same_port++;
    begin
      automatic beat_q_t b = to_beats(f, port_mask_t'(1 << host_port(sh)), '0);
      foreach (b[i]) drv_q[host_port(sh)].push_back(b[i]);
    end
    n_sent++;
  endtask

  task automatic add_mgmt(input int rp, input int first, input int n, input bit start, input bit last);
    automatic byte_q_t pl;
    automatic beat_q_t b;
    pl.push_back({6'd0, last, start});
    pl.push_back(8'(rp));
    for (int i = first; i < first + n; i++) begin
      automatic logic [31:0] w = bs_word(rp, i);
      for (int k = 3; k >= 0; k--) pl.push_back(w[8*k +: 8]);
    end
    b = to_beats(frame(DEV, CTRL, MGMT_ETHERTYPE, pl), 4'b1000, '0);
    foreach (b[i]) drv_q[3].push_back(b[i]);
  endtask

  // keep the ports busy with host traffic
  initial begin
    wait (rst_n);
    while (traffic_on) begin
      @(negedge clk);
      for (int p = 0; p < NUM_PORTS; p++)
        if (drv_q[p].size() < 40) begin
          automatic int sh = p + NUM_PORTS * ($urandom % 2);
          automatic int dh = $urandom % 8;
          add_app(sh, dh);
        end
    end
  end

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_drv
    initial begin
      bit fired = 0;
      forever begin
        @(negedge clk);
        if (fired) void'(drv_q[p].pop_front());
        if (!rx_valid[p] || fired) begin
          rx_valid[p] = (drv_q[p].size() > 0) && ($urandom % 8 != 0);
          if (drv_q[p].size() > 0) rx_beat[p] = drv_q[p][0];
        end
        #4 fired = rx_valid[p] && rx_ready[p] && rst_n;
      end
    end
  end

  // ------------------------------------------------------------ monitors
  int n_flood_copies = 0, n_rx_delivered = 0, n_backpressure = 0, n_replies = 0;
  int during_reload = 0;
  byte_q_t replies[$];
  // port 3 pauses briefly when a reload finishes, so that the reply meets
  // queued application traffic at the plane arbiter
  int hold3 = 0;
  logic [NUM_RP-1:0] rst_seen = '1;
  always @(negedge clk) begin
    if (hold3 > 0) hold3--;
    if (dut.rp_rst_n == '1 && rst_seen != '1) hold3 = 40;
    rst_seen = dut.rp_rst_n;
  end
  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_mon
    initial begin
      beat_q_t cur;
      forever begin
        @(negedge clk);
        tx_ready[p] = ($urandom % 6 != 0) && !(p == 3 && hold3 > 0);
        #4;
        if (rst_n && tx_valid[p] && !tx_ready[p]) n_backpressure++;
        if (rst_n && tx_valid[p] && tx_ready[p]) begin
          cur.push_back(tx_beat[p]);
          if (tx_beat[p].last) begin
            automatic byte_q_t f = from_beats(cur);
            cur.delete();
            if (f.size() >= 16 && {f[12], f[13]} == MGMT_ETHERTYPE) begin
              checks++;
              if (p != 3 || f[14] != 8'h80) begin failures++; $display("management frame left on port %0d", p); end
              replies.push_back(f);
              n_replies++;
            end else begin
              automatic int id = {f[17], f[16], f[15], f[14]};
              checks++;
              if (!pk.exists(id)) begin failures++; $display("port %0d: unknown frame", p); end
              else begin
                if (!same_bytes(f, pk[id].bytes)) begin failures++; $display("frame %0d corrupted", id); end
                if (p == pk[id].src_port) begin failures++; $display("frame %0d sent back to its port", id); end
                if (p == pk[id].dst_port) begin pk[id].copies_dst++; n_rx_delivered++; end
                else n_flood_copies++;
                if (reconfig_busy && dut.rp_rst_n != '1) during_reload++;
              end
            end
          end
        end
      end
    end
  end

  // mechanism counters from inside the design
  int n_mgmt_dispatch = 0, n_parallel = 0, n_other_carried = 0, n_arb_meet = 0;
  always @(negedge clk) if (rst_n) begin
    if (dut.mgi_valid && dut.mgi_ready && dut.mgi_beat.last) n_mgmt_dispatch++;
    if ((dut.ia_valid & dut.ia_ready) == '1) n_parallel++;
    for (int r = 0; r < NUM_RP; r++)
      if (!rp_enable[!r] && dut.ia_valid[r] && dut.ia_ready[r] && dut.ia_beat[r].last) n_other_carried++;
    if (dut.rep_valid && dut.eo_valid[3]) n_arb_meet++;
  end

  // ICAP words in order, per update
  logic [31:0] icap_seen[$];
  bit          rb = 0;
  always @(posedge clk) if (!icap_csib && !icap_rdwrb) begin
    if (icap_i == 32'hFFFF_FFFF || icap_i == 32'hAA99_5566) rb = 1;
    if (!rb) icap_seen.push_back(icap_i);
  end

  // ------------------------------------------------------------ sequence
  task automatic update(input int rp);
    automatic int n = N_WORDS[rp];
    automatic int t0;
    icap_seen.delete(); rb = 0; u_icap.clear();
    for (int i = 0; i < n; i += SEG_WORDS) begin
      automatic int m = (n - i < SEG_WORDS) ? n - i : SEG_WORDS;
      wait (drv_q[3].size() < 200);
      @(negedge clk);
      add_mgmt(rp, i, m, i == 0, i + m >= n);
    end
    t0 = n_replies;
    wait (n_replies > t0);
    begin
      automatic byte_q_t f = replies[$];
      automatic logic [31:0] st = {f[16], f[17], f[18], f[19]};
      automatic logic [31:0] nw = {f[20], f[21], f[22], f[23]};
      checks++;
      if (f[15] != 8'(rp) || nw != 32'(n) || st != {16'(n), 16'h4000}) begin
        failures++; $display("reply for RP_%0d: rp=%0d words=%0d status=%h", rp, f[15], nw, st);
      end
    end
    checks++;
    if (icap_seen.size() != n) begin failures++; $display("ICAP got %0d of %0d words", icap_seen.size(), n); end
    else foreach (icap_seen[i]) if (icap_seen[i] != bs_word(rp, i)) begin
      failures++; $display("ICAP word %0d wrong", i); break;
    end
    checks++;
    if (load_cycles < 32'(n) || load_cycles > 32'(n + 64)) begin
      failures++; $display("RP_%0d out of service %0d cycles for %0d words", rp, load_cycles, n);
    end
    $display("RP_%0d: %0d words (%0d bytes), out of service %0d cycles", rp, n, 4 * n, load_cycles);
  endtask

  initial begin
    int lost, dup, dropped;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (300) @(posedge clk);
    update(0);
    update(1);
    repeat (300) @(posedge clk);
    traffic_on = 0;
    wait (drv_q[0].size() + drv_q[1].size() + drv_q[2].size() + drv_q[3].size() == 0);
    repeat (500) @(posedge clk);
    lost = 0; dup = 0; dropped = 0;
    foreach (pk[id]) begin
      if (pk[id].src_port == pk[id].dst_port) begin
        if (pk[id].copies_dst != 0) dup++;
      end else if (pk[id].copies_dst == 0) lost++;
      else if (pk[id].copies_dst > 1) dup++;
    end
    checks++;
    if (lost != 0 || dup != 0) begin failures++; $display("lost %0d, duplicated %0d frames", lost, dup); end
    dropped = n_same_port;  // never delivered to their own port
    $display("frames sent %0d, delivered %0d, flood copies %0d, own-port %0d",
             n_sent, n_rx_delivered, n_flood_copies, n_same_port);
    $display("mgmt-dispatch %0d, parallel %0d, other-partition %0d, reload-delivered %0d, arbiter-meet %0d, backpressure %0d",
             n_mgmt_dispatch, n_parallel, n_other_carried, during_reload, n_arb_meet, n_backpressure);
    checks++; if (n_mgmt_dispatch == 0) begin failures++; $display("no management dispatch"); end
    checks++; if (n_parallel == 0)      begin failures++; $display("partitions never in parallel"); end
    checks++; if (n_other_carried == 0) begin failures++; $display("no traffic during a reload"); end
    checks++; if (during_reload == 0)   begin failures++; $display("no delivery during a reload"); end
    checks++; if (n_flood_copies == 0)  begin failures++; $display("no flood"); end
    checks++; if (n_rx_delivered <= n_flood_copies / 3) begin failures++; $display("no learned forwarding"); end
    checks++; if (n_same_port == 0)     begin failures++; $display("no own-port frame"); end
    checks++; if (n_arb_meet == 0)      begin failures++; $display("reply never met traffic"); end
    checks++; if (n_backpressure == 0)  begin failures++; $display("no back-pressure"); end
    checks++; if (n_replies != 2)       begin failures++; $display("%0d replies", n_replies); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
