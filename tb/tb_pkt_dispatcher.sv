// Testbench of pkt_dispatcher: four ports send a random mix of application
// frames, management frames (EtherType 0x88B5) and one-beat packets, with
// random gaps and random back-pressure. Checks that every application packet
// leaves on its own port's application stream and every management packet on
// the management stream, byte for byte and in order per port, that
// management packets are not interleaved, and that a packet streams at one
// beat per cycle once routed.
module tb_pkt_dispatcher;
  import mbox_pkg::*;
  import tb_pkt_pkg::*;

  localparam int PKTS = 60;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  [NUM_PORTS-1:0] rx_valid = '0, rx_ready;
  beat_t [NUM_PORTS-1:0] rx_beat = '0;
  logic  [NUM_PORTS-1:0] app_valid, app_ready = '0;
  beat_t [NUM_PORTS-1:0] app_beat;
  logic                  mgmt_valid, mgmt_ready = 0;
  beat_t                 mgmt_beat;
  int checks = 0, failures = 0;
  bit no_gaps = 0;

  pkt_dispatcher dut (.*);

  beat_q_t  drv_q[NUM_PORTS];
  byte_q_t  exp_app[NUM_PORTS][$];
  byte_q_t  exp_mgmt[NUM_PORTS][$];
  int       n_mgmt = 0, n_app = 0, n_short = 0;

  initial begin
    for (int p = 0; p < NUM_PORTS; p++)
      for (int k = 0; k < PKTS; k++) begin
        automatic int kind = $urandom % 3;
        automatic byte_q_t f;
        automatic beat_q_t b;
        if (kind == 0) f = frame(48'h02_00_00_00_00_01, 48'h0a_00_00_00_00_00 | 48'(p),
                                 MGMT_ETHERTYPE, rand_bytes(4 + $urandom % 40));
        else if (kind == 1) f = frame(48'($urandom), 48'($urandom), 16'h0800,
                                      rand_bytes(20 + $urandom % 60));
        else f = rand_bytes(1 + $urandom % 8);
        b = to_beats(f, port_mask_t'(1 << p), '0);
        foreach (b[i]) drv_q[p].push_back(b[i]);
        if (kind == 0) begin exp_mgmt[p].push_back(f); n_mgmt++; end
        else begin exp_app[p].push_back(f); n_app++; if (kind == 2) n_short++; end
      end
  end

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_drv
    initial begin
      bit fired = 0;
      forever begin
        @(negedge clk);
        if (fired) void'(drv_q[p].pop_front());
        if (!rx_valid[p] || fired) begin
          rx_valid[p] = (drv_q[p].size() > 0) && (no_gaps || $urandom % 4 != 0);
          if (drv_q[p].size() > 0) rx_beat[p] = drv_q[p][0];
        end
        #4 fired = rx_valid[p] && rx_ready[p] && rst_n;
      end
    end

    // application stream monitor
    initial begin
      beat_q_t cur;
      forever begin
        @(negedge clk);
        app_ready[p] = no_gaps || ($urandom % 3 != 0);
        #4;
        if (rst_n && app_valid[p] && app_ready[p]) begin
          cur.push_back(app_beat[p]);
          if (app_beat[p].last) begin
            checks++;
            if (exp_app[p].size() == 0 || !same_bytes(from_beats(cur), exp_app[p][0])) begin
              failures++; $display("port %0d: wrong application packet", p);
            end
            if (exp_app[p].size() > 0) void'(exp_app[p].pop_front());
            cur.delete();
          end
        end
      end
    end
  end

  // management stream monitor
  int app_left, mgmt_left;
  initial begin
    beat_q_t cur;
    int      owner;
    owner = -1;
    forever begin
      @(negedge clk);
      mgmt_ready = no_gaps || ($urandom % 3 != 0);
      #4;
      if (rst_n && mgmt_valid && mgmt_ready) begin
        automatic int sp = $clog2(int'(mgmt_beat.src));
        if (owner >= 0 && sp != owner) begin failures++; $display("management packets interleaved"); end
        owner = sp;
        cur.push_back(mgmt_beat);
        if (mgmt_beat.last) begin
          checks++;
          if (exp_mgmt[sp].size() == 0 || !same_bytes(from_beats(cur), exp_mgmt[sp][0])) begin
            failures++; $display("wrong management packet from port %0d", sp);
          end
          if (exp_mgmt[sp].size() > 0) void'(exp_mgmt[sp].pop_front());
          cur.delete();
          owner = -1;
        end
      end
    end
  end

  // streaming rate: a long application packet, no gaps, must take its beat
  // count plus one routing cycle
  int t0, t1;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    do begin
      repeat (50) @(posedge clk);
      app_left = 0; mgmt_left = 0;
      for (int p = 0; p < NUM_PORTS; p++) begin
        app_left += exp_app[p].size(); mgmt_left += exp_mgmt[p].size();
      end
    end while (app_left + mgmt_left > 0 || rx_valid != '0);
    checks++;
    if (n_mgmt == 0 || n_short == 0) begin failures++; $display("mix lacks a packet kind"); end
    // rate test on port 0
    no_gaps = 1;
    begin
      automatic beat_q_t b = to_beats(frame(48'h1, 48'h2, 16'h0800, rand_bytes(786)), 4'b0001, '0);
      exp_app[0].push_back(from_beats(b));
      @(negedge clk);
      foreach (b[i]) drv_q[0].push_back(b[i]);
      t0 = $time;
      wait (exp_app[0].size() == 0);
      t1 = $time;
      checks++;
      // 100 beats, first beat 1 cycle later, decision 1 cycle, then 1 per cycle
      if ((t1 - t0) / 10 > 100 + 4) begin
        failures++; $display("100-beat packet took %0d cycles", (t1 - t0) / 10);
      end
    end
    $display("app=%0d mgmt=%0d short=%0d", n_app, n_mgmt, n_short);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
