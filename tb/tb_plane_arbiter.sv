// Testbench of plane_arbiter: four application streams and one management
// stream addressed to one port per packet, random gaps and back-pressure.
// Checks that each transmit port carries exactly its application packets and
// the management packets addressed to it, complete, in order and not
// interleaved, and that a port where both planes wait alternates between them.
module tb_plane_arbiter;
  import mbox_pkg::*;

  localparam int PKTS = 60;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  [NUM_PORTS-1:0] app_valid = '0, app_ready;
  beat_t [NUM_PORTS-1:0] app_beat = '0;
  logic                  mgmt_valid = 0, mgmt_ready;
  beat_t                 mgmt_beat = '0;
  logic  [NUM_PORTS-1:0] tx_valid, tx_ready = '0;
  beat_t [NUM_PORTS-1:0] tx_beat;
  int checks = 0, failures = 0;

  plane_arbiter dut (.*);

  // beat data {plane, port, packet, beat}; plane 0 = application, 1 = management
  beat_t aq[NUM_PORTS][$];
  beat_t mq[$];
  int    exp_m[NUM_PORTS][$];
  int    mcount[NUM_PORTS];

  function automatic void add(ref beat_t q[$], input int plane, input int port, input int p,
                              input port_mask_t dst);
    automatic int len = 1 + ($urandom % 4);
    for (int b = 0; b < len; b++) begin
      automatic beat_t x = '0;
      x.data = {16'(plane), 16'(port), 16'(p), 16'(b)};
      x.dst  = dst;
      x.last = (b == len - 1);
      q.push_back(x);
    end
  endfunction

  initial begin
    for (int k = 0; k < NUM_PORTS; k++) begin
      mcount[k] = 0;
      for (int p = 0; p < PKTS; p++) add(aq[k], 0, k, p, port_mask_t'(1 << k));
    end
    for (int p = 0; p < PKTS; p++) begin
      automatic int k = $urandom % NUM_PORTS;
      add(mq, 1, k, mcount[k], port_mask_t'(1 << k));
      exp_m[k].push_back(mcount[k]);
      mcount[k]++;
    end
  end

  for (genvar k = 0; k < NUM_PORTS; k++) begin : g_drv
    initial begin
      bit fired = 0;
      forever begin
        @(negedge clk);
        if (fired) void'(aq[k].pop_front());
        if (!app_valid[k] || fired) begin
          app_valid[k] = (aq[k].size() > 0) && ($urandom % 3 != 0);
          if (aq[k].size() > 0) app_beat[k] = aq[k][0];
        end
        #4 fired = app_valid[k] && app_ready[k] && rst_n;
      end
    end
  end

  initial begin
    bit fired = 0;
    forever begin
      @(negedge clk);
      if (fired) void'(mq.pop_front());
      if (!mgmt_valid || fired) begin
        mgmt_valid = (mq.size() > 0) && ($urandom % 3 != 0);
        if (mq.size() > 0) mgmt_beat = mq[0];
      end
      #4 fired = mgmt_valid && mgmt_ready && rst_n;
    end
  end

  int alternations = 0, n_app_done = 0, n_m_done = 0;
  for (genvar k = 0; k < NUM_PORTS; k++) begin : g_mon
    initial begin
      int next_a, cur_pl, cur_p, cur_b, last_pl;
      bit both_waiting;
      next_a = 0; cur_pl = -1; last_pl = -1; both_waiting = 0;
      forever begin
        @(negedge clk);
        tx_ready[k] = ($urandom % 4 != 0);
        #4;
        if (rst_n && tx_valid[k] && tx_ready[k]) begin
          automatic int pl = int'(tx_beat[k].data[63:48]);
          automatic int pt = int'(tx_beat[k].data[47:32]);
          automatic int p  = int'(tx_beat[k].data[31:16]);
          automatic int b  = int'(tx_beat[k].data[15:0]);
          checks++;
          if (pt != k) begin failures++; $display("port %0d carries a packet for %0d", k, pt); end
          if (cur_pl < 0) begin
            if (pl == 0 && (p != next_a || b != 0)) begin
              failures++; $display("port %0d: application packet %0d, expected %0d", k, p, next_a);
            end
            if (pl == 1 && (exp_m[k].size() == 0 || exp_m[k][0] != p || b != 0)) begin
              failures++; $display("port %0d: management packet %0d out of order", k, p);
            end
            if (pl == 0) next_a++;
            if (pl == 1 && exp_m[k].size() > 0) void'(exp_m[k].pop_front());
            if (both_waiting && last_pl >= 0) begin
              checks++;
              if (pl == last_pl) begin failures++; $display("port %0d: same plane twice while both waited", k); end
              else alternations++;
            end
            cur_pl = pl; cur_p = p; cur_b = 0;
          end else if (pl != cur_pl || p != cur_p || b != cur_b) begin
            failures++; $display("port %0d: interleaved beat", k);
          end
          cur_b++;
          if (tx_beat[k].last) begin
            last_pl = cur_pl; cur_pl = -1;
            if (pl == 0) n_app_done++; else n_m_done++;
          end
        end
        // both planes have a packet waiting for this port at a packet boundary
        if (cur_pl < 0)
          both_waiting = app_valid[k] && mgmt_valid && mgmt_beat.dst[k];
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (n_app_done == NUM_PORTS * PKTS && n_m_done == PKTS);
    repeat (5) @(posedge clk);
    checks++;
    if (alternations == 0) begin failures++; $display("no contention between the planes"); end
    $display("alternations=%0d", alternations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
