// Testbench of egress_allocator: both partitions send numbered packets with
// random port sets (single ports, floods to several ports, and empty sets),
// and each transmit port applies random back-pressure. Checks that every
// packet appears complete on exactly the ports of its set, in order per
// partition and port, that packets are not interleaved on a port, that an
// empty set is consumed, and that packets with disjoint sets from the two
// partitions move in the same cycle.
module tb_egress_allocator;
  import mbox_pkg::*;

  localparam int PKTS = 150;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  [NUM_RP-1:0]    rp_valid = '0, rp_ready;
  beat_t [NUM_RP-1:0]    rp_beat = '0;
  logic  [NUM_PORTS-1:0] out_valid, out_ready = '0;
  beat_t [NUM_PORTS-1:0] out_beat;
  int checks = 0, failures = 0;

  egress_allocator dut (.*);

  beat_t q[NUM_RP][$];
  int    exp_q[NUM_PORTS][NUM_RP][$];   // packet numbers expected per port
  int    n_multi = 0, n_empty = 0, parallel = 0;

  initial begin
    for (int r = 0; r < NUM_RP; r++)
      for (int p = 0; p < PKTS; p++) begin
        automatic int         len = 1 + ($urandom % 5);
        automatic port_mask_t m = port_mask_t'($urandom);
        if ($urandom % 2) m = port_mask_t'(1 << ($urandom % NUM_PORTS));
        if (m == '0) n_empty++;
        if ($countones(m) > 1) n_multi++;
        for (int k = 0; k < NUM_PORTS; k++) if (m[k]) exp_q[k][r].push_back(p);
        for (int b = 0; b < len; b++) begin
          automatic beat_t x = '0;
          x.data = {32'(r), 16'(p), 16'(b)};
          x.dst  = m;
          x.last = (b == len - 1);
          q[r].push_back(x);
        end
      end
  end

  for (genvar r = 0; r < NUM_RP; r++) begin : g_drv
    initial begin
      bit fired = 0;
      forever begin
        @(negedge clk);
        if (fired) void'(q[r].pop_front());
        if (!rp_valid[r] || fired) begin
          rp_valid[r] = (q[r].size() > 0) && ($urandom % 5 != 0);
          if (q[r].size() > 0) rp_beat[r] = q[r][0];
        end
        #4 fired = rp_valid[r] && rp_ready[r] && rst_n;
      end
    end
  end

  for (genvar k = 0; k < NUM_PORTS; k++) begin : g_mon
    initial begin
      int cur_r, cur_p, cur_b;
      cur_r = -1; cur_p = 0; cur_b = 0;
      forever begin
        @(negedge clk);
        out_ready[k] = ($urandom % 4 != 0);
        #4;
        if (rst_n && out_valid[k] && out_ready[k]) begin
          automatic int r = int'(out_beat[k].data[63:32]);
          automatic int p = int'(out_beat[k].data[31:16]);
          automatic int b = int'(out_beat[k].data[15:0]);
          checks++;
          if (cur_r < 0) begin
            if (r >= NUM_RP || exp_q[k][r].size() == 0 || exp_q[k][r][0] != p || b != 0) begin
              failures++; $display("port %0d: unexpected packet %0d/%0d/%0d", k, r, p, b);
            end else void'(exp_q[k][r].pop_front());
            cur_r = r; cur_p = p; cur_b = 0;
          end else if (r != cur_r || p != cur_p || b != cur_b) begin
            failures++; $display("port %0d: beat %0d/%0d/%0d inside %0d/%0d", k, r, p, b, cur_r, cur_p);
          end
          cur_b++;
          if (out_beat[k].last) cur_r = -1;
        end
      end
    end
  end

  always @(negedge clk) if (rst_n && (rp_valid & rp_ready) == '1) parallel++;

  initial begin
    int left;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    do begin
      repeat (20) @(posedge clk);
      left = q[0].size() + q[1].size();
      for (int k = 0; k < NUM_PORTS; k++)
        for (int r = 0; r < NUM_RP; r++) left += exp_q[k][r].size();
    end while (left > 0);
    checks++;
    if (parallel == 0) begin failures++; $display("partitions never sent in the same cycle"); end
    checks++;
    if (n_multi == 0 || n_empty == 0) begin failures++; $display("no flood or empty set in the mix"); end
    $display("multi=%0d empty=%0d parallel=%0d", n_multi, n_empty, parallel);
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
