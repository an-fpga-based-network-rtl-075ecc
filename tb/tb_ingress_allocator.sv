// Testbench of ingress_allocator: four input streams of numbered packets, two
// modelled partitions that report idle a few cycles after a packet leaves
// them and apply random back-pressure. Checks that each packet reaches
// exactly one partition intact and in its input's order, that a partition
// never receives a packet while busy, that no packet starts on a disabled
// partition, that both partitions work in parallel, and that with one
// partition disabled the other carries all traffic.
module tb_ingress_allocator;
  import mbox_pkg::*;

  localparam int PKTS = 50;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  [NUM_PORTS-1:0] in_valid = '0, in_ready;
  beat_t [NUM_PORTS-1:0] in_beat = '0;
  logic  [NUM_RP-1:0]    rp_valid, rp_ready = '0, rp_enable = '1, rp_idle = '1, lane_busy;
  beat_t [NUM_RP-1:0]    rp_beat;
  int checks = 0, failures = 0;

  ingress_allocator dut (.*);

  beat_t q[NUM_PORTS][$];
  int    total_pkts = 0;
  initial begin
    for (int i = 0; i < NUM_PORTS; i++)
      for (int p = 0; p < PKTS; p++) begin
        automatic int len = 1 + ($urandom % 6);
        for (int b = 0; b < len; b++) begin
          automatic beat_t x = '0;
          x.data = {32'(i), 16'(p), 16'(b)};
          x.last = (b == len - 1);
          q[i].push_back(x);
        end
        total_pkts++;
      end
  end

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_drv
    initial begin
      bit fired = 0;
      forever begin
        @(negedge clk);
        if (fired) void'(q[i].pop_front());
        if (!in_valid[i] || fired) begin
          in_valid[i] = (q[i].size() > 0) && ($urandom % 4 != 0);
          if (q[i].size() > 0) in_beat[i] = q[i][0];
        end
        #4 fired = in_valid[i] && in_ready[i] && rst_n;
      end
    end
  end

  int next_pkt[NUM_PORTS];
  int got = 0, per_rp[NUM_RP], both_busy = 0, while_disabled[NUM_RP];
  for (genvar r = 0; r < NUM_RP; r++) begin : g_rp
    initial begin
      int cur_in, cur_pkt, cur_beat, hold;
      bit in_pkt;
      in_pkt = 0; hold = 0; cur_in = 0; cur_pkt = 0; cur_beat = 0;
      per_rp[r] = 0; while_disabled[r] = 0;
      forever begin
        @(negedge clk);
        rp_ready[r] = ($urandom % 4 != 0);
        if (!in_pkt && !rp_idle[r]) begin
          if (hold == 0) rp_idle[r] = 1'b1; else hold--;
        end
        #4;
        if (rst_n && rp_valid[r] && rp_ready[r]) begin
          automatic int i = int'(rp_beat[r].data[63:32]);
          automatic int p = int'(rp_beat[r].data[31:16]);
          automatic int b = int'(rp_beat[r].data[15:0]);
          checks++;
          if (!in_pkt) begin
            if (!rp_idle[r]) begin failures++; $display("RP%0d got a packet while busy", r); end
            if (!rp_enable[r]) while_disabled[r]++;
            if (i >= NUM_PORTS || p != next_pkt[i] || b != 0) begin
              failures++; $display("RP%0d: packet %0d/%0d/%0d out of order", r, i, p, b);
            end
            cur_in = i; cur_pkt = p; cur_beat = 0;
            if (i < NUM_PORTS) next_pkt[i]++;
            in_pkt = 1; rp_idle[r] = 1'b0;
          end else if (i != cur_in || p != cur_pkt || b != cur_beat) begin
            failures++; $display("RP%0d: beat %0d/%0d/%0d inside %0d/%0d", r, i, p, b, cur_in, cur_pkt);
          end
          if (!lane_busy[r]) begin failures++; $display("lane_busy low during a packet"); end
          cur_beat++;
          if (rp_beat[r].last) begin
            in_pkt = 0; hold = $urandom % 4; got++; per_rp[r]++;
          end
        end
      end
    end
  end

  always @(posedge clk) if (rst_n && rp_valid == '1) both_busy++;

  int got_before, rp0_before;
  initial begin
    foreach (next_pkt[i]) next_pkt[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (got >= total_pkts / 3);
    // take partition 1 out of service
    @(negedge clk) rp_enable[1] = 1'b0;
    got_before = got; rp0_before = per_rp[0];
    @(posedge clk);
    wait (!lane_busy[1]);
    wait (got >= 2 * total_pkts / 3);
    checks++;
    if (per_rp[0] - rp0_before < got - got_before - 1) begin
      failures++; $display("partition 0 did not carry the traffic alone");
    end
    @(negedge clk) rp_enable[1] = 1'b1;
    wait (got == total_pkts);
    repeat (10) @(posedge clk);
    checks++;
    if (while_disabled[1] != 0) begin failures++; $display("packets started on disabled RP1: %0d", while_disabled[1]); end
    checks++;
    if (both_busy == 0 || per_rp[1] == 0) begin failures++; $display("partitions never worked in parallel"); end
    for (int i = 0; i < NUM_PORTS; i++) begin
      checks++;
      if (next_pkt[i] != PKTS) begin failures++; $display("input %0d: %0d packets", i, next_pkt[i]); end
    end
    $display("rp0=%0d rp1=%0d parallel-cycles=%0d", per_rp[0], per_rp[1], both_busy);
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
