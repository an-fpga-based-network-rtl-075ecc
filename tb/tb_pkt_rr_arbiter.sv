// Testbench of pkt_rr_arbiter: three inputs send numbered packets. Checks that
// packets are never interleaved, that every input's packets arrive complete
// and in order, and that with all inputs busy and the output always ready the
// grants rotate 0,1,2,0,... with one beat per cycle inside a packet.
module tb_pkt_rr_arbiter;
  import mbox_pkg::*;

  localparam int N    = 3;
  localparam int PKTS = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  [N-1:0] in_valid = '0, in_ready;
  beat_t [N-1:0] in_beat = '0;
  logic          out_valid, out_ready = 0;
  beat_t         out_beat;
  int checks = 0, failures = 0;
  bit saturate = 1;

  pkt_rr_arbiter #(.N(N)) dut (.*);

  // beat data: {input, packet, beat index}; dst holds the packet length
  beat_t q[N][$];
  initial begin
    for (int i = 0; i < N; i++)
      for (int p = 0; p < PKTS; p++) begin
        automatic int len = 1 + ($urandom % 5);
        for (int b = 0; b < len; b++) begin
          automatic beat_t x = '0;
          x.data = {32'(i), 16'(p), 16'(b)};
          x.last = (b == len - 1);
          q[i].push_back(x);
        end
      end
  end

  // drivers: change on negedge, handshake sampled just before posedge
  for (genvar i = 0; i < N; i++) begin : g_drv
    initial begin
      bit fired = 0;
      forever begin
        @(negedge clk);
        if (fired) void'(q[i].pop_front());
        if (!in_valid[i] || fired) begin
          in_valid[i] = (q[i].size() > 0) && (saturate || ($urandom % 3 != 0));
          if (q[i].size() > 0) in_beat[i] = q[i][0];
        end
        #4 fired = in_valid[i] && in_ready[i] && rst_n;
      end
    end
  end

  int  exp_pkt[N];
  int  exp_beat[N];
  int  cur = -1;
  int  grants[$];
  int  got = 0, cycles_in_pkt = 0, gap_beats = 0;
  initial begin
    foreach (exp_pkt[i]) begin exp_pkt[i] = 0; exp_beat[i] = 0; end
    forever begin
      @(negedge clk);
      out_ready = saturate ? 1'b1 : ($urandom % 4 != 0);
      #4;
      if (rst_n && cur >= 0 && saturate && !out_valid) gap_beats++;
      if (rst_n && out_valid && out_ready) begin
        automatic int i = int'(out_beat.data[63:32]);
        automatic int p = int'(out_beat.data[31:16]);
        automatic int b = int'(out_beat.data[15:0]);
        checks++;
        if (cur >= 0 && i != cur) begin
          failures++; $display("interleaved: input %0d inside packet of %0d", i, cur);
        end
        if (i >= N || p != exp_pkt[i] || b != exp_beat[i]) begin
          failures++; $display("order: got %0d/%0d/%0d", i, p, b);
        end
        if (cur < 0) grants.push_back(i);
        if (i < N) begin
          exp_beat[i]++;
          if (out_beat.last) begin exp_pkt[i]++; exp_beat[i] = 0; end
        end
        cur = out_beat.last ? -1 : i;
        if (out_beat.last) got++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // saturated phase: first 30 packets
    wait (got >= 30);
    saturate = 0;
    wait (got == N * PKTS);
    repeat (5) @(posedge clk);
    for (int k = 0; k < 30; k++) begin
      checks++;
      if (grants[k] != k % N) begin
        failures++; $display("rotation: grant %0d went to %0d", k, grants[k]);
      end
    end
    checks++;
    if (gap_beats != 0) begin failures++; $display("bubbles inside packets: %0d", gap_beats); end
    foreach (exp_pkt[i]) begin
      checks++;
      if (exp_pkt[i] != PKTS) begin failures++; $display("input %0d: %0d packets", i, exp_pkt[i]); end
    end
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
