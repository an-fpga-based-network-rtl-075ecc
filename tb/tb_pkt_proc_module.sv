// Testbench of pkt_proc_module (learning switch). A reference model keeps
// its own address table with the same size and first-in-first-out
// replacement. Random frames between 24 addresses on four ports, with random
// back-pressure, check the forwarding set of every packet (learned port,
// flood on a miss or a group address, receive port removed, drop when
// nothing is left), the packet bytes, the idle flag, the one-cycle latency
// and that reset clears the table.
module tb_pkt_proc_module;
  import mbox_pkg::*;
  import tb_pkt_pkg::*;

  localparam int DEPTH = 16;
  localparam int PKTS  = 600;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_valid = 0, in_ready, out_valid, out_ready = 0, idle;
  beat_t in_beat = '0, out_beat;
  int checks = 0, failures = 0;
  bit stream_mode = 0;

  pkt_proc_module #(.CAM_DEPTH(DEPTH)) dut (.*);

  // reference table
  logic [47:0] m_mac[DEPTH];
  port_mask_t  m_port[DEPTH];
  bit          m_valid[DEPTH];
  int          m_repl = 0;

  function automatic port_mask_t model(input logic [47:0] dst, input logic [47:0] src,
                                       input port_mask_t sp);
    port_mask_t m;
    int hit;
    hit = -1;
    for (int k = 0; k < DEPTH; k++) if (m_valid[k] && m_mac[k] == dst) hit = k;
    if (hit >= 0 && !dst[40]) m = m_port[hit] & ~sp;
    else                      m = ~sp;
    if (!src[40]) begin
      hit = -1;
      for (int k = 0; k < DEPTH; k++) if (m_valid[k] && m_mac[k] == src) hit = k;
      if (hit >= 0) m_port[hit] = sp;
      else begin
        m_valid[m_repl] = 1; m_mac[m_repl] = src; m_port[m_repl] = sp;
        m_repl = (m_repl + 1) % DEPTH;
      end
    end
    return m;
  endfunction

  function automatic void model_reset();
    for (int k = 0; k < DEPTH; k++) m_valid[k] = 0;
    m_repl = 0;
  endfunction

  logic [47:0] pool[24];
  beat_q_t     drv_q;
  byte_q_t     exp_f[$];
  port_mask_t  exp_m[$];
  int n_flood = 0, n_hit = 0, n_drop = 0;

  task automatic add_pkt(input logic [47:0] dst, input logic [47:0] src, input int port);
    automatic byte_q_t    f = frame(dst, src, 16'h0800, rand_bytes(46 + $urandom % 30));
    automatic port_mask_t sp = port_mask_t'(1 << port);
    automatic port_mask_t m = model(dst, src, sp);
    automatic beat_q_t    b = to_beats(f, sp, '0);
    foreach (b[i]) drv_q.push_back(b[i]);
    if (m == '0) n_drop++;
    else begin
      exp_f.push_back(f); exp_m.push_back(m);
      if (m == ~sp) n_flood++; else n_hit++;
    end
  endtask

  // driver
  initial begin
    bit fired = 0;
    forever begin
      @(negedge clk);
      if (fired) void'(drv_q.pop_front());
      if (!in_valid || fired) begin
        in_valid = (drv_q.size() > 0) && (stream_mode || $urandom % 4 != 0);
        if (drv_q.size() > 0) in_beat = drv_q[0];
      end
      #4 fired = in_valid && in_ready && rst_n;
    end
  end

  // monitor
  int t_in_first = -1, lat_checked = 0;
  initial begin
    beat_q_t cur;
    forever begin
      @(negedge clk);
      out_ready = stream_mode || ($urandom % 4 != 0);
      #4;
      if (rst_n && out_valid && out_ready) begin
        cur.push_back(out_beat);
        if (out_beat.last) begin
          checks++;
          if (exp_f.size() == 0) begin failures++; $display("unexpected packet"); end
          else begin
            if (!same_bytes(from_beats(cur), exp_f[0])) begin failures++; $display("packet bytes differ"); end
            foreach (cur[i]) if (cur[i].dst != exp_m[0]) begin
              failures++; $display("dst %b expected %b", cur[i].dst, exp_m[0]); break;
            end
            void'(exp_f.pop_front()); void'(exp_m.pop_front());
          end
          cur.delete();
        end
      end
    end
  end

  // idle must be low whenever a packet is partly in or still inside
  initial begin
    bit prev_mid;
    prev_mid = 0;
    forever begin
      @(negedge clk);
      #4;
      if (rst_n && prev_mid && idle) begin failures++; $display("idle high inside a packet"); end
      if (rst_n && out_valid && idle) begin failures++; $display("idle high with output pending"); end
      if (in_valid && in_ready && rst_n) prev_mid = !in_beat.last;
    end
  end

  task automatic drain();
    int guard = 0;
    while ((drv_q.size() > 0 || exp_f.size() > 0 || !idle) && guard < 20000) begin
      @(posedge clk); guard++;
    end
  endtask

  initial begin
    for (int i = 0; i < 24; i++) pool[i] = {8'h02, 32'($urandom), 8'(i)};
    pool[23] = 48'hFF_FF_FF_FF_FF_FF;  // broadcast, only used as destination
    model_reset();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < PKTS; k++)
      add_pkt(pool[$urandom % 24], pool[$urandom % 23], $urandom % NUM_PORTS);
    drain();
    checks++;
    if (n_flood == 0 || n_hit == 0 || n_drop == 0) begin
      failures++; $display("missing case: flood=%0d hit=%0d drop=%0d", n_flood, n_hit, n_drop);
    end
    // latency: with no back-pressure the first beat leaves one cycle after it entered
    stream_mode = 1;
    @(negedge clk);
    add_pkt(48'h02_aa_bb_cc_dd_ee, pool[1], 2);
    begin
      int t0, t1;
      @(posedge clk iff (in_valid && in_ready)); t0 = $time;
      @(posedge clk iff out_valid); t1 = $time;
      #1;
      checks++;
      if (t1 - t0 != 10) begin failures++; $display("latency %0d ns", t1 - t0); end
    end
    drain();
    // reset clears the table: a learned destination floods again
    @(negedge clk) rst_n = 0;
    model_reset();
    @(negedge clk) rst_n = 1;
    n_flood = 0;
    add_pkt(pool[1], pool[5], 3);
    drain();
    checks++;
    if (n_flood != 1) begin failures++; $display("table not cleared by reset"); end
    $display("flood=%0d hit=%0d drop=%0d", n_flood, n_hit, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
