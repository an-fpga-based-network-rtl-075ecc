// Testbench of reconfig_handler with the SRAM interface, an SRAM model and
// an ICAP model. Two updates are run: RP_1 with 1000 words sent with random
// gaps, then RP_0 with 700 words after an abandoned start (the restart must
// discard the earlier words). Checks: new words are refused while an update
// runs; only the target's enable drops; its reset waits for the partition to
// be quiet; the words reach ICAP exactly and in order at one per cycle; the
// readback sequence captures the ICAP status; the partition is held in reset
// for the whole load and released with its enable restored; the completion
// report carries partition, status and word count; the readback program
// written to ICAP is the exact 7-series command sequence; the out-of-service time
// is the word count plus a fixed overhead.
module tb_reconfig_handler;
  import mbox_pkg::*;

  localparam int RP_AW = 12, LAT = 2, INIT = 16;
  localparam int AW = RP_AW + 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              cfg_valid = 0, cfg_ready;
  cfg_word_t         cfg = '0;
  logic              s_wr_en, s_rd_en, s_rd_ready, s_rd_valid;
  logic [AW-1:0]     s_wr_addr, s_rd_addr;
  logic [31:0]       s_wr_data, s_rd_data;
  logic [NUM_RP-1:0] rp_enable, rp_rst_n, rp_quiet = '1;
  logic              icap_csib, icap_rdwrb;
  logic [31:0]       icap_i, icap_o;
  logic              done_valid, done_ready = 0, done_rp, busy;
  logic [31:0]       done_status, done_words, load_cycles;
  logic              sram_we, sram_re;
  logic [AW-1:0]     sram_addr;
  logic [31:0]       sram_wdata, sram_rdata;
  int checks = 0, failures = 0;
  localparam logic [31:0] RB_PROG[10] = '{32'hFFFF_FFFF, 32'hAA99_5566, 32'h2000_0000, 32'h2800_E001,
                                         32'h2000_0000, 32'h2000_0000, 32'h3000_8001, 32'h0000_000D,
                                         32'h2000_0000, 32'h2000_0000};

  reconfig_handler #(.RP_AW(RP_AW), .INIT_CYCLES(INIT)) dut (
    .clk, .rst_n, .cfg_valid, .cfg_ready, .cfg,
    .sram_wr_en(s_wr_en), .sram_wr_addr(s_wr_addr), .sram_wr_data(s_wr_data),
    .sram_rd_en(s_rd_en), .sram_rd_ready(s_rd_ready), .sram_rd_addr(s_rd_addr),
    .sram_rd_valid(s_rd_valid), .sram_rd_data(s_rd_data),
    .rp_enable, .rp_rst_n, .rp_quiet, .icap_csib, .icap_rdwrb, .icap_i, .icap_o,
    .done_valid, .done_ready, .done_rp, .done_status, .done_words, .busy, .load_cycles);

  sram_if #(.ADDR_W(AW), .DATA_W(32), .RD_LAT(LAT)) u_sif (
    .clk, .rst_n, .wr_en(s_wr_en), .wr_addr(s_wr_addr), .wr_data(s_wr_data),
    .rd_en(s_rd_en), .rd_ready(s_rd_ready), .rd_addr(s_rd_addr),
    .rd_valid(s_rd_valid), .rd_data(s_rd_data),
    .sram_we, .sram_re, .sram_addr, .sram_wdata, .sram_rdata);

  sram_model #(.ADDR_W(AW), .DATA_W(32), .RD_LAT(LAT)) u_sram (.*);
  icap_model #(.STATUS(16'h4000)) u_icap (.clk, .csib(icap_csib), .rdwrb(icap_rdwrb),
                                          .i(icap_i), .o(icap_o));

  // ICAP data words seen before the readback's sync word
  logic [31:0] icap_seen[$], rb_seen[$];
  bit          in_readback = 0;
  int          first_t = -1, last_t = -1;
  always @(posedge clk) if (!icap_csib && !icap_rdwrb) begin
    if (icap_i == 32'hFFFF_FFFF || icap_i == 32'hAA99_5566) in_readback = 1;
    if (in_readback) rb_seen.push_back(icap_i);
    else begin
      icap_seen.push_back(icap_i);
      if (first_t < 0) first_t = $time;
      last_t = $time;
    end
  end

  // watch the partitions
  int bad_reset_early = 0, reset_cycles = 0, other_touched = 0;
  logic tgt = 0;
  always @(negedge clk) if (rst_n) begin
    if (!rp_rst_n[tgt] && !rp_quiet[tgt]) bad_reset_early++;
    if (!rp_rst_n[tgt]) reset_cycles++;
    if (!rp_rst_n[!tgt] || !rp_enable[!tgt]) other_touched++;
  end

  task automatic send(input logic [31:0] w[$], input logic rp, input bit first, input bit last);
    foreach (w[i]) begin
      @(negedge clk);
      while ($urandom % 4 == 0) @(negedge clk);
      cfg_valid = 1;
      cfg = '{word: w[i], first: first && i == 0, last: last && i == w.size() - 1, rp: rp};
      #4;
      while (!cfg_ready) begin @(negedge clk); #4; end
      @(negedge clk) cfg_valid = 0;
    end
  endtask

  task automatic update(input logic rp, input int n, input bit abandon_first);
    logic [31:0] w[$], junk[$];
    int refused, t_start;
    tgt = rp;
    icap_seen.delete(); rb_seen.delete(); in_readback = 0; first_t = -1; last_t = -1;
    u_icap.clear();
    reset_cycles = 0; bad_reset_early = 0;
    if (abandon_first) begin
      for (int i = 0; i < 50; i++) junk.push_back($urandom);
      send(junk, rp, 1, 0);
    end
    for (int i = 0; i < n; i++) w.push_back($urandom);
    // the partition stays busy for a while after the last word
    rp_quiet[rp] = 0;
    send(w, rp, 1, 1);
    // new words are refused during the update
    @(negedge clk) begin cfg_valid = 1; cfg = '{word: 32'h1, first: 1, last: 1, rp: !rp}; end
    refused = 0;
    repeat (40) begin #4; if (!cfg_ready) refused++; @(negedge clk); end
    cfg_valid = 0;
    checks++;
    if (refused != 40) begin failures++; $display("words accepted during an update"); end
    checks++;
    if (rp_enable[rp]) begin failures++; $display("enable of RP%0d not dropped", rp); end
    checks++;
    if (!rp_rst_n[rp] == 1'b1) begin failures++; $display("reset before the partition was quiet"); end
    rp_quiet[rp] = 1;
    t_start = $time;
    @(posedge clk iff done_valid);
    @(negedge clk) done_ready = 1;
    @(negedge clk) done_ready = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (icap_seen.size() != n) begin failures++; $display("ICAP got %0d words, expected %0d", icap_seen.size(), n); end
    else foreach (w[i]) begin
      checks++;
      if (icap_seen[i] != w[i]) begin
        failures++; $display("ICAP word %0d is %h, expected %h", i, icap_seen[i], w[i]);
      end
    end
    // readback program written after the bitstream: dummy, sync, NOOP,
    // read STAT, two NOOPs, then (after the read) DESYNC and two NOOPs
    checks++;
    if (rb_seen.size() != $size(RB_PROG)) begin
      failures++; $display("readback program has %0d writes, expected %0d", rb_seen.size(), $size(RB_PROG));
    end else foreach (RB_PROG[i]) begin
      checks++;
      if (rb_seen[i] != RB_PROG[i]) begin
        failures++; $display("readback write %0d is %h, expected %h", i, rb_seen[i], RB_PROG[i]);
      end
    end
    checks++;
    if ((last_t - first_t) / 10 != n - 1) begin
      failures++; $display("%0d words took %0d cycles at ICAP", n, (last_t - first_t) / 10 + 1);
    end
    checks++;
    if (done_rp != rp || done_words != 32'(n) || done_status != {16'(n), 16'h4000}) begin
      failures++; $display("report rp=%0d words=%0d status=%h", done_rp, done_words, done_status);
    end
    checks++;
    if (!u_icap.desynced || u_icap.reads == 0) begin failures++; $display("readback sequence incomplete"); end
    checks++;
    if (bad_reset_early != 0) begin failures++; $display("reset while not quiet"); end
    checks++;
    if (load_cycles < 32'(n) || load_cycles > 32'(n + LAT + 8 + 32 + INIT)) begin
      failures++; $display("out of service for %0d cycles", load_cycles);
    end
    checks++;
    if (reset_cycles < n || !rp_rst_n[rp] || !rp_enable[rp]) begin
      failures++; $display("partition reset/enable wrong after update (%0d cycles in reset)", reset_cycles);
    end
    $display("RP%0d: %0d words, out of service %0d cycles", rp, n, load_cycles);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    update(1, 1000, 0);
    update(0, 700, 1);
    checks++;
    if (other_touched != 0) begin failures++; $display("the other partition was disturbed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
