// Testbench of sram_if with the SRAM model: random writes, then random and
// back-to-back reads. Checks every returned word against a copy kept by the
// testbench, the read latency of RD_LAT + 2 cycles, one word per cycle for a
// burst of reads, and that a read asked for together with a write waits.
module tb_sram_if;
  localparam int AW = 10, DW = 32, LAT = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          wr_en = 0, rd_en = 0, rd_ready, rd_valid;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [DW-1:0] wr_data = '0, rd_data;
  logic          sram_we, sram_re;
  logic [AW-1:0] sram_addr;
  logic [DW-1:0] sram_wdata, sram_rdata;
  int checks = 0, failures = 0;

  sram_if #(.ADDR_W(AW), .DATA_W(DW), .RD_LAT(LAT)) dut (.*);
  sram_model #(.ADDR_W(AW), .DATA_W(DW), .RD_LAT(LAT)) u_mem (.*);

  logic [DW-1:0] ref_mem[1 << AW];
  logic [DW-1:0] exp_q[$];
  int            issue_t[$];
  int            cyc = 0;
  always @(posedge clk) cyc++;

  // read monitor
  initial forever begin
    @(negedge clk);
    #4;
    if (rd_valid) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected read data"); end
      else begin
        if (rd_data !== exp_q[0]) begin failures++; $display("read %h expected %h", rd_data, exp_q[0]); end
        checks++;
        if (cyc - issue_t[0] != LAT + 2) begin
          failures++; $display("read latency %0d", cyc - issue_t[0]);
        end
        void'(exp_q.pop_front()); void'(issue_t.pop_front());
      end
    end
  end

  task automatic write(input logic [AW-1:0] a, input logic [DW-1:0] d);
    @(negedge clk);
    wr_en = 1; wr_addr = a; wr_data = d; rd_en = 0;
    ref_mem[a] = d;
  endtask

  task automatic read(input logic [AW-1:0] a);
    @(negedge clk);
    wr_en = 0; rd_en = 1; rd_addr = a;
    #4;
    if (rd_ready) begin exp_q.push_back(ref_mem[a]); issue_t.push_back(cyc); end
  endtask

  int burst_start, burst_words;
  initial begin
    foreach (ref_mem[i]) ref_mem[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 300; k++) write(AW'($urandom), $urandom);
    for (int k = 0; k < 300; k++) begin
      read(AW'($urandom));
      if ($urandom % 3 == 0) begin @(negedge clk) rd_en = 0; end
    end
    // burst of 64 reads, one per cycle
    for (int k = 0; k < 64; k++) read(AW'(k));
    @(negedge clk) rd_en = 0;
    // a read together with a write is refused
    @(negedge clk) begin wr_en = 1; rd_en = 1; wr_addr = 5; wr_data = 32'hCAFE_0005; ref_mem[5] = wr_data; end
    #4;
    checks++;
    if (rd_ready) begin failures++; $display("read accepted during a write"); end
    @(negedge clk) begin wr_en = 0; rd_en = 0; end
    read(5);
    @(negedge clk) rd_en = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d reads never returned", exp_q.size()); end
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
