// Reconfiguration handler: stores a partial bitstream in SRAM, then swaps the
// logic of one reconfigurable partition while the other keeps serving.
//
// Sequence for one update of partition R:
//   STORE  Words from the management handler are written to SRAM, partition R
//          in its own region (address = {R, word index}), one per cycle. A
//          word flagged `first` restarts the index; the word flagged `last`
//          ends storage.
//   STOP   rp_enable[R] drops, so the ingress allocator sends R no new
//          packet; the handler waits until rp_quiet[R] says R holds no packet.
//   LOAD   R is held in reset (rp_rst_n[R] low, which also isolates it from
//          the static logic) and the stored words are read back and written
//          to ICAP, one read issued and one ICAP word written per cycle: 32
//          bits per cycle, 3.2 Gbit/s at 100 MHz, plus the SRAM read latency.
//   RB     Readback of the configuration status register through ICAP:
//          dummy/sync/no-op words, a type-1 read of STAT, a switch of ICAP to
//          read, capture of the word, then a DESYNC command.
//   INIT   R stays in reset for INIT_CYCLES more cycles, then is released.
//   DONE   rp_enable[R] rises again and the completion (partition, status
//          word, word count) is reported to the management handler.
// New bitstream words are refused (cfg_ready low) outside STORE. load_cycles
// holds the length of the last LOAD+RB+INIT, the time the partition is out of
// service. ICAP signals are registered; icap_o is sampled from the ICAP
// primitive's output. The order of the steps follows the source architecture; the
// command words of the readback are the usual 7-series ICAP packets, and the
// SRAM layout, INIT length and status report are this design's choices.
module reconfig_handler
  import mbox_pkg::*;
#(
  parameter int unsigned RP_AW       = 20,  // words per partition region, log2
  parameter int unsigned INIT_CYCLES = 16,
  parameter int unsigned RB_WAIT     = 4,   // cycles ICAP is held in read
  localparam int unsigned ADDR_W     = RP_AW + 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // bitstream words
  input  logic               cfg_valid,
  output logic               cfg_ready,
  input  cfg_word_t          cfg,
  // SRAM interface, user side
  output logic               sram_wr_en,
  output logic [ADDR_W-1:0]  sram_wr_addr,
  output logic [CFG_W-1:0]   sram_wr_data,
  output logic               sram_rd_en,
  input  logic               sram_rd_ready,
  output logic [ADDR_W-1:0]  sram_rd_addr,
  input  logic               sram_rd_valid,
  input  logic [CFG_W-1:0]   sram_rd_data,
  // partitions
  output logic [NUM_RP-1:0]  rp_enable,
  output logic [NUM_RP-1:0]  rp_rst_n,
  input  logic [NUM_RP-1:0]  rp_quiet,
  // ICAP
  output logic               icap_csib,
  output logic               icap_rdwrb,
  output logic [CFG_W-1:0]   icap_i,
  input  logic [CFG_W-1:0]   icap_o,
  // completion report
  output logic               done_valid,
  input  logic               done_ready,
  output logic               done_rp,
  output logic [31:0]        done_status,
  output logic [31:0]        done_words,
  // observation
  output logic               busy,
  output logic [31:0]        load_cycles
);
  typedef enum logic [2:0] {S_STORE, S_STOP, S_LOAD, S_RB, S_INIT, S_DONE} state_e;

  localparam logic [31:0] ICAP_DUMMY  = 32'hFFFF_FFFF;
  localparam logic [31:0] ICAP_SYNC   = 32'hAA99_5566;
  localparam logic [31:0] ICAP_NOOP   = 32'h2000_0000;
  localparam logic [31:0] ICAP_RD_STAT = 32'h2800_E001; // type 1, read, STAT, 1 word
  localparam logic [31:0] ICAP_WR_CMD = 32'h3000_8001;  // type 1, write, CMD, 1 word
  localparam logic [31:0] CMD_DESYNC  = 32'h0000_000D;

  localparam int unsigned ST_RD0  = 8;                 // first read step
  localparam int unsigned ST_CAP  = ST_RD0 + RB_WAIT;  // capture step
  localparam int unsigned ST_END  = ST_CAP + 6;

  state_e        state_q;
  logic          tgt_q;
  logic [RP_AW:0] wptr_q, total_q, rptr_q, cnt_q;
  logic [7:0]    step_q;
  logic [$clog2(INIT_CYCLES+1)-1:0] init_q;
  logic [31:0]   status_q, cyc_q;

  logic [RP_AW:0] widx;
  logic           wfire;

  assign cfg_ready = (state_q == S_STORE);
  assign wfire     = cfg_valid && cfg_ready;
  assign widx      = cfg.first ? '0 : wptr_q;

  assign sram_wr_en   = wfire;
  assign sram_wr_addr = {cfg.rp, widx[RP_AW-1:0]};
  assign sram_wr_data = cfg.word;
  assign sram_rd_en   = (state_q == S_LOAD) && (rptr_q < total_q);
  assign sram_rd_addr = {tgt_q, rptr_q[RP_AW-1:0]};

  assign done_valid  = (state_q == S_DONE);
  assign done_rp     = tgt_q;
  assign done_status = status_q;
  assign done_words  = 32'(total_q);
  assign busy        = (state_q != S_STORE);

  // readback program: ICAP select, direction and data for each step
  function automatic logic [33:0] rb_step(input int unsigned s);
    // {csib, rdwrb, data}
    if      (s == 0)                 return {2'b00, ICAP_DUMMY};
    else if (s == 1)                 return {2'b00, ICAP_SYNC};
    else if (s == 2)                 return {2'b00, ICAP_NOOP};
    else if (s == 3)                 return {2'b00, ICAP_RD_STAT};
    else if (s == 4 || s == 5)       return {2'b00, ICAP_NOOP};
    else if (s == 6)                 return {2'b10, 32'h0};
    else if (s == 7)                 return {2'b11, 32'h0};
    else if (s < ST_CAP)             return {2'b01, 32'h0};
    else if (s == ST_CAP)            return {2'b11, 32'h0};
    else if (s == ST_CAP + 1)        return {2'b10, 32'h0};
    else if (s == ST_CAP + 2)        return {2'b00, ICAP_WR_CMD};
    else if (s == ST_CAP + 3)        return {2'b00, CMD_DESYNC};
    else if (s == ST_CAP + 4 || s == ST_CAP + 5) return {2'b00, ICAP_NOOP};
    else                             return {2'b10, 32'h0};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_STORE;
      tgt_q       <= 1'b0;
      wptr_q      <= '0;
      total_q     <= '0;
      rptr_q      <= '0;
      cnt_q       <= '0;
      step_q      <= '0;
      init_q      <= '0;
      status_q    <= '0;
      cyc_q       <= '0;
      load_cycles <= '0;
      rp_enable   <= '1;
      rp_rst_n    <= '1;
      icap_csib   <= 1'b1;
      icap_rdwrb  <= 1'b0;
      icap_i      <= '0;
    end else begin
      icap_csib <= 1'b1;
      if (state_q inside {S_LOAD, S_RB, S_INIT}) cyc_q <= cyc_q + 1'b1;
      unique case (state_q)
        S_STORE: if (wfire) begin
          wptr_q <= widx + 1'b1;
          if (cfg.last) begin
            total_q <= widx + 1'b1;
            tgt_q   <= cfg.rp;
            state_q <= S_STOP;
          end
        end
        S_STOP: begin
          rp_enable[tgt_q] <= 1'b0;
          if (!rp_enable[tgt_q] && rp_quiet[tgt_q]) begin
            rp_rst_n[tgt_q] <= 1'b0;
            rptr_q  <= '0;
            cnt_q   <= '0;
            cyc_q   <= '0;
            state_q <= S_LOAD;
          end
        end
        S_LOAD: begin
          if (sram_rd_en && sram_rd_ready) rptr_q <= rptr_q + 1'b1;
          if (sram_rd_valid) begin
            icap_csib  <= 1'b0;
            icap_rdwrb <= 1'b0;
            icap_i     <= sram_rd_data;
            cnt_q      <= cnt_q + 1'b1;
            if (cnt_q + 1'b1 == total_q) begin
              step_q  <= '0;
              state_q <= S_RB;
            end
          end
        end
        S_RB: begin
          logic [33:0] op;
          op = rb_step(int'(step_q));
          icap_csib  <= op[33];
          icap_rdwrb <= op[32];
          icap_i     <= op[31:0];
          if (int'(step_q) == ST_CAP) status_q <= icap_o;
          step_q <= step_q + 1'b1;
          if (int'(step_q) == ST_END) begin
            init_q  <= '0;
            state_q <= S_INIT;
          end
        end
        S_INIT: begin
          init_q <= init_q + 1'b1;
          if (int'(init_q) == INIT_CYCLES - 1) begin
            rp_rst_n[tgt_q] <= 1'b1;
            load_cycles     <= cyc_q + 1'b1;
            state_q         <= S_DONE;
          end
        end
        S_DONE: begin
          rp_enable[tgt_q] <= 1'b1;
          if (done_ready) state_q <= S_STORE;
        end
        default: state_q <= S_STORE;
      endcase
    end
  end

  a_fits_region: assert property (@(posedge clk) disable iff (!rst_n)
    wfire |-> widx < (RP_AW + 1)'(1 << RP_AW));

endmodule
