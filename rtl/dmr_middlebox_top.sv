// Dual-partition network middlebox whose application can be replaced remotely
// without interrupting service.
//
// The application datapath (pkt_proc_module) exists twice, in partitions
// RP_0 and RP_1. Packets from the four receive ports pass the packet
// dispatcher, which sends management packets to the management plane and all
// others to the ingress allocator. The allocator gives each packet to
// whichever enabled partition is idle, so both serve traffic side by side;
// the egress allocator collects their results per transmit port, and the
// plane arbiter merges them with the management plane's replies before the
// transmit ports. A management packet stream carries a new partial bitstream:
// the management handler unpacks it, the reconfiguration handler stores it in
// SRAM through the SRAM interface, takes the target partition out of the flow
// once it is idle, loads the bitstream through ICAP, reads the configuration
// status back, re-initialises the partition and lets packets in again, then a
// status packet goes back to the sender. While one partition is reloaded the
// other carries all traffic.
//
// A partition under reconfiguration is held in reset by rp_rst_n and its
// outputs toward the static logic are forced idle, as a decoupler would do.
// The ports are the MACs' receive and transmit streams (valid/ready, beat_t),
// the pins of the external SRAM and of the ICAP primitive, and status
// outputs. The block structure follows the source architecture; everything inside the
// blocks that the source architecture leaves open is described in each block's header.
module dmr_middlebox_top
  import mbox_pkg::*;
#(
  parameter int unsigned CAM_DEPTH   = 16,
  parameter int unsigned RP_AW       = 20,
  parameter int unsigned SRAM_RD_LAT = 2,
  parameter int unsigned INIT_CYCLES = 16,
  parameter logic [47:0] DEV_MAC     = 48'h02_00_00_00_00_01,
  localparam int unsigned SRAM_AW    = RP_AW + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // MAC receive streams
  input  logic  [NUM_PORTS-1:0] rx_valid,
  output logic  [NUM_PORTS-1:0] rx_ready,
  input  beat_t [NUM_PORTS-1:0] rx_beat,
  // MAC transmit streams
  output logic  [NUM_PORTS-1:0] tx_valid,
  input  logic  [NUM_PORTS-1:0] tx_ready,
  output beat_t [NUM_PORTS-1:0] tx_beat,
  // external SRAM
  output logic                  sram_we,
  output logic                  sram_re,
  output logic  [SRAM_AW-1:0]   sram_addr,
  output logic  [CFG_W-1:0]     sram_wdata,
  input  logic  [CFG_W-1:0]     sram_rdata,
  // ICAP primitive
  output logic                  icap_csib,
  output logic                  icap_rdwrb,
  output logic  [CFG_W-1:0]     icap_i,
  input  logic  [CFG_W-1:0]     icap_o,
  // status
  output logic  [NUM_RP-1:0]    rp_enable,
  output logic                  reconfig_busy,
  output logic  [31:0]          load_cycles
);
  // dispatcher -> ingress allocator / management handler
  logic  [NUM_PORTS-1:0] app_valid, app_ready;
  beat_t [NUM_PORTS-1:0] app_beat;
  logic                  mgi_valid, mgi_ready;
  beat_t                 mgi_beat;
  // ingress allocator -> partitions
  logic  [NUM_RP-1:0]    ia_valid, ia_ready, lane_busy;
  beat_t [NUM_RP-1:0]    ia_beat;
  // partitions -> egress allocator
  logic  [NUM_RP-1:0]    pm_valid, pm_ready, pm_in_ready, pm_idle;
  beat_t [NUM_RP-1:0]    pm_beat;
  logic  [NUM_RP-1:0]    ea_valid, ea_ready;
  beat_t [NUM_RP-1:0]    ea_beat;
  // egress allocator -> plane arbiter
  logic  [NUM_PORTS-1:0] eo_valid, eo_ready;
  beat_t [NUM_PORTS-1:0] eo_beat;
  // management plane
  logic                  cfg_valid, cfg_ready;
  cfg_word_t             cfg;
  logic                  done_valid, done_ready, done_rp;
  logic  [31:0]          done_status, done_words;
  logic                  rep_valid, rep_ready;
  beat_t                 rep_beat;
  logic  [NUM_RP-1:0]    rp_rst_n, rp_quiet;
  // SRAM user side
  logic                  s_wr_en, s_rd_en, s_rd_ready, s_rd_valid;
  logic  [SRAM_AW-1:0]   s_wr_addr, s_rd_addr;
  logic  [CFG_W-1:0]     s_wr_data, s_rd_data;

  pkt_dispatcher u_dispatcher (
    .clk, .rst_n,
    .rx_valid, .rx_ready, .rx_beat,
    .app_valid, .app_ready, .app_beat,
    .mgmt_valid(mgi_valid), .mgmt_ready(mgi_ready), .mgmt_beat(mgi_beat)
  );

  ingress_allocator u_ingress (
    .clk, .rst_n,
    .in_valid(app_valid), .in_ready(app_ready), .in_beat(app_beat),
    .rp_valid(ia_valid), .rp_ready(ia_ready), .rp_beat(ia_beat),
    .rp_enable, .rp_idle(pm_idle), .lane_busy
  );

  for (genvar r = 0; r < NUM_RP; r++) begin : g_rp
    logic rp_idle_raw;
    pkt_proc_module #(.CAM_DEPTH(CAM_DEPTH)) u_app (
      .clk,
      .rst_n    (rst_n && rp_rst_n[r]),
      .in_valid (ia_valid[r] && rp_rst_n[r]),
      .in_ready (pm_in_ready[r]),
      .in_beat  (ia_beat[r]),
      .out_valid(pm_valid[r]),
      .out_ready(pm_ready[r]),
      .out_beat (pm_beat[r]),
      .idle     (rp_idle_raw)
    );
    // decoupling of a partition held for reconfiguration
    assign ia_ready[r]   = pm_in_ready[r] && rp_rst_n[r];
    assign ea_valid[r]   = pm_valid[r] && rp_rst_n[r];
    assign ea_beat[r]    = pm_beat[r];
    assign pm_ready[r]   = ea_ready[r];
    assign pm_idle[r]    = rp_idle_raw && rp_rst_n[r];
    assign rp_quiet[r]   = rp_idle_raw && !lane_busy[r];
  end

  egress_allocator u_egress (
    .clk, .rst_n,
    .rp_valid(ea_valid), .rp_ready(ea_ready), .rp_beat(ea_beat),
    .out_valid(eo_valid), .out_ready(eo_ready), .out_beat(eo_beat)
  );

  plane_arbiter u_plane_arb (
    .clk, .rst_n,
    .app_valid(eo_valid), .app_ready(eo_ready), .app_beat(eo_beat),
    .mgmt_valid(rep_valid), .mgmt_ready(rep_ready), .mgmt_beat(rep_beat),
    .tx_valid, .tx_ready, .tx_beat
  );

  mgmt_pkt_handler #(.DEV_MAC(DEV_MAC)) u_mgmt (
    .clk, .rst_n,
    .in_valid(mgi_valid), .in_ready(mgi_ready), .in_beat(mgi_beat),
    .cfg_valid, .cfg_ready, .cfg,
    .done_valid, .done_ready, .done_rp, .done_status, .done_words,
    .rep_valid, .rep_ready, .rep_beat
  );

  reconfig_handler #(.RP_AW(RP_AW), .INIT_CYCLES(INIT_CYCLES)) u_reconfig (
    .clk, .rst_n,
    .cfg_valid, .cfg_ready, .cfg,
    .sram_wr_en(s_wr_en), .sram_wr_addr(s_wr_addr), .sram_wr_data(s_wr_data),
    .sram_rd_en(s_rd_en), .sram_rd_ready(s_rd_ready), .sram_rd_addr(s_rd_addr),
    .sram_rd_valid(s_rd_valid), .sram_rd_data(s_rd_data),
    .rp_enable, .rp_rst_n, .rp_quiet,
    .icap_csib, .icap_rdwrb, .icap_i, .icap_o,
    .done_valid, .done_ready, .done_rp, .done_status, .done_words,
    .busy(reconfig_busy), .load_cycles
  );

  sram_if #(.ADDR_W(SRAM_AW), .DATA_W(CFG_W), .RD_LAT(SRAM_RD_LAT)) u_sram_if (
    .clk, .rst_n,
    .wr_en(s_wr_en), .wr_addr(s_wr_addr), .wr_data(s_wr_data),
    .rd_en(s_rd_en), .rd_ready(s_rd_ready), .rd_addr(s_rd_addr),
    .rd_valid(s_rd_valid), .rd_data(s_rd_data),
    .sram_we, .sram_re, .sram_addr, .sram_wdata, .sram_rdata
  );

endmodule
