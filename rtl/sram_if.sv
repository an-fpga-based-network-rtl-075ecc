// SRAM interface: connects the reconfiguration handler to the external
// synchronous SRAM that holds the partial bitstreams.
//
// One request per cycle: a write, or a read when no write is asked for in the
// same cycle (rd_ready is low then). Requests are registered onto the SRAM
// pins. The SRAM is taken to return read data RD_LAT cycles after it samples
// a read, as pipelined synchronous SRAMs do; the interface tracks outstanding
// reads with a shift register and registers the returned word, so rd_valid
// and rd_data appear RD_LAT + 2 cycles after the request, and back-to-back
// reads return one word per cycle. Pin polarity is active high. The source architecture
// names this block and the SRAM; the pin protocol, the latency and the
// widths are this design's choices.
module sram_if #(
  parameter int unsigned ADDR_W = 21,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned RD_LAT = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // user side
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [DATA_W-1:0] wr_data,
  input  logic              rd_en,
  output logic              rd_ready,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic              rd_valid,
  output logic [DATA_W-1:0] rd_data,
  // SRAM pins
  output logic              sram_we,
  output logic              sram_re,
  output logic [ADDR_W-1:0] sram_addr,
  output logic [DATA_W-1:0] sram_wdata,
  input  logic [DATA_W-1:0] sram_rdata
);
  logic [RD_LAT-1:0] pend_q;

  assign rd_ready = !wr_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sram_we    <= 1'b0;
      sram_re    <= 1'b0;
      sram_addr  <= '0;
      sram_wdata <= '0;
      pend_q     <= '0;
      rd_valid   <= 1'b0;
      rd_data    <= '0;
    end else begin
      sram_we    <= wr_en;
      sram_re    <= rd_en && !wr_en;
      sram_addr  <= wr_en ? wr_addr : rd_addr;
      sram_wdata <= wr_data;
      pend_q     <= (pend_q << 1) | RD_LAT'(sram_re);
      rd_valid   <= pend_q[RD_LAT-1];
      if (pend_q[RD_LAT-1]) rd_data <= sram_rdata;
    end
  end

endmodule
