// Behavioural model of the external synchronous SRAM (not synthesizable
// logic of the design): one access per clock, active-high write and read
// strobes, read data on sram_rdata RD_LAT clocks after the read is sampled.
// Contents start at zero; only the addresses written are stored.
module sram_model #(
  parameter int unsigned ADDR_W = 21,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned RD_LAT = 2
) (
  input  logic              clk,
  input  logic              sram_we,
  input  logic              sram_re,
  input  logic [ADDR_W-1:0] sram_addr,
  input  logic [DATA_W-1:0] sram_wdata,
  output logic [DATA_W-1:0] sram_rdata
);
  logic [DATA_W-1:0] mem [logic [ADDR_W-1:0]];
  logic [DATA_W-1:0] pipe [RD_LAT];
  int unsigned       writes = 0, reads = 0;

  initial foreach (pipe[i]) pipe[i] = '0;

  always @(posedge clk) begin
    for (int i = RD_LAT - 1; i > 0; i--) pipe[i] <= pipe[i-1];
    if (sram_re) begin
      pipe[0] <= mem.exists(sram_addr) ? mem[sram_addr] : '0;
      reads++;
    end else begin
      pipe[0] <= '0;
    end
    if (sram_we) begin
      mem[sram_addr] = sram_wdata;
      writes++;
    end
  end

  assign sram_rdata = pipe[RD_LAT-1];
endmodule
