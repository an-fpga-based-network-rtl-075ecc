// Behavioural model of the FPGA's internal configuration access port (ICAP)
// for the testbenches; the real part is a vendor primitive. On each clock
// with csib low and rdwrb low it takes a 32-bit word. Words before the first
// sync word (0xAA995566) are counted and summed as the partial bitstream
// (test bitstreams hold no sync word; 0xFFFFFFFF dummy words are skipped); after a sync word, a type-1 read of
// the status register (0x2800E001) arms a readback. With csib low and rdwrb high it drives o with STATUS
// (plus the number of configuration words in the upper half) one clock later.
// A DESYNC command (0x30008001 then 0x0000000D) ends the session.
module icap_model #(
  parameter logic [15:0] STATUS = 16'h4000
) (
  input  logic        clk,
  input  logic        csib,
  input  logic        rdwrb,
  input  logic [31:0] i,
  output logic [31:0] o
);
  int unsigned words = 0;        // every word written
  int unsigned data_words = 0;   // words before the first sync word
  logic [31:0] checksum = '0;
  bit          synced = 0, stat_armed = 0, cmd_next = 0, desynced = 0;
  int unsigned reads = 0, syncs = 0;
  longint      first_write_time = -1, last_data_time = -1;

  initial o = '0;

  always @(posedge clk) begin
    if (!csib && !rdwrb) begin
      words++;
      if (first_write_time < 0) first_write_time = $time;
      if (i == 32'hAA99_5566) begin synced = 1; syncs++; end
      else if (cmd_next) begin
        cmd_next = 0;
        if (i == 32'h0000_000D) begin synced = 0; desynced = 1; end
      end else if (synced && i == 32'h2800_E001) stat_armed = 1;
      else if (synced && i == 32'h3000_8001) cmd_next = 1;
      else if (syncs == 0 && i != 32'hFFFF_FFFF) begin
        data_words++;
        checksum = checksum + i;
        last_data_time = $time;
      end
    end
    if (!csib && rdwrb) begin
      reads++;
      o <= stat_armed ? {16'(data_words), STATUS} : 32'h0;
    end
  end

  function automatic void clear();
    words = 0; data_words = 0; checksum = '0; synced = 0; stat_armed = 0;
    cmd_next = 0; desynced = 0; reads = 0; syncs = 0;
    first_write_time = -1; last_data_time = -1;
  endfunction
endmodule
