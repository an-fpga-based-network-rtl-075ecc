// Packet-granular round-robin arbiter, N packet streams onto one.
//
// While no packet is in flight the arbiter offers the lowest-numbered valid
// input at or after the round-robin pointer; once the first beat of a packet
// has transferred, the grant is held until its last beat, so packets are never
// interleaved. The pointer then moves past the input just served. The data
// path is a combinational multiplexer: out_valid/out_beat follow the chosen
// input in the same cycle and in_ready[i] is out_ready for the granted input
// only. Used by the packet dispatcher (four ports onto the management plane)
// and by the plane arbiter (application against management per port). The
// round-robin policy is this design's choice; the source architecture gives none.
module pkt_rr_arbiter
  import mbox_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic  [N-1:0]   in_valid,
  output logic  [N-1:0]   in_ready,
  input  beat_t [N-1:0]   in_beat,
  output logic            out_valid,
  input  logic            out_ready,
  output beat_t           out_beat
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr_q;     // first input to consider
  logic [IW-1:0] lock_id_q; // input that owns the output mid-packet
  logic          locked_q;
  logic [IW-1:0] pick;
  logic          pick_ok;
  logic [IW-1:0] sel;

  always_comb begin
    logic [IW-1:0] idx;
    pick    = '0;
    pick_ok = 1'b0;
    idx     = '0;
    for (int k = 0; k < int'(N); k++) begin
      idx = IW'((int'(ptr_q) + k) % N);
      if (!pick_ok && in_valid[idx]) begin
        pick    = idx;
        pick_ok = 1'b1;
      end
    end
  end

  assign sel       = locked_q ? lock_id_q : pick;
  assign out_valid = locked_q ? in_valid[lock_id_q] : pick_ok;
  assign out_beat  = in_beat[sel];

  always_comb begin
    in_ready = '0;
    if (locked_q || pick_ok) in_ready[sel] = out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr_q     <= '0;
      lock_id_q <= '0;
      locked_q  <= 1'b0;
    end else if (out_valid && out_ready) begin
      if (out_beat.last) begin
        locked_q <= 1'b0;
        ptr_q    <= IW'((int'(sel) + 1) % N);
      end else begin
        locked_q  <= 1'b1;
        lock_id_q <= sel;
      end
    end
  end

endmodule
