// Helpers shared by the testbenches: Ethernet frame construction and the
// conversion of frames to and from 64-bit stream beats (byte 0 in
// data[7:0], keep marking valid bytes of the last beat).
package tb_pkt_pkg;
  import mbox_pkg::*;

  typedef logic [7:0] byte_q_t[$];
  typedef beat_t      beat_q_t[$];

  function automatic byte_q_t frame(input logic [47:0] dst, input logic [47:0] src,
                                    input logic [15:0] etype, input byte_q_t payload);
    byte_q_t f;
    for (int k = 5; k >= 0; k--) f.push_back(dst[8*k +: 8]);
    for (int k = 5; k >= 0; k--) f.push_back(src[8*k +: 8]);
    f.push_back(etype[15:8]);
    f.push_back(etype[7:0]);
    foreach (payload[i]) f.push_back(payload[i]);
    return f;
  endfunction

  function automatic byte_q_t rand_bytes(input int n);
    byte_q_t b;
    for (int i = 0; i < n; i++) b.push_back(8'($urandom));
    return b;
  endfunction

  function automatic beat_q_t to_beats(input byte_q_t f, input port_mask_t src,
                                       input port_mask_t dst);
    beat_q_t q;
    beat_t   b;
    int      n;
    n = f.size();
    for (int i = 0; i < n; i += 8) begin
      b      = '0;
      b.src  = src;
      b.dst  = dst;
      for (int k = 0; k < 8; k++)
        if (i + k < n) begin
          b.data[8*k +: 8] = f[i+k];
          b.keep[k]        = 1'b1;
        end
      b.last = (i + 8 >= n);
      q.push_back(b);
    end
    return q;
  endfunction

  function automatic byte_q_t from_beats(input beat_q_t q);
    byte_q_t f;
    foreach (q[i])
      for (int k = 0; k < 8; k++)
        if (q[i].keep[k]) f.push_back(q[i].data[8*k +: 8]);
    return f;
  endfunction

  function automatic bit same_bytes(input byte_q_t a, input byte_q_t b);
    if (a.size() != b.size()) return 1'b0;
    foreach (a[i]) if (a[i] != b[i]) return 1'b0;
    return 1'b1;
  endfunction

endpackage
