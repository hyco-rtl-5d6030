// hyco_pkg: types and constant functions shared by the HyCo controller.
//
// The controlled optical network is an N x N Benes network of 2x2 MZI switching
// elements (N a power of two, n = log2(N), 2n-1 stages of N/2 elements). It is
// described here in "line" form: between stages a light path sits on one of N
// lines numbered 0..N-1. Stage s acts on address bit d(s), with d running
// n-1, ..., 1, 0, 1, ..., n-1: its element e joins the two lines that differ only in
// bit d(s), and a Cross element flips that bit while a Bar element keeps it. The
// element number is the line number with bit d(s) removed. A path from input
// src to output dst is fixed by n-1 free "route" bits: in the first n-1 stages
// bit d(s) is set to route[d(s)-1]; the middle and last n-1 stages set the bits
// to those of dst. This numbering of the Benes network is this design's choice;
// the published HyCo design shows its 8x8 network only as a drawing.
//
// The functions below are used with constant stage numbers, so they reduce to
// wiring and small comparators when synthesised.
package hyco_pkg;

  // Step of Algorithm 1 at which an input port currently is. The checks of
  // REQ_RECEIVED .. CONFIGURE are evaluated together each cycle; the state kept
  // is the step that stopped the request in the last cycle.
  typedef enum logic [2:0] {
    ST_IDLE          = 3'd0,
    ST_REQ_RECEIVED  = 3'd1,  // waiting for the destination IP to become free
    ST_TEST_TARGET   = 3'd2,  // lost the round-robin on a conflicting output
    ST_VERIFY_ROUTE  = 3'd3,  // stalled by the Bloom filter
    ST_CONFIGURE     = 3'd4,  // path blocked inside the network (contention)
    ST_COMMUNICATION = 3'd5   // granted; path configured
  } acu_state_e;

  // Address bit handled by stage s of a Benes network with n = log2(N).
  function automatic int unsigned stage_dim(int unsigned n, int unsigned s);
    return (s < n) ? (n - 1 - s) : (s - (n - 1));
  endfunction

  // Value that stage s gives to its address bit on the path (src -> dst, route).
  function automatic logic stage_target(int unsigned n, int unsigned s,
                                        int unsigned dst, int unsigned route);
    int unsigned d;
    d = stage_dim(n, s);
    if (s + 1 < n) return route[d-1];
    return dst[d];
  endfunction

  // Line on which the path (src -> dst, route) enters stage s.
  function automatic int unsigned line_before(int unsigned n, int unsigned s, int unsigned src,
                                              int unsigned dst, int unsigned route);
    int unsigned l;
    l = src;
    for (int unsigned t = 0; t < 2*n - 1; t++)
      if (t < s) l[stage_dim(n, t)] = stage_target(n, t, dst, route);
    return l;
  endfunction

  // Element of stage s that a line passes through: the line with bit d(s) removed.
  function automatic int unsigned elem_index(int unsigned n, int unsigned s, int unsigned line);
    int unsigned d;
    d = stage_dim(n, s);
    return ((line >> (d + 1)) << d) | (line & ((32'd1 << d) - 1));
  endfunction

  // Default route ("XY"-like dimension-order routing): the first half of the
  // network already corrects the address bits n-1..1 towards the destination.
  function automatic int unsigned default_route(int unsigned dst);
    return dst >> 1;
  endfunction

  // 32-bit integer mixer, used only to derive the fixed constants of the
  // Bloom filter's hash functions.
  function automatic logic [31:0] mix32(logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x >> 16);
    y = y * 32'h7feb352d;
    y = y ^ (y >> 15);
    y = y * 32'h846ca68b;
    y = y ^ (y >> 16);
    return y;
  endfunction

  // Constant of hash function h for key bit b (H3 hash family: the hash of a key
  // is the XOR of the constants of its set bits).
  function automatic logic [31:0] hash_const(int unsigned h, int unsigned b);
    return mix32(32'(h * 32'h10001 + b + 1));
  endfunction

endpackage
