// hyco_dcu: distributed-configuration unit of one 2x2 MZI switching element.
//
// Stage STAGE, element ELEM of the Benes network (numbering in hyco_pkg). Each
// cycle the access-control unit presents the inputs that are ready to be
// routed (cand) with their destinations. For every candidate i the unit works
// out its own slice of i's path: whether the path crosses this element, and on
// which input and output port. The slice comes from the LITE-LUT when it holds
// a pre-calculated route for (i, dst[i]); otherwise from the default
// dimension-order route (hyco_pkg::default_route). ok[i] is 1 when the path
// does not cross the element, or when its ports are free and no candidate of
// higher rotating priority (counted from prio_ptr) wants one of them. The
// controller grants i only if every unit reports ok[i] (accept[i]); at that
// clock edge the unit records which input owns each port and sets its
// Cross/Bar control (mzi_cross). rel[i] frees the ports owned by input i at the next
// edge. All per-candidate checks are combinational, in parallel.
//
// LITE-LUT: LUT_DEPTH entries, each a (source, destination) key and this
// element's slice of the stored route. A write (lut_we) broadcasts index, key
// and the route's n-1 route bits to all units, and each unit stores its own
// slice, so hits are consistent across the network. lut_clear empties it.
// The unit's role, the reduced LUT and the fall-back routing follow the
// published HyCo design; the entry format, port-ownership bookkeeping and the priority rule
// are this design's own.
module hyco_dcu import hyco_pkg::*; #(
  parameter int unsigned N         = 8,
  parameter int unsigned STAGE     = 0,
  parameter int unsigned ELEM      = 0,
  parameter int unsigned LUT_DEPTH = 8
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [N-1:0]                      cand,
  input  logic [N-1:0][$clog2(N)-1:0]       dst,
  input  logic [$clog2(N)-1:0]              prio_ptr,
  input  logic [N-1:0]                      accept,
  input  logic [N-1:0]                      rel,
  input  logic                              lut_we,
  input  logic [$clog2(LUT_DEPTH)-1:0]      lut_idx,
  input  logic [$clog2(N)-1:0]              lut_src,
  input  logic [$clog2(N)-1:0]              lut_dst,
  input  logic [(($clog2(N) > 1) ? $clog2(N)-1 : 1)-1:0] lut_route,
  input  logic                              lut_clear,
  output logic [N-1:0]                      ok,
  output logic [N-1:0]                      lut_hit,
  output logic                              mzi_cross,
  output logic                              busy
);
  localparam int unsigned LOGN = $clog2(N);

  typedef struct packed {
    logic            on;    // path crosses this element
    logic            pin;   // element input port used
    logic            pout;  // element output port used
  } slice_t;

  typedef struct packed {
    logic            valid;
    logic [LOGN-1:0] src;
    logic [LOGN-1:0] dst;
    slice_t          sl;
  } lut_entry_t;

  function automatic slice_t path_slice(int unsigned src, int unsigned dst_p, int unsigned route);
    slice_t      r;
    int unsigned lb;
    logic [4:0]  d;
    d      = 5'(stage_dim(LOGN, STAGE));
    lb     = line_before(LOGN, STAGE, src, dst_p, route);
    r.on   = elem_index(LOGN, STAGE, lb) == ELEM;
    r.pin  = lb[d];
    r.pout = stage_target(LOGN, STAGE, dst_p, route);
    return r;
  endfunction

  lut_entry_t [LUT_DEPTH-1:0] lut_q;

  // Port ownership: for each element input port, whether a path uses it,
  // which input owns it and which output port it leaves by.
  logic [1:0]           own_v;
  logic [1:0][LOGN-1:0] own_id;
  logic [1:0]           own_out;
  logic                 cross_q;

  slice_t [N-1:0]       sl;
  logic   [1:0]         in_busy, out_busy;

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      lut_hit[i] = 1'b0;
      sl[i]      = path_slice(i, 32'(dst[i]), default_route(32'(dst[i])));
      for (int unsigned k = 0; k < LUT_DEPTH; k++)
        if (lut_q[k].valid && lut_q[k].src == LOGN'(i) && lut_q[k].dst == dst[i] && !lut_hit[i]) begin
          lut_hit[i] = 1'b1;
          sl[i]      = lut_q[k].sl;
        end
    end
  end

  always_comb begin
    for (int unsigned p = 0; p < 2; p++) begin
      in_busy[p]  = own_v[p];
      out_busy[p] = (own_v[0] && own_out[0] == 1'(p)) || (own_v[1] && own_out[1] == 1'(p));
    end
  end

  always_comb begin
    logic [LOGN-1:0] rank_i, rank_j;
    rank_i = '0;
    rank_j = '0;
    for (int unsigned i = 0; i < N; i++) begin
      ok[i] = 1'b1;
      if (sl[i].on) begin
        if (in_busy[sl[i].pin] || out_busy[sl[i].pout]) ok[i] = 1'b0;
        rank_i = LOGN'(i) - prio_ptr;
        for (int unsigned j = 0; j < N; j++) begin
          rank_j = LOGN'(j) - prio_ptr;
          if (j != i && cand[j] && sl[j].on && rank_j < rank_i &&
              (sl[j].pin == sl[i].pin || sl[j].pout == sl[i].pout))
            ok[i] = 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lut_q   <= '0;
      own_v   <= '0;
      own_id  <= '0;
      own_out <= '0;
      cross_q <= 1'b0;
    end else begin
      if (lut_clear) begin
        for (int unsigned k = 0; k < LUT_DEPTH; k++) lut_q[k].valid <= 1'b0;
      end else if (lut_we) begin
        lut_q[lut_idx].valid <= 1'b1;
        lut_q[lut_idx].src   <= lut_src;
        lut_q[lut_idx].dst   <= lut_dst;
        lut_q[lut_idx].sl    <= path_slice(32'(lut_src), 32'(lut_dst), 32'(lut_route));
      end
      for (int unsigned p = 0; p < 2; p++)
        if (own_v[p] && rel[own_id[p]]) own_v[p] <= 1'b0;
      for (int unsigned i = 0; i < N; i++)
        if (accept[i] && sl[i].on) begin
          own_v[sl[i].pin]   <= 1'b1;
          own_id[sl[i].pin]  <= LOGN'(i);
          own_out[sl[i].pin] <= sl[i].pout;
          cross_q            <= sl[i].pin != sl[i].pout;
        end
    end
  end

  assign mzi_cross = cross_q;
  assign busy  = |own_v;

  // The two paths through a busy element always agree on its Cross/Bar state.
  assert property (@(posedge clk) disable iff (!rst_n)
    (own_v == 2'b11) |-> ((own_out[0] != 1'b0) == (own_out[1] != 1'b1)));
endmodule
