// hyco_top: HyCo hybrid control plane for an N x N Benes optical network.
//
// Centralised part: the destination array, the conflict-resolution unit (CRU,
// request matrix and round-robin per output), the Bloom filter of destination
// sets known to be unroutable, and the access-control unit (ACU, one state
// machine per input port). Distributed part: one distributed-configuration unit
// (DCU) per 2x2 MZI switching element, 2*log2(N)-1 stages of N/2 elements (20
// for N = 8), each with its LITE-LUT and its own Cross/Bar control output.
//
// IP interface, per input port i: raise req[i] with the destination in
// req_dst[i] and hold both; grant[i] rises when the optical path is configured
// (two cycles after req in the unobstructed case) and stays high while req[i]
// is held; dropping req[i] releases path and destination the next cycle.
// Network interface: mzi_cross[s][e] is the Cross (1) / Bar (0) control of
// element e of stage s, numbered as in hyco_pkg. Route programming: the
// lut_* inputs write one pre-calculated route (source, destination, log2(N)-1
// route bits) into the LITE-LUTs of all DCUs. timeout_cycles sets how long an
// input may wait on a conflict or contention before the destination set is
// learnt by the Bloom filter; bloom_clear empties the filter. The ev_* outputs
// pulse for one cycle when the named mechanism acts, for observation.
// The block structure follows the published HyCo controller; the Benes network,
// the interfaces and the sizes not given there are this design's choices.
module hyco_top import hyco_pkg::*; #(
  parameter int unsigned N         = 8,
  parameter int unsigned LUT_DEPTH = 8,
  parameter int unsigned BLOOM_M   = 1024,
  parameter int unsigned BLOOM_K   = 3,
  parameter int unsigned TW        = 8,
  localparam int unsigned LOGN     = $clog2(N),
  localparam int unsigned NSTAGE   = 2*LOGN - 1,
  localparam int unsigned RW       = (LOGN > 1) ? LOGN - 1 : 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [N-1:0]                   req,
  input  logic [N-1:0][LOGN-1:0]         req_dst,
  output logic [N-1:0]                   grant,
  output logic [NSTAGE-1:0][N/2-1:0]     mzi_cross,
  input  logic [TW-1:0]                  timeout_cycles,
  input  logic                           bloom_clear,
  input  logic                           lut_we,
  input  logic [$clog2(LUT_DEPTH)-1:0]   lut_idx,
  input  logic [LOGN-1:0]                lut_src,
  input  logic [LOGN-1:0]                lut_dst,
  input  logic [RW-1:0]                  lut_route,
  input  logic                           lut_clear,
  output acu_state_e [N-1:0]             state,
  output logic [15:0]                    bloom_fill,
  output logic [N-1:0][N-1:0]            req_matrix,
  output logic [NSTAGE-1:0][N/2-1:0]     mzi_in_use,
  output logic                           ev_conflict,
  output logic                           ev_target_busy,
  output logic                           ev_bloom_stall,
  output logic                           ev_bloom_insert,
  output logic                           ev_route_block,
  output logic                           ev_lut_route,
  output logic                           ev_default_route
);
  localparam int unsigned KEYW = N * (LOGN + 1);

  logic [N-1:0]            da_we, da_clr, da_valid;
  logic [N-1:0][LOGN-1:0]  da_dst;
  logic [N-1:0]            row_valid, cru_win, conflict;
  logic [KEYW-1:0]         bloom_key;
  logic                    bloom_hit, bloom_insert;
  logic [N-1:0]            cand, accept, rel, route_ok;
  logic [LOGN-1:0]         prio_ptr;

  logic [NSTAGE-1:0][N/2-1:0][N-1:0] dcu_ok;
  logic [NSTAGE-1:0][N/2-1:0][N-1:0] dcu_hit;
  logic [N-1:0]                      lut_any;

  hyco_dest_array #(.N(N)) u_dest_array (
    .clk, .rst_n, .we(da_we), .wdst(req_dst), .clr(da_clr), .valid(da_valid), .dst(da_dst)
  );

  hyco_cru #(.N(N)) u_cru (
    .clk, .rst_n, .row_valid, .row_dst(da_dst), .granted(accept),
    .req_matrix, .conflict, .win(cru_win)
  );

  hyco_bloom #(.KEYW(KEYW), .M(BLOOM_M), .K(BLOOM_K)) u_bloom (
    .clk, .rst_n, .clear(bloom_clear), .test_key(bloom_key), .hit(bloom_hit),
    .insert(bloom_insert), .ins_key(bloom_key), .fill(bloom_fill)
  );

  hyco_acu #(.N(N), .TW(TW)) u_acu (
    .clk, .rst_n, .req, .grant, .da_we, .da_clr, .da_valid, .da_dst,
    .row_valid, .cru_win, .bloom_key, .bloom_hit, .bloom_insert, .timeout_cycles,
    .cand, .route_ok, .accept, .rel, .prio_ptr, .state,
    .ev_target_busy, .ev_bloom_stall, .ev_route_block
  );

  for (genvar s = 0; s < NSTAGE; s++) begin : g_stage
    for (genvar e = 0; e < N/2; e++) begin : g_elem
      hyco_dcu #(.N(N), .STAGE(s), .ELEM(e), .LUT_DEPTH(LUT_DEPTH)) u_dcu (
        .clk, .rst_n, .cand, .dst(da_dst), .prio_ptr, .accept, .rel,
        .lut_we, .lut_idx, .lut_src, .lut_dst, .lut_route, .lut_clear,
        .ok(dcu_ok[s][e]), .lut_hit(dcu_hit[s][e]), .mzi_cross(mzi_cross[s][e]),
        .busy(mzi_in_use[s][e])
      );
    end
  end

  // A path is accepted only if every DCU accepts it.
  always_comb begin
    route_ok = '1;
    lut_any  = '0;
    for (int unsigned s = 0; s < NSTAGE; s++)
      for (int unsigned e = 0; e < N/2; e++) begin
        route_ok &= dcu_ok[s][e];
        lut_any  |= dcu_hit[s][e];
      end
  end

  // Observation outputs. All DCUs hold the same LITE-LUT keys, so any of
  // them tells whether an accepted path came from the LUT.
  assign ev_conflict      = |conflict;
  assign ev_bloom_insert  = bloom_insert;
  assign ev_lut_route     = |(accept & lut_any);
  assign ev_default_route = |(accept & ~lut_any);
endmodule
