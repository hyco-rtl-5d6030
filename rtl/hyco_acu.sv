// hyco_acu: access-control unit of the HyCo controller.
//
// One state machine per input port follows the steps of the execution
// algorithm: Idle, Request Received, Test Target, Verify Route, Configure
// Network, Communication. All inputs run in parallel. A request sampled in
// Idle is written to the destination array. From the next cycle on, the
// checks of the four middle steps are evaluated together, combinationally,
// every cycle:
//   Request Received - the destination IP is free (no active connection to it);
//   Test Target      - the input wins its output column in the CRU;
//   Verify Route     - the Bloom filter does not know the current destination
//                      set as unroutable;
//   Configure        - every DCU accepts the path (route_ok).
// An input that passes all four is granted (accept) and its path configured at
// the clock edge; grant then rises, so an unobstructed request is granted two
// cycles after it is raised. An input that fails keeps, as its state, the step
// that stopped it. The IP holds req high for as long as it communicates;
// dropping req releases the path and the destination.
//
// Bloom filter use. The key is the destination array as seen by the network:
// one (valid, destination) field per input, valid for inputs communicating or
// waiting and not stalled. On a hit, and when at least two inputs are waiting
// unstalled, no route is tried that cycle: the round-robin choice among the
// waiting inputs is stalled and the reduced set is tested in the next cycle.
// Stalled inputs are freed when any connection is released. An input that
// waits on a conflict or on contention for timeout_cycles cycles makes the
// current key be inserted into the filter (timeout_cycles = 0 disables this).
// The role of these checks follows the published HyCo design; their single-cycle
// evaluation, the stall release rule and the key layout are this design's.
module hyco_acu import hyco_pkg::*; #(
  parameter int unsigned N  = 8,
  parameter int unsigned TW = 8
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // IP side
  input  logic [N-1:0]                    req,
  output logic [N-1:0]                    grant,
  // destination array
  output logic [N-1:0]                    da_we,
  output logic [N-1:0]                    da_clr,
  input  logic [N-1:0]                    da_valid,
  input  logic [N-1:0][$clog2(N)-1:0]     da_dst,
  // conflict-resolution unit
  output logic [N-1:0]                    row_valid,
  input  logic [N-1:0]                    cru_win,
  // Bloom filter
  output logic [N*($clog2(N)+1)-1:0]      bloom_key,
  input  logic                            bloom_hit,
  output logic                            bloom_insert,
  input  logic [TW-1:0]                   timeout_cycles,
  // distributed-configuration units
  output logic [N-1:0]                    cand,
  input  logic [N-1:0]                    route_ok,
  output logic [N-1:0]                    accept,
  output logic [N-1:0]                    rel,
  output logic [$clog2(N)-1:0]            prio_ptr,
  // status
  output acu_state_e [N-1:0]              state,
  output logic                            ev_target_busy,
  output logic                            ev_bloom_stall,
  output logic                            ev_route_block
);
  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned KW   = LOGN + 1;

  acu_state_e [N-1:0]    state_q;
  logic [N-1:0]          stalled_q;
  logic [N-1:0][TW-1:0]  wait_q;
  logic [LOGN-1:0]       prio_q;
  logic [LOGN-1:0]       stall_ptr_q;

  logic [N-1:0] waiting, comm, dest_busy, tgt_ok, unstalled_wait, stall_pick;
  logic [N-1:0] timed_out;
  logic         multi_wait, bloom_block;

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      comm[i]    = state_q[i] == ST_COMMUNICATION;
      waiting[i] = state_q[i] != ST_IDLE && state_q[i] != ST_COMMUNICATION;
    end
    dest_busy = '0;
    for (int unsigned i = 0; i < N; i++)
      if (comm[i] && da_valid[i]) dest_busy[da_dst[i]] = 1'b1;
    for (int unsigned i = 0; i < N; i++) begin
      tgt_ok[i]         = !dest_busy[da_dst[i]];
      unstalled_wait[i] = waiting[i] && !stalled_q[i];
      row_valid[i]      = unstalled_wait[i] && tgt_ok[i];
      bloom_key[i*KW +: KW] = (da_valid[i] && (comm[i] || unstalled_wait[i])) ? {1'b1, da_dst[i]} : '0;
    end
    multi_wait = (unstalled_wait & (unstalled_wait - 1'b1)) != '0;
    for (int unsigned i = 0; i < N; i++) begin
      da_we[i]     = state_q[i] == ST_IDLE && req[i];
      rel[i]       = comm[i] && !req[i];
      timed_out[i] = timeout_cycles != '0 && wait_q[i] >= timeout_cycles;
    end
    da_clr         = rel;
    grant          = comm;
    prio_ptr       = prio_q;
    state          = state_q;
    ev_target_busy = |(unstalled_wait & ~tgt_ok);
  end

  // Decision: depends on the CRU, Bloom filter and DCU answers to the above.
  always_comb begin
    bloom_block    = bloom_hit && multi_wait;
    cand           = bloom_block ? '0 : (row_valid & cru_win);
    accept         = cand & route_ok;
    bloom_insert   = (|timed_out) && !bloom_block;
    ev_bloom_stall = bloom_block;
    ev_route_block = |(cand & ~route_ok);
  end

  hyco_rr_pick #(.N(N)) u_stall_pick (.req(unstalled_wait), .ptr(stall_ptr_q), .gnt(stall_pick));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q     <= {N{ST_IDLE}};
      stalled_q   <= '0;
      wait_q      <= '0;
      prio_q      <= '0;
      stall_ptr_q <= '0;
    end else begin
      for (int unsigned i = 0; i < N; i++) begin
        unique case (state_q[i])
          ST_IDLE:          if (req[i]) state_q[i] <= ST_REQ_RECEIVED;
          ST_COMMUNICATION: if (!req[i]) state_q[i] <= ST_IDLE;
          default: begin
            if (accept[i])                   state_q[i] <= ST_COMMUNICATION;
            else if (stalled_q[i])           state_q[i] <= ST_VERIFY_ROUTE;
            else if (!tgt_ok[i])             state_q[i] <= ST_REQ_RECEIVED;
            else if (!cru_win[i])            state_q[i] <= ST_TEST_TARGET;
            else if (bloom_block)            state_q[i] <= ST_VERIFY_ROUTE;
            else                             state_q[i] <= ST_CONFIGURE;
          end
        endcase
        // Waiting time on a conflict or on contention, for the learning timeout.
        if (bloom_insert || accept[i] || !unstalled_wait[i] || !tgt_ok[i] || bloom_block)
          wait_q[i] <= '0;
        else if (wait_q[i] != '1)
          wait_q[i] <= wait_q[i] + 1'b1;
      end
      if (|accept) prio_q <= prio_q + 1'b1;
      if (|rel) begin
        stalled_q <= '0;
      end else if (bloom_block) begin
        stalled_q <= stalled_q | stall_pick;
        for (int unsigned i = 0; i < N; i++)
          if (stall_pick[i]) stall_ptr_q <= LOGN'(i + 1);
      end
    end
  end

  // Only waiting inputs are offered to the network, and a granted
  // destination is never granted twice.
  assert property (@(posedge clk) disable iff (!rst_n) (cand & ~waiting) == '0);
  assert property (@(posedge clk) disable iff (!rst_n) (accept & ~tgt_ok) == '0);
endmodule
