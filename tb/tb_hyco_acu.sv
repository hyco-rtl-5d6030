// tb_hyco_acu: directed test of the access-control unit with the other
// blocks replaced by the testbench: it keeps the destination array itself,
// picks column winners as the lowest requesting input, and sets the Bloom
// filter answer and the network's route answer by hand. Checked: the 2-cycle
// grant of an unobstructed request, the wait for a busy destination, losing
// a conflict, route contention, the learning timeout with the exact key
// presented to the filter, the Bloom stall of one of two waiting inputs, the
// release that frees the stall, and the state kept at each step.
module tb_hyco_acu;
  import hyco_pkg::*;
  localparam int N = 8, LOGN = 3, KW = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] req = '0, grant, da_we, da_clr, row_valid, cru_win, cand, accept, rel;
  logic [N-1:0] route_ok = '1;
  logic [N-1:0][LOGN-1:0] req_dst = '0, da_dst = '0;
  logic [N-1:0] da_valid = '0;
  logic [N*KW-1:0] bloom_key;
  logic bloom_hit = 0, bloom_insert, ev_target_busy, ev_bloom_stall, ev_route_block;
  logic [7:0] timeout_cycles = 8'd0;
  logic [LOGN-1:0] prio_ptr;
  acu_state_e [N-1:0] state;

  hyco_acu #(.N(N), .TW(8)) dut (
    .clk, .rst_n, .req, .grant, .da_we, .da_clr, .da_valid, .da_dst, .row_valid, .cru_win,
    .bloom_key, .bloom_hit, .bloom_insert, .timeout_cycles, .cand, .route_ok, .accept, .rel,
    .prio_ptr, .state, .ev_target_busy, .ev_bloom_stall, .ev_route_block);

  // destination array stand-in
  always @(posedge clk)
    for (int i = 0; i < N; i++)
      if (da_clr[i]) da_valid[i] <= 0;
      else if (da_we[i]) begin da_valid[i] <= 1; da_dst[i] <= req_dst[i]; end
  // CRU stand-in: lowest requesting input wins each column
  always_comb begin
    logic [N-1:0] taken;
    taken = '0; cru_win = '0;
    for (int i = 0; i < N; i++)
      if (row_valid[i] && !taken[da_dst[i]]) begin cru_win[i] = 1; taken[da_dst[i]] = 1; end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask
  task automatic tick(input int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N*KW-1:0] exp_key;
    tick(2);
    rst_n = 1;
    tick();
    // 1. unobstructed request: 2 cycles to grant
    req[0] = 1; req_dst[0] = 3;
    #1 check(da_we == 8'b1, "request not written to the destination array");
    tick();
    check(state[0] == ST_REQ_RECEIVED && !grant[0], "request not received");
    check(cand[0] && accept[0], "unobstructed request not accepted in its second cycle");
    tick();
    check(grant[0] && state[0] == ST_COMMUNICATION, "no grant two cycles after the request");
    // 2. busy destination
    req[1] = 1; req_dst[1] = 3;
    tick(2);
    check(state[1] == ST_REQ_RECEIVED && !cand[1] && ev_target_busy, "busy destination not detected");
    req[0] = 0;
    #1 check(rel[0] && da_clr[0], "release not signalled");
    tick();
    check(!grant[0] && state[0] == ST_IDLE, "released input not idle");
    check(accept[1], "waiting input not accepted once the destination is free");
    tick();
    check(grant[1], "no grant after destination freed");
    req[1] = 0;
    tick(2);
    // 3. conflict: inputs 2 and 4 on output 5, input 2 wins
    req[2] = 1; req_dst[2] = 5; req[4] = 1; req_dst[4] = 5;
    tick();
    check(accept == 8'b0000_0100, "conflict winner not the only one accepted");
    tick();
    check(grant[2] && state[4] == ST_TEST_TARGET, "conflict loser not in Test Target");
    req[2] = 0;
    tick(2);
    check(grant[4], "conflict loser not served after the winner");
    req[4] = 0;
    tick(2);
    // 4. contention and learning timeout
    timeout_cycles = 8'd3;
    route_ok = ~8'b0010_0000;
    req[5] = 1; req_dst[5] = 2;
    tick(2);
    check(state[5] == ST_CONFIGURE && ev_route_block && !accept[5], "contention not reported");
    exp_key = '0;
    exp_key[5*KW +: KW] = {1'b1, 3'd2};
    check(bloom_key == exp_key, $sformatf("bloom key %h expected %h", bloom_key, exp_key));
    tick(2);
    check(bloom_insert, "no insertion after the timeout");
    tick();
    check(!bloom_insert, "insertion longer than one cycle");
    // 5. Bloom stall: second waiting input; filter reports a hit
    req[6] = 1; req_dst[6] = 1;
    route_ok = ~8'b0110_0000;
    tick(2);
    bloom_hit = 1;
    #1 check(ev_bloom_stall && cand == '0, "Bloom hit did not block routing");
    tick();
    bloom_hit = 0;
    check(state[5] == ST_VERIFY_ROUTE && state[6] == ST_VERIFY_ROUTE, "inputs not held in Verify Route by the filter");
    exp_key = '0;
    exp_key[6*KW +: KW] = {1'b1, 3'd1};
    check(bloom_key == exp_key, "stalled input still in the key");
    route_ok = '1;
    #1 check(accept == 8'b0100_0000, "stalled input offered to the network");
    tick();
    check(grant[6] && !grant[5], "wrong grants after the stall");
    req[6] = 0;
    tick();
    check(state[5] != ST_VERIFY_ROUTE || accept[5], "stall not lifted by the release");
    tick(2);
    check(grant[5], "stalled input never granted");
    // 6. single waiting input: a hit is ignored
    req[5] = 0;
    tick(2);
    bloom_hit = 1;
    req[7] = 1; req_dst[7] = 0;
    tick(2);
    check(grant[7], "Bloom hit stalled a lone request");
    bloom_hit = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
