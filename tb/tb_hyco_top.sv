// tb_hyco_top: end-to-end test of the HyCo controller at its default size
// (8 x 8 Benes network, 20 configuration units).
//
// IP models raise requests and hold them while they communicate. A behavioural
// network model follows the light through the Cross/Bar settings the controller
// drives. On every cycle the testbench checks that each granted input reaches
// its own destination, that no two granted paths share a waveguide, and that
// no destination is granted twice. Directed phases then exercise and time
// each mechanism: an unobstructed request (granted in 2 cycles), a conflict
// on one output resolved in round-robin turn, a busy destination, the
// complement pattern, a pre-calculated LITE-LUT route, all-to-all traffic,
// and repeated contended permutations that make the Bloom filter learn and
// stall. A mechanism that never happened counts as a failure.
module tb_hyco_top;
  import hyco_pkg::*;
  localparam int N      = 8;
  localparam int LOGN   = 3;
  localparam int NS     = 2*LOGN - 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]            req = '0;
  logic [N-1:0][LOGN-1:0]  req_dst = '0;
  logic [N-1:0]            grant;
  logic [NS-1:0][N/2-1:0]  mzi_cross, mzi_in_use;
  logic [7:0]              timeout_cycles = 8'd0;
  logic                    bloom_clear = 1'b0;
  logic                    lut_we = 1'b0, lut_clear = 1'b0;
  logic [2:0]              lut_idx = '0;
  logic [LOGN-1:0]         lut_src = '0, lut_dst = '0;
  logic [LOGN-2:0]         lut_route = '0;
  acu_state_e [N-1:0]      state;
  logic [15:0]             bloom_fill;
  logic [N-1:0][N-1:0]     req_matrix;
  logic ev_conflict, ev_target_busy, ev_bloom_stall, ev_bloom_insert, ev_route_block,
        ev_lut_route, ev_default_route;

  hyco_top dut (
    .clk, .rst_n, .req, .req_dst, .grant, .mzi_cross, .timeout_cycles, .bloom_clear,
    .lut_we, .lut_idx, .lut_src, .lut_dst, .lut_route, .lut_clear, .state, .bloom_fill,
    .req_matrix, .mzi_in_use, .ev_conflict, .ev_target_busy, .ev_bloom_stall,
    .ev_bloom_insert, .ev_route_block, .ev_lut_route, .ev_default_route
  );

  int out_of [N];
  int link_use [NS][N];
  benes_net_model #(.N(N)) u_net (.mzi_cross, .lit(grant), .out_of, .link_use);

  int checks = 0, failures = 0;
  int n_conflict = 0, n_target_busy = 0, n_bloom_stall = 0, n_bloom_insert = 0,
      n_route_block = 0, n_lut_route = 0, n_default_route = 0, n_release = 0, n_grant = 0;
  int lat_sum = 0, lat_max = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // Per-cycle safety checks on the configured network.
  logic [N-1:0] grant_d = '0;
  always @(negedge clk) if (rst_n) begin
    logic [N-1:0] dst_seen;
    bit links_ok, dst_ok, path_ok;
    dst_seen = '0; links_ok = 1; dst_ok = 1; path_ok = 1;
    for (int i = 0; i < N; i++) if (grant[i]) begin
      if (out_of[i] != int'(req_dst[i])) path_ok = 0;
      if (dst_seen[req_dst[i]]) dst_ok = 0;
      dst_seen[req_dst[i]] = 1'b1;
    end
    for (int s = 0; s < NS; s++) for (int l = 0; l < N; l++) if (link_use[s][l] > 1) links_ok = 0;
    if (grant != '0) begin
      check(path_ok,  "granted input does not reach its destination");
      if (!path_ok) for (int i = 0; i < N; i++) $display("  in %0d grant %0d dst %0d out %0d state %0d", i, grant[i], req_dst[i], out_of[i], state[i]);
      check(links_ok, "two granted paths share a waveguide");
      check(dst_ok,   "destination granted twice");
    end
    n_conflict      += int'(ev_conflict);
    n_target_busy   += int'(ev_target_busy);
    n_bloom_stall   += int'(ev_bloom_stall);
    n_bloom_insert  += int'(ev_bloom_insert);
    n_route_block   += int'(ev_route_block);
    n_release       += $countones(grant_d & ~grant);
    n_grant         += $countones(grant & ~grant_d);
    grant_d = grant;
  end
  always @(negedge clk) if (rst_n && ev_lut_route) n_lut_route++;
  always @(negedge clk) if (rst_n && ev_default_route) n_default_route++;

  // One IP: request dst, wait for the grant, hold for 'hold' cycles, release.
  task automatic ip_transfer(input int i, input int dst, input int hold, output int lat);
    @(posedge clk); #1;
    req_dst[i] = LOGN'(dst);
    req[i] = 1'b1;
    lat = 0;
    do begin
      @(posedge clk); #1;
      lat++;
    end while (!grant[i] && lat < 1000);
    check(grant[i], $sformatf("input %0d never granted", i));
    lat_sum += lat;
    if (lat > lat_max) lat_max = lat;
    repeat (hold) @(posedge clk);
    #1 req[i] = 1'b0;
    @(posedge clk); #1;
    check(!grant[i], $sformatf("grant %0d not dropped after release", i));
  endtask

  int lat;
  int lats [N];
  int perm [N];
  int stall_before;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // 1. Unobstructed request: granted two cycles after it is raised.
    ip_transfer(3, 5, 4, lat);
    check(lat == 2, $sformatf("unobstructed latency %0d, expected 2", lat));
    check(mzi_in_use == '0, "network not free after release");

    // 2. Three inputs on one output: conflict, served one after another.
    fork
      ip_transfer(0, 4, 3, lats[0]);
      ip_transfer(1, 4, 3, lats[1]);
      ip_transfer(2, 4, 3, lats[2]);
    join
    check(lats[0] != lats[1] && lats[1] != lats[2] && lats[0] != lats[2],
          "conflicting inputs were not served in turn");

    // 3. Busy destination: input 1 waits until input 0 is done with output 6.
    fork
      ip_transfer(0, 6, 10, lats[0]);
      begin repeat (3) @(posedge clk); ip_transfer(1, 6, 2, lats[1]); end
    join
    check(lats[1] >= 8, $sformatf("request to a busy destination granted after %0d cycles", lats[1]));

    // 4. Complement pattern: every input i to N-1-i at once.
    for (int i = 0; i < N; i++) begin
      automatic int ii = i;
      fork ip_transfer(ii, N-1-ii, 5, lats[ii]); join_none
    end
    wait fork;
    for (int i = 0; i < N; i++) check(lats[i] <= 5, $sformatf("complement latency %0d", lats[i]));

    // 5. LITE-LUT: a stored route for 2 -> 3 through middle line 4 (route bits 2;
    //    the default route would use line 2).
    @(posedge clk); #1;
    lut_we = 1; lut_idx = 3'd1; lut_src = 3'd2; lut_dst = 3'd3; lut_route = 2'd2;
    @(posedge clk); #1 lut_we = 0;
    fork
      ip_transfer(2, 3, 3, lat);
      begin
        repeat (3) @(posedge clk); #2;
        check(link_use[LOGN-1][4] == 1, "stored LITE-LUT route not used");
      end
    join

    // 6. All-to-all: every IP visits all destinations one by one.
    for (int i = 0; i < N; i++) begin
      automatic int ii = i;
      fork
        for (int k = 0; k < N; k++) begin
          int l;
          ip_transfer(ii, (ii + k) % N, 1 + ($urandom % 4), l);
        end
      join_none
    end
    wait fork;

    // 7. Learning: repeated random permutations with contention.
    timeout_cycles = 8'd3;
    stall_before = n_bloom_stall;
    for (int r = 0; r < 40; r++) begin
      for (int i = 0; i < N; i++) perm[i] = i;
      if (r % 4 == 0 || r < 4) perm.shuffle();
      for (int i = 0; i < N; i++) begin
        automatic int ii = i;
        automatic int dd = perm[i];
        fork ip_transfer(ii, dd, 6 + ($urandom % 6), lats[ii]); join_none
      end
      wait fork;
    end

    repeat (3) @(posedge clk);
    check(n_conflict > 0,      "no output conflict happened");
    check(n_target_busy > 0,   "no request waited for a busy destination");
    check(n_route_block > 0,   "no path was blocked by contention");
    check(n_bloom_insert > 0,  "Bloom filter never learnt a destination set");
    check(n_bloom_stall > 0,   "Bloom filter never stalled a port");
    check(n_lut_route > 0,     "no LITE-LUT route was used");
    check(n_default_route > 0, "no default route was used");
    check(n_release == n_grant, "grants and releases do not match");
    $display("mechanisms: conflict=%0d target_busy=%0d route_block=%0d bloom_insert=%0d bloom_stall=%0d lut=%0d default=%0d grants=%0d",
             n_conflict, n_target_busy, n_route_block, n_bloom_insert, n_bloom_stall,
             n_lut_route, n_default_route, n_grant);
    $display("latency: mean %0d/%0d cycles, max %0d", lat_sum, n_grant, lat_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
