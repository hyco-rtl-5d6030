// hyco_size_harness: drives one hyco_top of N ports with rounds of random
// permutation traffic (learning on) and checks, every cycle, through the
// behavioural network model, that each granted input reaches its destination,
// that granted paths share no waveguide and that no destination is granted
// twice. Every request must be granted. Reports its check and failure counts
// and raises done at the end. Used to test network sizes other than 8.
module hyco_size_harness #(
  parameter int N      = 4,
  parameter int ROUNDS = 20
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   grants,
  output int   blocks,
  output logic done
);
  localparam int LOGN = $clog2(N);
  localparam int NS   = 2*LOGN - 1;
  localparam int RW   = (LOGN > 1) ? LOGN - 1 : 1;

  logic [N-1:0]           req = '0;
  logic [N-1:0][LOGN-1:0] req_dst = '0;
  logic [N-1:0]           grant;
  logic [NS-1:0][N/2-1:0] mzi_cross, mzi_in_use;
  hyco_pkg::acu_state_e [N-1:0] state;
  logic [15:0]            bloom_fill;
  logic [N-1:0][N-1:0]    req_matrix;
  logic ev_conflict, ev_target_busy, ev_bloom_stall, ev_bloom_insert, ev_route_block,
        ev_lut_route, ev_default_route;

  hyco_top #(.N(N)) dut (
    .clk, .rst_n, .req, .req_dst, .grant, .mzi_cross, .timeout_cycles(8'd3), .bloom_clear(1'b0),
    .lut_we(1'b0), .lut_idx('0), .lut_src('0), .lut_dst('0), .lut_route(RW'(0)), .lut_clear(1'b0),
    .state, .bloom_fill, .req_matrix, .mzi_in_use, .ev_conflict, .ev_target_busy, .ev_bloom_stall,
    .ev_bloom_insert, .ev_route_block, .ev_lut_route, .ev_default_route);

  int out_of [N];
  int link_use [NS][N];
  benes_net_model #(.N(N)) u_net (.mzi_cross, .lit(grant), .out_of, .link_use);

  initial begin
    checks = 0; failures = 0; grants = 0; blocks = 0; done = 0;
  end

  always @(negedge clk) if (rst_n && grant != '0) begin
    logic [N-1:0] seen;
    bit good;
    seen = '0; good = 1;
    for (int i = 0; i < N; i++) if (grant[i]) begin
      if (out_of[i] != int'(req_dst[i]) || seen[req_dst[i]]) good = 0;
      seen[req_dst[i]] = 1'b1;
    end
    for (int s = 0; s < NS; s++) for (int l = 0; l < N; l++) if (link_use[s][l] > 1) good = 0;
    checks++;
    if (!good) begin failures++; $display("FAIL N=%0d t=%0t network check", N, $time); end
  end
  always @(negedge clk) if (rst_n && ev_route_block) blocks++;

  task automatic xfer(input int i, input int d, input int hold);
    int w;
    @(posedge clk); #1;
    req_dst[i] = LOGN'(d); req[i] = 1'b1;
    w = 0;
    do begin @(posedge clk); #1; w++; end while (!grant[i] && w < 2000);
    checks++;
    if (!grant[i]) begin failures++; $display("FAIL N=%0d input %0d not granted", N, i); end
    else grants++;
    repeat (hold) @(posedge clk);
    #1 req[i] = 1'b0;
  endtask

  initial begin
    int perm [N];
    @(posedge rst_n);
    for (int r = 0; r < ROUNDS; r++) begin
      for (int i = 0; i < N; i++) perm[i] = i;
      perm.shuffle();
      for (int i = 0; i < N; i++) begin
        automatic int ii = i;
        automatic int dd = perm[i];
        fork xfer(ii, dd, 2 + ($urandom % 8)); join_none
      end
      wait fork;
      repeat (2) @(posedge clk);
    end
    done = 1;
  end
endmodule
