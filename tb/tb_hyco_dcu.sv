// tb_hyco_dcu: the distributed-configuration units of a whole 8 x 8 Benes
// network (20 units) driven as the access-control unit drives them: a path is
// accepted when every unit reports ok. The testbench computes each path
// itself, as the lines it occupies before and after every stage (from a
// programmed LITE-LUT route when one is stored, else the default route
// whose first half corrects the address bits towards the destination), and
// predicts which candidates are accepted: a candidate is refused when it
// shares a line with an established path or with a candidate of higher
// rotating priority. After each step a behavioural network model, fed with the
// units' Cross/Bar outputs, must bring every established path to its
// destination, and released paths must free their elements.
module tb_hyco_dcu;
  localparam int N = 8, LOGN = 3, NS = 5, LD = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] cand = '0, accept, rel = '0;
  logic [N-1:0][LOGN-1:0] dst = '0;
  logic [LOGN-1:0] prio_ptr = '0;
  logic lut_we = 0, lut_clear = 0;
  logic [2:0] lut_idx = 0;
  logic [LOGN-1:0] lut_src = 0, lut_dst = 0;
  logic [1:0] lut_route = 0;
  logic [NS-1:0][N/2-1:0][N-1:0] ok, hit;
  logic [NS-1:0][N/2-1:0] mzi_cross, busy;
  logic [N-1:0] ok_all, hit_any;

  for (genvar s = 0; s < NS; s++) begin : g_s
    for (genvar e = 0; e < N/2; e++) begin : g_e
      hyco_dcu #(.N(N), .STAGE(s), .ELEM(e), .LUT_DEPTH(LD)) dut (
        .clk, .rst_n, .cand, .dst, .prio_ptr, .accept, .rel, .lut_we, .lut_idx, .lut_src,
        .lut_dst, .lut_route, .lut_clear, .ok(ok[s][e]), .lut_hit(hit[s][e]),
        .mzi_cross(mzi_cross[s][e]), .busy(busy[s][e]));
    end
  end
  always_comb begin
    ok_all = '1; hit_any = '0;
    for (int s = 0; s < NS; s++) for (int e = 0; e < N/2; e++) begin
      ok_all &= ok[s][e]; hit_any |= hit[s][e];
    end
  end
  assign accept = cand & ok_all;

  int out_of [N];
  int link_use [NS][N];
  logic [N-1:0] active = '0;
  benes_net_model #(.N(N)) u_net (.mzi_cross, .lit(active), .out_of, .link_use);

  int checks = 0, failures = 0, n_refused = 0, n_lut = 0, n_acc = 0;
  int lut_r [N][N];          // stored route per (src, dst), -1 = none
  int act_dst [N];
  int lin [N][NS], lout [N][NS];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  function automatic void path(input int src, input int d, input int route, output int li[NS], output int lo[NS]);
    int l, dim;
    l = src;
    for (int s = 0; s < NS; s++) begin
      dim = (s < LOGN) ? LOGN - 1 - s : s - (LOGN - 1);
      li[s] = l;
      if (s < LOGN - 1) l = route[dim-1] ? (l | (1 << dim)) : (l & ~(1 << dim));
      else              l = d[dim]       ? (l | (1 << dim)) : (l & ~(1 << dim));
      lo[s] = l;
    end
  endfunction

  function automatic bit share(int a[NS], int b[NS], int c[NS], int dd[NS]);
    for (int s = 0; s < NS; s++) if (a[s] == c[s] || b[s] == dd[s]) return 1;
    return 0;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] exp_acc, dst_used;
    int li [N][NS], lo [N][NS], rank [N], tmpi[NS], tmpo[NS];
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) lut_r[i][j] = -1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // program four LITE-LUT routes
    for (int k = 0; k < 4; k++) begin
      lut_idx = 3'(k); lut_src = 3'($urandom); lut_dst = 3'($urandom); lut_route = 2'($urandom);
      lut_we = 1;
      @(posedge clk); #1;
      lut_we = 0;
      lut_r[lut_src][lut_dst] = int'(lut_route);
    end
    for (int c = 0; c < 1500; c++) begin
      // release a random part of the established paths
      rel = active & N'($urandom) & N'($urandom);
      @(posedge clk); #1;
      active &= ~rel; rel = '0;
      // new candidates with distinct, unused destinations
      dst_used = '0;
      for (int i = 0; i < N; i++) if (active[i]) dst_used[act_dst[i]] = 1;
      cand = '0;
      for (int i = 0; i < N; i++) if (!active[i] && ($urandom % 2)) begin
        int d;
        d = $urandom % N;
        if (!dst_used[d]) begin cand[i] = 1; dst[i] = 3'(d); dst_used[d] = 1; end
      end
      prio_ptr = 3'($urandom);
      #1;
      for (int i = 0; i < N; i++) if (cand[i]) begin
        int r;
        r = (lut_r[i][dst[i]] >= 0) ? lut_r[i][dst[i]] : int'(dst[i]) >> 1;
        path(i, int'(dst[i]), r, tmpi, tmpo);
        li[i] = tmpi; lo[i] = tmpo;
        rank[i] = (i - int'(prio_ptr) + N) % N;
        check(hit_any[i] == (lut_r[i][dst[i]] >= 0), "LITE-LUT hit");
      end
      exp_acc = '0;
      for (int i = 0; i < N; i++) if (cand[i]) begin
        bit good;
        good = 1;
        for (int j = 0; j < N; j++) begin
          if (active[j] && share(li[i], lo[i], lin[j], lout[j])) good = 0;
          if (j != i && cand[j] && rank[j] < rank[i] && share(li[i], lo[i], li[j], lo[j])) good = 0;
        end
        exp_acc[i] = good;
      end
      check(accept == exp_acc, $sformatf("accepted %b expected %b", accept, exp_acc));
      n_refused += $countones(cand & ~accept);
      n_acc += $countones(accept);
      n_lut += $countones(accept & hit_any);
      @(posedge clk); #1;
      for (int i = 0; i < N; i++) if (cand[i] && exp_acc[i]) begin
        active[i] = 1; act_dst[i] = int'(dst[i]); lin[i] = li[i]; lout[i] = lo[i];
      end
      cand = '0;
      #1;
      for (int i = 0; i < N; i++) if (active[i])
        check(out_of[i] == act_dst[i], $sformatf("path %0d ends at %0d, expected %0d", i, out_of[i], act_dst[i]));
      if (active == '0) check(busy == '0, "elements busy with no path established");
      else check($countones(busy) >= NS, "too few elements busy");
    end
    rel = active;
    @(posedge clk); #1 rel = '0;
    check(busy == '0, "elements still busy after releasing every path");
    check(n_refused > 0 && n_lut > 0, "no refused path or no LITE-LUT route seen");
    $display("accepted %0d refused %0d lut %0d", n_acc, n_refused, n_lut);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
