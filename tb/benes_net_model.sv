// benes_net_model: behavioural model of the N x N Benes network of 2x2 MZI
// switching elements, for testbenches only (not synthesizable intent).
//
// Light entering input port i is followed stage by stage: at stage s the
// element joins the two lines that differ in address bit d(s) (d runs
// n-1..1, 0, 1..n-1); a Cross element moves the light to the other line, a Bar
// element keeps it. out_of[i] is the output port reached from input i, and
// link_use[s][l] counts the granted inputs whose light enters stage s on line
// l (the check for shared waveguides). Numbering matches the controller.
module benes_net_model #(
  parameter int N = 8
) (
  input  logic [2*$clog2(N)-2:0][N/2-1:0] mzi_cross,
  input  logic [N-1:0]                    lit,      // inputs whose light is followed
  output int                              out_of   [N],
  output int                              link_use [2*$clog2(N)-1][N]
);
  localparam int LOGN = $clog2(N);
  localparam int NS   = 2*LOGN - 1;

  always_comb begin
    int l, d, e;
    for (int s = 0; s < NS; s++)
      for (int k = 0; k < N; k++) link_use[s][k] = 0;
    for (int i = 0; i < N; i++) begin
      l = i;
      for (int s = 0; s < NS; s++) begin
        d = (s < LOGN) ? (LOGN - 1 - s) : (s - (LOGN - 1));
        if (lit[i]) link_use[s][l]++;
        // element number: the line with bit d taken out
        e = ((l >> (d + 1)) << d) | (l & ((1 << d) - 1));
        if (mzi_cross[s][e]) l = l ^ (1 << d);
      end
      out_of[i] = l;
    end
  end
endmodule
