// hyco_cru: conflict-resolution unit.
//
// Builds the request matrix R, R(i,j) = 1 when input i requests output j, from
// the rows the access-control unit presents (row_valid, row_dst). Column j has
// a conflict when more than one row requests it (equation (2) of the method).
// Each column has a round-robin pointer; the winner of column j is the first
// requesting input at or after that pointer. A winner that is granted
// (granted[i]) moves its column's pointer to the input after it, so competing
// inputs are served in turn and each input gets a bounded waiting time.
// Matrix, conflict and winners are combinational on the inputs; only the
// pointers are registered. Matrix and column test follow the published HyCo design; the
// rotating pointer stands in for its per-input FIFO ordering.
module hyco_cru #(
  parameter int unsigned N = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [N-1:0]                row_valid,
  input  logic [N-1:0][$clog2(N)-1:0] row_dst,
  input  logic [N-1:0]                granted,
  output logic [N-1:0][N-1:0]         req_matrix,  // [i][j]
  output logic [N-1:0]                conflict,    // per output column
  output logic [N-1:0]                win          // per input row
);
  localparam int unsigned LOGN = $clog2(N);

  logic [N-1:0][N-1:0]    col_req;   // [j][i]
  logic [N-1:0][N-1:0]    col_gnt;   // [j][i]
  logic [N-1:0][LOGN-1:0] ptr_q;

  always_comb begin
    for (int unsigned i = 0; i < N; i++)
      for (int unsigned j = 0; j < N; j++) begin
        req_matrix[i][j] = row_valid[i] && (row_dst[i] == LOGN'(j));
        col_req[j][i]    = req_matrix[i][j];
      end
    for (int unsigned j = 0; j < N; j++)
      conflict[j] = (col_req[j] & (col_req[j] - 1'b1)) != '0;
  end

  for (genvar j = 0; j < N; j++) begin : g_col
    hyco_rr_pick #(.N(N)) u_pick (.req(col_req[j]), .ptr(ptr_q[j]), .gnt(col_gnt[j]));
  end

  always_comb begin
    win = '0;
    for (int unsigned i = 0; i < N; i++)
      for (int unsigned j = 0; j < N; j++)
        if (col_gnt[j][i]) win[i] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr_q <= '0;
    end else begin
      for (int unsigned j = 0; j < N; j++)
        for (int unsigned i = 0; i < N; i++)
          if (col_gnt[j][i] && granted[i]) ptr_q[j] <= LOGN'((i + 1) % N);
    end
  end

  // A row can win only the column it requests.
  assert property (@(posedge clk) disable iff (!rst_n) (win & ~row_valid) == '0);
endmodule
