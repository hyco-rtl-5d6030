// tb_hyco_cru: random request rows against the conflict-resolution unit.
// The testbench builds the request matrix itself, counts requests per column
// to know the conflicts, and keeps its own round-robin pointer per column to
// predict each winner; a random subset of winners is reported as granted,
// which moves those pointers.
module tb_hyco_cru;
  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [N-1:0] row_valid = '0, granted = '0, conflict, win;
  logic [N-1:0][2:0] row_dst = '0;
  logic [N-1:0][N-1:0] req_matrix;
  hyco_cru #(.N(N)) dut (.clk, .rst_n, .row_valid, .row_dst, .granted, .req_matrix, .conflict, .win);

  int ptr [N];
  int checks = 0, failures = 0;
  int n_conf = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt, w;
    logic [N-1:0] exp_win;
    for (int j = 0; j < N; j++) ptr[j] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 1000; c++) begin
      row_valid = N'($urandom);
      for (int i = 0; i < N; i++) row_dst[i] = 3'($urandom % ((c % 3 == 0) ? 3 : 8));
      #1;
      exp_win = '0;
      for (int j = 0; j < N; j++) begin
        cnt = 0; w = -1;
        for (int i = 0; i < N; i++) begin
          check(req_matrix[i][j] == (row_valid[i] && row_dst[i] == 3'(j)), "matrix entry");
          if (row_valid[i] && row_dst[i] == 3'(j)) cnt++;
        end
        for (int k = 0; k < N; k++) begin
          int ii;
          ii = (ptr[j] + k) % N;
          if (w < 0 && row_valid[ii] && row_dst[ii] == 3'(j)) w = ii;
        end
        if (w >= 0) exp_win[w] = 1'b1;
        check(conflict[j] == (cnt > 1), $sformatf("conflict column %0d", j));
        if (cnt > 1) n_conf++;
      end
      check(win == exp_win, $sformatf("winners %b expected %b", win, exp_win));
      granted = win & N'($urandom);
      @(posedge clk);
      for (int i = 0; i < N; i++) if (granted[i]) ptr[row_dst[i]] = (i + 1) % N;
      #1 granted = '0;
    end
    check(n_conf > 0, "no conflict generated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
