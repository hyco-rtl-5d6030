// tb_hyco_dest_array: random writes and clears of the destination array,
// compared each cycle with a reference copy kept by the testbench; clear must
// win over a write in the same cycle and reset must empty every entry.
module tb_hyco_dest_array;
  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [N-1:0] we = '0, clr = '0, valid;
  logic [N-1:0][2:0] wdst = '0, dst;
  hyco_dest_array #(.N(N)) dut (.clk, .rst_n, .we, .wdst, .clr, .valid, .dst);

  bit       mv [N];
  int       md [N];
  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin mv[i] = 0; md[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++; if (valid != '0) failures++;
    for (int c = 0; c < 500; c++) begin
      we   = N'($urandom);
      clr  = N'($urandom) & N'($urandom);
      for (int i = 0; i < N; i++) wdst[i] = 3'($urandom);
      @(posedge clk);
      for (int i = 0; i < N; i++)
        if (clr[i]) mv[i] = 0;
        else if (we[i]) begin mv[i] = 1; md[i] = int'(wdst[i]); end
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (valid[i] != mv[i] || (mv[i] && int'(dst[i]) != md[i])) begin
          failures++;
          $display("FAIL cycle %0d entry %0d", c, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
