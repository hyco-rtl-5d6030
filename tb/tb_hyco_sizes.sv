// tb_hyco_sizes: the controller at the other Benes sizes of the published
// evaluation, 4 x 4 (6 configuration units) and 16 x 16 (56 units in this
// numbering), each under rounds of random permutation traffic with learning
// on. Each size runs in its own harness with the per-cycle network checks;
// the test also requires that contention happened at 16 x 16.
module tb_hyco_sizes;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int c4, f4, g4, b4, c16, f16, g16, b16;
  logic d4, d16;
  hyco_size_harness #(.N(4),  .ROUNDS(30)) h4  (.clk, .rst_n, .checks(c4),  .failures(f4),  .grants(g4),  .blocks(b4),  .done(d4));
  hyco_size_harness #(.N(16), .ROUNDS(30)) h16 (.clk, .rst_n, .checks(c16), .failures(f16), .grants(g16), .blocks(b16), .done(d16));

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c16, f4 + f16 + 1);
    $finish;
  end
  initial begin
    int checks, failures;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (d4 && d16);
    checks = c4 + c16 + 2;
    failures = f4 + f16;
    if (g4 != 4*30)   begin failures++; $display("FAIL 4x4 grants %0d", g4); end
    if (g16 != 16*30) begin failures++; $display("FAIL 16x16 grants %0d", g16); end
    checks++;
    if (b16 == 0) begin failures++; $display("FAIL no contention at 16x16"); end
    $display("4x4: %0d grants, %0d blocked attempts; 16x16: %0d grants, %0d blocked attempts", g4, b4, g16, b16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
