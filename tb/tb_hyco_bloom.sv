// tb_hyco_bloom: the Bloom filter against a reference filter kept by the
// testbench. The reference computes the same H3 hashes with its own code:
// each key bit b has, for hash h, the constant obtained by mixing
// h*65537 + b + 1 with the 32-bit mixer x ^= x>>16; x *= 0x7feb352d;
// x ^= x>>15; x *= 0x846ca68b; x ^= x>>16, and a hash is the XOR of the
// constants of the set bits, cut to log2(M) bits. Checks: an empty filter
// never hits, every inserted key hits, random keys hit exactly when the
// reference hits, and clear empties the filter.
module tb_hyco_bloom;
  localparam int KEYW = 32, M = 1024, K = 3, LOGM = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clear = 0, insert = 0, hit;
  logic [KEYW-1:0] test_key = '0, ins_key = '0;
  logic [15:0] fill;
  hyco_bloom #(.KEYW(KEYW), .M(M), .K(K)) dut (.clk, .rst_n, .clear, .test_key, .hit, .insert, .ins_key, .fill);

  bit ref_bits [M];
  logic [KEYW-1:0] keys [64];
  int checks = 0, failures = 0;

  function automatic logic [31:0] mixer(logic [31:0] x);
    x = x ^ (x >> 16); x = x * 32'h7feb352d; x = x ^ (x >> 15); x = x * 32'h846ca68b;
    return x ^ (x >> 16);
  endfunction
  function automatic int hidx(int h, logic [KEYW-1:0] key);
    logic [31:0] a = 0;
    for (int b = 0; b < KEYW; b++) if (key[b]) a ^= mixer(32'(h * 65537 + b + 1));
    return int'(a[LOGM-1:0]);
  endfunction
  function automatic bit ref_hit(logic [KEYW-1:0] key);
    for (int h = 0; h < K; h++) if (!ref_bits[hidx(h, key)]) return 0;
    return 1;
  endfunction
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fp = 0;
    for (int i = 0; i < M; i++) ref_bits[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 200; c++) begin
      test_key = $urandom; #1;
      check(!hit, "empty filter hit");
    end
    for (int n = 0; n < 64; n++) begin
      keys[n] = $urandom;
      @(negedge clk);
      ins_key = keys[n]; insert = 1;
      @(posedge clk); #1 insert = 0;
      for (int h = 0; h < K; h++) ref_bits[hidx(h, keys[n])] = 1;
      check(fill == 16'(n + 1), $sformatf("fill count %0d expected %0d", fill, n + 1));
      for (int k = 0; k <= n; k++) begin
        test_key = keys[k]; #1;
        check(hit, $sformatf("inserted key %0d not found", k));
      end
    end
    for (int c = 0; c < 2000; c++) begin
      test_key = $urandom; #1;
      check(hit == ref_hit(test_key), "hit differs from reference filter");
      fp += int'(hit);
    end
    $display("false positives on random keys: %0d / 2000", fp);
    @(posedge clk); #1 clear = 1;
    @(posedge clk); #1 clear = 0;
    for (int k = 0; k < 64; k++) begin
      test_key = keys[k]; #1;
      check(!hit, "hit after clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
