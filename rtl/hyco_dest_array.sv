// hyco_dest_array: the destination array of the HyCo controller.
//
// One entry per input port holds a valid bit and the output port that input
// requests. An entry is written (we) in the cycle the request is accepted from
// the IP and cleared (clr) when the input releases its connection; clr wins
// over we. Reads are the registered contents, available one cycle after the
// write. The request matrix of the conflict-resolution unit and the key of the
// Bloom filter are both formed from this array. The published HyCo design names the array
// in its block diagram; its register organisation is this design's choice.
module hyco_dest_array #(
  parameter int unsigned N = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [N-1:0]                  we,
  input  logic [N-1:0][$clog2(N)-1:0]   wdst,
  input  logic [N-1:0]                  clr,
  output logic [N-1:0]                  valid,
  output logic [N-1:0][$clog2(N)-1:0]   dst
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid <= '0;
      dst   <= '0;
    end else begin
      for (int unsigned i = 0; i < N; i++) begin
        if (clr[i]) begin
          valid[i] <= 1'b0;
        end else if (we[i]) begin
          valid[i] <= 1'b1;
          dst[i]   <= wdst[i];
        end
      end
    end
  end
endmodule
