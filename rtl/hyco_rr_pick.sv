// hyco_rr_pick: combinational round-robin pick.
//
// Returns a one-hot grant for the first set bit of req at or after position
// ptr, wrapping around (rotating priority). Used by the conflict-resolution
// unit for each output column and by the access-control unit to choose the
// port the Bloom filter stalls. No clock; the caller keeps and moves ptr.
// The controller calls for round-robin choices; this rotating-priority circuit
// is this design's way of making them.
module hyco_rr_pick #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]         req,
  input  logic [$clog2(N)-1:0] ptr,
  output logic [N-1:0]         gnt
);
  always_comb begin
    logic [$clog2(N)-1:0] idx;
    logic found;
    gnt   = '0;
    found = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      idx = ptr + $clog2(N)'(k);
      if (!found && req[idx]) begin
        gnt[idx] = 1'b1;
        found    = 1'b1;
      end
    end
  end
endmodule
