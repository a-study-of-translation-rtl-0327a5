// tlb_prienc: priority encoder.
//
// Reports whether any request line is set and the index of the lowest one.
// The CAM of a TLB uses it twice: to encode the match lines of a hit into an
// entry number, and to find the first invalid entry, which a refill fills
// before any valid translation is evicted. Combinational.
//
// The study shows a priority encoder beside the CAM array; lowest index
// wins is this design's choice.
module tlb_prienc #(
  parameter int N  = 32,
  parameter int IW = tlb_pkg::idx_w(N)
) (
  input  logic [N-1:0]  req,
  output logic          found,
  output logic [IW-1:0] idx
);

  always_comb begin
    found = 1'b0;
    idx   = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (req[i]) begin
        found = 1'b1;
        idx   = IW'(i);
      end
    end
  end

endmodule
