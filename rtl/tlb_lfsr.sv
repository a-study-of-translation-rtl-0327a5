// tlb_lfsr: pseudo-random source for random replacement.
//
// A 16-bit Fibonacci linear feedback shift register with the maximal-length
// polynomial x^16 + x^14 + x^13 + x^11 + 1 (period 65535). It shifts once
// per clock while en is high; its low bits pick the victim entry when the
// TLB uses random replacement. Reset loads SEED, which must be non-zero.
//
// The study uses random replacement but does not say how the random number
// is made; the LFSR, its polynomial and seed are this design's choice.
module tlb_lfsr #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [15:0] value
);

  logic fb;
  assign fb = value[15] ^ value[13] ^ value[12] ^ value[10];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  value <= SEED;
    else if (en) value <= {value[14:0], fb};
  end

endmodule
