// tlb_addec: address decoder.
//
// Turns a binary address into a one-hot enable vector. Inside a TLB bank it
// drives the word lines of the CAM and SRAM arrays for a write, choosing the
// single word that is replaced on a refill. At the top of a banked TLB the
// same decoder turns the bank-select bits of the virtual page number into the
// enable of the one bank that is searched, so that the other banks stay idle.
// The decoder is combinational; when en is low every output is low.
//
// The study names the block (addec) and uses a decoder to enable sets and
// banks; its gate structure is not given, so it is written as a plain
// compare per output.
module tlb_addec #(
  parameter int N  = 32,                    // number of outputs
  parameter int AW = tlb_pkg::idx_w(N)      // address width
) (
  input  logic          en,
  input  logic [AW-1:0] addr,
  output logic [N-1:0]  sel
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      sel[i] = en && (addr == AW'(i));
    end
  end

endmodule
