// tlb_missdec: hit/miss decoder and output select of a banked TLB.
//
// Only the bank picked by bank_sel (one-hot) is searched, so the TLB hits
// when that bank hits. The decoder ANDs each bank's hit line with its enable,
// ORs the results into hit, raises miss for a lookup that did not hit, and
// passes on the physical page number of the enabled bank. Combinational.
//
// The study names the block (missdec) and shows the bank hit lines and PPN
// buses joining into one hit and one physical page number; the gating by
// bank enable is this design's reading of that.
module tlb_missdec #(
  parameter int BANKS  = 4,
  parameter int DATA_W = 20
) (
  input  logic              lookup,
  input  logic [BANKS-1:0]  bank_sel,
  input  logic [BANKS-1:0]  bank_hit,
  input  logic [DATA_W-1:0] bank_ppn [BANKS],
  output logic              hit,
  output logic              miss,
  output logic [DATA_W-1:0] ppn
);

  always_comb begin
    hit = 1'b0;
    ppn = '0;
    for (int b = 0; b < BANKS; b++) begin
      if (bank_sel[b] && bank_hit[b]) begin
        hit = 1'b1;
        ppn = ppn | bank_ppn[b];
      end
    end
    hit  = hit && lookup;
    miss = lookup && !hit;
    if (!lookup) ppn = '0;
  end

endmodule
