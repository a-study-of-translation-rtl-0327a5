// tlb_top: banked associative translation lookaside buffer.
//
// Translates a virtual address into a physical address. The virtual page
// number (VPN) is split in two: its BANK_SEL_W least significant bits pick
// one of BANKS fully associative banks (through the address decoder used as
// bank-select decoder), and only that bank's CAM is searched with the rest
// of the VPN as tag. Because the bank-select bits are implied by the bank,
// they are not stored, which shortens every CAM word. Only one bank's match
// lines switch per lookup, which is the power saving of the banked
// organisation. The miss decoder merges the bank outputs into hit, miss and
// the physical page number (PPN); the physical address is that PPN joined to
// the untranslated page offset.
//
// Parameters choose the organisation the study compares: BANKS = 1 is a
// fully associative TLB; SEL_IN_TAG = 1 keeps the select bits in the CAM
// (the set associative organisation); REPL chooses LRU or random
// replacement. The defaults are a 128-entry, 4-bank TLB with LRU.
//
// Interface and timing (one clock, active-low asynchronous reset that
// empties the TLB):
//   lookup  - lookup_valid with va. hit, miss, ppn and pa are combinational
//             in the same cycle; LRU state updates at the clock edge.
//   refill  - after a miss the page table walker (outside this design)
//             presents refill_valid with the VPN and its PPN for one cycle;
//             the entry is written at the clock edge. refill_compulsory or
//             refill_evict tells in that cycle whether an empty entry was
//             filled or a valid translation replaced. A refill has priority:
//             a lookup in the same cycle is not performed (hit = miss = 0).
//   probe   - probe_bank / probe_idx read one entry (valid, VPN, PPN) by
//             address, combinationally.
// Address widths (32-bit virtual and physical addresses, 4 KiB pages) are
// this design's choice; the study does not give them.
module tlb_top
  import tlb_pkg::*;
#(
  parameter int    VA_W       = 32,
  parameter int    PA_W       = 32,
  parameter int    OFFSET_W   = 12,
  parameter int    ENTRIES    = 128,
  parameter int    BANKS      = 4,
  parameter repl_e REPL       = REPL_LRU,
  parameter bit    SEL_IN_TAG = 1'b0,
  // derived
  parameter int    VPN_W      = VA_W - OFFSET_W,
  parameter int    PPN_W      = PA_W - OFFSET_W,
  parameter int    BANK_ENT   = ENTRIES / BANKS,
  parameter int    BANK_SEL_W = (BANKS > 1) ? $clog2(BANKS) : 0,
  parameter int    TAG_W      = SEL_IN_TAG ? VPN_W : VPN_W - BANK_SEL_W,
  parameter int    BW         = idx_w(BANKS),
  parameter int    IW         = idx_w(BANK_ENT)
) (
  input  logic             clk,
  input  logic             rst_n,
  // lookup
  input  logic             lookup_valid,
  input  logic [VA_W-1:0]  va,
  output logic             hit,
  output logic             miss,
  output logic [PPN_W-1:0] ppn,
  output logic [PA_W-1:0]  pa,
  // refill from the page table walker
  input  logic             refill_valid,
  input  logic [VPN_W-1:0] refill_vpn,
  input  logic [PPN_W-1:0] refill_ppn,
  output logic             refill_compulsory,
  output logic             refill_evict,
  // read one entry by address
  input  logic [BW-1:0]    probe_bank,
  input  logic [IW-1:0]    probe_idx,
  output logic             probe_valid,
  output logic [VPN_W-1:0] probe_vpn,
  output logic [PPN_W-1:0] probe_ppn
);

  initial begin
    assert (BANKS >= 1 && (BANKS & (BANKS - 1)) == 0)
      else $fatal(1, "tlb_top: BANKS must be a power of two");
    assert (ENTRIES % BANKS == 0 && (BANK_ENT & (BANK_ENT - 1)) == 0)
      else $fatal(1, "tlb_top: ENTRIES/BANKS must be a power of two");
  end

  logic [VPN_W-1:0] vpn;
  logic             lookup;
  logic [BW-1:0]    look_bank, fill_bank;
  logic [TAG_W-1:0] look_tag, fill_tag;
  logic [BANKS-1:0] look_sel, fill_sel;
  logic [BANKS-1:0] bank_hit, bank_comp, bank_evict, bank_rd_valid;
  logic [PPN_W-1:0] bank_ppn    [BANKS];
  logic [PPN_W-1:0] bank_rd_ppn [BANKS];
  logic [TAG_W-1:0] bank_rd_tag [BANKS];
  logic [15:0]      rand_bits;

  assign vpn    = va[VA_W-1:OFFSET_W];
  assign lookup = lookup_valid && !refill_valid;

  function automatic logic [BW-1:0] bank_of(input logic [VPN_W-1:0] v);
    return (BANKS > 1) ? BW'(v % BANKS) : '0;
  endfunction

  function automatic logic [TAG_W-1:0] tag_of(input logic [VPN_W-1:0] v);
    return SEL_IN_TAG ? TAG_W'(v) : TAG_W'(v >> BANK_SEL_W);
  endfunction

  assign look_bank = bank_of(vpn);
  assign fill_bank = bank_of(refill_vpn);
  assign look_tag  = tag_of(vpn);
  assign fill_tag  = tag_of(refill_vpn);

  // bank-select decoders: one for lookups, one for refills
  tlb_addec #(.N(BANKS), .AW(BW)) u_look_dec (
    .en (lookup), .addr (look_bank), .sel (look_sel)
  );
  tlb_addec #(.N(BANKS), .AW(BW)) u_fill_dec (
    .en (refill_valid), .addr (fill_bank), .sel (fill_sel)
  );

  tlb_lfsr u_lfsr (
    .clk (clk), .rst_n (rst_n), .en (1'b1), .value (rand_bits)
  );

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    tlb_bank #(
      .ENTRIES (BANK_ENT),
      .TAG_W   (TAG_W),
      .DATA_W  (PPN_W),
      .REPL    (REPL),
      .IW      (IW)
    ) u_bank (
      .clk             (clk),
      .rst_n           (rst_n),
      .lookup_en       (look_sel[b]),
      .lookup_tag      (look_tag),
      .hit             (bank_hit[b]),
      .ppn             (bank_ppn[b]),
      .fill_en         (fill_sel[b]),
      .fill_tag        (fill_tag),
      .fill_ppn        (refill_ppn),
      .fill_compulsory (bank_comp[b]),
      .fill_evict      (bank_evict[b]),
      .rand_bits       (rand_bits),
      .rd_addr         (probe_idx),
      .rd_valid        (bank_rd_valid[b]),
      .rd_tag          (bank_rd_tag[b]),
      .rd_ppn          (bank_rd_ppn[b])
    );
  end

  tlb_missdec #(.BANKS(BANKS), .DATA_W(PPN_W)) u_missdec (
    .lookup   (lookup),
    .bank_sel (look_sel),
    .bank_hit (bank_hit),
    .bank_ppn (bank_ppn),
    .hit      (hit),
    .miss     (miss),
    .ppn      (ppn)
  );

  assign pa                = {ppn, va[OFFSET_W-1:0]};
  assign refill_compulsory = |bank_comp;
  assign refill_evict      = |bank_evict;

  always_comb begin
    probe_valid = bank_rd_valid[probe_bank];
    probe_ppn   = bank_rd_ppn[probe_bank];
    if (SEL_IN_TAG || BANKS == 1) probe_vpn = VPN_W'(bank_rd_tag[probe_bank]);
    else probe_vpn = (VPN_W'(bank_rd_tag[probe_bank]) << BANK_SEL_W) | VPN_W'(probe_bank);
  end

endmodule
