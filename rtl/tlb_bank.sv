// tlb_bank: one fully associative TLB bank.
//
// A bank holds ENTRIES translations. The tags live in a CAM (tlb_cam), the
// physical page numbers in an SRAM (tlb_sram_cells) whose word lines are the
// CAM match lines, the address decoder (tlb_addec) drives the word lines of
// both arrays for a write, and the replacement control (tlb_cam_ctrl) picks
// the entry to write.
//
// Operations, one per cycle:
//   lookup - lookup_en high: the CAM compares lookup_tag with every valid
//            entry; hit and ppn are valid in the same cycle (combinational).
//            A hit counts as a use of the entry for LRU at the clock edge.
//   fill   - fill_en high: writes (fill_tag, fill_ppn) at the clock edge. If
//            the tag is already present its entry is overwritten, otherwise
//            the entry chosen by the replacement control. fill_compulsory /
//            fill_evict report, in the fill cycle, whether an empty entry was
//            used or a valid translation was evicted.
//   A fill has priority: while fill_en is high, hit is held low.
//   read   - rd_addr reads an entry's valid bit, tag and PPN by address.
// When neither lookup_en nor fill_en is high no match line toggles; this is
// how an unselected bank of a banked TLB stays idle.
//
// The CAM + SRAM organisation of a bank follows the study; the fill port,
// the overwrite of a tag already present and fill priority are this
// design's choices.
module tlb_bank
  import tlb_pkg::*;
#(
  parameter int    ENTRIES = 32,
  parameter int    TAG_W   = 18,
  parameter int    DATA_W  = 20,
  parameter repl_e REPL    = REPL_LRU,
  parameter int    IW      = idx_w(ENTRIES)
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup
  input  logic              lookup_en,
  input  logic [TAG_W-1:0]  lookup_tag,
  output logic              hit,
  output logic [DATA_W-1:0] ppn,
  // fill
  input  logic              fill_en,
  input  logic [TAG_W-1:0]  fill_tag,
  input  logic [DATA_W-1:0] fill_ppn,
  output logic              fill_compulsory,
  output logic              fill_evict,
  // random source for random replacement
  input  logic [15:0]       rand_bits,
  // read by address
  input  logic [IW-1:0]     rd_addr,
  output logic              rd_valid,
  output logic [TAG_W-1:0]  rd_tag,
  output logic [DATA_W-1:0] rd_ppn
);

  logic               match_en;
  logic [TAG_W-1:0]   cmp_tag;
  logic [ENTRIES-1:0] match;
  logic               cam_hit;
  logic [IW-1:0]      match_idx;
  logic               match_found;
  logic [ENTRIES-1:0] valid;
  logic [IW-1:0]      victim_idx;
  logic               victim_invalid;
  logic [IW-1:0]      wr_idx;
  logic [ENTRIES-1:0] wr_sel;
  logic               touch;
  logic [IW-1:0]      touch_idx;

  assign match_en = lookup_en || fill_en;
  assign cmp_tag  = fill_en ? fill_tag : lookup_tag;

  tlb_cam #(.ENTRIES(ENTRIES), .TAG_W(TAG_W), .IW(IW)) u_cam (
    .clk      (clk),
    .rst_n    (rst_n),
    .match_en (match_en),
    .cmp_tag  (cmp_tag),
    .match    (match),
    .hit      (cam_hit),
    .wr_en    (fill_en),
    .wr_sel   (wr_sel),
    .wr_tag   (fill_tag),
    .rd_addr  (rd_addr),
    .rd_tag   (rd_tag),
    .rd_valid (rd_valid),
    .valid    (valid)
  );

  tlb_sram_cells #(.ENTRIES(ENTRIES), .DATA_W(DATA_W), .IW(IW)) u_sram (
    .clk      (clk),
    .wordline (match),
    .rdata    (ppn),
    .wr_en    (fill_en),
    .wr_sel   (wr_sel),
    .wdata    (fill_ppn),
    .rd_addr  (rd_addr),
    .rd_data  (rd_ppn)
  );

  tlb_prienc #(.N(ENTRIES), .IW(IW)) u_match_enc (
    .req   (match),
    .found (match_found),
    .idx   (match_idx)
  );

  tlb_cam_ctrl #(.ENTRIES(ENTRIES), .REPL(REPL), .IW(IW)) u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .valid          (valid),
    .touch          (touch),
    .touch_idx      (touch_idx),
    .rand_bits      (rand_bits),
    .victim_idx     (victim_idx),
    .victim_invalid (victim_invalid)
  );

  assign wr_idx = cam_hit ? match_idx : victim_idx;

  tlb_addec #(.N(ENTRIES), .AW(IW)) u_addec (
    .en   (fill_en),
    .addr (wr_idx),
    .sel  (wr_sel)
  );

  assign hit             = cam_hit && !fill_en;
  assign touch           = fill_en || cam_hit;
  assign touch_idx       = fill_en ? wr_idx : match_idx;
  assign fill_compulsory = fill_en && !cam_hit && victim_invalid;
  assign fill_evict      = fill_en && !cam_hit && !victim_invalid;

  // The CAM never holds a tag twice, so a match is one-hot, and the
  // encoder agrees with the CAM's hit line.
  assert property (@(posedge clk) $onehot0(match) && (match_found == cam_hit))
    else $error("tlb_bank: CAM match lines not one-hot");

endmodule
