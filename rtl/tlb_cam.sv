// tlb_cam: content addressable memory holding the virtual page tags.
//
// Each of the ENTRIES words holds a TAG_W-bit tag and a valid bit. The CAM
// supports the three operations of a content addressable memory:
//   match - while match_en is high, every valid word whose tag equals
//           cmp_tag raises its match line; hit is the OR of the match lines.
//           The match lines act as the word lines of the SRAM that holds the
//           physical page numbers. While match_en is low (bank not selected)
//           no match line rises, which is what saves power in a banked TLB.
//           Combinational, same cycle.
//   write - on a clock edge with wr_en high the words whose wr_sel line is
//           set (one-hot, from the address decoder) take wr_tag and become
//           valid.
//   read  - rd_addr reads a word's tag and valid bit like an ordinary memory
//           (combinational).
// Reset clears every valid bit; the tags themselves are not reset.
//
// The operations and the match-line-to-SRAM connection follow the study;
// the absence of mask bits (a translation compares its whole tag) and the
// reset behaviour are this design's choices.
module tlb_cam #(
  parameter int ENTRIES = 32,
  parameter int TAG_W   = 18,
  parameter int IW      = tlb_pkg::idx_w(ENTRIES)
) (
  input  logic               clk,
  input  logic               rst_n,
  // match
  input  logic               match_en,
  input  logic [TAG_W-1:0]   cmp_tag,
  output logic [ENTRIES-1:0] match,
  output logic               hit,
  // write
  input  logic               wr_en,
  input  logic [ENTRIES-1:0] wr_sel,
  input  logic [TAG_W-1:0]   wr_tag,
  // read
  input  logic [IW-1:0]      rd_addr,
  output logic [TAG_W-1:0]   rd_tag,
  output logic               rd_valid,
  // valid bits, for the replacement control
  output logic [ENTRIES-1:0] valid
);

  logic [TAG_W-1:0] tags [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else if (wr_en) begin
      for (int i = 0; i < ENTRIES; i++) begin
        if (wr_sel[i]) valid[i] <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int i = 0; i < ENTRIES; i++) begin
        if (wr_sel[i]) tags[i] <= wr_tag;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      match[i] = match_en && valid[i] && (tags[i] == cmp_tag);
    end
  end

  assign hit      = |match;
  assign rd_tag   = tags[rd_addr];
  assign rd_valid = valid[rd_addr];

endmodule
