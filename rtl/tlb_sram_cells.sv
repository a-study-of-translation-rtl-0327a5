// tlb_sram_cells: the SRAM array holding the physical page numbers.
//
// One DATA_W-bit word per TLB entry. On a lookup the CAM's match lines are
// the word lines: rdata is the OR of every word whose match line is set, so
// with a single match it is that entry's physical page number and with no
// match it is zero. A write on a clock edge with wr_en high stores wdata into
// the words selected by the one-hot wr_sel (the same decoded address that
// writes the CAM tag). rd_addr reads a word by address. Reads are
// combinational; the array has no reset.
//
// The CAM-drives-SRAM organisation follows the study; the wired-OR read
// port and the address read port are this design's choices.
module tlb_sram_cells #(
  parameter int ENTRIES = 32,
  parameter int DATA_W  = 20,
  parameter int IW      = tlb_pkg::idx_w(ENTRIES)
) (
  input  logic               clk,
  input  logic [ENTRIES-1:0] wordline,
  output logic [DATA_W-1:0]  rdata,
  input  logic               wr_en,
  input  logic [ENTRIES-1:0] wr_sel,
  input  logic [DATA_W-1:0]  wdata,
  input  logic [IW-1:0]      rd_addr,
  output logic [DATA_W-1:0]  rd_data
);

  logic [DATA_W-1:0] mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int i = 0; i < ENTRIES; i++) begin
        if (wr_sel[i]) mem[i] <= wdata;
      end
    end
  end

  always_comb begin
    rdata = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (wordline[i]) rdata = rdata | mem[i];
    end
  end

  assign rd_data = mem[rd_addr];

endmodule
