// tb_tlb_cam: self-checking test of the tag CAM.
// A 16-entry, 12-bit CAM is reset (all invalid, nothing matches), filled
// word by word with distinct random tags, then searched with every stored
// tag, with absent tags and with match_en low. Reads by address and
// overwrites are checked too. A reference array held in the testbench gives
// the expected match lines.
module tb_tlb_cam;
  localparam int E = 16, W = 12;
  logic clk = 0, rst_n = 0;
  logic match_en = 0;
  logic [W-1:0] cmp_tag = '0, wr_tag = '0, rd_tag;
  logic [E-1:0] match, wr_sel = '0, valid;
  logic hit, wr_en = 0, rd_valid;
  logic [3:0] rd_addr = '0;
  logic [W-1:0] ref_tag [E];
  logic [E-1:0] ref_valid;
  int checks = 0, failures = 0;

  tlb_cam #(.ENTRIES(E), .TAG_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic search(input logic [W-1:0] t, input logic en);
    logic [E-1:0] exp;
    match_en = en;
    cmp_tag  = t;
    #1;
    for (int i = 0; i < E; i++) exp[i] = en && ref_valid[i] && ref_tag[i] == t;
    checks++;
    if (match !== exp || hit !== |exp) begin
      failures++;
      $display("FAIL search %h en=%0d match=%h exp=%h hit=%0d", t, en, match, exp, hit);
    end
  endtask

  task automatic write(input int idx, input logic [W-1:0] t);
    @(negedge clk);
    wr_en = 1; wr_sel = E'(1) << idx; wr_tag = t;
    @(negedge clk);
    wr_en = 0; wr_sel = '0;
    ref_tag[idx] = t; ref_valid[idx] = 1;
  endtask

  initial begin
    ref_valid = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    checks++;
    if (valid !== '0) begin failures++; $display("FAIL valid after reset"); end
    search(12'h000, 1);
    search(12'h123, 1);
    // fill with distinct tags
    for (int i = 0; i < E; i++) write(i, W'(12'h100 + i * 37));
    checks++;
    if (valid !== '1) begin failures++; $display("FAIL valid not all set"); end
    for (int i = 0; i < E; i++) search(W'(12'h100 + i * 37), 1);
    for (int i = 0; i < E; i++) search(W'(12'h100 + i * 37), 0);
    for (int n = 0; n < 50; n++) search(W'($urandom()), 1);
    // read by address
    for (int i = 0; i < E; i++) begin
      rd_addr = 4'(i);
      #1;
      checks++;
      if (rd_tag !== ref_tag[i] || rd_valid !== 1'b1) begin
        failures++; $display("FAIL read %0d: %h", i, rd_tag);
      end
    end
    // overwrite entry 5: the old tag no longer matches, the new one does
    write(5, 12'hABC);
    search(W'(12'h100 + 5 * 37), 1);
    search(12'hABC, 1);
    // reset clears valid bits
    rst_n = 0; #1; rst_n = 1; ref_valid = '0;
    search(12'hABC, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
