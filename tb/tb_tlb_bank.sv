// tb_tlb_bank: self-checking test of one fully associative TLB bank.
// An 8-entry LRU bank is driven with random lookups and fills over a small
// tag space, so that hits, compulsory fills, evictions and refills of a tag
// already present all occur. A reference model in the testbench (tag, PPN
// and valid per entry plus an LRU recency list) predicts hit and PPN in the
// lookup cycle (zero latency), the entry each fill writes, and the whole
// array, which is compared through the read port after every operation.
module tb_tlb_bank;
  import tlb_pkg::*;
  localparam int E = 8, TW = 6, DW = 10;
  logic clk = 0, rst_n = 0;
  logic lookup_en = 0, fill_en = 0;
  logic [TW-1:0] lookup_tag = '0, fill_tag = '0, rd_tag;
  logic [DW-1:0] ppn, fill_ppn = '0, rd_ppn;
  logic hit, fill_compulsory, fill_evict, rd_valid;
  logic [15:0] rand_bits = '0;
  logic [2:0] rd_addr = '0;

  logic [TW-1:0] m_tag [E];
  logic [DW-1:0] m_ppn [E];
  bit   [E-1:0]  m_valid = '0;
  int order [$];
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_comp = 0, n_evict = 0, n_refresh = 0, n_prio = 0;

  tlb_bank #(.ENTRIES(E), .TAG_W(TW), .DATA_W(DW), .REPL(REPL_LRU)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int find(input logic [TW-1:0] t);
    for (int i = 0; i < E; i++) if (m_valid[i] && m_tag[i] == t) return i;
    return -1;
  endfunction

  function automatic void use_entry(input int k);
    foreach (order[i]) if (order[i] == k) begin order.delete(i); break; end
    order.push_back(k);
  endfunction

  task automatic compare_array();
    for (int i = 0; i < E; i++) begin
      rd_addr = 3'(i);
      #1;
      checks++;
      if (rd_valid !== m_valid[i] || (m_valid[i] && (rd_tag !== m_tag[i] || rd_ppn !== m_ppn[i]))) begin
        failures++;
        $display("FAIL entry %0d: v=%0d tag=%h ppn=%h exp v=%0d tag=%h ppn=%h",
                 i, rd_valid, rd_tag, rd_ppn, m_valid[i], m_tag[i], m_ppn[i]);
      end
    end
  endtask

  task automatic do_lookup(input logic [TW-1:0] t);
    int k;
    @(negedge clk);
    lookup_en = 1; lookup_tag = t;
    #1;
    k = find(t);
    checks++;
    if (hit !== (k >= 0) || (k >= 0 && ppn !== m_ppn[k])) begin
      failures++; $display("FAIL lookup %h hit=%0d ppn=%h exp %0d", t, hit, ppn, k);
    end
    if (k >= 0) begin n_hit++; use_entry(k); end else n_miss++;
    @(negedge clk);
    lookup_en = 0;
  endtask

  task automatic do_fill(input logic [TW-1:0] t, input logic [DW-1:0] p, input bit with_lookup);
    int k;
    bit comp;
    @(negedge clk);
    fill_en = 1; fill_tag = t; fill_ppn = p;
    lookup_en = with_lookup; lookup_tag = t;
    k = find(t);
    comp = 0;
    if (k >= 0) n_refresh++;
    else begin
      for (int i = 0; i < E; i++) if (!m_valid[i]) begin k = i; comp = 1; break; end
      if (k < 0) k = order[0];
    end
    #1;
    checks++;
    if (fill_compulsory !== (comp && find(t) < 0) || fill_evict !== (!comp && find(t) < 0) ||
        hit !== 1'b0) begin
      failures++; $display("FAIL fill flags comp=%0d evict=%0d hit=%0d exp comp=%0d", fill_compulsory, fill_evict, hit, comp);
    end
    if (with_lookup) n_prio++;
    if (fill_compulsory) n_comp++;
    if (fill_evict) n_evict++;
    m_tag[k] = t; m_ppn[k] = p; m_valid[k] = 1; use_entry(k);
    @(negedge clk);
    fill_en = 0; lookup_en = 0;
  endtask

  initial begin
    for (int i = E - 1; i >= 0; i--) order.push_back(i);
    repeat (2) @(posedge clk);
    rst_n = 1;
    compare_array();
    for (int n = 0; n < 400; n++) begin
      logic [TW-1:0] t;
      t = TW'($urandom() % 14);
      do_lookup(t);
      if (find(t) < 0 || ($urandom() % 16) == 0) do_fill(t, DW'($urandom()), ($urandom() % 4) == 0);
      compare_array();
    end
    // lookup_en low: nothing hits
    @(negedge clk);
    lookup_en = 0; lookup_tag = m_tag[0];
    #1;
    checks++;
    if (hit !== 1'b0) begin failures++; $display("FAIL hit without lookup_en"); end
    $display("hits=%0d misses=%0d compulsory=%0d evictions=%0d refresh=%0d fill+lookup=%0d",
             n_hit, n_miss, n_comp, n_evict, n_refresh, n_prio);
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_comp != E || n_evict == 0 || n_refresh == 0 || n_prio == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
