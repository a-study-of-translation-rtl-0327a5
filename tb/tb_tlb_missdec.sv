// tb_tlb_missdec: self-checking test of the hit/miss decoder.
// For a 4-bank decoder, drives random bank enables (one-hot or none), bank
// hit lines and PPNs, and checks hit, miss and the selected PPN against a
// reference: only the enabled bank's hit counts.
module tb_tlb_missdec;
  localparam int B = 4, W = 20;
  logic lookup;
  logic [B-1:0] bank_sel, bank_hit;
  logic [W-1:0] bank_ppn [B];
  logic hit, miss;
  logic [W-1:0] ppn;
  int checks = 0, failures = 0;
  int nhit = 0, nmiss = 0;

  tlb_missdec #(.BANKS(B), .DATA_W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      int s;
      logic eh;
      logic [W-1:0] ep;
      lookup = ($urandom() % 8) != 0;
      s = $urandom() % 5;
      bank_sel = (s == 4) ? '0 : B'(1) << s;
      bank_hit = B'($urandom());
      for (int b = 0; b < B; b++) bank_ppn[b] = W'($urandom());
      eh = lookup && s < 4 && bank_hit[s];
      ep = eh ? bank_ppn[s] : '0;
      #1;
      checks++;
      if (hit !== eh || miss !== (lookup && !eh) || (eh && ppn !== ep)) begin
        failures++;
        $display("FAIL lookup=%0d sel=%b hit_in=%b -> hit=%0d miss=%0d ppn=%h exp %0d %h",
                 lookup, bank_sel, bank_hit, hit, miss, ppn, eh, ep);
      end
      if (eh) nhit++;
      if (lookup && !eh) nmiss++;
    end
    checks++;
    if (nhit == 0 || nmiss == 0) begin failures++; $display("FAIL coverage hit=%0d miss=%0d", nhit, nmiss); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
