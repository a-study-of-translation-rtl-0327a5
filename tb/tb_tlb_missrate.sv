// tb_tlb_missrate: miss rate against TLB size on one page stream.
// Six TLBs, all LRU, see the same page stream (same SEED and a pool of 768
// pages): fully associative with 64, 128 and 256 entries, and 4-bank with
// 64, 128 and 256 entries. Each is checked by its own tlb_env. LRU has the
// inclusion property: a fully associative LRU TLB of N entries always holds
// what one of N/2 entries holds, and the same holds bank by bank when the
// number of banks is fixed. So on the same stream the number of misses can
// only fall as the size grows; the test checks that for both organisations
// and prints the miss rates.
module tb_tlb_missrate;
  import tlb_pkg::*;
  localparam int NV = 6;
  localparam int OPS = 12000;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks [NV];
  int failures [NV];
  int misses [NV];
  logic [NV-1:0] done;

  `define TLB_RUN(I, ENT, NB)                                                         \
    begin : g_run_``I                                                                \
      localparam int BW = idx_w(NB);                                                 \
      localparam int IW = idx_w((ENT) / (NB));                                       \
      logic rst_n, lookup_valid, hit, miss, refill_valid, refill_compulsory;         \
      logic refill_evict, probe_valid;                                               \
      logic [31:0] va, pa;                                                           \
      logic [19:0] ppn, refill_vpn, refill_ppn, probe_vpn, probe_ppn;                \
      logic [BW-1:0] probe_bank;                                                     \
      logic [IW-1:0] probe_idx;                                                      \
      tlb_top #(.ENTRIES(ENT), .BANKS(NB), .REPL(REPL_LRU)) dut (.*);                \
      tlb_env #(.ENTRIES(ENT), .BANKS(NB), .REPL(REPL_LRU), .N_OPS(OPS),             \
                .SEED(12345), .POOL(768)) env (                                      \
        .*, .done(done[I]), .checks(checks[I]), .failures(failures[I]),              \
        .first_misses(misses[I]));                                                   \
    end

  `TLB_RUN(0, 64, 1)
  `TLB_RUN(1, 128, 1)
  `TLB_RUN(2, 256, 1)
  `TLB_RUN(3, 64, 4)
  `TLB_RUN(4, 128, 4)
  `TLB_RUN(5, 256, 4)

  `undef TLB_RUN

  function automatic int total(input int a [NV]);
    int s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  initial begin
    repeat (5_000_000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures) + 1);
    $finish;
  end

  initial begin
    int c, f;
    #1;
    wait (&done);
    c = total(checks);
    f = total(failures);
    for (int i = 0; i < NV; i++)
      $display("%s %0d entries: %0d misses in %0d lookups (%0.2f%%)",
               (i < 3) ? "fully associative" : "4 banks          ", 64 << (i % 3),
               misses[i], OPS, 100.0 * real'(misses[i]) / real'(OPS));
    for (int g = 0; g < 2; g++) begin
      for (int i = 0; i < 2; i++) begin
        c++;
        if (misses[3 * g + i + 1] > misses[3 * g + i]) begin
          f++;
          $display("FAIL: more misses with more entries (%0d > %0d)", misses[3 * g + i + 1], misses[3 * g + i]);
        end
      end
      c++;
      if (misses[3 * g] == misses[3 * g + 2]) begin
        f++;
        $display("FAIL: size made no difference at all");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
