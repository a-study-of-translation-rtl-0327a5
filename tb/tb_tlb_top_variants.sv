// tb_tlb_top_variants: end-to-end tests of the other TLB organisations.
// Runs tlb_top, each with its own tlb_env checker, as
//   a: 64 entries, fully associative (1 bank), LRU
//   b: 128 entries, 2 banks, random replacement
//   c: 256 entries, 4 banks, random replacement
//   d: 64 entries, 4 sets with the select bits kept in the CAM
//      (set associative), LRU
//   e: 256 entries, 2 banks, LRU
// and reports the sum of their checks and failures.
module tb_tlb_top_variants;
  import tlb_pkg::*;
  localparam int NV = 5;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int  checks [NV];
  int  failures [NV];
  logic [NV-1:0] done;

  // one TLB and its checker per organisation
  `define TLB_CASE(I, ENT, NB, POL, SIT)                                              \
    begin : g_case_``I                                                               \
      localparam int BW = idx_w(NB);                                                 \
      localparam int IW = idx_w((ENT) / (NB));                                       \
      logic rst_n, lookup_valid, hit, miss, refill_valid, refill_compulsory;         \
      logic refill_evict, probe_valid;                                               \
      logic [31:0] va, pa;                                                           \
      logic [19:0] ppn, refill_vpn, refill_ppn, probe_vpn, probe_ppn;                \
      logic [BW-1:0] probe_bank;                                                     \
      logic [IW-1:0] probe_idx;                                                      \
      int first_misses;                                                              \
      tlb_top #(.ENTRIES(ENT), .BANKS(NB), .REPL(POL), .SEL_IN_TAG(SIT)) dut (.*);   \
      tlb_env #(.ENTRIES(ENT), .BANKS(NB), .REPL(POL), .SEL_IN_TAG(SIT),             \
                .N_OPS(8000), .SEED(I + 7)) env (                                    \
        .*, .done(done[I]), .checks(checks[I]), .failures(failures[I]));             \
    end

  `TLB_CASE(0, 64, 1, REPL_LRU, 1'b0)
  `TLB_CASE(1, 128, 2, REPL_RANDOM, 1'b0)
  `TLB_CASE(2, 256, 4, REPL_RANDOM, 1'b0)
  `TLB_CASE(3, 64, 4, REPL_LRU, 1'b1)
  `TLB_CASE(4, 256, 2, REPL_LRU, 1'b0)

  `undef TLB_CASE

  function automatic int total(input int a [NV]);
    int s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  initial begin
    repeat (3_000_000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures) + 1);
    $finish;
  end

  initial begin
    #1;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures));
    $finish;
  end
endmodule
