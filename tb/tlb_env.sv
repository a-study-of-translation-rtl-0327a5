// tlb_env: stimulus and reference model for end-to-end tests of tlb_top.
//
// Plays the processor and the page table walker around one tlb_top of the
// same parameters. It translates a stream of N_OPS virtual addresses with
// page locality drawn from a pool of POOL pages (3 x ENTRIES by default), so
// that the TLB fills, overflows and starts replacing. The page stream comes
// from its own generator (a linear congruential sequence seeded by SEED) and
// does not depend on the TLB's answers, so TLBs of different organisations
// given the same SEED and POOL see the same pages in the same order. Every lookup is checked in its own
// cycle (zero-latency translation) against a reference model: per bank a
// list of (VPN, PPN, valid) words and, for LRU, a recency list; for random
// replacement a copy of the 16-bit LFSR. On a miss it waits 1 to 3 cycles
// (the walk), refills the page with PPN = page_table(VPN), checks whether the
// refill was reported as compulsory or as an eviction, and looks the address
// up again, which must now hit. Some refills are sent together with a lookup
// (the lookup must be suppressed) and some re-send a page already present
// (no entry may be lost). Every 64 operations the whole TLB is read through
// the probe port and compared with the model.
//
// Counts how often each mechanism happened and fails if one never did.
// done rises when the run is over; checks and failures are then final.
module tlb_env
  import tlb_pkg::*;
#(
  parameter int    VA_W       = 32,
  parameter int    PA_W       = 32,
  parameter int    OFFSET_W   = 12,
  parameter int    ENTRIES    = 128,
  parameter int    BANKS      = 4,
  parameter repl_e REPL       = REPL_LRU,
  parameter bit    SEL_IN_TAG = 1'b0,
  parameter int    N_OPS      = 4000,
  parameter int    SEED       = 1,
  parameter int    POOL       = 3 * ENTRIES,
  parameter int    VPN_W      = VA_W - OFFSET_W,
  parameter int    PPN_W      = PA_W - OFFSET_W,
  parameter int    BANK_ENT   = ENTRIES / BANKS,
  parameter int    BW         = idx_w(BANKS),
  parameter int    IW         = idx_w(BANK_ENT)
) (
  input  logic             clk,
  output logic             rst_n,
  output logic             lookup_valid,
  output logic [VA_W-1:0]  va,
  input  logic             hit,
  input  logic             miss,
  input  logic [PPN_W-1:0] ppn,
  input  logic [PA_W-1:0]  pa,
  output logic             refill_valid,
  output logic [VPN_W-1:0] refill_vpn,
  output logic [PPN_W-1:0] refill_ppn,
  input  logic             refill_compulsory,
  input  logic             refill_evict,
  output logic [BW-1:0]    probe_bank,
  output logic [IW-1:0]    probe_idx,
  input  logic             probe_valid,
  input  logic [VPN_W-1:0] probe_vpn,
  input  logic [PPN_W-1:0] probe_ppn,
  output logic             done,
  output int               checks,
  output int               failures,
  output int               first_misses
);

  // reference model
  logic [VPN_W-1:0] m_vpn   [BANKS][BANK_ENT];
  logic [PPN_W-1:0] m_ppn   [BANKS][BANK_ENT];
  bit               m_valid [BANKS][BANK_ENT];
  int               order   [BANKS][$];
  logic [15:0]      m_lfsr;

  // mechanism counters
  int n_hit, n_miss, n_comp, n_evict, n_refresh, n_prio, n_retry_hit;
  int n_bank [BANKS];

  logic [VPN_W-1:0] pool [POOL];
  logic [31:0]      trace_state;
  logic [VPN_W-1:0] recent [16];

  function automatic logic [PPN_W-1:0] page_table(input logic [VPN_W-1:0] v);
    logic [31:0] h;
    h = 32'(v) * 32'h9E37_79B1;
    return PPN_W'(h >> 7);
  endfunction

  // page stream generator: 32-bit LCG, upper bits used
  function automatic int unsigned next_rand();
    trace_state = trace_state * 32'd1664525 + 32'd1013904223;
    return int'(trace_state >> 8);
  endfunction

  function automatic int bank_of(input logic [VPN_W-1:0] v);
    return int'(32'(v) % BANKS);
  endfunction

  function automatic int find(input logic [VPN_W-1:0] v);
    int b = bank_of(v);
    for (int i = 0; i < BANK_ENT; i++) if (m_valid[b][i] && m_vpn[b][i] == v) return i;
    return -1;
  endfunction

  function automatic void use_entry(input int b, input int k);
    foreach (order[b][i]) if (order[b][i] == k) begin order[b].delete(i); break; end
    order[b].push_back(k);
  endfunction

  // the random replacement source, stepped like the one in the design
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) m_lfsr <= 16'hACE1;
    else        m_lfsr <= {m_lfsr[14:0], m_lfsr[15] ^ m_lfsr[13] ^ m_lfsr[12] ^ m_lfsr[10]};
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL: %s", msg);
  endtask

  task automatic compare_all();
    for (int b = 0; b < BANKS; b++) begin
      for (int i = 0; i < BANK_ENT; i++) begin
        probe_bank = BW'(b);
        probe_idx  = IW'(i);
        #1;
        checks++;
        if (probe_valid !== m_valid[b][i] ||
            (m_valid[b][i] && (probe_vpn !== m_vpn[b][i] || probe_ppn !== m_ppn[b][i])))
          fail($sformatf("bank %0d entry %0d holds v=%0d %h->%h, model v=%0d %h->%h", b, i,
                         probe_valid, probe_vpn, probe_ppn, m_valid[b][i], m_vpn[b][i], m_ppn[b][i]));
      end
    end
  endtask

  // one lookup; returns 1 on hit
  task automatic lookup(input logic [VPN_W-1:0] v, output bit was_hit);
    int k, b;
    @(negedge clk);
    lookup_valid = 1'b1;
    va = {v, OFFSET_W'($urandom())};
    #1;
    k = find(v);
    b = bank_of(v);
    n_bank[b]++;
    checks++;
    if (hit !== (k >= 0) || miss !== (k < 0))
      fail($sformatf("vpn %h: hit=%0d miss=%0d, model says %s", v, hit, miss, (k >= 0) ? "hit" : "miss"));
    else if (k >= 0) begin
      checks++;
      if (ppn !== m_ppn[b][k] || pa !== {m_ppn[b][k], va[OFFSET_W-1:0]})
        fail($sformatf("vpn %h: pa=%h ppn=%h, expected ppn %h", v, pa, ppn, m_ppn[b][k]));
    end
    if (k >= 0) begin
      n_hit++;
      use_entry(b, k);
    end else n_miss++;
    was_hit = (k >= 0);
    @(negedge clk);
    lookup_valid = 1'b0;
  endtask

  task automatic refill(input logic [VPN_W-1:0] v, input bit with_lookup);
    int k, b;
    bit comp, present;
    @(negedge clk);
    refill_valid = 1'b1;
    refill_vpn   = v;
    refill_ppn   = page_table(v);
    lookup_valid = with_lookup;
    va           = {v, OFFSET_W'(0)};
    b = bank_of(v);
    k = find(v);
    present = (k >= 0);
    comp = 1'b0;
    if (!present) begin
      for (int i = 0; i < BANK_ENT; i++) if (!m_valid[b][i]) begin k = i; comp = 1'b1; break; end
      if (k < 0) k = (REPL == REPL_LRU) ? order[b][0] : int'(32'(m_lfsr) % BANK_ENT);
    end
    #1;
    checks++;
    if (refill_compulsory !== (!present && comp) || refill_evict !== (!present && !comp))
      fail($sformatf("refill %h: compulsory=%0d evict=%0d, model %0d/%0d", v,
                     refill_compulsory, refill_evict, !present && comp, !present && !comp));
    if (with_lookup) begin
      checks++;
      n_prio++;
      if (hit !== 1'b0 || miss !== 1'b0) fail("lookup not held off during refill");
    end
    if (present) n_refresh++;
    else if (comp) n_comp++;
    else n_evict++;
    m_vpn[b][k] = v;
    m_ppn[b][k] = page_table(v);
    m_valid[b][k] = 1'b1;
    use_entry(b, k);
    @(negedge clk);
    refill_valid = 1'b0;
    lookup_valid = 1'b0;
  endtask

  initial begin
    bit h;
    logic [VPN_W-1:0] v;
    rst_n = 1'b0;
    done = 1'b0;
    checks = 0;
    failures = 0;
    lookup_valid = 1'b0;
    refill_valid = 1'b0;
    va = '0;
    refill_vpn = '0;
    refill_ppn = '0;
    probe_bank = '0;
    probe_idx = '0;
    {n_hit, n_miss, n_comp, n_evict, n_refresh, n_prio, n_retry_hit} = '0;
    void'($urandom(SEED));
    for (int b = 0; b < BANKS; b++) begin
      n_bank[b] = 0;
      for (int i = BANK_ENT - 1; i >= 0; i--) order[b].push_back(i);
      for (int i = 0; i < BANK_ENT; i++) m_valid[b][i] = 1'b0;
    end
    // page pool: half a dense region, half scattered pages
    trace_state = 32'(SEED);
    foreach (pool[i]) pool[i] = (i % 2 == 0) ? VPN_W'(32'h100 + i) : VPN_W'(next_rand());
    foreach (recent[i]) recent[i] = pool[i];
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    compare_all();

    for (int n = 0; n < N_OPS; n++) begin
      // locality: mostly pages used recently, sometimes a new one
      if ((next_rand() % 4) != 0) v = recent[next_rand() % 16];
      else begin
        v = pool[next_rand() % POOL];
        recent[next_rand() % 16] = v;
      end
      lookup(v, h);
      if (!h) begin
        repeat (1 + $urandom() % 3) @(negedge clk);
        refill(v, ($urandom() % 8) == 0);
        lookup(v, h);
        checks++;
        if (!h) fail($sformatf("vpn %h misses right after its refill", v));
        else n_retry_hit++;
      end else if (($urandom() % 32) == 0) begin
        refill(v, 1'b0);
      end
      if (n % 64 == 63) compare_all();
    end
    compare_all();
    first_misses = n_miss;

    $display("lookups: %0d hits (%0d of them right after a refill), %0d misses", n_hit, n_retry_hit, n_miss);
    $display("refills: compulsory=%0d evictions=%0d already present=%0d with lookup held off=%0d",
             n_comp, n_evict, n_refresh, n_prio);
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_comp == 0 || n_evict == 0 || n_refresh == 0 ||
        n_prio == 0 || n_retry_hit == 0)
      fail("a mechanism never happened");
    for (int b = 0; b < BANKS; b++) begin
      checks++;
      if (n_bank[b] == 0) fail($sformatf("bank %0d never searched", b));
    end
    done = 1'b1;
  end

endmodule
