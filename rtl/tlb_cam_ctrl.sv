// tlb_cam_ctrl: replacement control of one fully associative bank.
//
// Chooses the entry that a refill writes (victim_idx). An invalid entry is
// always taken first, lowest index first (victim_invalid is then high: the
// refill is a compulsory miss, in which the entry's valid bit goes from 0 to
// 1). Once every entry is valid the replacement policy decides:
//   REPL_LRU    - true least recently used. Each entry keeps an age in
//                 0..ENTRIES-1, the ages always form a permutation. A touch
//                 (a lookup hit or a refill write) makes the touched entry
//                 age 0 and ages by one every entry that was younger than
//                 it. The victim is the entry of age ENTRIES-1.
//   REPL_RANDOM - the victim is rand_bits modulo ENTRIES.
// victim_idx is combinational from the current state; touch takes effect on
// the next clock edge. With REPL_LRU the rand_bits input is not used (lint
// reports it); the port is kept so that both policies share one interface.
//
// The study places the replacement algorithm in the CAM's control logic and
// compares random and LRU replacement; how LRU order is stored, and filling
// invalid entries first, are this design's choices (the latter matches the
// study's distinction between compulsory and conflict misses).
module tlb_cam_ctrl
  import tlb_pkg::*;
#(
  parameter int    ENTRIES = 32,
  parameter repl_e REPL    = REPL_LRU,
  parameter int    IW      = idx_w(ENTRIES)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [ENTRIES-1:0] valid,
  input  logic               touch,
  input  logic [IW-1:0]      touch_idx,
  input  logic [15:0]        rand_bits,
  output logic [IW-1:0]      victim_idx,
  output logic               victim_invalid
);

  logic [IW-1:0] policy_idx;
  logic [IW-1:0] free_idx;

  tlb_prienc #(.N(ENTRIES), .IW(IW)) u_free (
    .req   (~valid),
    .found (victim_invalid),
    .idx   (free_idx)
  );

  if (REPL == REPL_LRU) begin : g_lru
    logic [IW-1:0] age [ENTRIES];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < ENTRIES; i++) age[i] <= IW'(i);
      end else if (touch) begin
        for (int i = 0; i < ENTRIES; i++) begin
          if (IW'(i) == touch_idx)          age[i] <= '0;
          else if (age[i] < age[touch_idx]) age[i] <= age[i] + 1'b1;
        end
      end
    end

    always_comb begin
      policy_idx = '0;
      for (int i = 0; i < ENTRIES; i++) begin
        if (age[i] == IW'(ENTRIES - 1)) policy_idx = IW'(i);
      end
    end
  end else begin : g_random
    assign policy_idx = IW'(32'(rand_bits) % ENTRIES);
  end

  assign victim_idx = victim_invalid ? free_idx : policy_idx;

endmodule
