// tb_tlb_cam_ctrl: self-checking test of the replacement control.
// Two 8-entry instances, one LRU and one random. With invalid entries the
// victim must be the lowest invalid one. With all entries valid the LRU
// victim is compared with a recency list kept in the testbench (touched
// entry moves to the back, the victim is the front), and the random victim
// with rand_bits modulo 8; every entry must be chosen at least once.
module tb_tlb_cam_ctrl;
  import tlb_pkg::*;
  localparam int E = 8;
  logic clk = 0, rst_n = 0;
  logic [E-1:0] valid = '0;
  logic touch = 0;
  logic [2:0] touch_idx = '0;
  logic [15:0] rand_bits = '0;
  logic [2:0] lru_victim, rnd_victim;
  logic lru_inv, rnd_inv;
  int order [$];
  int checks = 0, failures = 0;
  bit [E-1:0] rnd_seen = '0;

  tlb_cam_ctrl #(.ENTRIES(E), .REPL(REPL_LRU)) u_lru (
    .clk, .rst_n, .valid, .touch, .touch_idx, .rand_bits,
    .victim_idx(lru_victim), .victim_invalid(lru_inv));
  tlb_cam_ctrl #(.ENTRIES(E), .REPL(REPL_RANDOM)) u_rnd (
    .clk, .rst_n, .valid, .touch, .touch_idx, .rand_bits,
    .victim_idx(rnd_victim), .victim_invalid(rnd_inv));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_touch(input int k);
    @(negedge clk);
    touch = 1; touch_idx = 3'(k);
    @(negedge clk);
    touch = 0;
    foreach (order[i]) if (order[i] == k) begin order.delete(i); break; end
    order.push_back(k);
  endtask

  initial begin
    for (int i = E - 1; i >= 0; i--) order.push_back(i);
    repeat (2) @(posedge clk);
    rst_n = 1;
    // compulsory fills: lowest invalid first, whatever the policy
    for (int i = 0; i < E; i++) begin
      #1;
      checks++;
      if (!lru_inv || !rnd_inv || lru_victim !== 3'(i) || rnd_victim !== 3'(i)) begin
        failures++; $display("FAIL invalid-first %0d: %0d %0d", i, lru_victim, rnd_victim);
      end
      do_touch(i);
      valid[i] = 1'b1;
    end
    // a hole in the middle is found first
    valid[5] = 1'b0;
    #1;
    checks++;
    if (!lru_inv || lru_victim !== 3'd5) begin failures++; $display("FAIL hole"); end
    valid[5] = 1'b1;
    // LRU order after random touches
    for (int n = 0; n < 300; n++) begin
      #1;
      checks++;
      if (lru_inv || lru_victim !== 3'(order[0])) begin
        failures++; $display("FAIL lru step %0d victim %0d exp %0d", n, lru_victim, order[0]);
      end
      rand_bits = 16'($urandom());
      #1;
      checks++;
      if (rnd_inv || rnd_victim !== 3'(rand_bits % E)) begin
        failures++; $display("FAIL random victim %0d bits %h", rnd_victim, rand_bits);
      end
      rnd_seen[rnd_victim] = 1'b1;
      // touch the LRU entry now and then, so each victim changes
      do_touch((n % 3 == 0) ? order[0] : int'($urandom() % E));
    end
    checks++;
    if (rnd_seen !== '1) begin failures++; $display("FAIL random never chose some entry %b", rnd_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
