// tb_tlb_top: end-to-end test of the TLB at its default size.
// tlb_top is used with its default parameters (128 entries in 4 banks, LRU
// replacement, 32-bit addresses, 4 KiB pages); tlb_env drives a stream of
// translations with misses, page walks and refills and checks every result
// against its reference model. A monitor checks that every access
// activates the CAM of exactly one bank, the power saving of the banked
// organisation. A watchdog ends the run if it hangs.
module tb_tlb_top;
  logic clk = 1'b0;
  logic rst_n, lookup_valid, hit, miss, refill_valid, refill_compulsory, refill_evict;
  logic probe_valid, done;
  logic [31:0] va, pa;
  logic [19:0] ppn, refill_vpn, refill_ppn, probe_vpn, probe_ppn;
  logic [1:0]  probe_bank;
  logic [4:0]  probe_idx;
  int checks, failures, first_misses;

  always #5 clk = ~clk;

  tlb_top dut (.*);

  tlb_env #(.N_OPS(20000)) env (.*);

  initial begin
    repeat (2_000_000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // Banking: during a lookup exactly one bank's CAM may search; during a
  // refill exactly one bank's CAM may compare and write.
  logic [3:0] searching;
  int n_one_bank = 0, n_bank_err = 0;
  assign searching = {dut.g_bank[3].u_bank.match_en, dut.g_bank[2].u_bank.match_en,
                      dut.g_bank[1].u_bank.match_en, dut.g_bank[0].u_bank.match_en};
  always @(negedge clk) begin
    if (rst_n && (lookup_valid || refill_valid)) begin
      if ($countones(searching) == 1) n_one_bank++;
      else begin
        n_bank_err++;
        $display("FAIL: %0d banks active in one access", $countones(searching));
      end
    end else if (rst_n && searching != '0) begin
      n_bank_err++;
      $display("FAIL: a bank searches with no access");
    end
  end

  initial begin
    #1;
    wait (done);
    $display("accesses that activated exactly one bank: %0d", n_one_bank);
    checks += n_one_bank + n_bank_err + 1;
    failures += n_bank_err + ((n_one_bank == 0) ? 1 : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
