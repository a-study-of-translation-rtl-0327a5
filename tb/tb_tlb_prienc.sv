// tb_tlb_prienc: self-checking test of the priority encoder.
// Applies all-zero, every single bit, and random vectors to a 32-input
// encoder and compares found/idx with a reference that scans from bit 0.
module tb_tlb_prienc;
  logic [31:0] req;
  logic        found;
  logic [4:0]  idx;
  int checks = 0, failures = 0;

  tlb_prienc #(.N(32)) dut (.req(req), .found(found), .idx(idx));

  task automatic check_one();
    int exp_idx = 0;
    bit exp_found = 0;
    for (int i = 0; i < 32; i++) begin
      if (req[i] && !exp_found) begin
        exp_found = 1;
        exp_idx = i;
      end
    end
    #1;
    checks++;
    if (found !== exp_found || (exp_found && idx !== 5'(exp_idx))) begin
      failures++;
      $display("FAIL req=%h found=%0d idx=%0d exp %0d/%0d", req, found, idx, exp_found, exp_idx);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0;
    check_one();
    for (int i = 0; i < 32; i++) begin
      req = 32'd1 << i;
      check_one();
    end
    for (int n = 0; n < 200; n++) begin
      req = $urandom() & $urandom();
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
