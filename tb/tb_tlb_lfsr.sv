// tb_tlb_lfsr: self-checking test of the random-replacement LFSR.
// Checks the reset seed, each step against a reference shift computed here,
// that the register holds when en is low, and that the sequence returns to
// the seed after exactly 65535 steps (maximal length).
module tb_tlb_lfsr;
  logic clk = 0, rst_n = 0, en = 0;
  logic [15:0] value, model;
  int checks = 0, failures = 0;

  tlb_lfsr dut (.clk(clk), .rst_n(rst_n), .en(en), .value(value));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (value !== 16'hACE1) begin failures++; $display("FAIL seed %h", value); end
    rst_n = 1;
    model = 16'hACE1;
    // held while disabled
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (value !== model) begin failures++; $display("FAIL hold %h", value); end
    en = 1;
    for (int n = 1; n <= 65535; n++) begin
      @(posedge clk);
      #1;
      model = {model[14:0], model[15] ^ model[13] ^ model[12] ^ model[10]};
      if (n <= 64) begin
        checks++;
        if (value !== model) begin failures++; $display("FAIL step %0d %h exp %h", n, value, model); end
      end
      if (n < 65535 && value == 16'hACE1) begin
        checks++; failures++; $display("FAIL period too short: %0d", n);
      end
    end
    checks++;
    if (value !== 16'hACE1) begin failures++; $display("FAIL period not 65535"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
