// tb_tlb_sram_cells: self-checking test of the PPN SRAM.
// Writes random words into a 16 x 20 array through one-hot word selects, then
// reads each through its word line (the CAM match line), through the address
// port, with no word line (expects zero) and after an overwrite.
module tb_tlb_sram_cells;
  localparam int E = 16, W = 20;
  logic clk = 0;
  logic [E-1:0] wordline = '0, wr_sel = '0;
  logic [W-1:0] rdata, wdata = '0, rd_data;
  logic wr_en = 0;
  logic [3:0] rd_addr = '0;
  logic [W-1:0] ref_mem [E];
  int checks = 0, failures = 0;

  tlb_sram_cells #(.ENTRIES(E), .DATA_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input int idx, input logic [W-1:0] d);
    @(negedge clk);
    wr_en = 1; wr_sel = E'(1) << idx; wdata = d;
    @(negedge clk);
    wr_en = 0; wr_sel = '0;
    ref_mem[idx] = d;
  endtask

  initial begin
    for (int i = 0; i < E; i++) write(i, W'($urandom()));
    for (int i = 0; i < E; i++) begin
      wordline = E'(1) << i;
      rd_addr  = 4'(i);
      #1;
      checks++;
      if (rdata !== ref_mem[i]) begin failures++; $display("FAIL wl %0d %h exp %h", i, rdata, ref_mem[i]); end
      checks++;
      if (rd_data !== ref_mem[i]) begin failures++; $display("FAIL addr %0d %h", i, rd_data); end
    end
    wordline = '0;
    #1;
    checks++;
    if (rdata !== '0) begin failures++; $display("FAIL no wordline gives %h", rdata); end
    // write with wr_en low does nothing
    @(negedge clk);
    wr_sel = E'(1) << 3; wdata = ~ref_mem[3];
    @(negedge clk);
    wr_sel = '0;
    write(9, 20'h5A5A5);
    foreach (ref_mem[i]) begin
      wordline = E'(1) << i;
      #1;
      checks++;
      if (rdata !== ref_mem[i]) begin failures++; $display("FAIL after overwrite wl %0d %h", i, rdata); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
