// tb_tlb_addec: self-checking test of the address decoder.
// Drives every address with the enable high and low, for a 32-output and a
// 4-output decoder, and compares the output with a one-hot value computed by
// shifting. Ends with a TB_RESULT line.
module tb_tlb_addec;
  logic       en;
  logic [4:0] a32;
  logic [31:0] s32;
  logic [1:0] a4;
  logic [3:0] s4;
  int checks = 0, failures = 0;

  tlb_addec #(.N(32)) dut32 (.en(en), .addr(a32), .sel(s32));
  tlb_addec #(.N(4))  dut4  (.en(en), .addr(a4),  .sel(s4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      en = e[0];
      for (int i = 0; i < 32; i++) begin
        a32 = 5'(i);
        a4  = 2'(i);
        #1;
        checks++;
        if (s32 !== (en ? (32'd1 << i) : 32'd0)) begin
          failures++;
          $display("FAIL N=32 en=%0d addr=%0d sel=%h", en, i, s32);
        end
        checks++;
        if (s4 !== (en ? (4'd1 << (i % 4)) : 4'd0)) begin
          failures++;
          $display("FAIL N=4 en=%0d addr=%0d sel=%h", en, i % 4, s4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
