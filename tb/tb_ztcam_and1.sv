// tb_ztcam_and1: exhaustive test of the 1-bit AND for N = 2 and N = 5.
module tb_ztcam_and1;
  logic [1:0] v2;
  logic [4:0] v5;
  logic a2, a5;
  int checks = 0, failures = 0;

  ztcam_and1 #(.N(2)) dut2 (.vm_bits(v2), .activation(a2));
  ztcam_and1 #(.N(5)) dut5 (.vm_bits(v5), .activation(a5));

  initial begin
    for (int i = 0; i < 4; i++) begin
      v2 = 2'(i); #1;
      checks++;
      if (a2 !== (i == 3)) begin failures++; $display("FAIL N=2 in=%b", v2); end
    end
    for (int i = 0; i < 32; i++) begin
      v5 = 5'(i); #1;
      checks++;
      if (a5 !== (i == 31)) begin failures++; $display("FAIL N=5 in=%b", v5); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
