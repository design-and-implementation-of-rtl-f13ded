// tb_ztcam_lpe: test of the layer priority encoder, exhaustive for K = 2 and
// K = 8; the expected index is the lowest set bit.
module tb_ztcam_lpe;
  logic [1:0] r2;
  logic [7:0] r8;
  logic       p2, v2, v8;
  logic [2:0] p8;
  int checks = 0, failures = 0;

  ztcam_lpe #(.K(2)) dut2 (.req(r2), .pma(p2), .pma_valid(v2));
  ztcam_lpe #(.K(8)) dut8 (.req(r8), .pma(p8), .pma_valid(v8));

  function automatic int lowest(input logic [7:0] r);
    for (int i = 0; i < 8; i++) if (r[i]) return i;
    return -1;
  endfunction

  initial begin
    for (int i = 0; i < 4; i++) begin
      r2 = 2'(i); #1;
      checks++;
      if (v2 !== (i != 0) || (i != 0 && int'(p2) != lowest(8'(i)))) begin
        failures++; $display("FAIL K=2 req=%b pma=%0d valid=%b", r2, p2, v2);
      end
    end
    for (int i = 0; i < 256; i++) begin
      r8 = 8'(i); #1;
      checks++;
      if (v8 !== (i != 0) || (i != 0 && int'(p8) != lowest(r8))) begin
        failures++; $display("FAIL K=8 req=%b pma=%0d valid=%b", r8, p8, v8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
