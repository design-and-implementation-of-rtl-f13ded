// tb_ztcam_cpe: random test of the CAM priority encoder with L = 12 layers of
// K = 4 entries, including the case where layers 4, 5, 7 and 10 match and
// layer 4 must win.
module tb_ztcam_cpe;
  localparam int unsigned L = 12, K = 4, PW = 2, AW = 6;
  logic [L-1:0][PW-1:0] pma;
  logic [L-1:0]         pma_valid;
  logic [AW-1:0]        ma;
  logic                 hit;
  int checks = 0, failures = 0;

  ztcam_cpe #(.L(L), .K(K)) dut (.*);

  task automatic check();
    int exp_ma;
    exp_ma = -1;
    for (int l = 0; l < L; l++)
      if (pma_valid[l] && exp_ma < 0) exp_ma = l * K + int'(pma[l]);
    #1;
    checks++;
    if (hit !== (exp_ma >= 0) || (exp_ma >= 0 && int'(ma) != exp_ma)) begin
      failures++;
      $display("FAIL valid=%b got ma=%0d hit=%b expected %0d", pma_valid, ma, hit, exp_ma);
    end
  endtask

  initial begin
    pma = '0;
    pma_valid = '0;
    check();
    // layers 4, 5, 7 and 10 (counted from 1) report a PMA
    foreach (pma[l]) pma[l] = PW'($urandom);
    pma_valid = '0;
    pma_valid[3] = 1'b1; pma_valid[4] = 1'b1; pma_valid[6] = 1'b1; pma_valid[9] = 1'b1;
    check();
    checks++;
    if (int'(ma) != 3 * K + int'(pma[3])) begin
      failures++; $display("FAIL layer 4 did not win");
    end
    for (int i = 0; i < 1000; i++) begin
      foreach (pma[l]) pma[l] = PW'($urandom);
      pma_valid = L'($urandom & $urandom & $urandom);
      check();
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
