// tb_ztcam_layer: self-checking test of one ZTCAM layer (N = 2 subwords of
// W = 3 bits, K = 4 entries). For each of 20 random ternary sub-tables the
// testbench computes the OAT rows itself, writes them through the layer's
// write port and then searches all 64 words, comparing the PMA, the match
// flag and the activation signal with a direct ternary compare of the
// entries. Search is combinational, so results are checked in the same cycle.
module tb_ztcam_layer;
  localparam int unsigned N = 2, W = 3, K = 4, C = N * W;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0][W-1:0] sw = '0;
  logic [1:0] pma;
  logic pma_valid, activation;
  logic we = 1'b0;
  logic wpart = 1'b0;
  logic [W-1:0] wrow = '0;
  logic [K-1:0] wdata = '0;
  logic [C-1:0] val [K];
  logic [C-1:0] care [K];
  int checks = 0, failures = 0;
  int vm_miss = 0, oat_miss = 0, multi = 0;

  ztcam_layer #(.N(N), .W(W), .K(K)) dut (.*);

  always #5 clk = ~clk;

  // subword n of a word, n = 0 being the most significant
  function automatic logic [W-1:0] sub(input logic [C-1:0] x, input int n);
    return x[C-1-n*W -: W];
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20; t++) begin
      for (int k = 0; k < K; k++) begin
        val[k]  = C'($urandom);
        care[k] = C'($urandom | $urandom);  // mostly care bits
      end
      // program every row of every pair
      for (int n = 0; n < N; n++) begin
        for (int r = 0; r < (1 << W); r++) begin
          @(negedge clk);
          we = 1'b1; wpart = 1'(n); wrow = W'(r);
          for (int k = 0; k < K; k++)
            wdata[k] = ((W'(r) ^ sub(val[k], n)) & sub(care[k], n)) == '0;
        end
      end
      @(negedge clk);
      we = 1'b0;
      for (int word = 0; word < (1 << C); word++) begin
        int exp_pma, nmatch;
        logic exp_act;
        for (int n = 0; n < N; n++) sw[n] = sub(C'(word), n);
        exp_pma = -1; nmatch = 0;
        for (int k = K - 1; k >= 0; k--)
          if (((C'(word) ^ val[k]) & care[k]) == '0) begin exp_pma = k; nmatch++; end
        exp_act = 1'b1;
        for (int n = 0; n < N; n++) begin
          logic found;
          found = 1'b0;
          for (int k = 0; k < K; k++)
            if (((sub(C'(word), n) ^ sub(val[k], n)) & sub(care[k], n)) == '0) found = 1'b1;
          exp_act &= found;
        end
        #1;
        checks++;
        if (activation !== exp_act || pma_valid !== (exp_pma >= 0) ||
            (exp_pma >= 0 && int'(pma) != exp_pma)) begin
          failures++;
          $display("FAIL table %0d word %b: pma=%0d valid=%b act=%b expected pma=%0d act=%b",
                   t, C'(word), pma, pma_valid, activation, exp_pma, exp_act);
        end
        if (!exp_act) vm_miss++;
        else if (exp_pma < 0) oat_miss++;
        if (nmatch > 1) multi++;
      end
    end
    $display("layer mismatches at VM %0d, at K-bit AND %0d, multiple matches %0d",
             vm_miss, oat_miss, multi);
    checks++;
    if (vm_miss == 0 || oat_miss == 0 || multi == 0) begin
      failures++;
      $display("FAIL a search outcome never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
