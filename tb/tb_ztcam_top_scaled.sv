// tb_ztcam_top_scaled: the ZTCAM at a larger, uneven size: 8-bit words cut
// into four 2-bit subwords, three layers of three entries (nine entries, a
// 4-bit match address whose top values are never used). Twenty random ternary
// tables are loaded, each followed by a search of all 256 words; every result
// is compared, one clock after the word is applied, with a direct ternary
// compare (lowest matching address wins). The load time L*N*2**W + 1 clocks,
// from write request to done, is checked too.
module tb_ztcam_top_scaled;
  localparam int unsigned C = 8, W = 2, L = 3, K = 3;
  localparam int unsigned E = L * K, N = C / W, AW = 4;

  logic clk = 1'b0, rst_n = 1'b0, clk_en = 1'b1, sel = 1'b1, r_wb = 1'b1;
  logic [C-1:0] c = '0;
  logic [E-1:0]        tbl_valid = '0;
  logic [E-1:0][C-1:0] tbl_value = '0, tbl_care = '0;
  logic [AW-1:0] ma;
  logic ma_oe, hit, busy, done;
  int checks = 0, failures = 0, cycles = 0, n_hit = 0, n_miss = 0;

  ztcam_top #(.C(C), .W(W), .L(L), .K(K), .AW(AW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20; t++) begin
      int t0;
      for (int e = 0; e < E; e++) begin
        tbl_valid[e] = ($urandom % 6) != 0;
        tbl_value[e] = C'($urandom);
        tbl_care[e]  = C'($urandom | $urandom | $urandom);
      end
      @(negedge clk);
      sel = 1'b0; r_wb = 1'b0; t0 = cycles;
      @(negedge clk);
      r_wb = 1'b1;
      wait (done);
      check(cycles - t0 == L * N * (1 << W) + 1, $sformatf("load took %0d cycles", cycles - t0));
      // stored words, and random words, are searched
      for (int w = 0; w < (1 << C); w++) begin
        int exp_e;
        @(negedge clk);
        c = C'(w);
        exp_e = -1;
        for (int e = E - 1; e >= 0; e--)
          if (tbl_valid[e] && (((C'(w) ^ tbl_value[e]) & tbl_care[e]) == '0)) exp_e = e;
        @(negedge clk);
        check(hit == (exp_e >= 0) && (exp_e < 0 || int'(ma) == exp_e),
              $sformatf("table %0d word %h: ma=%0d hit=%b expected %0d", t, w, ma, hit, exp_e));
        if (exp_e >= 0) n_hit++; else n_miss++;
      end
    end
    $display("hits %0d, misses %0d", n_hit, n_miss);
    check(n_hit > 0 && n_miss > 0, "both hits and misses occurred");
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
