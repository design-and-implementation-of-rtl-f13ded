// tb_ztcam_mapper: self-checking test of the data-mapping sequencer with
// C = 6, W = 2 (N = 3), L = 2 layers of K = 3 entries. The testbench catches
// every row write into its own copy of the tables and checks that:
//   - exactly L*N*2**W writes occur, one per clock, each row exactly once,
//     starting the cycle after start; done pulses the cycle after the last;
//   - each written row equals the ternary cover computed here from the table;
//   - a start while busy is ignored and the table is sampled at start.
module tb_ztcam_mapper;
  localparam int unsigned C = 6, W = 2, N = 3, L = 2, K = 3;
  localparam int unsigned ROWS = 1 << W;
  localparam int unsigned WRITES = L * N * ROWS;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [L*K-1:0]        tbl_valid = '0;
  logic [L*K-1:0][C-1:0] tbl_value = '0, tbl_care = '0;
  logic busy, done, wr_en;
  logic wr_layer;
  logic [1:0] wr_part;
  logic [W-1:0] wr_row;
  logic [K-1:0] wr_data;
  logic [K-1:0] oat [L][N][ROWS];
  int  seen [L][N][ROWS];
  int checks = 0, failures = 0;
  int nwrites, cyc, first_wr, last_wr, done_cyc;

  ztcam_mapper #(.C(C), .W(W), .N(N), .L(L), .K(K)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (wr_en) begin
      oat[wr_layer][wr_part][wr_row] <= wr_data;
      seen[wr_layer][wr_part][wr_row] <= seen[wr_layer][wr_part][wr_row] + 1;
      nwrites <= nwrites + 1;
      if (first_wr < 0) first_wr <= cyc;
      last_wr <= cyc;
    end
    if (done) done_cyc <= cyc;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int start_cyc;
    logic [L*K-1:0]        v;
    logic [L*K-1:0][C-1:0] val, cr;
    cyc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 10; t++) begin
      foreach (seen[l, n, r]) seen[l][n][r] = 0;
      nwrites = 0; first_wr = -1; last_wr = -1; done_cyc = -1;
      for (int e = 0; e < L * K; e++) begin
        v[e] = ($urandom % 4) != 0;
        val[e] = C'($urandom);
        cr[e] = C'($urandom | $urandom);
      end
      tbl_valid = v; tbl_value = val; tbl_care = cr;
      @(negedge clk);
      start = 1'b1; start_cyc = cyc;
      @(negedge clk);
      start = 1'b0;
      // scramble the inputs and pulse start while busy: both must be ignored
      tbl_valid = ~v; tbl_value = ~val;
      repeat (3) @(negedge clk);
      check(busy, "busy during mapping");
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      wait (done);
      @(posedge clk);
      @(negedge clk);
      check(!busy, "idle after done");
      check(nwrites == WRITES, $sformatf("write count %0d", nwrites));
      check(first_wr == start_cyc + 1, $sformatf("first write at %0d, start at %0d", first_wr, start_cyc));
      check(last_wr - first_wr == WRITES - 1, "one write per clock");
      check(done_cyc == last_wr + 1, "done the cycle after the last write");
      foreach (seen[l, n, r]) check(seen[l][n][r] == 1, "each row written once");
      foreach (oat[l, n, r]) begin
        logic [K-1:0] exp;
        for (int k = 0; k < K; k++) begin
          int e;
          logic [W-1:0] sv, sc;
          e = l * K + k;
          sv = val[e][C-1-n*W -: W];
          sc = cr[e][C-1-n*W -: W];
          exp[k] = v[e] && (((W'(r) ^ sv) & sc) == '0);
        end
        check(oat[l][n][r] == exp,
              $sformatf("table %0d layer %0d part %0d row %0d: %b expected %b", t, l, n, r, oat[l][n][r], exp));
      end
      // wait out the ignored second start (it fell inside the busy window)
      repeat (2) @(negedge clk);
      check(!busy, "second start ignored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
