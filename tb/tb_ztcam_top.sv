// tb_ztcam_top: end-to-end test of the ZTCAM at its default size (4-bit
// words, two 2-bit subwords, two layers of two entries, 2-bit match address).
//
// 1. Loads the four-entry example table
//        address 0: 00 11    address 2: 0x 11
//        address 1: 01 01    address 3: 11 1x
//    checks the VM and OAT contents the mapping produces (for layer 0:
//    VM11 rows 00, 01; VM12 rows 01, 11; OAT11 row 00 -> address 0, row 01
//    -> address 1; OAT12 row 01 -> address 1, row 11 -> address 0) and
//    searches all 16 words.
// 2. Loads a table in which two entries of one layer and entries of both
//    layers overlap, and searches all 16 words.
// 3. Loads 30 random ternary tables and searches all 16 words of each.
// Every search is checked one clock after the word is applied, against a
// direct ternary compare of the table (lowest matching address wins). The
// test also exercises deselection (sel = 1), the clock enable, and searches
// and write requests issued while a load is running, and counts how often
// each of these and each search outcome occurred; one that never occurred
// is a failure.
module tb_ztcam_top;
  import ztcam_pkg::*;
  localparam int unsigned C = C_DEF, W = W_DEF, L = L_DEF, K = K_DEF;
  localparam int unsigned E = L * K;
  localparam int unsigned N = C / W;
  localparam int unsigned AW = idx_w(E);

  logic clk = 1'b0, rst_n = 1'b0, clk_en = 1'b1, sel = 1'b1, r_wb = 1'b1;
  logic [C-1:0] c = '0;
  logic [E-1:0]        tbl_valid = '0;
  logic [E-1:0][C-1:0] tbl_value = '0, tbl_care = '0;
  logic [AW-1:0] ma;
  logic ma_oe, hit, busy, done;

  int checks = 0, failures = 0, cycles = 0;
  // mechanism counters
  int n_load = 0, n_hit = 0, n_miss = 0, n_vm_reject = 0, n_kand_miss = 0;
  int n_lpe_multi = 0, n_cpe_multi = 0, n_xbit = 0, n_desel = 0;
  int n_gated = 0, n_busy_search = 0, n_busy_write = 0;

  ztcam_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit entry_hit(input int e, input logic [C-1:0] word);
    return tbl_valid[e] && (((word ^ tbl_value[e]) & tbl_care[e]) == '0);
  endfunction

  function automatic bit sub_hit(input int e, input int n, input logic [C-1:0] word);
    return tbl_valid[e] &&
           (((word[C-1-n*W -: W] ^ tbl_value[e][C-1-n*W -: W]) & tbl_care[e][C-1-n*W -: W]) == '0);
  endfunction

  // load the table currently on tbl_*; check the load time
  task automatic load();
    int t0;
    @(negedge clk);
    sel = 1'b0; r_wb = 1'b0;
    t0 = cycles;
    @(negedge clk);
    r_wb = 1'b1;                        // search request while busy
    c = C'($urandom);
    begin
      logic [AW-1:0] ma_before;
      logic hit_before;
      ma_before = ma; hit_before = hit;
      @(negedge clk);
      check(busy, "busy after a write request");
      check(ma == ma_before && hit == hit_before, "search ignored while loading");
      n_busy_search++;
    end
    r_wb = 1'b0;                        // second write request while busy
    @(negedge clk);
    n_busy_write++;
    r_wb = 1'b1; sel = 1'b1;
    wait (done);
    check(cycles - t0 == L * N * (1 << W) + 1,
          $sformatf("load took %0d cycles, expected %0d", cycles - t0, L * N * (1 << W) + 1));
    @(negedge clk);
    check(!busy, "second write request did not restart the load");
    n_load++;
  endtask

  // one search, result checked one clock later
  task automatic search(input logic [C-1:0] word);
    int exp_e, layers_hit;
    bit xbit;
    @(negedge clk);
    sel = 1'b0; r_wb = 1'b1; c = word;
    exp_e = -1; layers_hit = 0; xbit = 0;
    for (int l = 0; l < L; l++) begin
      int in_layer;
      bit all_sub;
      in_layer = 0;
      all_sub = 1;
      for (int k = 0; k < K; k++) if (entry_hit(l * K + k, word)) in_layer++;
      for (int n = 0; n < N; n++) begin
        bit found;
        found = 0;
        for (int k = 0; k < K; k++) if (sub_hit(l * K + k, n, word)) found = 1;
        all_sub &= found;
      end
      if (in_layer > 1) n_lpe_multi++;
      if (in_layer > 0) layers_hit++;
      if (!all_sub) n_vm_reject++;
      else if (in_layer == 0) n_kand_miss++;
      #0.1;
      check(dut.activation[l] == all_sub, $sformatf("activation of layer %0d for %b", l, word));
    end
    if (layers_hit > 1) n_cpe_multi++;
    for (int e = E - 1; e >= 0; e--) if (entry_hit(e, word)) exp_e = e;
    if (exp_e >= 0 && tbl_care[exp_e] != '1) xbit = 1;
    @(negedge clk);
    check(ma_oe == 1'b1, "output enabled while selected");
    check(hit == (exp_e >= 0), $sformatf("hit for %b: %b", word, hit));
    if (exp_e >= 0) begin
      check(int'(ma) == exp_e, $sformatf("ma for %b: %0d expected %0d", word, ma, exp_e));
      n_hit++;
      if (xbit) n_xbit++;
    end else n_miss++;
  endtask

  task automatic set_entry(input int e, input string pattern);
    // pattern: C characters of 0, 1 or x, most significant first
    tbl_valid[e] = 1'b1;
    for (int i = 0; i < C; i++) begin
      tbl_value[e][C-1-i] = (pattern[i] == "1");
      tbl_care[e][C-1-i]  = (pattern[i] != "x");
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!hit && !busy && !ma_oe, "state after reset");

    // --- example table -----------------------------------------------------
    set_entry(0, "0011");
    set_entry(1, "0101");
    set_entry(2, "0x11");
    set_entry(3, "111x");
    load();
    // memory contents after mapping (VM: bit r = row r; OAT: one row per line)
    check(dut.g_layer[0].u_layer.g_pair[0].u_vm.mem == 4'b0011, "VM11 = rows 00, 01");
    check(dut.g_layer[0].u_layer.g_pair[1].u_vm.mem == 4'b1010, "VM12 = rows 01, 11");
    check(dut.g_layer[0].u_layer.g_pair[0].u_oat.mem == {2'b00, 2'b00, 2'b10, 2'b01},
          "OAT11: row 00 -> address 0, row 01 -> address 1");
    check(dut.g_layer[0].u_layer.g_pair[1].u_oat.mem == {2'b01, 2'b00, 2'b10, 2'b00},
          "OAT12: row 01 -> address 1, row 11 -> address 0");
    check(dut.g_layer[1].u_layer.g_pair[0].u_vm.mem == 4'b1011, "VM21 = rows 00, 01 (0x), 11");
    check(dut.g_layer[1].u_layer.g_pair[1].u_vm.mem == 4'b1100, "VM22 = rows 10, 11 (1x)");
    check(dut.g_layer[1].u_layer.g_pair[0].u_oat.mem == {2'b10, 2'b00, 2'b01, 2'b01},
          "OAT21: rows 00, 01 -> address 2, row 11 -> address 3");
    check(dut.g_layer[1].u_layer.g_pair[1].u_oat.mem == {2'b11, 2'b10, 2'b00, 2'b00},
          "OAT22: row 10 -> address 3, row 11 -> addresses 2 and 3");
    search(4'b1110);
    check(ma == 2'd3, "1110 matches address 3");
    search(4'b0011);
    check(ma == 2'd0, "0011 matches addresses 0 and 2, address 0 wins");
    search(4'b0111);
    check(ma == 2'd2, "0111 matches address 2 through its x bit");
    for (int w = 0; w < 16; w++) search(C'(w));

    // --- deselect: output disabled, no search taken ------------------------
    search(4'b0101);
    @(negedge clk);
    sel = 1'b1; c = 4'b0111;
    @(negedge clk);
    check(!ma_oe && ma == '0, "deselected output is disabled");
    sel = 1'b0;
    @(negedge clk);
    check(ma_oe && ma == 2'd2, "reselected output shows the new search");
    n_desel++;

    // --- clock enable low: nothing is sampled -------------------------------
    search(4'b0011);
    @(negedge clk);
    clk_en = 1'b0; c = 4'b0101;
    repeat (3) @(negedge clk);
    check(ma == 2'd0, "no search while the clock is gated");
    r_wb = 1'b0;                           // write request while gated
    repeat (2) @(negedge clk);
    check(!busy, "no load while the clock is gated");
    r_wb = 1'b1;
    clk_en = 1'b1;
    @(negedge clk);
    check(ma == 2'd1, "search resumes with the clock enabled");
    n_gated++;

    // --- overlapping table --------------------------------------------------
    set_entry(0, "00xx");
    set_entry(1, "0x01");
    set_entry(2, "x0x1");
    set_entry(3, "xxxx");
    load();
    search(4'b0001);
    check(ma == 2'd0, "0001 matches all four entries, address 0 wins");
    for (int w = 0; w < 16; w++) search(C'(w));

    // --- random tables ------------------------------------------------------
    for (int t = 0; t < 30; t++) begin
      for (int e = 0; e < E; e++) begin
        tbl_valid[e] = ($urandom % 5) != 0;
        tbl_value[e] = C'($urandom);
        tbl_care[e]  = C'($urandom | $urandom);
      end
      load();
      for (int w = 0; w < (1 << C); w++) search(C'(w));
    end

    $display("loads %0d, hits %0d, misses %0d, layer rejected by VM %0d, layer miss at K-bit AND %0d",
             n_load, n_hit, n_miss, n_vm_reject, n_kand_miss);
    $display("multiple matches in a layer %0d, in several layers %0d, hits through x bits %0d",
             n_lpe_multi, n_cpe_multi, n_xbit);
    $display("deselects %0d, clock-gated intervals %0d, searches during load %0d, writes during load %0d",
             n_desel, n_gated, n_busy_search, n_busy_write);
    check(n_load > 0 && n_hit > 0 && n_miss > 0 && n_vm_reject > 0 && n_kand_miss > 0 &&
          n_lpe_multi > 0 && n_cpe_multi > 0 && n_xbit > 0 && n_desel > 0 && n_gated > 0 &&
          n_busy_search > 0 && n_busy_write > 0, "every mechanism occurred");
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
