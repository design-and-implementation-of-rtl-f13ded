// tb_ztcam_kand: random test of the K-bit AND (N = 3 rows of K = 8 bits),
// the expected value built bit by bit.
module tb_ztcam_kand;
  localparam int unsigned N = 3, K = 8;
  logic [N-1:0][K-1:0] rows;
  logic [K-1:0] hits, exp_hits;
  int checks = 0, failures = 0;

  ztcam_kand #(.N(N), .K(K)) dut (.rows(rows), .hits(hits));

  initial begin
    for (int i = 0; i < 500; i++) begin
      // bias towards ones so that matches are common
      foreach (rows[n]) rows[n] = K'($urandom | $urandom);
      for (int k = 0; k < K; k++) exp_hits[k] = rows[0][k] & rows[1][k] & rows[2][k];
      #1;
      checks++;
      if (hits !== exp_hits) begin
        failures++;
        $display("FAIL rows=%h got %b expected %b", rows, hits, exp_hits);
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
