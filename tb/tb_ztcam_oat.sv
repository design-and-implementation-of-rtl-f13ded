// tb_ztcam_oat: self-checking test of the original address table.
// Random row writes against a model; every row is read with the activation
// high (row contents) and low (all zeros).
module tb_ztcam_oat;
  localparam int unsigned W = 2;
  localparam int unsigned K = 4;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0, ren = 1'b0;
  logic [W-1:0] waddr = '0, raddr = '0;
  logic [K-1:0] wdata = '0, rdata;
  logic [K-1:0] model [1<<W];
  int checks = 0, failures = 0;

  ztcam_oat #(.W(W), .K(K)) dut (.*);

  always #5 clk = ~clk;

  task automatic check_all();
    for (int r = 0; r < (1 << W); r++) begin
      raddr = W'(r);
      ren = 1'b1; #1;
      checks++;
      if (rdata !== model[r]) begin
        failures++;
        $display("FAIL row %0d: got %b expected %b", r, rdata, model[r]);
      end
      ren = 1'b0; #1;
      checks++;
      if (rdata !== '0) begin
        failures++;
        $display("FAIL row %0d read while disabled: %b", r, rdata);
      end
    end
  endtask

  initial begin
    foreach (model[r]) model[r] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check_all();
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = W'($urandom); wdata = K'($urandom);
      @(negedge clk);
      we = 1'b0; model[waddr] = wdata;
      check_all();
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
