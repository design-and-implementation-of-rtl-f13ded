// tb_ztcam_vm: self-checking test of the validation memory.
// Writes random bits to random rows, keeps its own copy of the contents and
// compares every row after each write; also checks that reset clears all rows.
module tb_ztcam_vm;
  localparam int unsigned W = 3;  // 8 rows, as in the 3-bit example table
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0, wdata = 1'b0, rdata;
  logic [W-1:0] waddr = '0, raddr = '0;
  logic [(1<<W)-1:0] model;
  int checks = 0, failures = 0;

  ztcam_vm #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check_all();
    for (int r = 0; r < (1 << W); r++) begin
      raddr = W'(r);
      #1;
      checks++;
      if (rdata !== model[r]) begin
        failures++;
        $display("FAIL row %0d: got %0b expected %0b", r, rdata, model[r]);
      end
    end
  endtask

  initial begin
    model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check_all();
    // example contents: rows 000, 010, 011 and 111 present
    foreach (model[r]) begin
      @(negedge clk);
      we = 1'b1; waddr = W'(r);
      wdata = (r == 0 || r == 2 || r == 3 || r == 7);
    end
    @(negedge clk); we = 1'b0;
    model = 8'b1000_1101;
    check_all();
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = W'($urandom); wdata = 1'($urandom);
      @(negedge clk);
      we = 1'b0; model[waddr] = wdata;
      check_all();
    end
    rst_n = 1'b0; #1; rst_n = 1'b1;
    model = '0;
    check_all();
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
