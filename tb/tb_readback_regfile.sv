// tb_readback_regfile: self-checking test of readback_regfile.
// Checks that every entry reads zero after reset, then writes random values
// to random (task, register) entries and compares every entry with a model
// array after each write.
module tb_readback_regfile;
  localparam int NV = 2, NR = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        wr_en = 1'b0;
  logic [0:0]  wr_task = '0, rd_task = '0;
  logic [1:0]  wr_idx = '0, rd_idx = '0;
  logic [31:0] wr_data = '0, rd_data;

  readback_regfile #(.NUM_VH(NV), .NREG(NR), .DW(32)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model [NV][NR];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic check_all();
    for (int t = 0; t < NV; t++)
      for (int r = 0; r < NR; r++) begin
        rd_task = 1'(t); rd_idx = 2'(r);
        #1;
        check(rd_data == model[t][r], $sformatf("entry %0d/%0d = %0h expected %0h", t, r, rd_data, model[t][r]));
      end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < NV; t++) for (int r = 0; r < NR; r++) model[t][r] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    check_all();
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_task = 1'($urandom); wr_idx = 2'($urandom); wr_data = $urandom;
      @(negedge clk);
      model[wr_task][wr_idx] = wr_data;
      wr_en = 1'b0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
