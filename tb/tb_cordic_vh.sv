// tb_cordic_vh: self-checking test of the CORDIC task.
// Writes angles covering all four quadrants and both signs through the
// register bus, starts each calculation, checks that done is 0 while busy,
// that irq pulses once, that the calculation takes ITER+1 cycles from the
// start acknowledge, and compares the cosine with $cos (2 LSB tolerance in
// Q1.14). Also checks the angle register reads back.
module tb_cordic_vh;
  import rtr_pkg::*;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        rq_wr = 1'b0, rq_rd = 1'b0;
  logic [1:0]  rq_idx = '0;
  logic [31:0] rq_wdata = '0;
  logic [3:0]  rq_be = 4'hF;
  logic        rs_ack, irq;
  logic [31:0] rs_rdata;

  cordic_vh dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [1:0] i, input logic [31:0] d);
    @(posedge clk);
    rq_wr <= 1'b1; rq_idx <= i; rq_wdata <= d;
    do @(negedge clk); while (!rs_ack);
    @(posedge clk);
    rq_wr <= 1'b0;
  endtask

  task automatic rd(input logic [1:0] i, output logic [31:0] d);
    @(posedge clk);
    rq_rd <= 1'b1; rq_idx <= i;
    do @(negedge clk); while (!rs_ack);
    d = rs_rdata;
    @(posedge clk);
    rq_rd <= 1'b0;
  endtask

  int n_irq = 0;
  always @(posedge clk) if (rst_n && irq) n_irq++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] angles [10] = '{16'h001F, 16'h0000, 16'h2000, 16'h3FFF, 16'h4000,
                               16'h6000, 16'h7FFF, 16'h8000, 16'hA000, 16'hE123};

  initial begin
    logic [31:0] d;
    int cyc, exp, got, irq0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    foreach (angles[a]) begin
      wr(2'd0, {16'h0, angles[a]});
      rd(2'd0, d);
      check(d[15:0] == angles[a], "angle readback");
      irq0 = n_irq;
      wr(2'd1, 32'h0);
      cyc = 0;
      rd(2'd2, d);
      check(d == 0, "done clear while busy");
      // measure latency from the start acknowledge
      cyc = 3;  // cycles already spent in the read above
      while (!irq) begin @(negedge clk); cyc++; end
      check(cyc == 17, $sformatf("latency %0d cycles, expected 17", cyc));
      @(negedge clk);
      check(n_irq == irq0 + 1, "one irq per calculation");
      rd(2'd2, d);
      check(d == 1, "done set");
      rd(2'd3, d);
      got = int'($signed(d));
      exp = int'($cos(real'($signed(angles[a])) * PI / 32768.0) * 16384.0);
      check((got - exp) <= 2 && (exp - got) <= 2,
            $sformatf("cos(0x%04h) got %0d expected %0d", angles[a], got, exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
