// tb_dct_vh: self-checking test of the DCT task.
// A word memory answers the task's master port, first with one cycle of
// latency and then with random wait states. Each run writes the input and
// output addresses, starts the transform, and checks: done is 0 while busy,
// exactly one irq, every result within the constant-rounding bound of a floating-point orthonormal
// DCT-II, no writes outside the output block, and (at fixed latency) the
// run time of 2 cycles per memory access, 8 reads plus 8 writes.
module tb_dct_vh;
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
  logic        m_req, m_we, m_ack;
  logic [31:0] m_addr, m_wdata, m_rdata;

  dct_vh dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // memory with optional random wait states
  logic [31:0] mem [1024];
  bit random_wait = 1'b0;
  int wait_cnt = 0;
  int n_wr_outside = 0;
  logic [31:0] out_lo, out_hi;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_ack <= 1'b0;
      wait_cnt <= 0;
    end else begin
      m_ack <= 1'b0;
      if (m_req && !m_ack) begin
        if (wait_cnt > 0) wait_cnt <= wait_cnt - 1;
        else begin
          m_ack <= 1'b1;
          m_rdata <= mem[m_addr[11:2]];
          if (m_we) begin
            mem[m_addr[11:2]] <= m_wdata;
            if (m_addr < out_lo || m_addr > out_hi) n_wr_outside++;
          end
          wait_cnt <= random_wait ? int'($urandom % 4) : 0;
        end
      end
    end
  end

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
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int x [8];

  task automatic run(input int in_w, input int out_w, input int seed, input bit timed);
    logic [31:0] d;
    int cyc, irq0;
    for (int n = 0; n < 8; n++) begin
      case (seed % 3)
        0: x[n] = int'($signed(16'($urandom)));
        1: x[n] = (n % 2 == 0) ? 32767 : -32768;   // extremes
        default: x[n] = int'($signed(16'($urandom % 512))) - 256;
      endcase
      mem[in_w + n] = 32'(x[n]);
      mem[out_w + n] = 32'hDEAD_BEEF;
    end
    out_lo = 32'(out_w * 4);
    out_hi = 32'(out_w * 4 + 28);
    wr(2'd0, 32'(in_w * 4));
    wr(2'd1, 32'(out_w * 4));
    rd(2'd0, d); check(d == 32'(in_w * 4), "in_addr readback");
    rd(2'd1, d); check(d == 32'(out_w * 4), "out_addr readback");
    irq0 = n_irq;
    wr(2'd2, 32'h0);
    cyc = 1;
    while (!irq) begin @(negedge clk); cyc++; end
    // counted from the edge after the start acknowledge: 1 + 16 accesses * 2
    if (timed) check(cyc == 33, $sformatf("run time %0d cycles, expected 33", cyc));
    @(negedge clk);
    check(n_irq == irq0 + 1, "one irq");
    rd(2'd3, d); check(d == 1, "done set");
    for (int k = 0; k < 8; k++) begin
      real acc, s;
      int exp, got, tol;
      acc = 0.0;
      // bound: rounding of the Q1.14 constants plus final rounding
      tol = 0;
      for (int n = 0; n < 8; n++) tol += (x[n] < 0) ? -x[n] : x[n];
      tol = 2 + tol / 32768;
      for (int n = 0; n < 8; n++) acc += real'(x[n]) * $cos(real'((2 * n + 1) * k) * PI / 16.0);
      s = (k == 0) ? $sqrt(0.125) : 0.5;
      exp = int'(acc * s);
      got = int'(mem[out_w + k]);
      check((got - exp) <= tol && (exp - got) <= tol,
            $sformatf("seed %0d X[%0d] got %0d expected %0d", seed, k, got, exp));
    end
    check(n_wr_outside == 0, "no write outside output block");
  endtask

  initial begin
    logic [31:0] d;
    out_lo = '0; out_hi = '1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    rd(2'd3, d); check(d == 0, "done 0 after reset");
    for (int i = 0; i < 6; i++) run(16 + 32 * i, 256 + 16 * i, i, 1'b1);
    random_wait = 1'b1;
    for (int i = 0; i < 6; i++) run(512 + 16 * i, 768 + 16 * i, i + 3, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
