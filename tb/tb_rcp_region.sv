// tb_rcp_region: self-checking test of the reconfigurable region switch.
// Checks that with no task configured nothing answers and nothing drives
// the boundary; that the selected CORDIC task answers its registers and
// raises irq; that after switching to the DCT only the DCT answers and uses
// the memory port; and that a task switched out and back in starts again
// from its reset state, as after a fresh configuration.
module tb_rcp_region;
  import rtr_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        cfg_sel = 1'b0, cfg_active = 1'b0;
  logic        rq_wr = 1'b0, rq_rd = 1'b0;
  logic [1:0]  rq_idx = '0;
  logic [31:0] rq_wdata = '0;
  logic [3:0]  rq_be = 4'hF;
  logic        rs_ack, irq;
  logic [31:0] rs_rdata;
  logic        m_req, m_we, m_ack;
  logic [31:0] m_addr, m_wdata, m_rdata;

  rcp_region dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0] mem [256];
  int n_mreq = 0;
  always_ff @(posedge clk) begin
    if (!rst_n) m_ack <= 1'b0;
    else begin
      m_ack <= m_req && !m_ack;
      if (m_req && !m_ack) begin
        n_mreq <= n_mreq + 1;
        if (m_we) mem[m_addr[9:2]] <= m_wdata;
        m_rdata <= mem[m_addr[9:2]];
      end
    end
  end

  int n_irq = 0;
  always @(posedge clk) if (rst_n && irq) n_irq++;

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

  task automatic configure(input logic sel);
    @(posedge clk);
    cfg_active <= 1'b0;
    repeat (3) @(posedge clk);
    cfg_sel <= sel;
    cfg_active <= 1'b1;
    repeat (2) @(posedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    bit seen;
    for (int i = 0; i < 256; i++) mem[i] = 32'(i * 100);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // nothing configured: no answer
    @(posedge clk);
    rq_rd <= 1'b1; rq_idx <= 2'd0;
    seen = 1'b0;
    repeat (10) begin @(negedge clk); if (rs_ack) seen = 1'b1; end
    @(posedge clk);
    rq_rd <= 1'b0;
    check(!seen, "no answer from an empty region");
    check(!m_req && !irq, "empty region drives nothing");

    // CORDIC configured
    configure(1'b0);
    wr(2'd0, 32'h0000_2000);
    rd(2'd0, d);
    check(d == 32'h2000, "CORDIC angle register");
    wr(2'd1, 32'h0);
    repeat (30) @(negedge clk);
    check(n_irq == 1, "CORDIC irq through region");
    rd(2'd3, d);
    check(int'($signed(d)) > 11580 && int'($signed(d)) < 11590, "CORDIC cos(pi/4)");
    check(n_mreq == 0, "CORDIC does not use the memory port");

    // switch to DCT
    configure(1'b1);
    rd(2'd0, d);
    check(d == 0, "fresh DCT in_addr");
    wr(2'd0, 32'h0000_0040);
    wr(2'd1, 32'h0000_0200);
    rd(2'd1, d);
    check(d == 32'h200, "DCT out_addr register");
    wr(2'd2, 32'h0);
    repeat (60) @(negedge clk);
    check(n_irq == 2, "DCT irq through region");
    check(n_mreq == 16, $sformatf("DCT made %0d memory accesses, expected 16", n_mreq));
    rd(2'd3, d);
    check(d == 1, "DCT done");
    // DC term: (1600+1700+...+2300) * sqrt(1/8) = 5515.4
    check(int'(mem[128]) >= 5513 && int'(mem[128]) <= 5518,
          $sformatf("DCT DC result %0d", int'(mem[128])));

    // back to CORDIC: it starts from reset
    configure(1'b0);
    rd(2'd0, d);
    check(d == 0, "CORDIC angle reset after reconfiguration");
    rd(2'd2, d);
    check(d == 0, "CORDIC done reset after reconfiguration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
