// tb_rtr_stress: long randomised run of the three-software-task workload on
// rtr_top.
//
// Same host model as tb_rtr_workload (round-robin scheduler, FIFO of blocked
// software tasks, interrupt services for irq_block and irq_unblock), but
// software tasks 1 and 2 each run their accelerator ITERS times with fresh
// random data, the time slice and the compute bursts of software task 3 are
// random, and the configuration delay varies. The CORDIC and the DCT keep
// displacing each other, are sometimes reused while DONE, and sometimes find
// the other task running. Every CORDIC and DCT result is checked against
// floating-point arithmetic, and every unblocked software task must find its
// VH task in the region.
module tb_rtr_stress;
  import rtr_pkg::*;

  localparam int ITERS = 12;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              s_wr = 1'b0, s_rd = 1'b0;
  logic [31:0]       s_addr = '0, s_wdata = '0;
  logic [3:0]        s_be = 4'hF;
  logic              s_ack;
  logic [31:0]       s_rdata;
  logic              irq_block, irq_unblock;
  logic [1:0]        vh_irq;
  logic              cfg_start, cfg_task, cfg_done;
  logic              m_req, m_we, m_ack;
  logic [31:0]       m_addr, m_wdata, m_rdata;
  vh_state_t [1:0]   vh_state;

  rtr_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // memory, one cycle latency
  logic [31:0] mem [16384];
  always_ff @(posedge clk) begin
    if (!rst_n) m_ack <= 1'b0;
    else begin
      m_ack <= m_req && !m_ack;
      if (m_req && !m_ack) begin
        if (m_we) mem[m_addr[15:2]] <= m_wdata;
        m_rdata <= mem[m_addr[15:2]];
      end
    end
  end

  // configuration controller: fixed delay
  int cfg_cnt = 0, n_cfg = 0;
  always_ff @(posedge clk) begin
    if (!rst_n) begin cfg_done <= 1'b0; cfg_cnt <= 0; end
    else begin
      cfg_done <= 1'b0;
      if (cfg_start) begin cfg_cnt <= 50 + int'($urandom % 400); n_cfg <= n_cfg + 1; end
      else if (cfg_cnt == 1) begin cfg_done <= 1'b1; cfg_cnt <= 0; end
      else if (cfg_cnt > 1) cfg_cnt <= cfg_cnt - 1;
    end
  end

  // interrupt latches (the interrupt controller)
  int blk_pend = 0, unblk_pend = 0;
  always @(posedge clk) if (rst_n) begin
    if (irq_block)   blk_pend++;
    if (irq_unblock) unblk_pend++;
  end

  int cycle = 0;
  always @(posedge clk) cycle++;

  // -------------------------------------------------------------- software
  typedef enum {OP_WR, OP_POLL, OP_RD, OP_COMPUTE, OP_END} op_kind_t;
  typedef struct {
    op_kind_t    kind;
    logic [31:0] addr;
    logic [31:0] data;
  } op_t;
  typedef enum {SW_READY, SW_RUNNING, SW_BLOCKED, SW_FINISHED} sw_state_t;

  op_t       prog [3][6];
  int        pc [3];
  sw_state_t sw [3];
  int        blocked_q [$];
  int        last_d1 = -1;
  logic [31:0] cos_read;
  int        n_local = 0, n_switch = 0, n_compute = 0;
  int        unblock_order [$];

  task automatic bus_write(input logic [31:0] a, input logic [31:0] d);
    int t0;
    t0 = cycle;
    @(posedge clk);
    s_wr <= 1'b1; s_addr <= a; s_wdata <= d;
    do @(negedge clk); while (!s_ack);
    if (irq_block) last_d1 = cycle - t0;
    @(posedge clk);
    s_wr <= 1'b0;
  endtask

  task automatic bus_read(input logic [31:0] a, output logic [31:0] d);
    @(posedge clk);
    s_rd <= 1'b1; s_addr <= a;
    do @(negedge clk); while (!s_ack);
    d = s_rdata;
    @(posedge clk);
    s_rd <= 1'b0;
  endtask

  int          xin [8];
  logic [15:0] angle;
  int          iter [2];
  int          slice;
  int          n_dct_ok = 0, n_cordic_ok = 0;

  task automatic new_cordic_round();
    angle = 16'($urandom);
    prog[0][0] = '{OP_WR,   32'h1000, {16'h0, angle}};
    prog[0][1] = '{OP_WR,   32'h1004, 32'h0};
    prog[0][2] = '{OP_POLL, 32'h1008, 32'h0};
    prog[0][3] = '{OP_RD,   32'h100C, 32'h0};
    prog[0][4] = '{OP_END,  32'h0,    32'h0};
    prog[0][5] = '{OP_END,  32'h0,    32'h0};
  endtask

  task automatic new_dct_round(input int r);
    logic [31:0] in_a, out_a;
    in_a  = 32'h8000 + 32'(r * 64);
    out_a = 32'hC000 + 32'(r * 64);
    for (int n = 0; n < 8; n++) begin
      xin[n] = int'($signed(16'($urandom)));
      mem[(in_a >> 2) + 32'(n)] = 32'(xin[n]);
    end
    prog[1][0] = '{OP_WR,   32'h2000, in_a};
    prog[1][1] = '{OP_WR,   32'h2004, out_a};
    prog[1][2] = '{OP_WR,   32'h2008, 32'h0};
    prog[1][3] = '{OP_POLL, 32'h200C, 32'h0};
    prog[1][4] = '{OP_END,  32'h0,    32'h0};
    prog[1][5] = '{OP_END,  32'h0,    32'h0};
  endtask

  task automatic check_cordic();
    int exp, got;
    exp = int'($cos(real'($signed(angle)) * PI / 32768.0) * 16384.0);
    got = int'($signed(cos_read));
    check(got - exp <= 2 && exp - got <= 2,
          $sformatf("round %0d cos(0x%04h) got %0d expected %0d", iter[0], angle, got, exp));
    if (got - exp <= 2 && exp - got <= 2) n_cordic_ok++;
  endtask

  task automatic check_dct();
    int exp, got, tol, bad;
    logic [31:0] out_a;
    out_a = prog[1][1].data;
    tol = 0;
    for (int n = 0; n < 8; n++) tol += (xin[n] < 0) ? -xin[n] : xin[n];
    tol = 2 + tol / 32768;
    bad = 0;
    for (int k = 0; k < 8; k++) begin
      real acc, s;
      acc = 0.0;
      for (int n = 0; n < 8; n++) acc += real'(xin[n]) * $cos(real'((2 * n + 1) * k) * PI / 16.0);
      s = (k == 0) ? $sqrt(0.125) : 0.5;
      exp = int'(acc * s);
      got = int'(mem[(out_a >> 2) + 32'(k)]);
      check(got - exp <= tol && exp - got <= tol,
            $sformatf("round %0d X[%0d] got %0d expected %0d", iter[1], k, got, exp));
      if (!(got - exp <= tol && exp - got <= tol)) bad++;
    end
    if (bad == 0) n_dct_ok++;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cur, slice_start, nxt;
    logic [31:0] d;
    for (int i = 0; i < 16384; i++) mem[i] = '0;
    for (int i = 0; i < 6; i++) prog[2][i] = '{OP_COMPUTE, 32'h0, 32'h0};
    iter[0] = 0;
    iter[1] = 0;
    new_cordic_round();
    new_dct_round(0);
    for (int t = 0; t < 3; t++) begin pc[t] = 0; sw[t] = SW_READY; end

    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    cur = int'($urandom % 3);
    sw[cur] = SW_RUNNING;
    slice_start = cycle;
    slice = 50 + int'($urandom % 300);
    while (!(sw[0] == SW_FINISHED && sw[1] == SW_FINISHED)) begin
      op_t op;
      op = prog[cur][pc[cur]];
      unique case (op.kind)
        OP_WR:   begin bus_write(op.addr, op.data); pc[cur]++; end
        OP_POLL: begin bus_read(op.addr, d); if (d != 0) pc[cur]++; end
        OP_RD:   begin
          if (vh_state[VH_CORDIC] != VH_RUNNING && vh_state[VH_CORDIC] != VH_DONE) n_local++;
          bus_read(op.addr, d);
          cos_read = d;
          pc[cur]++;
        end
        OP_COMPUTE: begin repeat (1 + $urandom % 20) @(posedge clk); n_compute++; end
        OP_END: begin
          // one round of this software task is complete
          if (cur == 0) begin
            check_cordic();
            iter[0]++;
            if (iter[0] == ITERS) sw[0] = SW_FINISHED;
            else begin new_cordic_round(); pc[0] = 0; end
          end else begin
            check_dct();
            iter[1]++;
            if (iter[1] == ITERS) sw[1] = SW_FINISHED;
            else begin new_dct_round(iter[1]); pc[1] = 0; end
          end
        end
      endcase
      @(negedge clk);
      if (blk_pend > 0) begin
        blk_pend--;
        sw[cur] = SW_BLOCKED;
        blocked_q.push_back(cur);
      end
      while (unblk_pend > 0) begin
        int t;
        unblk_pend--;
        check(blocked_q.size() > 0, "unblock with a blocked software task");
        if (blocked_q.size() > 0) begin
          t = blocked_q.pop_front();
          unblock_order.push_back(t);
          check(vh_state[t] == VH_RUNNING || vh_state[t] == VH_DONE,
                $sformatf("SW%0d unblocked while its VH task is in the region", t + 1));
          sw[t] = SW_READY;
        end
      end
      if (sw[cur] != SW_RUNNING || cycle - slice_start > slice) begin
        if (sw[cur] == SW_RUNNING) sw[cur] = SW_READY;
        nxt = cur;
        for (int k = 1; k <= 3; k++) begin
          if (sw[(cur + k) % 3] == SW_READY) begin nxt = (cur + k) % 3; break; end
        end
        if (nxt != cur) n_switch++;
        cur = nxt;
        sw[cur] = SW_RUNNING;
        slice_start = cycle;
        slice = 50 + int'($urandom % 300);
      end
    end

    repeat (20) @(negedge clk);
    check(n_cordic_ok == ITERS, $sformatf("%0d of %0d CORDIC rounds correct", n_cordic_ok, ITERS));
    check(n_dct_ok == ITERS, $sformatf("%0d of %0d DCT rounds correct", n_dct_ok, ITERS));
    check(n_cfg >= 3, $sformatf("tasks displaced each other (%0d reconfigurations)", n_cfg));
    check(n_local >= 1, "a CORDIC result came from the controller copy");
    check(blocked_q.size() == 0, "no software task left blocked");
    $display("stress: cycles=%0d switches=%0d reconfigurations=%0d local_reads=%0d unblocks=%0d",
             cycle, n_switch, n_cfg, n_local, unblock_order.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
