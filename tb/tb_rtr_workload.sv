// tb_rtr_workload: the three-task real-time scenario run on rtr_top.
//
// The testbench contains a small model of the host side: three software
// tasks and a round-robin scheduler with a time slice, plus the operating
// system's FIFO of blocked software tasks. Software task 1 drives the CORDIC
// (angle, start, poll done, read cos), software task 2 drives the DCT (input
// address, output address, start, poll done), and software task 3 only
// computes. The driver code is exactly what it would be for fixed
// accelerators: no access asks for a reconfiguration.
//
// The model reacts to the two controller interrupts as the interrupt
// services would: on irq_block it moves the running software task to the
// blocked FIFO and dispatches another; on irq_unblock it makes the oldest
// blocked task ready. Checked: both accelerated tasks give correct results,
// the software tasks are unblocked in blocking order and each one only
// after its own VH task is running, the CORDIC result is read from the
// controller's copy while the DCT is loaded, exactly two reconfigurations
// happen, and the controller's share of the miss handling (request edge to
// irq_block) is two cycles.
module tb_rtr_workload;
  import rtr_pkg::*;

  localparam int CFG_CYCLES = 400;
  localparam int SLICE      = 150;
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
      if (cfg_start) begin cfg_cnt <= CFG_CYCLES; n_cfg <= n_cfg + 1; end
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

  int xin [8];

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cur, slice_start, nxt;
    logic [31:0] d;
    // SW1: CORDIC driver
    prog[0][0] = '{OP_WR,   32'h1000, 32'h0000_001F};
    prog[0][1] = '{OP_WR,   32'h1004, 32'h0};
    prog[0][2] = '{OP_POLL, 32'h1008, 32'h0};
    prog[0][3] = '{OP_RD,   32'h100C, 32'h0};
    prog[0][4] = '{OP_END,  32'h0,    32'h0};
    prog[0][5] = '{OP_END,  32'h0,    32'h0};
    // SW2: DCT driver
    prog[1][0] = '{OP_WR,   32'h2000, 32'h0000_F000};
    prog[1][1] = '{OP_WR,   32'h2004, 32'h0000_F100};
    prog[1][2] = '{OP_WR,   32'h2008, 32'h0};
    prog[1][3] = '{OP_POLL, 32'h200C, 32'h0};
    prog[1][4] = '{OP_END,  32'h0,    32'h0};
    prog[1][5] = '{OP_END,  32'h0,    32'h0};
    // SW3: computation only
    for (int i = 0; i < 6; i++) prog[2][i] = '{OP_COMPUTE, 32'h0, 32'h0};

    for (int i = 0; i < 16384; i++) mem[i] = '0;
    for (int n = 0; n < 8; n++) begin
      xin[n] = (n * 977 % 2000) - 1000;
      mem[(32'hF000 >> 2) + n] = 32'(xin[n]);
    end
    for (int t = 0; t < 3; t++) begin pc[t] = 0; sw[t] = SW_READY; end

    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    cur = 0;
    sw[0] = SW_RUNNING;
    slice_start = cycle;
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
        OP_COMPUTE: begin repeat (10) @(posedge clk); n_compute++; end
        OP_END:  sw[cur] = SW_FINISHED;
      endcase
      @(negedge clk);
      // block interrupt service: the running task called a task not loaded
      if (blk_pend > 0) begin
        blk_pend--;
        sw[cur] = SW_BLOCKED;
        blocked_q.push_back(cur);
      end
      // unblock interrupt service: oldest blocked software task is ready
      while (unblk_pend > 0) begin
        int t;
        unblk_pend--;
        t = blocked_q.pop_front();
        unblock_order.push_back(t);
        check(vh_state[t] == VH_RUNNING || vh_state[t] == VH_DONE,
              $sformatf("SW%0d unblocked while its VH task is running", t + 1));
        sw[t] = SW_READY;
      end
      // dispatcher: switch when the task stops running or its slice ends
      if (sw[cur] != SW_RUNNING || cycle - slice_start > SLICE) begin
        if (sw[cur] == SW_RUNNING) sw[cur] = SW_READY;
        nxt = cur;
        for (int k = 1; k <= 3; k++) begin
          if (sw[(cur + k) % 3] == SW_READY) begin nxt = (cur + k) % 3; break; end
        end
        if (nxt != cur) n_switch++;
        cur = nxt;
        sw[cur] = SW_RUNNING;
        slice_start = cycle;
      end
    end

    repeat (20) @(negedge clk);
    // results
    begin
      int exp, got;
      exp = int'($cos(real'(16'h001F) * PI / 32768.0) * 16384.0);
      got = int'($signed(cos_read));
      check(got - exp <= 4 && exp - got <= 4, $sformatf("SW1 cos got %0d expected %0d", got, exp));
      for (int k = 0; k < 8; k++) begin
        real acc, s;
        acc = 0.0;
        for (int n = 0; n < 8; n++) acc += real'(xin[n]) * $cos(real'((2 * n + 1) * k) * PI / 16.0);
        s = (k == 0) ? $sqrt(0.125) : 0.5;
        exp = int'(acc * s);
        got = int'(mem[(32'hF100 >> 2) + k]);
        check(got - exp <= 2 && exp - got <= 2, $sformatf("SW2 X[%0d] got %0d expected %0d", k, got, exp));
      end
    end
    check(unblock_order.size() == 2 && unblock_order[0] == 0 && unblock_order[1] == 1,
          "software tasks unblocked in blocking order");
    check(n_cfg == 2, $sformatf("%0d reconfigurations, expected 2", n_cfg));
    check(n_local == 1, "CORDIC result read from the controller copy");
    check(last_d1 == 2, $sformatf("miss handling took %0d cycles, expected 2", last_d1));
    check(n_compute > 0, "SW3 ran while the others were blocked");
    $display("workload: cycles=%0d switches=%0d sw3_slices=%0d reconfigurations=%0d",
             cycle, n_switch, n_compute, n_cfg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
