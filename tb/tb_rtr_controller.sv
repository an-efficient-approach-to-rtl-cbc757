// tb_rtr_controller: self-checking test of the RTR controller with three
// tasks and a stub region.
//
// The stub region keeps four registers per task, answers register accesses
// one cycle after the request, logs every write it receives, and flags any
// access made while the region is not active. The testbench raises the
// stub's completion interrupt itself. Checked: block/unblock interrupts,
// the state sequence of every task, request FIFO order (task 1 before task
// 2), replay of held-back writes in order before irq_unblock, the read-back
// copy of exactly the RB_MASK registers, local-copy reads, a read of a
// loading task waiting, a full write buffer stalling the bus, gating of the
// memory master port, and the one-cycle answer to held writes.
module tb_rtr_controller;
  import rtr_pkg::*;

  localparam int NV = 3;
  localparam logic [NV-1:0][31:0] BASE = {32'h3000, 32'h2000, 32'h1000};
  localparam logic [NV-1:0][3:0]  MASK = {4'b1000, 4'b1000, 4'b1100};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              s_wr = 1'b0, s_rd = 1'b0;
  logic [31:0]       s_addr = '0, s_wdata = '0;
  logic [3:0]        s_be = 4'hF;
  logic              s_ack;
  logic [31:0]       s_rdata;
  logic              irq_block, irq_unblock;
  logic [NV-1:0]     vh_irq;
  logic              cfg_start, cfg_done = 1'b0;
  logic [1:0]        cfg_task, rcp_sel;
  logic              rcp_active, rq_wr, rq_rd, rs_ack, rcp_irq = 1'b0;
  logic [1:0]        rq_idx;
  logic [31:0]       rq_wdata, rs_rdata;
  logic [3:0]        rq_be;
  logic              rcp_m_req = 1'b0, rcp_m_we = 1'b0, rcp_m_ack, m_req, m_we, m_ack = 1'b0;
  logic [31:0]       rcp_m_addr = '0, rcp_m_wdata = '0, rcp_m_rdata, m_addr, m_wdata, m_rdata = '0;
  vh_state_t [NV-1:0] vh_state;

  rtr_controller #(.NUM_VH(NV), .NREG(4), .WBUF_DEPTH(2), .VH_BASE(BASE), .RB_MASK(MASK)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- stub region
  logic [31:0] regs [NV][4];
  string wlog [$];
  int n_bad_access = 0, n_rd_region = 0;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rs_ack <= 1'b0;
    end else begin
      rs_ack <= 1'b0;
      if ((rq_wr || rq_rd) && !rs_ack) begin
        if (!rcp_active) n_bad_access++;
        rs_ack <= 1'b1;
        if (rq_wr) begin
          regs[rcp_sel][rq_idx] <= rq_wdata;
          wlog.push_back($sformatf("%0d:%0d:%0h", rcp_sel, rq_idx, rq_wdata));
        end else begin
          rs_rdata <= regs[rcp_sel][rq_idx];
          n_rd_region++;
        end
      end
    end
  end

  int n_block = 0, n_unblock = 0;
  // cycles each task has spent in WAITING
  int n_went_waiting [NV] = '{default: 0};
  always @(posedge clk) if (rst_n)
    for (int i = 0; i < NV; i++) if (vh_state[i] == VH_WAITING) n_went_waiting[i]++;
  int unblock_wlog_size = -1;
  always @(posedge clk) begin
    if (rst_n && irq_block) n_block++;
    if (rst_n && irq_unblock) begin
      n_unblock++;
      unblock_wlog_size = wlog.size();
    end
  end

  // last_lat counts clock cycles from the request edge to the acknowledge,
  // so an access answered in the first cycle the controller sees it counts 2.
  int last_lat;
  task automatic bus_write(input logic [31:0] a, input logic [31:0] d);
    int n = 0;
    @(posedge clk);
    s_wr <= 1'b1; s_addr <= a; s_wdata <= d;
    do begin @(negedge clk); n++; end while (!s_ack);
    @(posedge clk);
    s_wr <= 1'b0;
    last_lat = n;
  endtask

  task automatic bus_read(input logic [31:0] a, output logic [31:0] d);
    int n = 0;
    @(posedge clk);
    s_rd <= 1'b1; s_addr <= a;
    do begin @(negedge clk); n++; end while (!s_ack);
    d = s_rdata;
    @(posedge clk);
    s_rd <= 1'b0;
    last_lat = n;
  endtask

  // configuration requests seen so far, and the task of the last one
  int n_cfg_start = 0;
  int last_cfg_task = -1;
  always @(posedge clk) if (rst_n && cfg_start) begin
    n_cfg_start++;
    last_cfg_task = int'(cfg_task);
  end

  task automatic wait_cfg_start(input int exp_count, input int exp_task);
    int n = 0;
    while (n_cfg_start < exp_count && n < 100) begin @(negedge clk); n++; end
    check(n_cfg_start == exp_count && last_cfg_task == exp_task,
          $sformatf("configuration %0d for task %0d (got %0d for task %0d)",
                    exp_count, exp_task, n_cfg_start, last_cfg_task));
    @(negedge clk);
  endtask

  task automatic give_cfg_done();
    repeat (20) @(negedge clk);
    cfg_done = 1'b1;
    @(negedge clk);
    cfg_done = 1'b0;
  endtask

  task automatic finish_task(input int t, input logic [31:0] result);
    regs[t][2] = 32'h1;
    regs[t][3] = result;
    rcp_irq = 1'b1;
    @(negedge clk);
    rcp_irq = 1'b0;
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
    for (int t = 0; t < NV; t++) for (int r = 0; r < 4; r++) regs[t][r] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;

    // Task 0 requested while nothing is loaded.
    bus_write(32'h1000, 32'hA1);
    check(last_lat == 2, $sformatf("held write answered in %0d cycle(s)", last_lat));
    @(negedge clk);
    check(n_block == 1, "block interrupt");
    wait_cfg_start(1, 0);
    check(vh_state[0] == VH_LOADING, "task 0 LOADING");
    check(n_went_waiting[0] == 0, "free region: task 0 went straight to LOADING");
    // Tasks 1 and 2 queue behind it, in this order.
    bus_write(32'h2000, 32'hB1);
    bus_write(32'h3000, 32'hC1);
    @(negedge clk);
    check(vh_state[1] == VH_WAITING && vh_state[2] == VH_WAITING, "tasks 1 and 2 WAITING");
    check(n_went_waiting[1] > 0 && n_went_waiting[2] > 0, "busy region: tasks 1 and 2 queued");
    check(n_block == 3, "three block interrupts");
    // Master port gated while nothing is configured.
    rcp_m_req = 1'b1;
    #1 check(!m_req, "master request gated while loading");
    rcp_m_req = 1'b0;
    // A second held write for task 0, and a read of task 0 that must wait.
    bus_write(32'h1004, 32'hA2);
    fork
      bus_read(32'h1000, d);
      give_cfg_done();
    join
    check(last_lat > 15, "read of a loading task waited");
    check(d == 32'hA1, "read after load sees the replayed write");
    check(vh_state[0] == VH_RUNNING, "task 0 RUNNING");
    check(wlog.size() >= 2 && wlog[0] == "0:0:a1" && wlog[1] == "0:1:a2", "held writes replayed in order");
    check(unblock_wlog_size == 2, "unblock after the replay");
    check(n_unblock == 1, "one unblock interrupt");
    rcp_m_req = 1'b1;
    #1 check(m_req, "master request passed while running");
    rcp_m_req = 1'b0;
    // Pass-through write to the running task.
    bus_write(32'h1008, 32'hA3);
    check(wlog[wlog.size()-1] == "0:2:a3", "pass-through write");
    // Task 1 read from the local copy.
    bus_read(32'h200C, d);
    check(d == 0 && last_lat == 2, "local-copy read of a waiting task");

    // Task 0 finishes: copy regs 2 and 3, then load task 1 (FIFO order).
    finish_task(0, 32'h1234);
    wait_cfg_start(2, 1);
    check(vh_state[0] == VH_UNLOADED && vh_state[1] == VH_LOADING && vh_state[2] == VH_WAITING,
          "task 0 replaced by task 1, task 2 still waiting");
    bus_read(32'h100C, d);
    check(d == 32'h1234, "result from the local copy");
    bus_read(32'h1008, d);
    check(d == 32'h1, "done flag from the local copy");
    bus_read(32'h1000, d);
    check(d == 32'h0, "register outside the read-back mask not copied");
    give_cfg_done();
    repeat (10) @(negedge clk);
    check(vh_state[1] == VH_RUNNING, "task 1 RUNNING");
    check(wlog[wlog.size()-1] == "1:0:b1", "task 1 held write replayed");
    check(n_unblock == 2, "second unblock");

    // Task 1 finishes: only register 3 copied; task 2 loaded.
    regs[1][2] = 32'h55;
    finish_task(1, 32'h5678);
    wait_cfg_start(3, 2);
    bus_read(32'h200C, d);
    check(d == 32'h5678, "task 1 result from the local copy");
    bus_read(32'h2008, d);
    check(d == 32'h0, "task 1 register 2 not in its mask");
    give_cfg_done();
    repeat (10) @(negedge clk);
    check(wlog[wlog.size()-1] == "2:0:c1", "task 2 held write replayed");

    // Task 2 finishes with nothing waiting: stays loaded and DONE.
    finish_task(2, 32'h9ABC);
    repeat (20) @(negedge clk);
    check(vh_state[2] == VH_DONE, "task 2 DONE and kept");
    bus_read(32'h300C, d);
    check(d == 32'h9ABC, "DONE task read");
    // A write to the DONE task reuses it.
    bus_write(32'h3004, 32'hC2);
    check(vh_state[2] == VH_RUNNING, "DONE to RUNNING on a write");
    finish_task(2, 32'h9ABD);
    repeat (20) @(negedge clk);

    // Three writes to unloaded task 0: the third waits for the buffer.
    fork
      begin
        bus_write(32'h1000, 32'hD1);
        bus_write(32'h1004, 32'hD2);
        bus_write(32'h1008, 32'hD3);
      end
      begin
        wait_cfg_start(4, 0);
        give_cfg_done();
      end
    join
    check(last_lat > 15, "third write waited for the full buffer to drain");
    repeat (10) @(negedge clk);
    check(wlog[wlog.size()-3] == "0:0:d1" && wlog[wlog.size()-2] == "0:1:d2" &&
          wlog[wlog.size()-1] == "0:2:d3", "order kept across a full buffer");

    // Unmapped address.
    bus_read(32'h8000, d);
    check(d == 0 && last_lat == 2, "unmapped read");
    check(n_bad_access == 0, "no access to an inactive region");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
