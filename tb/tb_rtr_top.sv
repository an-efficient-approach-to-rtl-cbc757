// tb_rtr_top: end-to-end test of the reconfigurable coprocessor subsystem at
// its default size.
//
// The testbench plays three parts around rtr_top: the host processor issuing
// register accesses the way the CORDIC and DCT driver code does, a word
// memory answering the DCT task's master port one cycle after each request,
// and the configuration memory controller, which answers cfg_start with
// cfg_done CFG_CYCLES later (reconfiguration modelled as a pure delay).
//
// Sequence: CORDIC angle write while nothing is loaded (block, load), DCT
// address write while the CORDIC loads (DCT waits in the queue), reads from
// the local copy, CORDIC run and result read after the DCT replaced it, DCT
// run with results checked against a floating-point DCT, a DCT re-run
// without reconfiguration, a CORDIC reload that replaces a DONE DCT, and a
// burst of writes to an unloaded task that fills its write buffer.
// Every mechanism is counted and must occur at least once.
module tb_rtr_top;
  import rtr_pkg::*;

  localparam int CFG_CYCLES = 300;
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
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------- memory model
  logic [31:0] mem [4096];
  always_ff @(posedge clk) begin
    if (!rst_n) m_ack <= 1'b0;
    else begin
      m_ack <= m_req && !m_ack;
      if (m_req && !m_ack) begin
        if (m_we) mem[m_addr[13:2]] <= m_wdata;
        m_rdata <= mem[m_addr[13:2]];
      end
    end
  end

  // ------------------------------------------- configuration controller model
  int cfg_cnt = 0;
  int n_cfg = 0;
  int last_cfg_task = -1;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg_done <= 1'b0;
      cfg_cnt  <= 0;
    end else begin
      cfg_done <= 1'b0;
      if (cfg_start) begin
        cfg_cnt       <= CFG_CYCLES;
        n_cfg         <= n_cfg + 1;
        last_cfg_task <= int'(cfg_task);
      end else if (cfg_cnt == 1) begin
        cfg_done <= 1'b1;
        cfg_cnt  <= 0;
      end else if (cfg_cnt > 1) begin
        cfg_cnt <= cfg_cnt - 1;
      end
    end
  end

  // ------------------------------------------------------ mechanism counters
  int n_block = 0, n_unblock = 0, n_copy = 0, n_waiting = 0, n_rerun = 0;
  int n_replace = 0, n_fwd = 0, n_local_rd = 0, n_loading_rd = 0, n_wbuf_full = 0;
  int n_pass = 0;
  vh_state_t prev_st [2];
  always @(posedge clk) begin
    if (rst_n) begin
      if (irq_block)   n_block++;
      if (irq_unblock) n_unblock++;
      if (vh_irq != 0) n_copy++;
      for (int i = 0; i < 2; i++) begin
        if (vh_state[i] == VH_WAITING && vh_state[1-i] == VH_LOADING) n_waiting++;
        if (prev_st[i] == VH_DONE && vh_state[i] == VH_RUNNING) n_rerun++;
        if (prev_st[i] == VH_DONE && vh_state[i] == VH_UNLOADED) n_replace++;
        prev_st[i] = vh_state[i];
      end
      if (dut.u_ctrl.eng == dut.u_ctrl.E_FWD && dut.rq_wr && dut.rs_ack) n_fwd++;
      if (dut.u_ctrl.h_pass) n_pass++;
    end else begin
      prev_st[0] = VH_UNLOADED;
      prev_st[1] = VH_UNLOADED;
    end
  end

  // --------------------------------------------------------------- host bus
  int last_lat;
  task automatic bus_write(input logic [31:0] a, input logic [31:0] d);
    int n = 0;
    @(posedge clk);
    s_wr <= 1'b1; s_addr <= a; s_wdata <= d; s_be <= 4'hF;
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

  task automatic wait_irq_unblock();
    do @(negedge clk); while (!irq_unblock);
  endtask

  // ------------------------------------------------------------ references
  function automatic int cos_ref(input logic [15:0] ang);
    real r;
    r = $cos(real'($signed(ang)) * PI / 32768.0) * 16384.0;
    return int'(r);
  endfunction

  function automatic int dct_ref(input int x [8], input int k);
    real s, acc;
    acc = 0.0;
    for (int n = 0; n < 8; n++) acc += real'(x[n]) * $cos(real'((2 * n + 1) * k) * PI / 16.0);
    s = (k == 0) ? $sqrt(1.0 / 8.0) : 0.5;
    return int'(s * acc);
  endfunction

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  int xin [8];

  task automatic fill_input(input int base_word, input int seed);
    for (int n = 0; n < 8; n++) begin
      xin[n] = int'($signed(16'(seed * 37 + n * 1111 - 4000)));
      mem[base_word + n] = 32'(xin[n]);
    end
  endtask

  task automatic check_dct(input int out_word, input string tag);
    for (int k = 0; k < 8; k++) begin
      int got, exp;
      got = int'(mem[out_word + k]);
      exp = dct_ref(xin, k);
      check(iabs(got - exp) <= 2, $sformatf("%s X[%0d] got %0d expected %0d", tag, k, got, exp));
    end
  endtask

  task automatic run_cordic_check(input logic [15:0] ang, input string tag);
    logic [31:0] d;
    int tries = 0;
    do begin bus_read(32'h1008, d); tries++; end while (d == 0 && tries < 200);
    check(d == 1, {tag, " CORDIC done flag"});
    bus_read(32'h100C, d);
    check(iabs(int'($signed(d)) - cos_ref(ang)) <= 4,
          $sformatf("%s cos(0x%04h) got %0d expected %0d", tag, ang, $signed(d), cos_ref(ang)));
  endtask

  // ------------------------------------------------------------- watchdog
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // --------------------------------------------------------------- stimulus
  initial begin
    logic [31:0] d;
    int cfg_before, tries;
    for (int i = 0; i < 4096; i++) mem[i] = '0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    // t1: SW1 sets the CORDIC angle; the CORDIC is not loaded.
    fork
      bus_write(32'h1000, 32'h0000_001F);
      begin do @(negedge clk); while (!irq_block); end
    join
    check(last_lat <= 2, $sformatf("held write acknowledged in %0d cycles", last_lat));
    repeat (3) @(negedge clk);
    check(vh_state[VH_CORDIC] == VH_LOADING, "CORDIC loading after first write");
    check(last_cfg_task == VH_CORDIC, "configuration of CORDIC requested");

    // t2: SW2 sets the DCT input address; the DCT must wait.
    fill_input(32'hF000 >> 2, 1);
    bus_write(32'h2000, 32'h0000_F000);
    repeat (2) @(negedge clk);
    check(vh_state[VH_DCT] == VH_WAITING, "DCT waiting while CORDIC loads");
    check(n_block == 2, "two block interrupts");

    // A status read of the waiting DCT comes from the local copy.
    bus_read(32'h200C, d);
    n_local_rd++;
    check(d == 0 && last_lat <= 2, "DCT done read from local copy during wait");

    // A read of the loading CORDIC waits until it is configured.
    bus_read(32'h1000, d);
    n_loading_rd++;
    check(d == 32'h1F, "held angle write reached CORDIC before read");
    check(last_lat > 10, "read of loading task waited for configuration");
    check(n_unblock == 1, "unblock after CORDIC configuration");
    check(n_fwd >= 1, "held-back write forwarded");

    // t6: SW1 starts the CORDIC; when it finishes, the DCT replaces it.
    bus_write(32'h1004, 32'h0);
    wait_irq_unblock();
    check(vh_state[VH_CORDIC] == VH_UNLOADED && vh_state[VH_DCT] == VH_RUNNING,
          "DCT replaced the finished CORDIC");
    // t10: CORDIC result from the local copy.
    bus_read(32'h100C, d);
    n_local_rd++;
    check(iabs(int'($signed(d)) - cos_ref(16'h001F)) <= 4,
          $sformatf("cos from local copy got %0d expected %0d", $signed(d), cos_ref(16'h001F)));
    bus_read(32'h1008, d);
    check(d == 1, "CORDIC done from local copy");

    // t11: SW2 sets the output address and starts the DCT.
    bus_write(32'h2004, 32'h0000_F100);
    bus_write(32'h2008, 32'h0);
    tries = 0;
    do begin bus_read(32'h200C, d); tries++; end while (d == 0 && tries < 500);
    check(d == 1, "DCT done");
    repeat (20) @(negedge clk);
    check_dct(32'hF100 >> 2, "first DCT");
    check(vh_state[VH_DCT] == VH_DONE, "DCT DONE and still loaded");

    // A second DCT run reuses the loaded task: no reconfiguration.
    cfg_before = n_cfg;
    fill_input(32'hF200 >> 2, 7);
    bus_write(32'h2000, 32'h0000_F200);
    bus_write(32'h2004, 32'h0000_F300);
    bus_write(32'h2008, 32'h0);
    tries = 0;
    do begin bus_read(32'h200C, d); tries++; end while (d == 0 && tries < 500);
    repeat (20) @(negedge clk);
    check_dct(32'hF300 >> 2, "second DCT");
    check(n_cfg == cfg_before, "no reconfiguration for a DONE task");

    // The CORDIC is needed again: the DONE DCT is replaced at once.
    bus_write(32'h1000, 32'h0000_6000);
    wait_irq_unblock();
    bus_write(32'h1004, 32'h0);
    run_cordic_check(16'h6000, "reloaded");

    // Three writes to the unloaded DCT: the third finds the buffer full.
    repeat (30) @(negedge clk);
    fill_input(32'hF400 >> 2, 3);
    bus_write(32'h2000, 32'h0000_F400);
    bus_write(32'h2004, 32'h0000_F500);
    bus_write(32'h2008, 32'h0);
    if (last_lat > 10) n_wbuf_full++;
    tries = 0;
    do begin bus_read(32'h200C, d); tries++; end while (d == 0 && tries < 500);
    repeat (20) @(negedge clk);
    check_dct(32'hF500 >> 2, "buffered DCT");

    // An unmapped address reads as zero.
    bus_read(32'h3000, d);
    check(d == 0, "unmapped read");

    // Every mechanism must have happened.
    check(n_block   >= 1, "mechanism: block interrupt");
    check(n_unblock >= 1, "mechanism: unblock interrupt");
    check(n_waiting >= 1, "mechanism: task WAITING in the request FIFO");
    check(n_fwd     >= 1, "mechanism: held-back write forwarded");
    check(n_copy    >= 1, "mechanism: read-back copy on completion");
    check(n_local_rd >= 1, "mechanism: read served from local copy");
    check(n_loading_rd >= 1, "mechanism: read of a loading task waited");
    check(n_rerun   >= 1, "mechanism: DONE to RUNNING without reconfiguration");
    check(n_replace >= 1, "mechanism: DONE task replaced");
    check(n_wbuf_full >= 1, "mechanism: write buffer full");
    check(n_pass    >= 1, "mechanism: pass-through access");
    $display("mechanisms: block=%0d unblock=%0d waiting=%0d fwd=%0d copy=%0d local=%0d loading_rd=%0d rerun=%0d replace=%0d wbuf_full=%0d pass=%0d cfg=%0d",
             n_block, n_unblock, n_waiting, n_fwd, n_copy, n_local_rd, n_loading_rd,
             n_rerun, n_replace, n_wbuf_full, n_pass, n_cfg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
