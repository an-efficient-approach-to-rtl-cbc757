// rtr_controller: run-time reconfiguration (RTR) controller. It makes a
// reconfigurable coprocessor look to software like a set of fixed,
// memory-mapped accelerators: software simply writes a task's registers,
// and the controller notices when the task is not in the reconfigurable
// region, much as a cache notices a miss.
//
// Operation (follows the reference approach):
//  * Each virtual hardware (VH) task has a state: UNLOADED, WAITING, LOADING,
//    RUNNING or DONE (rtr_pkg::vh_state_t).
//  * A write to a RUNNING or DONE task is passed to the region (DONE ->
//    RUNNING, no reconfiguration). A write to an UNLOADED task is acknowledged
//    but held back in that task's write buffer and irq_block pulses so the
//    operating system blocks the calling software task. If the region is
//    free and no request is queued, the task goes straight to LOADING;
//    otherwise its number is pushed into the request FIFO and it becomes
//    WAITING. Further writes to a WAITING or LOADING task are held back too.
//  * When the region is free (empty, or its task is DONE), the head of the
//    request FIFO is loaded: the old task becomes UNLOADED, the new one
//    LOADING, and cfg_start asks the configuration port for its bitstream.
//  * On cfg_done the task becomes RUNNING, its held-back writes are replayed
//    to it in order, and then irq_unblock pulses so the operating system
//    releases the first blocked software task.
//  * When the loaded task raises its completion interrupt it becomes DONE;
//    the controller reads the registers selected by RB_MASK into its local
//    read-back copy, then pulses vh_irq for that task.
//  * Reads never change a state. A read of a RUNNING or DONE task goes to the
//    task; a read of an UNLOADED or WAITING task is answered from the local
//    copy; a read of a LOADING task waits until the task is RUNNING.
//
// This design's own choices: the host register bus is a simple IPIC-like
// request/acknowledge bus (s_wr/s_rd held until a one-cycle s_ack; s_rdata
// valid with s_ack); interrupts and cfg_start are one-cycle pulses; a
// LOADING task's reads wait; a write finding the task's buffer
// full waits for it to drain; the read-back copy happens on every task
// completion. The memory master port of the region is passed through only
// while its task is RUNNING or DONE.
//
// Timing: an access that the controller answers itself (held-back write,
// local-copy read, unmapped address) is acknowledged one cycle after it is
// seen; a pass-through access takes the task's latency plus two cycles.
module rtr_controller
  import rtr_pkg::*;
#(
  parameter int unsigned                       NUM_VH     = 2,
  parameter int unsigned                       NREG       = 4,
  parameter int unsigned                       WBUF_DEPTH = 2,
  // Byte base address of each task's register window (task 0 in the low word).
  parameter logic [NUM_VH-1:0][ADDR_W-1:0]     VH_BASE    = {32'h0000_2000, 32'h0000_1000},
  // Registers copied into the local read-back copy when a task finishes.
  parameter logic [NUM_VH-1:0][NREG-1:0]       RB_MASK    = {4'b1000, 4'b1100},
  localparam int unsigned                      TW = (NUM_VH > 1) ? $clog2(NUM_VH) : 1,
  localparam int unsigned                      IW = (NREG > 1) ? $clog2(NREG) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host register bus (from the PLB adapter)
  input  logic                     s_wr,
  input  logic                     s_rd,
  input  logic [ADDR_W-1:0]        s_addr,
  input  logic [DATA_W-1:0]        s_wdata,
  input  logic [3:0]               s_be,
  output logic                     s_ack,
  output logic [DATA_W-1:0]        s_rdata,
  // interrupts to the host processor
  output logic                     irq_block,
  output logic                     irq_unblock,
  output logic [NUM_VH-1:0]        vh_irq,
  // configuration port (to the configuration memory controller)
  output logic                     cfg_start,
  output logic [TW-1:0]            cfg_task,
  input  logic                     cfg_done,
  // reconfigurable region: selection and register bus
  output logic [TW-1:0]            rcp_sel,
  output logic                     rcp_active,
  output logic                     rq_wr,
  output logic                     rq_rd,
  output logic [IW-1:0]            rq_idx,
  output logic [DATA_W-1:0]        rq_wdata,
  output logic [3:0]               rq_be,
  input  logic                     rs_ack,
  input  logic [DATA_W-1:0]        rs_rdata,
  input  logic                     rcp_irq,
  // reconfigurable region: memory master, passed to the system bus
  input  logic                     rcp_m_req,
  input  logic                     rcp_m_we,
  input  logic [ADDR_W-1:0]        rcp_m_addr,
  input  logic [DATA_W-1:0]        rcp_m_wdata,
  output logic                     rcp_m_ack,
  output logic [DATA_W-1:0]        rcp_m_rdata,
  output logic                     m_req,
  output logic                     m_we,
  output logic [ADDR_W-1:0]        m_addr,
  output logic [DATA_W-1:0]        m_wdata,
  input  logic                     m_ack,
  input  logic [DATA_W-1:0]        m_rdata,
  // task states, for status and debug
  output vh_state_t [NUM_VH-1:0]   vh_state
);

  typedef struct packed {
    logic [IW-1:0]     idx;
    logic [3:0]        be;
    logic [DATA_W-1:0] data;
  } wr_entry_t;

  typedef enum logic [1:0] {E_IDLE, E_CFG, E_FWD, E_COPY} eng_t;

  vh_state_t st [NUM_VH];
  logic [TW-1:0] cur;
  logic          cur_valid;
  eng_t          eng;
  logic          h_busy;
  logic          irq_pend;
  logic [IW-1:0] copy_idx;

  // ---------------------------------------------------------------- decode
  logic          hit;
  logic [TW-1:0] h_id;
  logic [IW-1:0] h_idx;
  logic          host_req;

  always_comb begin
    hit  = 1'b0;
    h_id = '0;
    for (int i = 0; i < NUM_VH; i++) begin
      if ((s_addr & ~ADDR_W'(NREG * 4 - 1)) == VH_BASE[i]) begin
        hit  = 1'b1;
        h_id = TW'(i);
      end
    end
  end
  assign h_idx    = s_addr[IW+1:2];
  assign host_req = (s_wr || s_rd) && !s_ack;

  // ---------------------------------------------------------------- queues
  logic          rq_push, rq_pop, rq_empty, rq_full;
  logic [TW-1:0] rq_head;
  logic [$clog2(NUM_VH+1)-1:0] rq_count;

  sync_fifo #(.WIDTH(TW), .DEPTH(NUM_VH)) u_req_fifo (
    .clk, .rst_n,
    .push (rq_push), .din (h_id),
    .pop  (rq_pop),  .dout (rq_head),
    .empty(rq_empty), .full (rq_full), .count (rq_count)
  );

  logic [NUM_VH-1:0] wb_push, wb_pop, wb_empty, wb_full;
  wr_entry_t         wb_head [NUM_VH];
  wr_entry_t         wb_din;
  assign wb_din = '{idx: h_idx, be: s_be, data: s_wdata};

  for (genvar i = 0; i < NUM_VH; i++) begin : g_wbuf
    logic [$clog2(WBUF_DEPTH+1)-1:0] cnt;
    sync_fifo #(.WIDTH($bits(wr_entry_t)), .DEPTH(WBUF_DEPTH)) u_wbuf (
      .clk, .rst_n,
      .push (wb_push[i]), .din (wb_din),
      .pop  (wb_pop[i]),  .dout (wb_head[i]),
      .empty(wb_empty[i]), .full (wb_full[i]), .count (cnt)
    );
  end

  // ------------------------------------------------------ read-back copy
  logic              rb_we;
  logic [DATA_W-1:0] rb_rdata;
  assign rb_we = (eng == E_COPY) && rq_rd && rs_ack;

  readback_regfile #(.NUM_VH(NUM_VH), .NREG(NREG), .DW(DATA_W)) u_rb (
    .clk, .rst_n,
    .wr_en   (rb_we),   .wr_task (cur),  .wr_idx (copy_idx), .wr_data (rs_rdata),
    .rd_task (h_id),    .rd_idx  (h_idx), .rd_data (rb_rdata)
  );

  // ------------------------------------------------------ control decisions
  logic rcp_free, eng_go, pt_ok;
  assign rcp_free = !cur_valid || (st[cur] == VH_DONE);
  assign eng_go   = (eng == E_IDLE) && !h_busy && (irq_pend || (!rq_empty && rcp_free));
  assign pt_ok    = (eng == E_IDLE) && !h_busy && !eng_go;

  // Host write/read classification.
  vh_state_t h_st;
  logic      h_capture, h_first_miss, h_pass, h_local;
  always_comb begin
    h_st         = st[h_id];
    h_capture    = 1'b0;
    h_first_miss = 1'b0;
    h_pass       = 1'b0;
    h_local      = 1'b0;
    if (host_req && !h_busy && hit) begin
      if (s_wr) begin
        unique case (h_st)
          VH_UNLOADED: begin
            h_capture    = !wb_full[h_id];
            h_first_miss = !wb_full[h_id];
          end
          VH_WAITING, VH_LOADING: h_capture = !wb_full[h_id];
          default:
            if (!wb_empty[h_id]) h_capture = !wb_full[h_id];
            else                 h_pass    = pt_ok;
        endcase
      end else begin
        unique case (h_st)
          VH_UNLOADED, VH_WAITING: h_local = 1'b1;
          VH_LOADING:              ;
          default:                 h_pass  = pt_ok && wb_empty[h_id];
        endcase
      end
    end
  end

  always_comb begin
    wb_push = '0;
    if (h_capture) wb_push[h_id] = 1'b1;
  end
  // A first miss goes straight to LOADING when the engine could start it
  // this very cycle; otherwise it is queued.
  logic h_direct;
  assign h_direct = h_first_miss && pt_ok && rcp_free && rq_empty;
  assign rq_push  = h_first_miss && !h_direct;

  assign rq_pop = eng_go && !irq_pend;
  always_comb begin
    wb_pop = '0;
    if ((eng == E_FWD) && rq_wr && rs_ack) wb_pop[cur] = 1'b1;
  end

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_VH; i++) st[i] <= VH_UNLOADED;
      cur         <= '0;
      cur_valid   <= 1'b0;
      eng         <= E_IDLE;
      h_busy      <= 1'b0;
      irq_pend    <= 1'b0;
      copy_idx    <= '0;
      s_ack       <= 1'b0;
      s_rdata     <= '0;
      irq_block   <= 1'b0;
      irq_unblock <= 1'b0;
      vh_irq      <= '0;
      cfg_start   <= 1'b0;
      cfg_task    <= '0;
      rq_wr       <= 1'b0;
      rq_rd       <= 1'b0;
      rq_idx      <= '0;
      rq_wdata    <= '0;
      rq_be       <= '0;
    end else begin
      s_ack       <= 1'b0;
      irq_block   <= 1'b0;
      irq_unblock <= 1'b0;
      vh_irq      <= '0;
      cfg_start   <= 1'b0;

      if (rcp_irq) irq_pend <= 1'b1;

      // ---- host side
      if (host_req && !h_busy) begin
        if (!hit) begin
          s_ack   <= 1'b1;
          s_rdata <= '0;
        end else if (h_capture) begin
          s_ack <= 1'b1;
          if (h_first_miss) begin
            irq_block <= 1'b1;
            if (h_direct) begin
              // Region free and nobody queued: load at once.
              if (cur_valid) st[cur] <= VH_UNLOADED;
              cur       <= h_id;
              cur_valid <= 1'b1;
              st[h_id]  <= VH_LOADING;
              cfg_start <= 1'b1;
              cfg_task  <= h_id;
              eng       <= E_CFG;
            end else begin
              st[h_id] <= VH_WAITING;
            end
          end
        end else if (h_local) begin
          s_ack   <= 1'b1;
          s_rdata <= rb_rdata;
        end else if (h_pass) begin
          h_busy   <= 1'b1;
          rq_wr    <= s_wr;
          rq_rd    <= s_rd;
          rq_idx   <= h_idx;
          rq_wdata <= s_wdata;
          rq_be    <= s_be;
          if (s_wr) st[h_id] <= VH_RUNNING;
        end
      end
      if (h_busy && rs_ack) begin
        h_busy  <= 1'b0;
        rq_wr   <= 1'b0;
        rq_rd   <= 1'b0;
        s_ack   <= 1'b1;
        s_rdata <= rs_rdata;
      end

      // ---- reconfiguration engine
      unique case (eng)
        E_IDLE: if (eng_go) begin
          if (irq_pend) begin
            irq_pend <= rcp_irq;
            st[cur]  <= VH_DONE;
            copy_idx <= '0;
            eng      <= E_COPY;
          end else begin
            if (cur_valid) st[cur] <= VH_UNLOADED;
            cur         <= rq_head;
            cur_valid   <= 1'b1;
            st[rq_head] <= VH_LOADING;
            cfg_start   <= 1'b1;
            cfg_task    <= rq_head;
            eng         <= E_CFG;
          end
        end
        E_CFG: if (cfg_done) begin
          st[cur] <= VH_RUNNING;
          eng     <= E_FWD;
        end
        E_FWD: begin
          if (rq_wr) begin
            if (rs_ack) rq_wr <= 1'b0;
          end else if (!wb_empty[cur]) begin
            rq_wr    <= 1'b1;
            rq_idx   <= wb_head[cur].idx;
            rq_wdata <= wb_head[cur].data;
            rq_be    <= wb_head[cur].be;
          end else begin
            irq_unblock <= 1'b1;
            eng         <= E_IDLE;
          end
        end
        E_COPY: begin
          if (rq_rd) begin
            if (rs_ack) begin
              rq_rd <= 1'b0;
              if (copy_idx == IW'(NREG - 1)) begin
                vh_irq[cur] <= 1'b1;
                eng         <= E_IDLE;
              end else begin
                copy_idx <= copy_idx + 1'b1;
              end
            end
          end else if (RB_MASK[cur][copy_idx]) begin
            rq_rd  <= 1'b1;
            rq_idx <= copy_idx;
          end else if (copy_idx == IW'(NREG - 1)) begin
            vh_irq[cur] <= 1'b1;
            eng         <= E_IDLE;
          end else begin
            copy_idx <= copy_idx + 1'b1;
          end
        end
        default: eng <= E_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- outputs
  assign rcp_sel    = cur;
  assign rcp_active = cur_valid && ((st[cur] == VH_RUNNING) || (st[cur] == VH_DONE));

  always_comb begin
    m_req       = rcp_m_req && rcp_active;
    m_we        = rcp_m_we && rcp_active;
    m_addr      = rcp_m_addr;
    m_wdata     = rcp_m_wdata;
    rcp_m_ack   = m_ack && rcp_active;
    rcp_m_rdata = m_rdata;
  end

  always_comb begin
    for (int i = 0; i < NUM_VH; i++) vh_state[i] = st[i];
  end

  // ---------------------------------------------------------------- checks
  a_req_fifo_never_full: assert property (@(posedge clk) disable iff (!rst_n) !(rq_push && rq_full));
  a_cfg_done_when_loading: assert property (@(posedge clk) disable iff (!rst_n) cfg_done |-> eng == E_CFG);
  a_one_loaded: assert property (@(posedge clk) disable iff (!rst_n)
                                 cur_valid |-> st[cur] != VH_UNLOADED && st[cur] != VH_WAITING);
  a_ack_one_cycle: assert property (@(posedge clk) disable iff (!rst_n) s_ack |=> !s_ack);

endmodule
