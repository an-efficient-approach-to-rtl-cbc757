// rtr_top: the reconfigurable coprocessor subsystem: RTR controller plus the
// reconfigurable region with its CORDIC and DCT virtual hardware tasks.
//
// Software drives the two tasks through ordinary memory-mapped registers
// (CORDIC at byte address 0x1000, DCT at 0x2000, four 32-bit registers
// each). Whether a task is currently in the region is invisible to it: a
// write to a task that is not loaded is held back, the task is queued for
// reconfiguration and irq_block asks the operating system to block the
// caller; irq_unblock reports that the task is loaded and the held-back
// writes have reached it. vh_irq[i] reports that task i finished and its
// results are in the controller's read-back copy.
//
// Ports: host register bus (s_*), interrupts, configuration port (cfg_start
// with cfg_task, answered by cfg_done when the partial bitstream is in) and
// the memory master port (m_*) through which the DCT task reads its input
// and writes its results. The processor, system bus adapter and
// configuration memory controller are outside. Timing and protocols are
// those of rtr_controller.
module rtr_top
  import rtr_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 s_wr,
  input  logic                 s_rd,
  input  logic [ADDR_W-1:0]    s_addr,
  input  logic [DATA_W-1:0]    s_wdata,
  input  logic [3:0]           s_be,
  output logic                 s_ack,
  output logic [DATA_W-1:0]    s_rdata,
  output logic                 irq_block,
  output logic                 irq_unblock,
  output logic [1:0]           vh_irq,
  output logic                 cfg_start,
  output logic                 cfg_task,
  input  logic                 cfg_done,
  output logic                 m_req,
  output logic                 m_we,
  output logic [ADDR_W-1:0]    m_addr,
  output logic [DATA_W-1:0]    m_wdata,
  input  logic                 m_ack,
  input  logic [DATA_W-1:0]    m_rdata,
  output vh_state_t [1:0]      vh_state
);

  logic                 rcp_sel, rcp_active;
  logic                 rq_wr, rq_rd, rs_ack, rcp_irq;
  logic [REG_IDX_W-1:0] rq_idx;
  logic [DATA_W-1:0]    rq_wdata, rs_rdata;
  logic [3:0]           rq_be;
  logic                 r_m_req, r_m_we, r_m_ack;
  logic [ADDR_W-1:0]    r_m_addr;
  logic [DATA_W-1:0]    r_m_wdata, r_m_rdata;

  rtr_controller #(
    .NUM_VH (2),
    .NREG   (4)
  ) u_ctrl (
    .clk, .rst_n,
    .s_wr, .s_rd, .s_addr, .s_wdata, .s_be, .s_ack, .s_rdata,
    .irq_block, .irq_unblock, .vh_irq,
    .cfg_start, .cfg_task, .cfg_done,
    .rcp_sel, .rcp_active,
    .rq_wr, .rq_rd, .rq_idx, .rq_wdata, .rq_be, .rs_ack, .rs_rdata, .rcp_irq,
    .rcp_m_req   (r_m_req),
    .rcp_m_we    (r_m_we),
    .rcp_m_addr  (r_m_addr),
    .rcp_m_wdata (r_m_wdata),
    .rcp_m_ack   (r_m_ack),
    .rcp_m_rdata (r_m_rdata),
    .m_req, .m_we, .m_addr, .m_wdata, .m_ack, .m_rdata,
    .vh_state
  );

  rcp_region u_region (
    .clk, .rst_n,
    .cfg_sel    (rcp_sel),
    .cfg_active (rcp_active),
    .rq_wr, .rq_rd, .rq_idx, .rq_wdata, .rq_be, .rs_ack, .rs_rdata,
    .irq        (rcp_irq),
    .m_req      (r_m_req),
    .m_we       (r_m_we),
    .m_addr     (r_m_addr),
    .m_wdata    (r_m_wdata),
    .m_ack      (r_m_ack),
    .m_rdata    (r_m_rdata)
  );

endmodule
