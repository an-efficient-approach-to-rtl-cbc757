// rcp_region: the reconfigurable (dynamic) region holding one virtual
// hardware (VH) task at a time: the CORDIC task (task 0) or the DCT task
// (task 1).
//
// On the FPGA the region is physically rewritten by a partial bitstream.
// Here each task is instantiated once and "configured" by a switch in the
// manner of dynamic circuit switching: the task selected by cfg_sel is
// connected while cfg_active is high; every other task is held in reset and
// cut off from the register bus, the memory master port and the interrupt,
// exactly as if its logic were not present. Loading a task therefore always
// starts it from its reset state, as a fresh configuration does.
//
// Interface: the register slave (rq_*/rs_*), completion interrupt (irq) and
// memory master (m_*) ports of the selected task, as seen through the bus
// macros of the static/dynamic boundary. cfg_sel/cfg_active come from the
// RTR controller. Timing: the connection switches one cycle after
// cfg_sel/cfg_active change (a registered enable per task); bus timing is
// that of the tasks. The switch model is this design's own choice.
module rcp_region
  import rtr_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_sel,
  input  logic                 cfg_active,
  input  logic                 rq_wr,
  input  logic                 rq_rd,
  input  logic [REG_IDX_W-1:0] rq_idx,
  input  logic [DATA_W-1:0]    rq_wdata,
  input  logic [3:0]           rq_be,
  output logic                 rs_ack,
  output logic [DATA_W-1:0]    rs_rdata,
  output logic                 irq,
  output logic                 m_req,
  output logic                 m_we,
  output logic [ADDR_W-1:0]    m_addr,
  output logic [DATA_W-1:0]    m_wdata,
  input  logic                 m_ack,
  input  logic [DATA_W-1:0]    m_rdata
);

  logic [1:0] en;        // en[i]: task i is configured and connected
  logic [1:0] task_rst_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) en <= '0;
    else begin
      en[VH_CORDIC] <= cfg_active && (cfg_sel == 1'(VH_CORDIC));
      en[VH_DCT]    <= cfg_active && (cfg_sel == 1'(VH_DCT));
    end
  end
  assign task_rst_n = {rst_n && en[1], rst_n && en[0]};

  // CORDIC task
  logic              c_ack, c_irq;
  logic [DATA_W-1:0] c_rdata;

  cordic_vh u_cordic (
    .clk      (clk),
    .rst_n    (task_rst_n[VH_CORDIC]),
    .rq_wr    (rq_wr && en[VH_CORDIC]),
    .rq_rd    (rq_rd && en[VH_CORDIC]),
    .rq_idx   (rq_idx),
    .rq_wdata (rq_wdata),
    .rq_be    (rq_be),
    .rs_ack   (c_ack),
    .rs_rdata (c_rdata),
    .irq      (c_irq)
  );

  // DCT task
  logic              d_ack, d_irq, d_mreq, d_mwe;
  logic [DATA_W-1:0] d_rdata, d_mwdata;
  logic [ADDR_W-1:0] d_maddr;

  dct_vh u_dct (
    .clk      (clk),
    .rst_n    (task_rst_n[VH_DCT]),
    .rq_wr    (rq_wr && en[VH_DCT]),
    .rq_rd    (rq_rd && en[VH_DCT]),
    .rq_idx   (rq_idx),
    .rq_wdata (rq_wdata),
    .rq_be    (rq_be),
    .rs_ack   (d_ack),
    .rs_rdata (d_rdata),
    .irq      (d_irq),
    .m_req    (d_mreq),
    .m_we     (d_mwe),
    .m_addr   (d_maddr),
    .m_wdata  (d_mwdata),
    .m_ack    (m_ack && en[VH_DCT]),
    .m_rdata  (m_rdata)
  );

  // Isolation: only the connected task drives the boundary.
  always_comb begin
    rs_ack   = (en[VH_CORDIC] && c_ack) || (en[VH_DCT] && d_ack);
    rs_rdata = en[VH_DCT] ? d_rdata : (en[VH_CORDIC] ? c_rdata : '0);
    irq      = (en[VH_CORDIC] && c_irq) || (en[VH_DCT] && d_irq);
    m_req    = en[VH_DCT] && d_mreq;
    m_we     = en[VH_DCT] && d_mwe;
    m_addr   = en[VH_DCT] ? d_maddr  : '0;
    m_wdata  = en[VH_DCT] ? d_mwdata : '0;
  end

  a_onehot_en: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(en));

endmodule
