// readback_regfile: the RTR controller's local copy of the read-back
// registers of every VH task.
//
// When a task finishes, the controller reads the task's result and status
// registers and stores them here, so software can still read them after the
// task has been swapped out of the reconfigurable region. Reads of a task
// that is not configured are answered from this copy.
//
// Interface: one synchronous write port (wr_en, wr_task, wr_idx, wr_data)
// and one combinational read port (rd_task, rd_idx -> rd_data). Every entry
// resets to zero, so a task never run reads back as "not done".
// Only the registers selected by the controller's read-back mask are ever
// written; the others stay zero. Reset to zero is this design's choice.
module readback_regfile #(
  parameter int unsigned NUM_VH = 2,
  parameter int unsigned NREG   = 4,
  parameter int unsigned DW     = 32,
  localparam int unsigned TW    = (NUM_VH > 1) ? $clog2(NUM_VH) : 1,
  localparam int unsigned IW    = (NREG > 1) ? $clog2(NREG) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [TW-1:0] wr_task,
  input  logic [IW-1:0] wr_idx,
  input  logic [DW-1:0] wr_data,
  input  logic [TW-1:0] rd_task,
  input  logic [IW-1:0] rd_idx,
  output logic [DW-1:0] rd_data
);

  logic [DW-1:0] regs [NUM_VH][NREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NUM_VH; t++)
        for (int r = 0; r < NREG; r++)
          regs[t][r] <= '0;
    end else if (wr_en) begin
      regs[wr_task][wr_idx] <= wr_data;
    end
  end

  assign rd_data = regs[rd_task][rd_idx];

endmodule
