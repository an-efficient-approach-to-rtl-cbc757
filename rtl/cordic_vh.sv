// cordic_vh: CORDIC virtual hardware (VH) task, computing the cosine of an
// angle written by software.
//
// Register map (word index on the task's register bus):
//   0  angle   (read/write) 16-bit binary angle in bits [15:0]:
//              0x4000 = +pi/2, 0x8000 = -pi (two's complement turn fraction)
//   1  start   (write)      any write starts a calculation; reads 0
//   2  done    (read)       0 while calculating, 1 after the result is ready
//   3  cos     (read)       cosine, Q1.14 (16384 = 1.0), sign-extended
// The order angle / start / done / cos follows the driver code of the
// reference system; the number formats are this design's own choice.
//
// How it works: the angle is first folded into [-pi/2, pi/2] by a quarter
// turn pre-rotation, then ITER rotation-mode CORDIC micro-rotations run, one
// per clock, starting from x = K (the CORDIC gain compensation constant
// 0.60725) and y = 0. The datapath carries guard bits: the residual angle has
// 4 bits below the input angle's LSB (the arctangent table holds
// round(atan(2^-i) / pi * 2^19) for i = 0..15) and x/y are Q1.17 (K = 79594),
// rounded to Q1.14 at the end. The cosine is then within 1.5 LSB of exact
// over the whole circle.
//
// Bus timing: a request (rq_wr or rq_rd, held until acknowledged) is
// answered by a one-cycle rs_ack in the next cycle; rs_rdata is valid with
// rs_ack. Start to done takes ITER+1 cycles after the start write is
// acknowledged; irq pulses for one cycle when done is set, as the task
// interrupt the reference design requires on completion.
module cordic_vh
  import rtr_pkg::*;
#(
  parameter int unsigned ITER = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 rq_wr,
  input  logic                 rq_rd,
  input  logic [REG_IDX_W-1:0] rq_idx,
  input  logic [DATA_W-1:0]    rq_wdata,
  input  logic [3:0]           rq_be,
  output logic                 rs_ack,
  output logic [DATA_W-1:0]    rs_rdata,
  output logic                 irq
);

  localparam int unsigned XG = 3;             // x/y guard bits
  localparam int unsigned ZG = 4;             // angle guard bits
  localparam int unsigned XW = 20;            // x/y datapath width, Q1.17
  localparam int unsigned ZW = 21;            // residual angle width
  localparam logic signed [XW-1:0] K_INIT = 20'sd79594;

  localparam logic [17:0] ATAN [16] = '{
    18'd131072, 18'd77376, 18'd40884, 18'd20753, 18'd10417, 18'd5213, 18'd2607, 18'd1304,
    18'd652,    18'd326,   18'd163,   18'd81,    18'd41,    18'd20,   18'd10,   18'd5
  };

  logic [15:0]           angle;
  logic                  done;
  logic                  busy;
  logic [4:0]            step;
  logic signed [XW-1:0]  x, y;
  logic signed [ZW-1:0]  z;
  logic signed [XW-1:0]  cos_q;
  logic signed [ZW-1:0]  z_init;

  logic req;
  assign req = (rq_wr || rq_rd) && !rs_ack;

  // One micro-rotation.
  logic signed [XW-1:0] x_sh, y_sh;
  logic signed [ZW-1:0] atan_i;
  assign x_sh   = x >>> step;
  assign y_sh   = y >>> step;
  assign atan_i = ZW'(signed'({1'b0, ATAN[step[3:0]]}));

  // Folded start angle with guard bits.
  always_comb begin
    unique case (angle[15:14])
      2'b01:   z_init = ZW'(signed'(angle - 16'h4000)) <<< ZG;
      2'b10:   z_init = ZW'(signed'(angle + 16'h4000)) <<< ZG;
      default: z_init = ZW'(signed'(angle)) <<< ZG;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      angle    <= '0;
      done     <= 1'b0;
      busy     <= 1'b0;
      step     <= '0;
      x        <= '0;
      y        <= '0;
      z        <= '0;
      cos_q    <= '0;
      rs_ack   <= 1'b0;
      rs_rdata <= '0;
      irq      <= 1'b0;
    end else begin
      rs_ack <= 1'b0;
      irq    <= 1'b0;

      if (busy) begin
        if (!z[ZW-1]) begin
          x <= x - y_sh;
          y <= y + x_sh;
          z <= z - atan_i;
        end else begin
          x <= x + y_sh;
          y <= y - x_sh;
          z <= z + atan_i;
        end
        step <= step + 1'b1;
        if (step == 5'(ITER-1)) begin
          busy <= 1'b0;
        end
      end else if (step == 5'(ITER)) begin
        // Result of the last micro-rotation is now in x; round to Q1.14.
        cos_q <= (x + XW'(1 << (XG - 1))) >>> XG;
        done  <= 1'b1;
        irq   <= 1'b1;
        step  <= '0;
      end

      if (req) begin
        rs_ack <= 1'b1;
        if (rq_wr) begin
          unique case (rq_idx)
            2'd0: begin
              if (rq_be[0]) angle[7:0]  <= rq_wdata[7:0];
              if (rq_be[1]) angle[15:8] <= rq_wdata[15:8];
            end
            2'd1: begin
              // Quarter-turn pre-rotation into [-pi/2, pi/2].
              unique case (angle[15:14])
                2'b01:   begin x <= '0;     y <= K_INIT;  end
                2'b10:   begin x <= '0;     y <= -K_INIT; end
                default: begin x <= K_INIT; y <= '0;      end
              endcase
              z    <= z_init;
              step <= '0;
              busy <= 1'b1;
              done <= 1'b0;
            end
            default: ;  // done and cos are read-only
          endcase
        end else begin
          unique case (rq_idx)
            2'd0:    rs_rdata <= {16'h0, angle};
            2'd2:    rs_rdata <= {31'h0, done};
            2'd3:    rs_rdata <= DATA_W'(cos_q);
            default: rs_rdata <= '0;
          endcase
        end
      end
    end
  end

  a_one_request: assert property (@(posedge clk) disable iff (!rst_n) !(rq_wr && rq_rd));

endmodule
