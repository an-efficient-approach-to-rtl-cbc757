// dct_vh: DCT virtual hardware (VH) task. It reads a block of NPT samples
// from memory, computes their one-dimensional DCT and writes the NPT
// coefficients back to memory.
//
// Register map (word index on the task's register bus), as the reference
// system's four DCT control registers:
//   0  in_addr   (read/write) byte address of the first input sample
//   1  out_addr  (read/write) byte address of the first result
//   2  start     (write)      any write starts the transform; reads 0
//   3  done      (read)       0 while busy, 1 when the results are written
// Samples and results occupy one 32-bit word each, at consecutive word
// addresses. A sample is the signed 16-bit value in bits [15:0]; a result
// is a signed 32-bit integer.
//
// Arithmetic: orthonormal DCT-II,
//   X[k] = s(k) * sum_n x[n] * cos((2n+1) k pi / 16),  s(0)=sqrt(1/8), s(k)=1/2,
// with s(k)*cos(...) held as Q1.14 constants (8192*cos(m pi/16) for m=0..8,
// mirrored by symmetry; s(0) folds to 5793) and results rounded to integers.
// Eight multiply-accumulate lanes, one per output k, consume one sample per
// memory read, which matches the eight multipliers the reference DCT uses;
// the transform size, number formats and memory access pattern are this
// design's own choices.
//
// Timing: register bus as in cordic_vh (rs_ack one cycle after a request).
// Memory master: m_req with m_we/m_addr/m_wdata is held until m_ack; read
// data is taken from m_rdata in the m_ack cycle. NPT reads then NPT writes;
// done is set and irq pulses for one cycle after the last write is acked.
module dct_vh
  import rtr_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // register slave
  input  logic                 rq_wr,
  input  logic                 rq_rd,
  input  logic [REG_IDX_W-1:0] rq_idx,
  input  logic [DATA_W-1:0]    rq_wdata,
  input  logic [3:0]           rq_be,
  output logic                 rs_ack,
  output logic [DATA_W-1:0]    rs_rdata,
  output logic                 irq,
  // memory master
  output logic                 m_req,
  output logic                 m_we,
  output logic [ADDR_W-1:0]    m_addr,
  output logic [DATA_W-1:0]    m_wdata,
  input  logic                 m_ack,
  input  logic [DATA_W-1:0]    m_rdata
);

  localparam int unsigned NPT   = 8;
  localparam int unsigned ACC_W = 36;

  typedef enum logic [1:0] {D_IDLE, D_READ, D_WRITE} dstate_t;

  dstate_t                  st;
  logic [DATA_W-1:0]        in_addr, out_addr;
  logic                     done;
  logic [2:0]               n;       // sample / coefficient counter
  logic signed [ACC_W-1:0]  acc [NPT];

  // Scaled cosine s(k)*cos(m*pi/16) for m = 0..8, Q1.14.
  function automatic logic signed [15:0] cos16(input int unsigned m);
    unique case (m)
      0: return 16'sd8192;
      1: return 16'sd8035;
      2: return 16'sd7568;
      3: return 16'sd6811;
      4: return 16'sd5793;
      5: return 16'sd4551;
      6: return 16'sd3135;
      7: return 16'sd1598;
      default: return 16'sd0;
    endcase
  endfunction

  // Coefficient of output k for sample n.
  function automatic logic signed [15:0] coef(input int unsigned k, input int unsigned nn);
    int unsigned m;
    m = ((2 * nn + 1) * k) % 32;
    if (k == 0)       return 16'sd5793;
    else if (m <= 8)  return cos16(m);
    else if (m <= 16) return -cos16(16 - m);
    else if (m <= 24) return -cos16(m - 16);
    else              return cos16(32 - m);
  endfunction

  logic signed [15:0] sample;
  assign sample = signed'(m_rdata[15:0]);

  logic signed [ACC_W-1:0] prod [NPT];
  always_comb begin
    for (int k = 0; k < NPT; k++)
      prod[k] = ACC_W'(sample * coef(k, 32'(n)));
  end

  logic signed [ACC_W-1:0] rounded;
  assign rounded = (acc[n] + ACC_W'(8192)) >>> 14;

  logic req;
  assign req = (rq_wr || rq_rd) && !rs_ack;

  always_comb begin
    m_req   = (st != D_IDLE);
    m_we    = (st == D_WRITE);
    m_addr  = (st == D_WRITE) ? out_addr + {27'h0, n, 2'b00}
                              : in_addr  + {27'h0, n, 2'b00};
    m_wdata = DATA_W'(rounded);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= D_IDLE;
      in_addr  <= '0;
      out_addr <= '0;
      done     <= 1'b0;
      n        <= '0;
      rs_ack   <= 1'b0;
      rs_rdata <= '0;
      irq      <= 1'b0;
      for (int k = 0; k < NPT; k++) acc[k] <= '0;
    end else begin
      rs_ack <= 1'b0;
      irq    <= 1'b0;

      unique case (st)
        D_READ: if (m_ack) begin
          for (int k = 0; k < NPT; k++) acc[k] <= acc[k] + prod[k];
          n <= n + 1'b1;
          if (n == 3'(NPT-1)) st <= D_WRITE;
        end
        D_WRITE: if (m_ack) begin
          n <= n + 1'b1;
          if (n == 3'(NPT-1)) begin
            st   <= D_IDLE;
            done <= 1'b1;
            irq  <= 1'b1;
          end
        end
        default: ;
      endcase

      if (req) begin
        rs_ack <= 1'b1;
        if (rq_wr) begin
          unique case (rq_idx)
            2'd0: for (int b = 0; b < 4; b++) if (rq_be[b]) in_addr[8*b +: 8]  <= rq_wdata[8*b +: 8];
            2'd1: for (int b = 0; b < 4; b++) if (rq_be[b]) out_addr[8*b +: 8] <= rq_wdata[8*b +: 8];
            2'd2: if (st == D_IDLE) begin
              st   <= D_READ;
              n    <= '0;
              done <= 1'b0;
              for (int k = 0; k < NPT; k++) acc[k] <= '0;
            end
            default: ;  // done is read-only
          endcase
        end else begin
          unique case (rq_idx)
            2'd0:    rs_rdata <= in_addr;
            2'd1:    rs_rdata <= out_addr;
            2'd3:    rs_rdata <= {31'h0, done};
            default: rs_rdata <= '0;
          endcase
        end
      end
    end
  end

  a_one_request: assert property (@(posedge clk) disable iff (!rst_n) !(rq_wr && rq_rd));
  a_mreq_hold:   assert property (@(posedge clk) disable iff (!rst_n) m_req && !m_ack |=> m_req);

endmodule
