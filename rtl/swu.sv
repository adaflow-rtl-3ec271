// swu: flexible Sliding Window Unit (convolution input generator).
//
// Takes an input feature map as a stream of pixels in row-major order, each
// pixel split into cin/SIMD beats of SIMD channels, and emits, for every output
// position (oy, ox), the K x K window in the order ky, kx, channel-fold: the
// column order of the MVTU weight matrix. No padding; OFM = (IFM-K)/STRIDE + 1.
//
// Insides: a line buffer of K+STRIDE rows used as a ring; input rows take the
// slots in turn, continuing across frames. Output row oy can be read once rows
// oy*STRIDE .. oy*STRIDE+K-1 are complete; a new input row r may be written
// while r < oy*STRIDE + K + STRIDE, so writing the next rows overlaps reading
// the current ones. The writer may run up to one frame ahead (flag 'ahead'):
// the first rows of the next frame are written while the last windows of the
// current one are read, so the consumer does not idle at frame boundaries.
//
// Flexibility: cfg_ch is the runtime channel count; it only bounds the
// channel-fold loops. The buffer is sized for CH_WORST (addresses keep the
// worst-case spacing). FLEXIBLE = 0 uses CH_WORST and ignores the port.
//
// Timing: the window read is asynchronous from the buffer, so a window beat
// can be produced every cycle when the needed rows are present; input is
// accepted every cycle when a free row slot exists.
//
// Origin: the unit's role (preparing windows for the MVTU) and its run-time
// channel count follow the published description; the ring line buffer, the
// window order and the handshake are this design's own.
module swu
  import adaflow_pkg::*;
#(
  parameter int unsigned LANE_W   = 2,
  parameter int unsigned SIMD     = 32,
  parameter int unsigned CH_WORST = 64,
  parameter int unsigned IFM      = 30,
  parameter int unsigned K        = 3,
  parameter int unsigned STRIDE   = 1,
  parameter bit          FLEXIBLE = 1'b1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  ch_t                    cfg_ch,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [SIMD*LANE_W-1:0] in_data,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [SIMD*LANE_W-1:0] out_data
);

  localparam int unsigned OFM    = (IFM - K) / STRIDE + 1;
  localparam int unsigned CF_W   = CH_WORST / SIMD;
  localparam int unsigned NROWS  = K + STRIDE;
  localparam int unsigned DEPTH  = NROWS * IFM * CF_W;
  localparam int unsigned RB     = $clog2(IFM + NROWS + 1);
  localparam int unsigned CB     = $clog2(IFM + 1);
  localparam int unsigned FB     = $clog2(CF_W + 1);
  localparam int unsigned SB     = $clog2(NROWS + 1);
  localparam int unsigned KB     = $clog2(K + 1);
  localparam int unsigned AB     = $clog2(DEPTH + 1);

  logic [SIMD*LANE_W-1:0] mem [DEPTH];

  logic [CFG_W-1:0] ch_rt;
  logic [FB-1:0]    cf_n;
  assign ch_rt = FLEXIBLE ? cfg_ch : CFG_W'(CH_WORST);
  assign cf_n  = FB'(32'(ch_rt) / SIMD);

  localparam int unsigned IFM_MOD = IFM % NROWS;  // slot advance per frame

  // ---------------- write side
  logic [RB-1:0] wr_row;     // rows of the writer's frame completed so far
  logic [CB-1:0] wr_col;
  logic [FB-1:0] wr_cf;
  logic [SB-1:0] wr_slot;
  logic          ahead;      // writer is already in the frame after the reader's
  logic          in_fire, wr_row_end;

  // ---------------- read side
  logic [RB-1:0] rd_oy;
  logic [CB-1:0] rd_ox;
  logic [KB-1:0] rd_ky, rd_kx;
  logic [FB-1:0] rd_cf;
  logic [SB-1:0] rd_base;    // slot of row rd_oy*STRIDE
  logic [SB-1:0] rd_fbase;   // slot of row 0 of the reader's frame
  logic          rd_done, rows_ready, out_fire, rd_frame_end;
  logic [SB-1:0] rd_slot;
  logic [31:0]   rd_addr, wr_addr, wr_abs, rd_need;

  // rows are numbered from row 0 of the reader's frame
  assign wr_abs   = ahead ? (IFM + 32'(wr_row)) : 32'(wr_row);
  assign rd_need  = 32'(rd_oy) * STRIDE + NROWS;
  assign in_ready = (wr_abs < rd_need) && !(ahead && 32'(wr_row) == IFM - 1);
  assign in_fire  = in_valid && in_ready;
  assign wr_row_end = in_fire && (wr_cf == cf_n - 1'b1) && (32'(wr_col) == IFM - 1);

  assign rd_done      = (32'(rd_oy) == OFM);
  assign rows_ready   = ahead || (32'(rd_oy) * STRIDE + K <= 32'(wr_row));
  assign out_valid    = !rd_done && rows_ready;
  assign out_fire     = out_valid && out_ready;
  assign rd_frame_end = rd_done && ahead;   // reader moves to the writer's frame

  function automatic logic [SB-1:0] slot_add(logic [SB-1:0] a, int unsigned b);
    return SB'((32'(a) + b) % NROWS);
  endfunction

  always_comb begin
    logic [SB:0] s;
    s = {1'b0, rd_base} + (SB+1)'(rd_ky);
    if (32'(s) >= NROWS) s = s - (SB+1)'(NROWS);
    rd_slot = s[SB-1:0];
  end

  assign rd_addr  = (32'(rd_slot) * IFM + 32'(rd_ox) * STRIDE + 32'(rd_kx)) * CF_W + 32'(rd_cf);
  assign wr_addr  = (32'(wr_slot) * IFM + 32'(wr_col)) * CF_W + 32'(wr_cf);
  assign out_data = mem[AB'(rd_addr)];

  always_ff @(posedge clk) begin
    if (in_fire) mem[AB'(wr_addr)] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_row <= '0; wr_col <= '0; wr_cf <= '0; wr_slot <= '0; ahead <= 1'b0;
      rd_oy <= '0; rd_ox <= '0; rd_ky <= '0; rd_kx <= '0; rd_cf <= '0;
      rd_base <= '0; rd_fbase <= '0;
    end else begin
      // writer
      if (in_fire) begin
        if (wr_cf == cf_n - 1'b1) begin
          wr_cf <= '0;
          if (32'(wr_col) == IFM - 1) begin
            wr_col  <= '0;
            wr_slot <= slot_add(wr_slot, 1);
            if (32'(wr_row) == IFM - 1) wr_row <= '0;   // frame written
            else                        wr_row <= wr_row + 1'b1;
          end else begin
            wr_col <= wr_col + 1'b1;
          end
        end else begin
          wr_cf <= wr_cf + 1'b1;
        end
      end
      // 'ahead' is set when the writer finishes a frame, cleared when the
      // reader finishes one; the writer cannot finish while ahead
      if (wr_row_end && 32'(wr_row) == IFM - 1) ahead <= 1'b1;
      else if (rd_frame_end)                    ahead <= 1'b0;
      // reader
      if (rd_frame_end) begin
        rd_oy    <= '0;
        rd_fbase <= slot_add(rd_fbase, IFM_MOD);
        rd_base  <= slot_add(rd_fbase, IFM_MOD);
      end else if (out_fire) begin
        if (rd_cf == cf_n - 1'b1) begin
          rd_cf <= '0;
          if (32'(rd_kx) == K - 1) begin
            rd_kx <= '0;
            if (32'(rd_ky) == K - 1) begin
              rd_ky <= '0;
              if (32'(rd_ox) == OFM - 1) begin
                rd_ox   <= '0;
                rd_oy   <= rd_oy + 1'b1;
                rd_base <= slot_add(rd_base, STRIDE);
              end else begin
                rd_ox <= rd_ox + 1'b1;
              end
            end else begin
              rd_ky <= rd_ky + 1'b1;
            end
          end else begin
            rd_kx <= rd_kx + 1'b1;
          end
        end else begin
          rd_cf <= rd_cf + 1'b1;
        end
      end
    end
  end

endmodule
