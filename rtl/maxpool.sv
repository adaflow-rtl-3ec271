// maxpool: flexible streaming max pool, POOL x POOL window with stride POOL.
//
// Each input beat is one whole pixel: CH_WORST unsigned activation lanes, so the
// comparators are unrolled over the worst-case channel count. With a runtime
// channel count cfg_ch below CH_WORST, the lanes at and above cfg_ch are not
// fed (forced to zero) and their comparators idle; that is the price of
// unrolling on a runtime-controlled bound. FLEXIBLE = 0 feeds all lanes.
//
// Insides: one row buffer of OFM partial maxima. For an input at (y, x) the
// pool column px = x/POOL collects the running maximum; at the last pixel of
// a window (ky = kx = POOL-1) the maximum is sent out instead of stored.
// Rows or columns past OFM*POOL are consumed and dropped.
//
// Timing: one pixel per cycle; the output beat is registered (one cycle after
// the window's last pixel) and back-pressure stalls the input.
//
// Origin: unrolling over the worst-case channel count with unfed lanes for a
// smaller run-time count follows the published description; the 2x2 window,
// the row buffer and the handshake are this design's own.
module maxpool
  import adaflow_pkg::*;
#(
  parameter int unsigned LANE_W   = 2,
  parameter int unsigned CH_WORST = 64,
  parameter int unsigned IFM      = 28,
  parameter int unsigned POOL     = 2,
  parameter bit          FLEXIBLE = 1'b1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  ch_t                        cfg_ch,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [CH_WORST*LANE_W-1:0] in_data,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [CH_WORST*LANE_W-1:0] out_data
);

  localparam int unsigned OFM = IFM / POOL;
  localparam int unsigned CB  = $clog2(IFM + 1);
  localparam int unsigned PB  = $clog2(POOL + 1);

  logic [CH_WORST*LANE_W-1:0] rowbuf [OFM];

  logic [CB-1:0] y, px, py;
  logic [PB-1:0] kx, ky;
  logic          in_fire, in_win, first, last;
  logic [CFG_W-1:0] ch_rt;
  logic [CH_WORST*LANE_W-1:0] merged;

  assign ch_rt    = FLEXIBLE ? cfg_ch : CFG_W'(CH_WORST);
  assign in_ready = !out_valid || out_ready;
  assign in_fire  = in_valid && in_ready;
  assign in_win   = (32'(px) < OFM) && (32'(py) < OFM);
  assign first    = (kx == '0) && (ky == '0);
  assign last     = (32'(kx) == POOL - 1) && (32'(ky) == POOL - 1);

  always_comb begin
    for (int c = 0; c < CH_WORST; c++) begin
      logic [LANE_W-1:0] a, b;
      a = (c < 32'(ch_rt)) ? in_data[c*LANE_W +: LANE_W] : '0;
      b = rowbuf[px < CB'(OFM) ? px : '0][c*LANE_W +: LANE_W];
      merged[c*LANE_W +: LANE_W] = (first || a > b) ? a : b;
    end
  end

  always_ff @(posedge clk) begin
    if (in_fire && in_win && !last) rowbuf[px] <= merged;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y <= '0; px <= '0; py <= '0; kx <= '0; ky <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_fire) begin
        if (in_win && last) begin
          out_valid <= 1'b1;
          out_data  <= merged;
        end
        // advance the (y, x) position, kept as pool index + offset
        if (32'(px) * POOL + 32'(kx) == IFM - 1) begin
          px <= '0; kx <= '0;
          if (32'(y) == IFM - 1) begin
            y <= '0; py <= '0; ky <= '0;
          end else begin
            y <= y + 1'b1;
            if (32'(ky) == POOL - 1) begin ky <= '0; py <= py + 1'b1; end
            else ky <= ky + 1'b1;
          end
        end else if (32'(kx) == POOL - 1) begin
          kx <= '0; px <= px + 1'b1;
        end else begin
          kx <= kx + 1'b1;
        end
      end
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
