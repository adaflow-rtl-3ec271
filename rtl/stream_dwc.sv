// stream_dwc: flexible stream width converter.
//
// Re-folds a stream of pixels from IN_L lanes per beat to OUT_L lanes per beat,
// for example from the PE-wide output of one MVTU to the SIMD-wide input of the
// next layer, or to and from the whole-pixel stream of the max pool. A pixel
// has ch lanes, the runtime channel count cfg_ch (CH_WORST when FLEXIBLE = 0),
// which must be a multiple of both IN_L and OUT_L, except on a whole-pixel side
// (lanes = CH_WORST), which always carries one beat per pixel whose lanes at and
// above ch are left over from earlier pixels and must be ignored downstream.
//
// Insides: a one-pixel buffer of CH_WORST lanes. It collects ch/IN_L input
// beats, then emits ch/OUT_L output beats, then collects the next pixel. When
// IN_L equals OUT_L the stream passes straight through.
//
// Timing: ch/IN_L + ch/OUT_L cycles per pixel; this is far below the cycles an
// MVTU spends per pixel, so the converter never limits the dataflow rate.
//
// Origin: the description only implies this unit, through the rule tying each
// layer's PE count to the next layer's SIMD count; its structure is this
// design's own.
module stream_dwc
  import adaflow_pkg::*;
#(
  parameter int unsigned LANE_W   = 2,
  parameter int unsigned IN_L     = 16,
  parameter int unsigned OUT_L    = 32,
  parameter int unsigned CH_WORST = 64,
  parameter bit          FLEXIBLE = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  ch_t                     cfg_ch,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [IN_L*LANE_W-1:0]  in_data,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [OUT_L*LANE_W-1:0] out_data
);

  if (IN_L == OUT_L) begin : g_pass
    assign in_ready  = out_ready;
    assign out_valid = in_valid;
    assign out_data  = in_data;
  end else begin : g_conv
    localparam int unsigned NI = CH_WORST / IN_L;
    localparam int unsigned NO = CH_WORST / OUT_L;
    localparam int unsigned IB = $clog2(NI + 1);
    localparam int unsigned OB = $clog2(NO + 1);

    logic [CH_WORST*LANE_W-1:0] pix;
    logic [CFG_W-1:0]           ch_rt;
    logic [IB-1:0]              icnt, ni_rt;
    logic [OB-1:0]              ocnt, no_rt;
    logic                       emit;

    assign ch_rt     = FLEXIBLE ? cfg_ch : CFG_W'(CH_WORST);
    // beats per pixel; a whole-pixel side (lanes = CH_WORST) always takes one
    assign ni_rt     = IB'((32'(ch_rt) + IN_L - 1) / IN_L);
    assign no_rt     = OB'((32'(ch_rt) + OUT_L - 1) / OUT_L);
    assign in_ready  = !emit;
    assign out_valid = emit;
    assign out_data  = pix[32'(ocnt)*OUT_L*LANE_W +: OUT_L*LANE_W];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        pix  <= '0;
        icnt <= '0;
        ocnt <= '0;
        emit <= 1'b0;
      end else if (!emit) begin
        if (in_valid) begin
          pix[32'(icnt)*IN_L*LANE_W +: IN_L*LANE_W] <= in_data;
          if (icnt == ni_rt - 1'b1) begin
            icnt <= '0;
            emit <= 1'b1;
          end else begin
            icnt <= icnt + 1'b1;
          end
        end
      end else if (out_ready) begin
        if (ocnt == no_rt - 1'b1) begin
          ocnt <= '0;
          emit <= 1'b0;
        end else begin
          ocnt <= ocnt + 1'b1;
        end
      end
    end
  end

endmodule
