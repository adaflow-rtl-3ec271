// adaflow_accel: Flexible-Pruning dataflow CNN accelerator.
//
// A feed-forward chain with one hardware stage per CNN layer. A convolution
// layer is a Sliding Window Unit (swu) feeding a Matrix-Vector-Threshold Unit
// (mvtu); a fully connected layer (K = 1 on a 1x1 map) is an mvtu alone. A 2x2
// max pool follows the layers marked in L_POOL. Between stages, stream_dwc
// re-folds the PE-wide output of one layer into the SIMD-wide input of the next
// (or into whole pixels for the max pool). All stages run concurrently on
// valid/ready streams, so the frame rate is set by the slowest layer.
//
// Flexibility: every stage reads its channel counts at run time from
// model_switch_ctrl (16-bit values, one per layer output). A pruned model,
// whose layers have fewer filters, runs on the same hardware with shorter fold
// loops; switching models only needs the dataflow to drain, new channel
// counts and new weights, not a new bitstream. FLEXIBLE = 0 turns the design
// into a fixed accelerator for the channel counts given as parameters (all
// runtime counts ignored); a Fixed-Pruning accelerator is that with the pruned
// counts as L_COUT.
//
// Interfaces:
//   in_*   image stream, row-major pixels, CIN0/SIMD_0 beats per pixel of
//          SIMD_0 unsigned IN0_W-bit channels (one 24-bit pixel per beat for CNV);
//   out_*  class scores, COUT_last/PE_last beats per frame of PE_last signed
//          ACC_W-bit accumulators (no activation on the last layer);
//   sw_req/drained/cfg_*  model switch protocol (see model_switch_ctrl);
//   wr_*   weight and threshold writes for layer wr_layer (see mvtu for the
//          word layout); accepted only while drained.
// The host must load weights and thresholds (one switch window after reset)
// before the first frame.
//
// Origin: a dataflow chain of SWU/MVTU/MaxPool stages, synthesized for the
// not-pruned network with run-time channel counts, and the fixed variant
// without that logic, follow the published description. The CNV layer table
// and folding, the width converters, the loadable weights and the switch
// controller are this design's own choices.
module adaflow_accel
  import adaflow_pkg::*;
#(
  parameter int unsigned NL          = CNV_NL,
  parameter int unsigned L_K    [NL] = CNV_K,
  parameter int unsigned L_IFM  [NL] = CNV_IFM,
  parameter int unsigned L_COUT [NL] = CNV_COUT,
  parameter int unsigned L_PE   [NL] = CNV_PE,
  parameter int unsigned L_SIMD [NL] = CNV_SIMD,
  parameter int unsigned L_POOL [NL] = CNV_POOL,
  parameter int unsigned CIN0        = CNV_CIN0,
  parameter int unsigned IN0_W       = CNV_IN0_W,
  parameter int unsigned ABITS       = CNV_ABITS,
  parameter int unsigned WBITS       = CNV_WBITS,
  parameter int unsigned ACC_W       = CNV_ACC_W,
  parameter bit          FLEXIBLE    = 1'b1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // image input
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [L_SIMD[0]*IN0_W-1:0]    in_data,
  // class scores
  output logic                          out_valid,
  input  logic                          out_ready,
  output logic [L_PE[NL-1]*ACC_W-1:0]   out_data,
  // model switch and channel configuration
  input  logic                          sw_req,
  output logic                          drained,
  input  logic                          cfg_we,
  input  logic [3:0]                    cfg_layer,
  input  ch_t                           cfg_value,
  output logic                          cfg_err,
  output ch_t                           cout_rt [NL],
  output logic [15:0]                   switch_cnt,
  // weight / threshold load
  input  logic                          wr_en,
  input  logic [3:0]                    wr_layer,
  input  mem_sel_e                      wr_sel,
  input  logic [WR_ADDR_W-1:0]          wr_addr,
  input  logic [wr_width()-1:0]         wr_data
);

  localparam int unsigned NTH = n_thresh(ABITS);

  function automatic int unsigned lane_w(int unsigned i);
    return (i == NL - 1) ? ACC_W : ABITS;
  endfunction

  function automatic int unsigned wr_width();
    int unsigned w = 1;
    for (int unsigned i = 0; i < NL; i++) begin
      w = imax(w, L_PE[i] * L_SIMD[i] * WBITS);
      w = imax(w, L_PE[i] * ((i == NL - 1) ? 1 : n_thresh(ABITS)) * ACC_W);
    end
    return w;
  endfunction

  function automatic int unsigned bus_width();
    int unsigned w = L_SIMD[0] * IN0_W;
    for (int unsigned i = 0; i < NL; i++) w = imax(w, L_PE[i] * lane_w(i));
    return w;
  endfunction

  localparam int unsigned BUS_W     = bus_width();
  localparam int unsigned WR_W      = wr_width();
  localparam int unsigned IN_BEATS  = L_IFM[0] * L_IFM[0] * CIN0 / L_SIMD[0];
  localparam int unsigned OUT_BEATS = L_COUT[NL-1] / L_PE[NL-1];

  // inter-layer streams: s_*[i] enters layer i, s_*[NL] is the output
  logic             s_valid [NL+1];
  logic             s_ready [NL+1];
  logic [BUS_W-1:0] s_data  [NL+1];

  // ---------------- model switch controller
  model_switch_ctrl #(
    .NL(NL), .COUT(L_COUT), .PE(L_PE), .SIMD(L_SIMD),
    .IN_BEATS(IN_BEATS), .OUT_BEATS(OUT_BEATS)
  ) u_ctrl (
    .clk, .rst_n,
    .sw_req, .drained, .cfg_we, .cfg_layer, .cfg_value, .cfg_err,
    .cout_rt, .switch_cnt,
    .s_valid(in_valid), .s_ready(in_ready),
    .m_valid(s_valid[0]), .m_ready(s_ready[0]),
    .out_fire(out_valid && out_ready)
  );

  assign s_data[0] = BUS_W'(in_data);

  // ---------------- layers
  for (genvar i = 0; i < NL; i++) begin : g_layer
    localparam int unsigned LIN   = (i == 0) ? IN0_W : ABITS;
    localparam int unsigned CIN   = (i == 0) ? CIN0 : L_COUT[(i == 0) ? 0 : i-1];
    localparam int unsigned PREVL = (i == 0) ? L_SIMD[0] : L_PE[(i == 0) ? 0 : i-1];
    localparam bit          POOLI = (i == 0) ? 1'b0 : (L_POOL[(i == 0) ? 0 : i-1] != 0);
    localparam int unsigned PIFM  = (i == 0) ? 1 : L_IFM[(i == 0) ? 0 : i-1] - L_K[(i == 0) ? 0 : i-1] + 1;
    localparam int unsigned SIMD  = L_SIMD[i];
    localparam int unsigned PE    = L_PE[i];
    localparam int unsigned OUTL  = lane_w(i);
    localparam bit          LAST  = (i == NL - 1);

    ch_t cin_rt;
    assign cin_rt = (i == 0) ? CFG_W'(CIN0) : cout_rt[(i == 0) ? 0 : i-1];

    // vector stream into the window generator
    logic                  v_valid, v_ready;
    logic [SIMD*LIN-1:0]   v_data;
    // window stream into the MVTU
    logic                  w_valid, w_ready;
    logic [SIMD*LIN-1:0]   w_data;
    logic [PE*OUTL-1:0]    m_data;

    if (i == 0) begin : g_first
      assign v_valid     = s_valid[0];
      assign s_ready[0]  = v_ready;
      assign v_data      = s_data[0][SIMD*LIN-1:0];
    end else if (POOLI) begin : g_pool
      logic                 a_valid, a_ready, p_valid, p_ready;
      logic [CIN*LIN-1:0]   a_data, p_data;
      stream_dwc #(.LANE_W(LIN), .IN_L(PREVL), .OUT_L(CIN), .CH_WORST(CIN), .FLEXIBLE(FLEXIBLE)) u_dwc_a (
        .clk, .rst_n, .cfg_ch(cin_rt),
        .in_valid(s_valid[i]), .in_ready(s_ready[i]), .in_data(s_data[i][PREVL*LIN-1:0]),
        .out_valid(a_valid), .out_ready(a_ready), .out_data(a_data));
      maxpool #(.LANE_W(LIN), .CH_WORST(CIN), .IFM(PIFM), .POOL(2), .FLEXIBLE(FLEXIBLE)) u_pool (
        .clk, .rst_n, .cfg_ch(cin_rt),
        .in_valid(a_valid), .in_ready(a_ready), .in_data(a_data),
        .out_valid(p_valid), .out_ready(p_ready), .out_data(p_data));
      stream_dwc #(.LANE_W(LIN), .IN_L(CIN), .OUT_L(SIMD), .CH_WORST(CIN), .FLEXIBLE(FLEXIBLE)) u_dwc_b (
        .clk, .rst_n, .cfg_ch(cin_rt),
        .in_valid(p_valid), .in_ready(p_ready), .in_data(p_data),
        .out_valid(v_valid), .out_ready(v_ready), .out_data(v_data));
    end else begin : g_dwc
      stream_dwc #(.LANE_W(LIN), .IN_L(PREVL), .OUT_L(SIMD), .CH_WORST(CIN), .FLEXIBLE(FLEXIBLE)) u_dwc (
        .clk, .rst_n, .cfg_ch(cin_rt),
        .in_valid(s_valid[i]), .in_ready(s_ready[i]), .in_data(s_data[i][PREVL*LIN-1:0]),
        .out_valid(v_valid), .out_ready(v_ready), .out_data(v_data));
    end

    if (L_K[i] > 1 || L_IFM[i] > 1) begin : g_swu
      swu #(.LANE_W(LIN), .SIMD(SIMD), .CH_WORST(CIN), .IFM(L_IFM[i]), .K(L_K[i]),
            .STRIDE(1), .FLEXIBLE(FLEXIBLE)) u_swu (
        .clk, .rst_n, .cfg_ch(cin_rt),
        .in_valid(v_valid), .in_ready(v_ready), .in_data(v_data),
        .out_valid(w_valid), .out_ready(w_ready), .out_data(w_data));
    end else begin : g_fc
      assign w_valid = v_valid;
      assign v_ready = w_ready;
      assign w_data  = v_data;
    end

    mvtu #(
      .IN_W(LIN), .IN_SIGNED(1'b0), .SIMD(SIMD), .PE(PE), .K(L_K[i]),
      .CIN_WORST(CIN), .COUT_WORST(L_COUT[i]), .W_BITS(WBITS), .ACC_W(ACC_W),
      .NT(LAST ? 0 : NTH), .FLEXIBLE(FLEXIBLE), .OUT_W(OUTL), .WR_W(WR_W)
    ) u_mvtu (
      .clk, .rst_n, .cfg_cin(cin_rt), .cfg_cout(cout_rt[i]),
      .wr_en(wr_en && drained && 32'(wr_layer) == i), .wr_sel, .wr_addr, .wr_data,
      .in_valid(w_valid), .in_ready(w_ready), .in_data(w_data),
      .out_valid(s_valid[i+1]), .out_ready(s_ready[i+1]), .out_data(m_data));

    assign s_data[i+1] = BUS_W'(m_data);
  end

  assign out_valid   = s_valid[NL];
  assign s_ready[NL] = out_ready;
  assign out_data    = s_data[NL][L_PE[NL-1]*ACC_W-1:0];

endmodule
