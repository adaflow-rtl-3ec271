// mvtu: flexible Matrix-Vector-Threshold Unit.
//
// Computes, for every input vector (one convolution window or one FC input),
// the product with a COUT x (K*K*CIN) weight matrix and turns each result into
// an NT-level activation by comparing it with NT per-channel thresholds. The
// matrix is folded onto PE processing elements, each with SIMD lanes: one cycle
// consumes SIMD input elements and multiplies them with PE*SIMD weights, so a
// vector takes SF = K*K*cin/SIMD cycles per group of PE outputs and NF = cout/PE
// groups. The first group reads the vector from the input stream and stores it
// in an input buffer; the other groups re-read it from there.
//
// Flexibility: cfg_cin and cfg_cout (16-bit, the runtime channel counts of the
// currently loaded pruned model) only set the bounds of the SF and NF loops; the
// PE x SIMD array is always the worst-case one. With FLEXIBLE = 0 the ports are
// ignored and the compile-time CIN_WORST/COUT_WORST are used (a fixed
// accelerator). cfg_cin must be a multiple of SIMD and cfg_cout of PE; both must
// stay constant while data is in flight.
//
// Memories: the weight word at address nf*SF + sf holds the PE*SIMD weights for
// that fold (lane pe*SIMD+s), densely packed for the current model; the
// threshold word at address nf holds PE*NT thresholds (lane pe*NT+t). Both are
// written through wr_*; reads are asynchronous (distributed RAM style).
// An output lane counts the thresholds that acc >= threshold. With NT = 0 the
// raw signed accumulator is output instead (last layer).
//
// Timing: one fold per cycle when not stalled; an output beat is registered and
// appears one cycle after the last fold of its group. in_ready is high only
// while the first group reads from the stream.
//
// Origin: the PE x SIMD folding and the way the run-time channel counts only
// shorten the fold loops follow the published description of the flexible
// accelerator. The memory layout, the host write port, the threshold encoding,
// the number formats and the asynchronous memory reads are this design's own.
module mvtu
  import adaflow_pkg::*;
#(
  parameter int unsigned IN_W       = 2,   // bits of one input element
  parameter bit          IN_SIGNED  = 1'b0,
  parameter int unsigned SIMD       = 32,
  parameter int unsigned PE         = 32,
  parameter int unsigned K          = 3,
  parameter int unsigned CIN_WORST  = 64,
  parameter int unsigned COUT_WORST = 64,
  parameter int unsigned W_BITS     = 2,
  parameter int unsigned ACC_W      = 16,
  parameter int unsigned NT         = 3,   // thresholds per channel, 0 = no activation
  parameter bit          FLEXIBLE   = 1'b1,
  parameter int unsigned OUT_W      = (NT > 0) ? $clog2(NT + 1) : ACC_W,
  parameter int unsigned WR_W       = imax(PE * SIMD * W_BITS, PE * imax(NT, 1) * ACC_W)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  ch_t                     cfg_cin,
  input  ch_t                     cfg_cout,
  // host write port for weights and thresholds
  input  logic                    wr_en,
  input  mem_sel_e                wr_sel,
  input  logic [WR_ADDR_W-1:0]    wr_addr,
  input  logic [WR_W-1:0]         wr_data,
  // input vector stream, SIMD elements per beat
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [SIMD*IN_W-1:0]    in_data,
  // output stream, PE activations per beat
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [PE*OUT_W-1:0]     out_data
);

  localparam int unsigned SF_WORST = K * K * CIN_WORST / SIMD;
  localparam int unsigned NF_WORST = COUT_WORST / PE;
  localparam int unsigned WDEPTH   = SF_WORST * NF_WORST;
  localparam int unsigned NTM      = (NT > 0) ? NT : 1;
  localparam int unsigned SF_BITS  = $clog2(SF_WORST + 1);
  localparam int unsigned NF_BITS  = $clog2(NF_WORST + 1);
  localparam int unsigned WA_BITS  = $clog2(WDEPTH + 1);
  localparam int unsigned W_WORD   = PE * SIMD * W_BITS;
  localparam int unsigned T_WORD   = PE * NTM * ACC_W;

  // ---------------- runtime loop bounds
  logic [CFG_W-1:0]   cin_rt, cout_rt;
  logic [SF_BITS-1:0] sf_n;
  logic [NF_BITS-1:0] nf_n;

  assign cin_rt  = FLEXIBLE ? cfg_cin  : CFG_W'(CIN_WORST);
  assign cout_rt = FLEXIBLE ? cfg_cout : CFG_W'(COUT_WORST);
  assign sf_n    = SF_BITS'((32'(cin_rt) * K * K) / SIMD);
  assign nf_n    = NF_BITS'(32'(cout_rt) / PE);

  // ---------------- memories
  logic [W_WORD-1:0]     wmem [WDEPTH];
  logic [T_WORD-1:0]     tmem [NF_WORST];
  logic [SIMD*IN_W-1:0]  ibuf [SF_WORST];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      if (wr_sel == MEM_WEIGHT) begin
        if (32'(wr_addr) < WDEPTH) wmem[wr_addr] <= wr_data[W_WORD-1:0];
      end else begin
        if (32'(wr_addr) < NF_WORST) tmem[wr_addr] <= wr_data[T_WORD-1:0];
      end
    end
  end

  // ---------------- fold counters
  logic [SF_BITS-1:0] sf;
  logic [NF_BITS-1:0] nf;
  logic [WA_BITS-1:0] waddr;
  logic               last_sf, last_nf, stall_out, fire;
  logic [SIMD*IN_W-1:0] vec;

  assign last_sf   = (sf == sf_n - 1'b1);
  assign last_nf   = (nf == nf_n - 1'b1);
  assign stall_out = last_sf && out_valid && !out_ready;
  assign in_ready  = (nf == '0) && !stall_out;
  assign fire      = ((nf == '0) ? in_valid : 1'b1) && !stall_out;
  assign vec       = (nf == '0) ? in_data : ibuf[sf];

  // ---------------- PE x SIMD array
  logic signed [ACC_W-1:0] acc     [PE];
  logic signed [ACC_W-1:0] acc_nxt [PE];
  logic [W_WORD-1:0]       wword;
  logic [T_WORD-1:0]       tword;
  logic [PE*OUT_W-1:0]     act;

  assign wword = wmem[waddr];
  assign tword = tmem[nf];

  always_comb begin
    for (int p = 0; p < PE; p++) begin
      logic signed [ACC_W-1:0] dot;
      dot = '0;
      for (int s = 0; s < SIMD; s++) begin
        logic signed [W_BITS-1:0] w;
        logic signed [IN_W+1:0]   x;
        w = wword[(p*SIMD + s)*W_BITS +: W_BITS];
        if (IN_SIGNED) x = (IN_W+2)'(signed'(vec[s*IN_W +: IN_W]));
        else           x = (IN_W+2)'(vec[s*IN_W +: IN_W]);
        dot = dot + ACC_W'(w * x);
      end
      acc_nxt[p] = ((sf == '0) ? ACC_W'(0) : acc[p]) + dot;
    end
  end

  // multi-threshold activation (or raw accumulator)
  always_comb begin
    act = '0;
    for (int p = 0; p < PE; p++) begin
      if (NT > 0) begin
        logic [OUT_W-1:0] cnt;
        cnt = '0;
        for (int t = 0; t < NTM; t++) begin
          if (acc_nxt[p] >= signed'(tword[(p*NTM + t)*ACC_W +: ACC_W])) cnt = cnt + 1'b1;
        end
        act[p*OUT_W +: OUT_W] = cnt;
      end else begin
        act[p*OUT_W +: OUT_W] = OUT_W'(acc_nxt[p]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sf        <= '0;
      nf        <= '0;
      waddr     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      for (int p = 0; p < PE; p++) acc[p] <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (fire) begin
        for (int p = 0; p < PE; p++) acc[p] <= acc_nxt[p];
        if (last_sf) begin
          out_valid <= 1'b1;
          out_data  <= act;
          sf        <= '0;
          if (last_nf) begin
            nf    <= '0;
            waddr <= '0;
          end else begin
            nf    <= nf + 1'b1;
            waddr <= waddr + 1'b1;
          end
        end else begin
          sf    <= sf + 1'b1;
          waddr <= waddr + 1'b1;
        end
      end
    end
  end

  // first group stores the vector for reuse by the later groups
  always_ff @(posedge clk) begin
    if (fire && nf == '0) ibuf[sf] <= in_data;
  end

  // stream rule: a held output beat does not change
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
