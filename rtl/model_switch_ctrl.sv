// model_switch_ctrl: runtime channel configuration and fast model switch.
//
// Holds the output channel count of every layer (the 16-bit value each
// flexible module of that layer reads) and switches between pruned models
// without reconfiguring the FPGA:
//   1. the host raises sw_req;
//   2. at the next input-frame boundary no further frame is admitted
//      (the input stream is gated);
//   3. once every admitted frame has left the accelerator, drained rises:
//      the host may now write channel counts (cfg_*) and weights;
//   4. the host lowers sw_req and frames flow again with the new model.
// A channel write is accepted only while drained, only for layers 0..NL-2
// (the class count of the last layer is fixed), and only if the value is
// non-zero, at most the worst case and meets the dataflow pruning rule of the
// folding: cout_i mod PE_i = 0 and cout_i mod SIMD_{i+1} = 0. A rejected write
// pulses cfg_err and leaves the register unchanged. After reset every layer
// holds its worst-case (not pruned) count.
//
// Frame accounting: an input frame is IN_BEATS accepted beats, an output frame
// OUT_BEATS accepted beats; the controller compares the two frame counts.
// Combinational path: s_ready = m_ready && !gate.
//
// Origin: 16-bit channel counts per flexible module and the PE/SIMD
// divisibility rule follow the published description; the drain-then-write
// switch protocol, the frame counting and the refusal of bad values are this
// design's own.
module model_switch_ctrl
  import adaflow_pkg::*;
#(
  parameter int unsigned NL        = CNV_NL,
  parameter int unsigned COUT [NL] = CNV_COUT,
  parameter int unsigned PE   [NL] = CNV_PE,
  parameter int unsigned SIMD [NL] = CNV_SIMD,
  parameter int unsigned IN_BEATS  = 1024,
  parameter int unsigned OUT_BEATS = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  // host control
  input  logic        sw_req,
  output logic        drained,
  input  logic        cfg_we,
  input  logic [3:0]  cfg_layer,
  input  ch_t         cfg_value,
  output logic        cfg_err,
  output ch_t         cout_rt [NL],
  output logic [15:0] switch_cnt,
  // input stream gate: host side (s_) and accelerator side (m_)
  input  logic        s_valid,
  output logic        s_ready,
  output logic        m_valid,
  input  logic        m_ready,
  // accepted output beats of the accelerator
  input  logic        out_fire
);

  localparam int unsigned IBB = $clog2(IN_BEATS + 1);
  localparam int unsigned OBB = $clog2(OUT_BEATS + 1);

  logic [IBB-1:0] in_beat;
  logic [OBB-1:0] out_beat;
  logic [15:0]    frames_in, frames_out;
  logic           gate, in_fire, cfg_ok;

  // gate only between frames
  assign gate    = (sw_req && (in_beat == '0)) || drained;
  assign s_ready = m_ready && !gate;
  assign m_valid = s_valid && !gate;
  assign in_fire = s_valid && s_ready;

  always_comb begin
    cfg_ok = 1'b0;
    for (int i = 0; i < NL - 1; i++) begin
      if (32'(cfg_layer) == i) begin
        cfg_ok = (cfg_value != '0) && (32'(cfg_value) <= COUT[i]) &&
                 (32'(cfg_value) % PE[i] == 0) && (32'(cfg_value) % SIMD[i+1] == 0);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_beat    <= '0;
      out_beat   <= '0;
      frames_in  <= '0;
      frames_out <= '0;
      drained    <= 1'b0;
      cfg_err    <= 1'b0;
      switch_cnt <= '0;
      for (int i = 0; i < NL; i++) cout_rt[i] <= CFG_W'(COUT[i]);
    end else begin
      cfg_err <= 1'b0;
      if (in_fire) begin
        if (32'(in_beat) == IN_BEATS - 1) begin
          in_beat   <= '0;
          frames_in <= frames_in + 1'b1;
        end else begin
          in_beat <= in_beat + 1'b1;
        end
      end
      if (out_fire) begin
        if (32'(out_beat) == OUT_BEATS - 1) begin
          out_beat   <= '0;
          frames_out <= frames_out + 1'b1;
        end else begin
          out_beat <= out_beat + 1'b1;
        end
      end
      if (!sw_req) begin
        drained <= 1'b0;
      end else if (gate && !drained && frames_in == frames_out && !out_fire) begin
        drained    <= 1'b1;
        switch_cnt <= switch_cnt + 1'b1;
      end
      if (cfg_we) begin
        if (drained && cfg_ok) cout_rt[cfg_layer] <= cfg_value;
        else                   cfg_err <= 1'b1;
      end
    end
  end

  // no frame may be admitted while the switch window is open
  a_no_input_when_drained: assert property (@(posedge clk) disable iff (!rst_n)
    drained |-> !in_fire);

endmodule
