// tb_swu: self-checking test of the flexible Sliding Window Unit.
// 6x6 input, 3x3 windows, SIMD=2, worst case 4 channels. Three back-to-back
// frames with all four channels, then three of a pruned model with two, with
// random input gaps and random output back-pressure. Every window beat is
// compared with the expected (oy, ox, ky, kx, channel-fold) element of the
// frame that was sent.
module tb_swu;
  import adaflow_pkg::*;

  localparam int unsigned LANE_W = 2, SIMD = 2, CHW = 4, IFM = 6, K = 3;
  localparam int unsigned OFM = IFM - K + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ch_t cfg_ch;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [SIMD*LANE_W-1:0] in_data, out_data;

  swu #(.LANE_W(LANE_W), .SIMD(SIMD), .CH_WORST(CHW), .IFM(IFM), .K(K)) dut (.*);

  int checks = 0, failures = 0;
  logic [LANE_W-1:0] img [IFM][IFM][CHW];
  logic [SIMD*LANE_W-1:0] exp_q [$];

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // nf frames of ch channels sent back to back (the writer runs ahead into
  // the next frame while the last windows of the current one are read)
  task automatic frames(int ch, int nf);
    int cf_n = ch / SIMD;
    int n_out = nf*OFM*OFM*K*K*cf_n, got = 0;
    logic [LANE_W-1:0] imgs [$];
    cfg_ch = ch_t'(ch);
    for (int f = 0; f < nf; f++) begin
      for (int y = 0; y < IFM; y++) for (int x = 0; x < IFM; x++) for (int c = 0; c < CHW; c++)
        img[y][x][c] = LANE_W'($urandom);
      for (int y = 0; y < IFM; y++) for (int x = 0; x < IFM; x++) for (int c = 0; c < CHW; c++)
        imgs.push_back(img[y][x][c]);
      for (int oy = 0; oy < OFM; oy++) for (int ox = 0; ox < OFM; ox++)
        for (int ky = 0; ky < K; ky++) for (int kx = 0; kx < K; kx++)
          for (int cf = 0; cf < cf_n; cf++) begin
            logic [SIMD*LANE_W-1:0] w;
            for (int s = 0; s < SIMD; s++) w[s*LANE_W +: LANE_W] = img[oy+ky][ox+kx][cf*SIMD+s];
            exp_q.push_back(w);
          end
    end
    fork
      begin
        for (int f = 0; f < nf; f++)
          for (int y = 0; y < IFM; y++) for (int x = 0; x < IFM; x++) begin
            logic [LANE_W-1:0] px [CHW];
            for (int c = 0; c < CHW; c++) px[c] = imgs.pop_front();
            for (int cf = 0; cf < cf_n; cf++) begin
              @(negedge clk);
              while ($urandom_range(0, 5) == 0) begin in_valid = 0; @(negedge clk); end
              in_valid = 1;
              for (int s = 0; s < SIMD; s++) in_data[s*LANE_W +: LANE_W] = px[cf*SIMD+s];
              #4;
              while (!in_ready) begin @(negedge clk); #4; end
            end
          end
        @(negedge clk);
        in_valid = 0;
      end
      begin
        while (got < n_out) begin
          @(negedge clk);
          out_ready = ($urandom_range(0, 5) != 0);
          #4;
          if (out_valid && out_ready) begin
            logic [SIMD*LANE_W-1:0] e;
            e = exp_q.pop_front();
            checks++;
            if (out_data !== e) begin
              failures++;
              if (failures < 10) $display("ch=%0d beat %0d: got %h exp %h", ch, got, out_data, e);
            end
            got++;
          end
        end
        @(negedge clk); out_ready = 0;
      end
    join
  endtask

  initial begin
    in_valid = 0; in_data = '0; out_ready = 0; cfg_ch = ch_t'(CHW);
    repeat (3) @(posedge clk);
    rst_n = 1;
    frames(4, 3);
    repeat (5) @(posedge clk);
    frames(2, 3);
    // no extra window may follow a complete frame
    repeat (20) @(posedge clk);
    checks++;
    if (out_valid) begin failures++; $display("spurious window after last frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
