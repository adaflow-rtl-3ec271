// tb_maxpool: self-checking test of the flexible max pool.
// 6x6 pixels of 4 worst-case channels, 2x2 windows: two frames with all
// channels, then two frames with 2 runtime channels, where the upper lanes of
// the input carry random data that must not reach the output (those units are
// not fed). Random input gaps and output back-pressure.
module tb_maxpool;
  import adaflow_pkg::*;

  localparam int unsigned LANE_W = 2, CHW = 4, IFM = 6, OFM = IFM / 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ch_t cfg_ch;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [CHW*LANE_W-1:0] in_data, out_data;

  maxpool #(.LANE_W(LANE_W), .CH_WORST(CHW), .IFM(IFM), .POOL(2)) dut (.*);

  int checks = 0, failures = 0;
  int unsigned img [IFM][IFM][CHW];
  logic [CHW*LANE_W-1:0] exp_q [$];

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(int ch);
    int got = 0;
    cfg_ch = ch_t'(ch);
    for (int y = 0; y < IFM; y++) for (int x = 0; x < IFM; x++) for (int c = 0; c < CHW; c++)
      img[y][x][c] = $urandom_range(0, 3);
    for (int py = 0; py < OFM; py++) for (int px = 0; px < OFM; px++) begin
      logic [CHW*LANE_W-1:0] e;
      e = '0;
      for (int c = 0; c < ch; c++) begin
        int unsigned m = 0;
        for (int dy = 0; dy < 2; dy++) for (int dx = 0; dx < 2; dx++)
          if (img[2*py+dy][2*px+dx][c] > m) m = img[2*py+dy][2*px+dx][c];
        e[c*LANE_W +: LANE_W] = LANE_W'(m);
      end
      exp_q.push_back(e);
    end
    fork
      begin
        for (int y = 0; y < IFM; y++) for (int x = 0; x < IFM; x++) begin
          @(negedge clk);
          while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
          in_valid = 1;
          for (int c = 0; c < CHW; c++) in_data[c*LANE_W +: LANE_W] = LANE_W'(img[y][x][c]);
          #4;
          while (!in_ready) begin @(negedge clk); #4; end
        end
        @(negedge clk);
        in_valid = 0;
      end
      begin
        while (got < OFM*OFM) begin
          @(negedge clk);
          out_ready = ($urandom_range(0, 2) != 0);
          #4;
          if (out_valid && out_ready) begin
            logic [CHW*LANE_W-1:0] e;
            e = exp_q.pop_front();
            checks++;
            if (out_data !== e) begin
              failures++;
              if (failures < 10) $display("ch=%0d pixel %0d: got %h exp %h", ch, got, out_data, e);
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
    frame(4); frame(4); frame(2); frame(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
