// tb_stream_dwc: self-checking test of the flexible width converter.
// Two chained instances, 2 -> 4 lanes and 4 -> 2 lanes, 8 worst-case channels,
// with runtime channel counts 8 and 4, and a third one that builds whole
// pixels (2 -> 8 lanes), which must give exactly one beat per pixel also when
// only 4 channels are in use. Random pixels go through both with random
// gaps and back-pressure; every output beat is compared with the expected
// slice of its pixel.
module tb_stream_dwc;
  import adaflow_pkg::*;

  localparam int unsigned LW = 2, CHW = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ch_t cfg_ch;
  logic a_valid, a_ready, b_valid, b_ready, c_valid, c_ready;
  logic [2*LW-1:0] a_data, c_data;
  logic [4*LW-1:0] b_data;

  // up: 2 lanes -> 4 lanes, then down: 4 lanes -> 2 lanes
  stream_dwc #(.LANE_W(LW), .IN_L(2), .OUT_L(4), .CH_WORST(CHW)) u_up (
    .clk, .rst_n, .cfg_ch, .in_valid(a_valid), .in_ready(a_ready), .in_data(a_data),
    .out_valid(b_valid), .out_ready(b_ready), .out_data(b_data));
  stream_dwc #(.LANE_W(LW), .IN_L(4), .OUT_L(2), .CH_WORST(CHW)) u_down (
    .clk, .rst_n, .cfg_ch, .in_valid(b_valid), .in_ready(b_ready), .in_data(b_data),
    .out_valid(c_valid), .out_ready(c_ready), .out_data(c_data));

  // whole-pixel output side: 2 lanes -> 8 lanes (one beat per pixel)
  logic d_valid, d_ready, e_valid, e_ready;
  logic [2*LW-1:0] d_data;
  logic [CHW*LW-1:0] e_data;
  stream_dwc #(.LANE_W(LW), .IN_L(2), .OUT_L(CHW), .CH_WORST(CHW)) u_whole (
    .clk, .rst_n, .cfg_ch, .in_valid(d_valid), .in_ready(d_ready), .in_data(d_data),
    .out_valid(e_valid), .out_ready(e_ready), .out_data(e_data));

  int checks = 0, failures = 0;
  logic [4*LW-1:0] mid_q [$];
  logic [2*LW-1:0] exp_q [$];
  int n_mid = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checks the 4-lane stream in the middle
  always @(negedge clk) begin
    #4;
    if (rst_n && b_valid && b_ready) begin
      logic [4*LW-1:0] e;
      e = mid_q.pop_front();
      checks++;
      n_mid++;
      if (b_data !== e) begin failures++; $display("mid beat: got %h exp %h", b_data, e); end
    end
  end

  task automatic run(int ch, int npix);
    int got = 0;
    cfg_ch = ch_t'(ch);
    fork
      begin
        for (int p = 0; p < npix; p++) begin
          logic [CHW*LW-1:0] pix;
          pix = (CHW*LW)'($urandom);
          for (int k = 0; k < ch/4; k++) mid_q.push_back(pix[k*4*LW +: 4*LW]);
          for (int k = 0; k < ch/2; k++) exp_q.push_back(pix[k*2*LW +: 2*LW]);
          for (int k = 0; k < ch/2; k++) begin
            @(negedge clk);
            while ($urandom_range(0, 3) == 0) begin a_valid = 0; @(negedge clk); end
            a_valid = 1; a_data = pix[k*2*LW +: 2*LW];
            #4;
            while (!a_ready) begin @(negedge clk); #4; end
          end
        end
        @(negedge clk); a_valid = 0;
      end
      begin
        while (got < npix*ch/2) begin
          @(negedge clk);
          c_ready = ($urandom_range(0, 2) != 0);
          #4;
          if (c_valid && c_ready) begin
            logic [2*LW-1:0] e;
            e = exp_q.pop_front();
            checks++;
            if (c_data !== e) begin failures++; $display("out beat %0d: got %h exp %h", got, c_data, e); end
            got++;
          end
        end
        @(negedge clk); c_ready = 0;
      end
    join
  endtask

  // pixels of ch channels into the whole-pixel converter: exactly one beat
  // per pixel, whose lanes below ch are the pixel
  task automatic run_whole(int ch, int npix);
    logic [CHW*LW-1:0] pq [$];
    int got = 0;
    cfg_ch = ch_t'(ch);
    fork
      begin
        for (int p = 0; p < npix; p++) begin
          logic [CHW*LW-1:0] pix;
          pix = (CHW*LW)'($urandom);
          pq.push_back(pix);
          for (int k = 0; k < ch/2; k++) begin
            @(negedge clk);
            d_valid = 1; d_data = pix[k*2*LW +: 2*LW];
            #4;
            while (!d_ready) begin @(negedge clk); #4; end
          end
        end
        @(negedge clk); d_valid = 0;
      end
      begin
        while (got < npix) begin
          @(negedge clk);
          e_ready = ($urandom_range(0, 1) != 0);
          #4;
          if (e_valid && e_ready) begin
            logic [CHW*LW-1:0] e;
            logic [CHW*LW-1:0] mask;
            e = pq.pop_front();
            checks++;
            mask = ((CHW*LW)'(1) << (ch*LW)) - 1'b1;
            if (ch == int'(CHW)) mask = '1;
            if ((e_data & mask) !== (e & mask)) begin
              failures++; $display("whole pixel %0d ch=%0d: got %h exp %h", got, ch, e_data, e);
            end
            got++;
          end
        end
        @(negedge clk); e_ready = 0;
        repeat (10) @(negedge clk);
        checks++;
        if (e_valid) begin failures++; $display("extra beat after %0d pixels", npix); end
      end
    join
  endtask

  initial begin
    d_valid = 0; d_data = '0; e_ready = 0;
    a_valid = 0; a_data = '0; c_ready = 0; cfg_ch = ch_t'(CHW);
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(8, 10);
    run(4, 10);
    run_whole(8, 6);
    run_whole(4, 6);
    checks++;
    if (n_mid != 10*2 + 10*1) begin failures++; $display("mid beats %0d", n_mid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
