// tb_adaflow_accel: end-to-end test of the Flexible-Pruning accelerator.
//
// Builds a small five-layer network (three 3x3 convolutions with a 2x2 max
// pool after the second, two fully connected layers) so that it runs in
// seconds, loads random 2-bit weights and thresholds through the write port,
// streams random 8-bit images and compares the class scores with a reference
// model of the same network computed here. Then it performs a fast model
// switch in the middle of the input stream to a pruned model (half the
// filters of every hidden layer), loads the pruned weights, runs more frames
// on the same hardware and switches back. Mechanisms that must each occur at
// least once: model switch, input gating during a switch, a refused channel
// write (pruning rule violated), output back-pressure, frames on the pruned
// model (idle max-pool lanes). The pruned model must also finish a frame in
// fewer cycles than the full one, and back-to-back images must leave at the
// rate of the slowest stage (within 10%: the line buffers refill at image
// boundaries).
module tb_adaflow_accel;
  import adaflow_pkg::*;

  localparam int unsigned NL = 5;
  localparam int unsigned L_K    [NL] = '{3, 3, 3, 1, 1};
  localparam int unsigned L_IFM  [NL] = '{10, 8, 3, 1, 1};
  localparam int unsigned L_COUT [NL] = '{8, 8, 8, 8, 4};
  localparam int unsigned L_PE   [NL] = '{4, 2, 2, 1, 2};
  localparam int unsigned L_SIMD [NL] = '{3, 4, 4, 2, 1};
  localparam int unsigned L_POOL [NL] = '{0, 1, 0, 0, 0};
  localparam int unsigned PRUNED [NL] = '{4, 4, 4, 4, 4};
  localparam int unsigned N_FRAMES = 3;      // frames per model phase
  localparam int unsigned WATCHDOG = 2000000; // cycles

  localparam int unsigned CIN0 = CNV_CIN0, IN0_W = CNV_IN0_W, ACC_W = CNV_ACC_W;
  localparam int unsigned WBITS = CNV_WBITS, NTH = 3;

  function automatic int unsigned wr_width();
    int unsigned w = 1;
    for (int unsigned i = 0; i < NL; i++) begin
      w = imax(w, L_PE[i] * L_SIMD[i] * WBITS);
      w = imax(w, L_PE[i] * ((i == NL - 1) ? 1 : NTH) * ACC_W);
    end
    return w;
  endfunction
  localparam int unsigned WR_W = wr_width();
  localparam int unsigned PIX_BEATS = CIN0 / L_SIMD[0];

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [L_SIMD[0]*IN0_W-1:0] in_data;
  logic [L_PE[NL-1]*ACC_W-1:0] out_data;
  logic sw_req, drained, cfg_we, cfg_err, wr_en;
  logic [3:0] cfg_layer, wr_layer;
  ch_t cfg_value;
  ch_t cout_rt [NL];
  logic [15:0] switch_cnt;
  mem_sel_e wr_sel;
  logic [WR_ADDR_W-1:0] wr_addr;
  logic [WR_W-1:0] wr_data;

  adaflow_accel #(
    .NL(NL), .L_K(L_K), .L_IFM(L_IFM), .L_COUT(L_COUT), .L_PE(L_PE),
    .L_SIMD(L_SIMD), .L_POOL(L_POOL)
  ) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_switch_gate = 0, n_backpressure = 0, n_cfg_refused = 0, n_pruned_frames = 0;

  always @(posedge clk) begin
    if (rst_n && sw_req && in_valid && !in_ready) n_switch_gate <= n_switch_gate + 1;
    if (rst_n && out_valid && !out_ready) n_backpressure <= n_backpressure + 1;
    if (rst_n && cfg_err) n_cfg_refused <= n_cfg_refused + 1;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- model: weights [layer][o*ncol + j], thresholds [layer][o*3 + t]
  int wt  [NL][];
  int thr [NL][];
  int cur_cout [NL];

  function automatic int cin_of(int i);
    return (i == 0) ? int'(CIN0) : cur_cout[i-1];
  endfunction

  function automatic int ncol_of(int i);
    return int'(L_K[i] * L_K[i]) * cin_of(i);
  endfunction

  function automatic void new_model();
    for (int i = 0; i < NL; i++) begin
      int nc = ncol_of(i);
      real ex2 = (i == 0) ? 21800.0 : 3.0;
      int sigma = int'($sqrt(real'(nc) * 2.0 / 3.0 * ex2));
      wt[i]  = new[cur_cout[i] * nc];
      thr[i] = new[cur_cout[i] * 3];
      foreach (wt[i][k]) wt[i][k] = int'($urandom_range(0, 2)) - 1;
      for (int o = 0; o < cur_cout[i]; o++) begin
        int j = int'($urandom_range(0, 4)) - 2;
        thr[i][o*3+0] = -sigma / 2 + j;
        thr[i][o*3+1] = j;
        thr[i][o*3+2] = sigma / 2 + j;
      end
    end
  endfunction

  // reference inference of one image ([y][x][c] layout) with the current model
  function automatic void ref_infer(input int img[], output int scores[]);
    int fm[];
    int dim = int'(L_IFM[0]);
    fm = img;
    for (int i = 0; i < NL; i++) begin
      int cin = cin_of(i), cout = cur_cout[i], k = int'(L_K[i]);
      int odim = dim - k + 1;
      int nxt[];
      nxt = new[odim * odim * cout];
      for (int oy = 0; oy < odim; oy++) for (int ox = 0; ox < odim; ox++)
        for (int o = 0; o < cout; o++) begin
          int acc = 0;
          for (int ky = 0; ky < k; ky++) for (int kx = 0; kx < k; kx++)
            for (int c = 0; c < cin; c++)
              acc += wt[i][o*ncol_of(i) + (ky*k + kx)*cin + c] * fm[((oy+ky)*dim + ox+kx)*cin + c];
          acc = int'(ACC_W'(acc)) <<< (32 - ACC_W) >>> (32 - ACC_W);
          if (i == NL - 1) nxt[(oy*odim + ox)*cout + o] = acc;
          else begin
            int a = 0;
            for (int t = 0; t < 3; t++) if (acc >= thr[i][o*3+t]) a++;
            nxt[(oy*odim + ox)*cout + o] = a;
          end
        end
      dim = odim;
      fm = nxt;
      if (L_POOL[i] != 0) begin
        int pd = dim / 2;
        nxt = new[pd * pd * cout];
        for (int py = 0; py < pd; py++) for (int px = 0; px < pd; px++)
          for (int c = 0; c < cout; c++) begin
            int m = 0;
            for (int dy = 0; dy < 2; dy++) for (int dx = 0; dx < 2; dx++)
              if (fm[((2*py+dy)*dim + 2*px+dx)*cout + c] > m) m = fm[((2*py+dy)*dim + 2*px+dx)*cout + c];
            nxt[(py*pd + px)*cout + c] = m;
          end
        dim = pd;
        fm = nxt;
      end
    end
    scores = fm;
  endfunction

  // ---------------- host side: switch window, configuration and weight load
  task automatic open_window();
    @(negedge clk);
    sw_req = 1;
    while (!drained) @(negedge clk);
  endtask

  task automatic close_window();
    @(negedge clk);
    sw_req = 0;
  endtask

  task automatic write_cfg(int layer, int value);
    @(negedge clk);
    cfg_we = 1; cfg_layer = 4'(layer); cfg_value = ch_t'(value);
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic load_weights();
    for (int i = 0; i < NL; i++) begin
      int sf_n = ncol_of(i) / int'(L_SIMD[i]);
      int nf_n = cur_cout[i] / int'(L_PE[i]);
      for (int nf = 0; nf < nf_n; nf++) begin
        for (int sf = 0; sf < sf_n; sf++) begin
          @(negedge clk);
          wr_en = 1; wr_layer = 4'(i); wr_sel = MEM_WEIGHT; wr_addr = WR_ADDR_W'(nf*sf_n + sf);
          wr_data = '0;
          for (int p = 0; p < int'(L_PE[i]); p++)
            for (int s = 0; s < int'(L_SIMD[i]); s++)
              wr_data[(p*L_SIMD[i] + s)*WBITS +: WBITS] =
                WBITS'(wt[i][(nf*L_PE[i] + p)*ncol_of(i) + sf*L_SIMD[i] + s]);
        end
        if (i != NL - 1) begin
          @(negedge clk);
          wr_en = 1; wr_layer = 4'(i); wr_sel = MEM_THRESH; wr_addr = WR_ADDR_W'(nf);
          wr_data = '0;
          for (int p = 0; p < int'(L_PE[i]); p++)
            for (int t = 0; t < 3; t++)
              wr_data[(p*3 + t)*ACC_W +: ACC_W] = ACC_W'(thr[i][(nf*L_PE[i] + p)*3 + t]);
        end
      end
    end
    @(negedge clk);
    wr_en = 0;
  endtask

  // ---------------- streams
  int exp_q [$];           // expected score lanes, in output order
  int frames_out = 0;
  int t_start [$];         // cycle the first beat of a frame was accepted
  int frame_cycles [$];    // first input beat to last output beat
  bit bp_on = 0;
  int n_started = 0;       // frames whose first beat was accepted
  int t_done [$];          // cycle each frame's last score was accepted

  // cycles per image of the slowest stage with the current channel counts
  function automatic int bottleneck();
    int b = 0;
    for (int i = 0; i < NL; i++) begin
      int odim = int'(L_IFM[i] - L_K[i] + 1);
      int c = odim * odim * (ncol_of(i) / int'(L_SIMD[i])) * (cur_cout[i] / int'(L_PE[i]));
      if (c > b) b = c;
    end
    return b;
  endfunction

  task automatic send_frame(bit pruned);
    int img[];
    int sc[];
    img = new[L_IFM[0] * L_IFM[0] * CIN0];
    foreach (img[k]) img[k] = int'($urandom_range(0, 255));
    ref_infer(img, sc);
    foreach (sc[k]) exp_q.push_back(sc[k]);
    if (pruned) n_pruned_frames++;
    for (int p = 0; p < int'(L_IFM[0] * L_IFM[0]); p++)
      for (int b = 0; b < int'(PIX_BEATS); b++) begin
        @(negedge clk);
        in_valid = 1;
        for (int s = 0; s < int'(L_SIMD[0]); s++)
          in_data[s*IN0_W +: IN0_W] = IN0_W'(img[p*CIN0 + b*L_SIMD[0] + s]);
        #4;
        while (!in_ready) begin @(negedge clk); #4; end
        if (p == 0 && b == 0) begin t_start.push_back(cyc); n_started++; end
      end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin : monitor
    int lane = 0;
    forever begin
      @(negedge clk);
      out_ready = bp_on ? ($urandom_range(0, 3) != 0) : 1'b1;
      #4;
      if (rst_n && out_valid && out_ready) begin
        for (int p = 0; p < int'(L_PE[NL-1]); p++) begin
          int e, g;
          e = exp_q.pop_front();
          g = int'(signed'(out_data[p*ACC_W +: ACC_W]));
          checks++;
          if (g != e) begin
            failures++;
            if (failures < 10) $display("frame %0d class %0d: got %0d exp %0d", frames_out, lane, g, e);
          end
          lane++;
        end
        if (lane == int'(L_COUT[NL-1])) begin
          lane = 0;
          frames_out++;
          frame_cycles.push_back(cyc - t_start.pop_front());
          t_done.push_back(cyc);
        end
      end
    end
  end

  task automatic wait_frames(int n);
    while (frames_out < n) @(negedge clk);
  endtask

  initial begin
    int full_lat, pruned_lat;
    sw_req = 0; cfg_we = 0; cfg_layer = '0; cfg_value = '0; wr_en = 0; wr_layer = '0;
    wr_sel = MEM_WEIGHT; wr_addr = '0; wr_data = '0; in_valid = 0; in_data = '0; out_ready = 1;
    foreach (cur_cout[i]) cur_cout[i] = int'(L_COUT[i]);
    repeat (3) @(posedge clk);
    rst_n = 1;

    // initial load of the not-pruned model
    new_model();
    open_window();
    load_weights();
    close_window();

    // one isolated frame for the latency, then a burst with back-pressure
    send_frame(1'b0);
    wait_frames(1);
    full_lat = frame_cycles[0];
    for (int f = 0; f < int'(N_FRAMES); f++) send_frame(1'b0);

    // switch while frames are still in flight
    fork
      send_frame(1'b0);
      begin
        // request the switch once the last frame has started: it must finish
        wait (n_started == 2 + int'(N_FRAMES));
        repeat (5) @(negedge clk);
        open_window();
      end
    join
    checks++;
    if (frames_out != 2 + int'(N_FRAMES)) begin
      failures++; $display("window opened with %0d of %0d frames out", frames_out, 2 + N_FRAMES);
    end
    // back-to-back images without back-pressure: one image per slowest-stage time
    begin
      int iv;
      iv = t_done[N_FRAMES + 1] - t_done[N_FRAMES];
      $display("image interval %0d cycles, slowest stage %0d cycles", iv, bottleneck());
      checks++;
      if (iv < bottleneck() || iv > bottleneck() + bottleneck() / 10) begin
        failures++; $display("image interval off the slowest-stage time");
      end
    end
    write_cfg(0, int'(L_PE[0]) + 1);   // violates the divisibility rule: refused
    checks++;
    if (cout_rt[0] != ch_t'(L_COUT[0])) begin failures++; $display("refused write changed layer 0"); end
    for (int i = 0; i < NL - 1; i++) begin
      write_cfg(i, int'(PRUNED[i]));
      cur_cout[i] = int'(PRUNED[i]);
    end
    new_model();
    load_weights();
    close_window();

    send_frame(1'b1);
    wait_frames(3 + int'(N_FRAMES));
    pruned_lat = frame_cycles[2 + N_FRAMES];
    bp_on = 1;
    for (int f = 0; f < int'(N_FRAMES); f++) send_frame(1'b1);
    wait_frames(3 + 2*int'(N_FRAMES));
    bp_on = 0;

    // and back to the full model
    open_window();
    for (int i = 0; i < NL - 1; i++) begin
      write_cfg(i, int'(L_COUT[i]));
      cur_cout[i] = int'(L_COUT[i]);
    end
    new_model();
    load_weights();
    close_window();
    send_frame(1'b0);
    wait_frames(4 + 2*int'(N_FRAMES));

    $display("frame latency: full %0d cycles, pruned %0d cycles", full_lat, pruned_lat);
    checks++;
    if (!(pruned_lat < full_lat)) begin failures++; $display("pruned model not faster"); end
    checks++;
    if (switch_cnt != 3) begin failures++; $display("switch count %0d", switch_cnt); end
    $display("mechanisms: switches=%0d gated=%0d refused_cfg=%0d backpressure=%0d pruned_frames=%0d",
             switch_cnt, n_switch_gate, n_cfg_refused, n_backpressure, n_pruned_frames);
    checks += 4;
    if (n_switch_gate == 0)   begin failures++; $display("input never gated by a switch"); end
    if (n_cfg_refused == 0)   begin failures++; $display("no channel write refused"); end
    if (n_backpressure == 0)  begin failures++; $display("no output back-pressure"); end
    if (n_pruned_frames == 0) begin failures++; $display("no pruned frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
