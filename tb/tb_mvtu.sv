// tb_mvtu: self-checking test of the flexible MVTU.
// Runs a 3x3, 8-in/8-out layer (SIMD=4, PE=2) first with all channels, then
// with a pruned model of 4 input and 4 output channels on the same hardware.
// Weights and thresholds are random; the expected activations are computed
// here from the same matrices. Without back-pressure the output rate must be
// one PE group every SF = 9*cin/SIMD cycles; the pruned phase adds random
// back-pressure.
module tb_mvtu;
  import adaflow_pkg::*;

  localparam int unsigned SIMD = 4, PE = 2, K = 3, CINW = 8, COUTW = 8;
  localparam int unsigned IN_W = 2, ACC_W = 16, NT = 3, W_BITS = 2;
  localparam int unsigned WR_W = imax(PE*SIMD*W_BITS, PE*NT*ACC_W);
  localparam int unsigned NV = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ch_t cfg_cin, cfg_cout;
  logic wr_en; mem_sel_e wr_sel; logic [WR_ADDR_W-1:0] wr_addr; logic [WR_W-1:0] wr_data;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [SIMD*IN_W-1:0] in_data;
  logic [PE*2-1:0] out_data;

  mvtu #(.IN_W(IN_W), .SIMD(SIMD), .PE(PE), .K(K), .CIN_WORST(CINW), .COUT_WORST(COUTW),
         .W_BITS(W_BITS), .ACC_W(ACC_W), .NT(NT)) dut (.*);

  int checks = 0, failures = 0;
  int signed wt  [COUTW][K*K*CINW];
  int signed thr [COUTW][NT];
  int unsigned xv [NV][K*K*CINW];
  int unsigned exp_q [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(int cin, int cout);
    int sf_n = K*K*cin/SIMD, nf_n = cout/PE;
    for (int o = 0; o < cout; o++) begin
      for (int j = 0; j < K*K*cin; j++) wt[o][j] = int'($urandom_range(0, 3)) - 2;
      thr[o][0] = -8 + int'($urandom_range(0, 6));
      thr[o][1] = thr[o][0] + int'($urandom_range(0, 8));
      thr[o][2] = thr[o][1] + int'($urandom_range(0, 8));
    end
    for (int nf = 0; nf < nf_n; nf++) begin
      for (int sf = 0; sf < sf_n; sf++) begin
        @(negedge clk);
        wr_en = 1; wr_sel = MEM_WEIGHT; wr_addr = WR_ADDR_W'(nf*sf_n + sf); wr_data = '0;
        for (int p = 0; p < PE; p++)
          for (int s = 0; s < SIMD; s++)
            wr_data[(p*SIMD+s)*W_BITS +: W_BITS] = W_BITS'(wt[nf*PE+p][sf*SIMD+s]);
      end
      @(negedge clk);
      wr_en = 1; wr_sel = MEM_THRESH; wr_addr = WR_ADDR_W'(nf); wr_data = '0;
      for (int p = 0; p < PE; p++)
        for (int t = 0; t < NT; t++)
          wr_data[(p*NT+t)*ACC_W +: ACC_W] = ACC_W'(thr[nf*PE+p][t]);
    end
    @(negedge clk); wr_en = 0;
  endtask

  task automatic run(int cin, int cout, bit bp);
    int sf_n = K*K*cin/SIMD, nf_n = cout/PE;
    int got = 0, t_first = -1, t_last = -1;
    cfg_cin = ch_t'(cin); cfg_cout = ch_t'(cout);
    load(cin, cout);
    for (int v = 0; v < NV; v++) begin
      for (int j = 0; j < K*K*cin; j++) xv[v][j] = $urandom_range(0, 3);
      for (int o = 0; o < cout; o++) begin
        int acc = 0, a = 0;
        for (int j = 0; j < K*K*cin; j++) acc += wt[o][j] * int'(xv[v][j]);
        for (int t = 0; t < NT; t++) if (acc >= thr[o][t]) a++;
        exp_q.push_back(a);
      end
    end
    fork
      begin
        for (int v = 0; v < NV; v++)
          for (int sf = 0; sf < sf_n; sf++) begin
            @(negedge clk);
            in_valid = 1;
            for (int s = 0; s < SIMD; s++) in_data[s*IN_W +: IN_W] = IN_W'(xv[v][sf*SIMD+s]);
            #4;
            while (!in_ready) begin @(negedge clk); #4; end
          end
        @(negedge clk);
        in_valid = 0;
      end
      begin
        while (got < NV*nf_n) begin
          @(negedge clk);
          out_ready = bp ? ($urandom_range(0, 2) != 0) : 1'b1;
          #4;
          if (out_valid && out_ready) begin
            if (t_first < 0) t_first = cyc;
            t_last = cyc;
            for (int p = 0; p < PE; p++) begin
              int e = exp_q.pop_front();
              checks++;
              if (int'(out_data[p*2 +: 2]) != e) begin
                failures++;
                $display("mismatch cin=%0d beat %0d lane %0d: got %0d exp %0d", cin, got, p, out_data[p*2 +: 2], e);
              end
            end
            got++;
          end
        end
      end
    join
    if (!bp) begin
      checks++;
      if (t_last - t_first != (NV*nf_n - 1) * sf_n) begin
        failures++;
        $display("rate: %0d cycles between first and last output, expected %0d", t_last - t_first, (NV*nf_n-1)*sf_n);
      end
    end
  endtask

  initial begin
    wr_en = 0; wr_sel = MEM_WEIGHT; wr_addr = '0; wr_data = '0;
    in_valid = 0; in_data = '0; out_ready = 1; cfg_cin = ch_t'(CINW); cfg_cout = ch_t'(COUTW);
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(8, 8, 1'b0);   // not pruned, full rate
    run(4, 4, 1'b1);   // pruned model, random back-pressure
    run(8, 4, 1'b0);   // only output filters pruned
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
