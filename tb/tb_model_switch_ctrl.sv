// tb_model_switch_ctrl: self-checking test of the model switch controller.
// A three-layer table (cout 8/8/4, PE 2/4/2, SIMD 1/4/2), 4 input beats and
// 2 output beats per frame. The dataflow is modelled as a delay: each complete
// input frame returns its 2 output beats 20 cycles later. Checks: reset
// values; a write outside a switch window is refused; a switch request in the
// middle of a frame lets that frame finish, then blocks input; the window
// opens only after the last output; valid writes change the register and
// writes breaking the PE/SIMD divisibility rule or aimed at the last layer are
// refused; input flows again after the request is dropped.
module tb_model_switch_ctrl;
  import adaflow_pkg::*;

  localparam int unsigned NL = 3;
  localparam int unsigned COUT [NL] = '{8, 8, 4};
  localparam int unsigned PE   [NL] = '{2, 4, 2};
  localparam int unsigned SIMD [NL] = '{1, 4, 2};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic sw_req, drained, cfg_we, cfg_err, s_valid, s_ready, m_valid, m_ready, out_fire;
  logic [3:0] cfg_layer;
  ch_t cfg_value;
  ch_t cout_rt [NL];
  logic [15:0] switch_cnt;

  model_switch_ctrl #(.NL(NL), .COUT(COUT), .PE(PE), .SIMD(SIMD), .IN_BEATS(4), .OUT_BEATS(2)) dut (.*);

  int checks = 0, failures = 0;
  int in_beats = 0, drained_in = 0;
  int pending [$];   // cycle at which a frame's output starts
  int cyc = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // dataflow model: input beats always accepted by the accelerator side
  assign m_ready = 1'b1;
  int out_left = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (s_valid && s_ready) begin
      in_beats <= in_beats + 1;
      if (in_beats % 4 == 3) pending.push_back(cyc + 20);
      if (drained) drained_in <= drained_in + 1;
    end
    if (out_left == 0 && pending.size() > 0 && pending[0] <= cyc) begin
      void'(pending.pop_front());
      out_left <= 2;
    end else if (out_left > 0) out_left <= out_left - 1;
  end
  assign out_fire = (out_left > 0);

  task automatic cfg_write(int layer, int value, bit expect_ok);
    ch_t prev;
    prev = cout_rt[layer];
    @(negedge clk);
    cfg_we = 1; cfg_layer = 4'(layer); cfg_value = ch_t'(value);
    @(negedge clk);
    cfg_we = 0;
    check(cfg_err == !expect_ok, $sformatf("cfg_err for layer %0d value %0d", layer, value));
    check(cout_rt[layer] == (expect_ok ? ch_t'(value) : prev),
          $sformatf("register of layer %0d after writing %0d", layer, value));
  endtask

  initial begin
    sw_req = 0; cfg_we = 0; cfg_layer = '0; cfg_value = '0; s_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < NL; i++) check(cout_rt[i] == ch_t'(COUT[i]), "reset value");
    cfg_write(0, 4, 1'b0);                    // not in a switch window
    // stream continuously, request a switch after 6 beats (mid frame)
    s_valid = 1;
    wait (in_beats == 6);
    @(negedge clk);
    sw_req = 1;
    wait (in_beats == 8);                     // the open frame completes
    repeat (3) @(negedge clk);
    check(in_beats == 8, "input blocked at the frame boundary");
    check(!drained, "window not open while outputs are pending");
    wait (drained);
    check(pending.size() == 0 && out_left == 0, "window opens only after the last output");
    check(switch_cnt == 1, "switch counted");
    cfg_write(0, 4, 1'b1);                    // 4 % PE0=2 and 4 % SIMD1=4
    cfg_write(0, 6, 1'b0);                    // 6 % SIMD1 != 0
    cfg_write(1, 4, 1'b1);                    // 4 % PE1=4, 4 % SIMD2=2
    cfg_write(1, 12, 1'b0);                   // above worst case
    cfg_write(2, 2, 1'b0);                    // last layer is fixed
    @(negedge clk);
    sw_req = 0;
    wait (in_beats == 16);
    check(drained_in == 0, "no input admitted inside the switch window");
    check(cout_rt[0] == 4 && cout_rt[1] == 4 && cout_rt[2] == 4, "new model active");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
