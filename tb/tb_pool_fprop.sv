// tb_pool_fprop: runs the pooling engine at a reduced size (3 channels, 6x6,
// 2x2 window, stride 2) twice: max pooling with ReLU, then mean pooling as
// the layer's last run. Outputs are compared with a reference pooling, burst
// padding is counted, and the busy time is checked to be one tick per input
// point plus stalls of the input stream, padding, the window latency and the done state.
module tb_pool_fprop;
  import cnn_pkg::*;

  localparam int N_CH = 3, IN_DIM = 6, W = 2, S = 2;
  localparam int OD = (IN_DIM - W) / S + 1;
  localparam int IN_SZ = N_CH * IN_DIM * IN_DIM;

  logic clk = 0, rst_n = 0, enable = 1;
  layer_ctrl_t ctrl;
  stream_t in, out;
  logic in_ready, busy, done;
  int checks = 0, failures = 0;

  pool_fprop #(.N_CH(N_CH), .IN_DIM(IN_DIM), .WSIZE(W), .STRIDE(S)) dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .ctrl(ctrl), .in(in), .in_ready(in_ready),
    .out(out), .busy(busy), .done(done));

  always #5 clk = ~clk;

  data_t vol [IN_SZ];
  int    idx, ncyc, nstall;
  logic  feed, gap;
  int    got [$];

  always_comb begin
    in.valid = feed && (idx < IN_SZ) && !gap;
    in.data  = vol[(idx < IN_SZ) ? idx : 0];
  end
  always @(posedge clk) if (rst_n) begin
    if (in.valid && in_ready) idx <= idx + 1;
    gap <= ($urandom_range(0, 4) == 0);
    if (out.valid) got.push_back(int'(out.data));
    if (busy) ncyc <= ncyc + 1;
    if (busy && idx < IN_SZ && !in.valid) nstall <= nstall + 1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input pool_e mode, input logic last, input act_e act);
    int e, pads, total;
    for (int i = 0; i < IN_SZ; i++) vol[i] = data_t'($signed($urandom_range(0, 1024)) - 512);
    got.delete();
    idx = 0; ncyc = 0; nstall = 0;
    ctrl = '0; ctrl.start = 1; ctrl.last_run = last; ctrl.act = act; ctrl.pool_mode = mode;
    @(negedge clk);
    ctrl.start = 0;
    feed = 1;
    @(posedge done);
    feed = 0;
    @(negedge clk);
    total = N_CH * OD * OD;
    for (int c = 0; c < N_CH; c++)
      for (int oy = 0; oy < OD; oy++)
        for (int ox = 0; ox < OD; ox++) begin
          int mx, sm, n;
          mx = -40000; sm = 0;
          for (int wy = 0; wy < W; wy++)
            for (int wx = 0; wx < W; wx++) begin
              int v;
              v = int'(vol[(c * IN_DIM + oy * S + wy) * IN_DIM + ox * S + wx]);
              if (v > mx) mx = v;
              sm += v;
            end
          e = (mode == POOL_MAX) ? mx : (sm >>> 2);
          if (act == ACT_RELU) e = (e <= 0) ? 0 : ((e > 2560) ? 2560 : e);
          n = (c * OD + oy) * OD + ox;
          checks++;
          if (n >= got.size() || got[n] != e) begin
            failures++;
            $display("FAIL c%0d (%0d,%0d): got %0d expected %0d", c, oy, ox,
                     (n < got.size()) ? got[n] : -99999, e);
          end
        end
    pads = got.size() - total;
    checks++;
    if (pads != (last ? (BURST_SIZE - total % BURST_SIZE) % BURST_SIZE : 0)) begin
      failures++;
      $display("FAIL padding: %0d points", pads);
    end
    checks++;
    if (ncyc != IN_SZ + nstall + pads + 2) begin
      failures++;
      $display("FAIL cycles %0d, expected %0d", ncyc, IN_SZ + nstall + pads + 2);
    end
  endtask

  initial begin
    ctrl = '0; feed = 0; idx = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(POOL_MAX, 1'b0, ACT_RELU);
    run(POOL_MEAN, 1'b1, ACT_NONE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
