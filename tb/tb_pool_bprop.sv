// tb_pool_bprop: runs the pooling backward engine at a reduced size (3
// channels, 6x6 input, 2x2 window, stride 2) with ReLU after pooling. A max
// pooling mask is built here from a random input, delta = Error x f'(FwdOut)
// is computed here, and every output point is compared with mask * delta of
// its window; burst padding of the last run is counted.
module tb_pool_bprop;
  import cnn_pkg::*;

  localparam int N_CH = 3, IN_DIM = 6, W = 2, S = 2;
  localparam int OD = (IN_DIM - W) / S + 1;
  localparam int D_SZ = N_CH * OD * OD, M_SZ = N_CH * IN_DIM * IN_DIM;

  logic clk = 0, rst_n = 0, enable = 1;
  layer_ctrl_t ctrl;
  stream_t fo, er, mk, out;
  logic de_ready, mask_ready, busy, done;
  int checks = 0, failures = 0;

  pool_bprop #(.N_CH(N_CH), .IN_DIM(IN_DIM), .WSIZE(W), .STRIDE(S)) dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .ctrl(ctrl), .fwd_out(fo), .err(er),
    .de_ready(de_ready), .mask(mk), .mask_ready(mask_ready), .out(out), .busy(busy),
    .done(done));

  always #5 clk = ~clk;

  data_t fov [D_SZ];
  data_t erv [D_SZ];
  data_t mkv [M_SZ];
  int    di, mi;
  logic  feed, gap;
  int    got [$];

  always_comb begin
    fo.valid = feed && (di < D_SZ) && !gap;
    fo.data  = fov[(di < D_SZ) ? di : 0];
    er.valid = fo.valid;
    er.data  = erv[(di < D_SZ) ? di : 0];
    mk.valid = feed && (mi < M_SZ);
    mk.data  = mkv[(mi < M_SZ) ? mi : 0];
  end
  always @(posedge clk) if (rst_n) begin
    if (fo.valid && de_ready) di <= di + 1;
    if (mk.valid && mask_ready) mi <= mi + 1;
    gap <= ($urandom_range(0, 4) == 0);
    if (out.valid) got.push_back(int'(out.data));
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pads;
    ctrl = '0; feed = 0; di = 0; mi = 0;
    // forward input, its max pooling, masks and errors
    for (int c = 0; c < N_CH; c++)
      for (int oy = 0; oy < OD; oy++)
        for (int ox = 0; ox < OD; ox++) begin
          int best, by, bx;
          best = -1;
          for (int wy = 0; wy < W; wy++)
            for (int wx = 0; wx < W; wx++) begin
              int v;
              v = $urandom_range(0, 1000) - 500;
              mkv[(c * IN_DIM + oy * S + wy) * IN_DIM + ox * S + wx] = '0;
              if (best == -1 || v > best) begin best = v; by = wy; bx = wx; end
            end
          mkv[(c * IN_DIM + oy * S + by) * IN_DIM + ox * S + bx] = ONE;
          fov[(c * OD + oy) * OD + ox] = data_t'((best < 0) ? 0 : best);  // ReLU output
          erv[(c * OD + oy) * OD + ox] = data_t'($signed($urandom_range(0, 1024)) - 512);
        end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    ctrl.start = 1; ctrl.last_run = 1; ctrl.act = ACT_RELU;
    @(negedge clk);
    ctrl.start = 0;
    feed = 1;
    @(posedge done);
    @(negedge clk);
    for (int c = 0; c < N_CH; c++)
      for (int y = 0; y < IN_DIM; y++)
        for (int x = 0; x < IN_DIM; x++) begin
          int d, e, n;
          n = (c * OD + y / S) * OD + x / S;
          d = (fov[n] > 0) ? int'(erv[n]) : 0;
          e = (int'(mkv[(c * IN_DIM + y) * IN_DIM + x]) * d) >>> 8;
          n = (c * IN_DIM + y) * IN_DIM + x;
          checks++;
          if (n >= got.size() || got[n] != e) begin
            failures++;
            $display("FAIL c%0d (%0d,%0d): got %0d expected %0d", c, y, x,
                     (n < got.size()) ? got[n] : -99999, e);
          end
        end
    pads = got.size() - M_SZ;
    checks++;
    if (pads != (BURST_SIZE - M_SZ % BURST_SIZE) % BURST_SIZE) begin
      failures++;
      $display("FAIL padding: %0d points", pads);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
