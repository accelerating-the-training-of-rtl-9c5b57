// tb_conv_bprop: runs the convolution backward engine at a reduced size
// (3 channels, 5x5 input, 4 kernels 3x3, stride 2, padding 1, parallelism 2
// over kernels, sigmoid activation) in two runs: channels 0-1, then channel 2
// as the layer's last run. The error points are compared with a scatter-form
// reference (each delta point times each weight added into the input point it
// came from), every weight-update vector with delta * FwdIn(window), and the
// burst padding and compute cycle count are checked.
module tb_conv_bprop;
  import cnn_pkg::*;

  localparam int N_CH = 3, IN_DIM = 5, N_KER = 4, K = 3, S = 2, PADP = 1, PAR = 2, CPR = 2;
  localparam int OD = (IN_DIM - K + 2*PADP) / S + 1;
  localparam int D_SZ = N_KER * OD * OD, X1 = IN_DIM * IN_DIM;

  logic clk = 0, rst_n = 0, enable = 1;
  layer_ctrl_t ctrl;
  fmem_wr_t fmem_wr;
  stream_t fo, er, fi, out;
  logic de_ready, fi_ready, wu_valid, busy, done;
  data_t wu [K*K];
  int checks = 0, failures = 0;

  conv_bprop #(.N_CH(N_CH), .IN_DIM(IN_DIM), .N_KER(N_KER), .KSIZE(K), .STRIDE(S),
               .PAD(PADP), .PAR(PAR), .CPR(CPR)) dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .ctrl(ctrl), .fmem_wr(fmem_wr),
    .fwd_out(fo), .err(er), .de_ready(de_ready), .fwd_in(fi), .fwd_in_ready(fi_ready),
    .out(out), .wu_valid(wu_valid), .wu(wu), .busy(busy), .done(done));

  always #5 clk = ~clk;

  data_t fov [D_SZ];
  data_t erv [D_SZ];
  data_t xin [N_CH][IN_DIM][IN_DIM];
  data_t w   [N_KER][N_CH][K][K];
  int    dl  [D_SZ];
  int    di, xi, nx, c0, ncomp;
  logic  feed, gap;
  int    got [$];
  int    gwu [$];

  always_comb begin
    fo.valid = feed && (di < D_SZ) && !gap;
    fo.data  = fov[(di < D_SZ) ? di : 0];
    er.valid = fo.valid;
    er.data  = erv[(di < D_SZ) ? di : 0];
    fi.valid = feed && (xi < nx);
    fi.data  = xin[c0 + xi / X1][(xi % X1) / IN_DIM][xi % IN_DIM];
  end
  always @(posedge clk) if (rst_n) begin
    if (fo.valid && de_ready) di <= di + 1;
    if (fi.valid && fi_ready) xi <= xi + 1;
    gap <= ($urandom_range(0, 4) == 0);
    if (out.valid) got.push_back(int'(out.data));
    if (wu_valid) for (int t = 0; t < K*K; t++) gwu.push_back(int'(wu[t]));
    if (busy && xi >= nx) ncomp <= ncomp + 1;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(input int v);
    return (v > 32767) ? 32767 : ((v < -32768) ? -32768 : v);
  endfunction

  int lay_pts = 0;  // points the layer wrote in earlier runs

  task automatic run(input int first_c, input int units, input logic last);
    int pads, n, ref_err [CPR][IN_DIM][IN_DIM];
    c0 = first_c;
    for (int k = 0; k < N_KER; k++)
      for (int cc = 0; cc < units; cc++)
        for (int t = 0; t < K*K; t++) begin
          @(negedge clk);
          fmem_wr.we = 1;
          fmem_wr.addr = 16'((k * CPR + cc) * K * K + t);
          fmem_wr.data = w[k][first_c + cc][t / K][t % K];
        end
    @(negedge clk);
    fmem_wr.we = 0;
    got.delete(); gwu.delete();
    di = 0; xi = 0; nx = units * X1; ncomp = 0;
    ctrl = '0; ctrl.start = 1; ctrl.last_run = last; ctrl.act = ACT_SIGMOID;
    ctrl.run_units = 2'(units);
    @(negedge clk);
    ctrl.start = 0;
    feed = 1;
    @(posedge done);
    feed = 0;
    @(negedge clk);
    // error reference, scatter form
    for (int cc = 0; cc < CPR; cc++)
      for (int y = 0; y < IN_DIM; y++)
        for (int x = 0; x < IN_DIM; x++) ref_err[cc][y][x] = 0;
    for (int cc = 0; cc < units; cc++)
      for (int k = 0; k < N_KER; k++)
        for (int oy = 0; oy < OD; oy++)
          for (int ox = 0; ox < OD; ox++)
            for (int ky = 0; ky < K; ky++)
              for (int kx = 0; kx < K; kx++) begin
                int iy, ix;
                iy = oy * S + ky - PADP; ix = ox * S + kx - PADP;
                if (iy >= 0 && ix >= 0 && iy < IN_DIM && ix < IN_DIM)
                  ref_err[cc][iy][ix] += (dl[(k * OD + oy) * OD + ox]
                                          * int'(w[k][first_c + cc][ky][kx])) >>> 8;
              end
    for (int cc = 0; cc < units; cc++)
      for (int y = 0; y < IN_DIM; y++)
        for (int x = 0; x < IN_DIM; x++) begin
          n = (cc * IN_DIM + y) * IN_DIM + x;
          checks++;
          if (n >= got.size() || got[n] != sat(ref_err[cc][y][x])) begin
            failures++;
            $display("FAIL err c%0d (%0d,%0d): got %0d expected %0d", first_c + cc, y, x,
                     (n < got.size()) ? got[n] : -99999, sat(ref_err[cc][y][x]));
          end
        end
    pads = got.size() - units * X1;
    checks++;
    // the layer's output over all runs is padded once, after its last run
    if (pads != (last ? (BURST_SIZE - (lay_pts + units * X1) % BURST_SIZE) % BURST_SIZE : 0)) begin
      failures++;
      $display("FAIL padding: %0d points", pads);
    end
    lay_pts = last ? 0 : lay_pts + units * X1;
    // weight-update vectors
    checks++;
    if (gwu.size() != units * N_KER * OD * OD * K * K) begin
      failures++;
      $display("FAIL %0d weight-update values", gwu.size());
    end
    n = 0;
    for (int cc = 0; cc < units; cc++)
      for (int k = 0; k < N_KER; k++)
        for (int oy = 0; oy < OD; oy++)
          for (int ox = 0; ox < OD; ox++)
            for (int t = 0; t < K*K; t++) begin
              int iy, ix, e;
              iy = oy * S + t / K - PADP; ix = ox * S + t % K - PADP;
              e = 0;
              if (iy >= 0 && ix >= 0 && iy < IN_DIM && ix < IN_DIM)
                e = sat((dl[(k * OD + oy) * OD + ox] * int'(xin[first_c + cc][iy][ix])) >>> 8);
              checks++;
              if (n >= gwu.size() || gwu[n] != e) begin
                failures++;
                if (failures < 10)
                  $display("FAIL wu c%0d k%0d (%0d,%0d) t%0d: got %0d expected %0d",
                           first_c + cc, k, oy, ox, t, (n < gwu.size()) ? gwu[n] : -99999, e);
              end
              n++;
            end
    // compute ticks after the loads: error + weight update + padding + done
    checks++;
    if (ncomp != units * (N_KER / PAR) * X1 + units * N_KER * OD * OD + pads + 1) begin
      failures++;
      $display("FAIL compute cycles %0d", ncomp);
    end
  endtask

  initial begin
    ctrl = '0; fmem_wr = '0; feed = 0; di = 0; xi = 0; nx = 0; c0 = 0;
    for (int i = 0; i < D_SZ; i++) begin
      int d;
      fov[i] = data_t'($urandom_range(0, 256));              // sigmoid outputs in [0,1]
      erv[i] = data_t'($signed($urandom_range(0, 1024)) - 512);
      d = (int'(fov[i]) * (256 - int'(fov[i]))) >>> 8;        // sigmoid'
      dl[i] = sat((int'(erv[i]) * d) >>> 8);
    end
    for (int c = 0; c < N_CH; c++)
      for (int y = 0; y < IN_DIM; y++)
        for (int x = 0; x < IN_DIM; x++) xin[c][y][x] = data_t'($signed($urandom_range(0, 1024)) - 512);
    for (int k = 0; k < N_KER; k++)
      for (int c = 0; c < N_CH; c++)
        for (int t = 0; t < K*K; t++) w[k][c][t / K][t % K] = data_t'($signed($urandom_range(0, 512)) - 256);
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 2, 1'b0);
    run(2, 1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
