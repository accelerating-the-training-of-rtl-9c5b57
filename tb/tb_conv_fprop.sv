// tb_conv_fprop: runs the convolution engine at a reduced size (4 channels,
// 7x7 input, 3x3 kernels, stride 2, padding 1, parallelism 2, one 24-point
// output unit per run). A 3-kernel layer (48 points) takes two runs, the
// second starting at FirstOutput 24 in the middle of kernel 1; a 1-kernel
// layer (16 points) takes one last run padded to 24. Every output point is
// compared with a direct convolution computed here, the burst padding zeros
// are counted, and each run's cycle count is checked against
// load + points * (channels/PAR) + padding + 1. The input stream has random
// gaps.
module tb_conv_fprop;
  import cnn_pkg::*;

  localparam int N_CH = 4, IN_DIM = 7, K = 3, S = 2, PADP = 1, PAR = 2, KPR = 2;
  localparam int OD = (IN_DIM - K + 2*PADP) / S + 1;
  localparam int IN_SZ = N_CH * IN_DIM * IN_DIM;

  logic clk = 0, rst_n = 0, enable = 1;
  layer_ctrl_t ctrl;
  fmem_wr_t fmem_wr;
  stream_t in, out;
  logic in_ready, busy, done;
  logic [31:0] first_out_r;
  int checks = 0, failures = 0;

  conv_fprop #(.N_CH(N_CH), .IN_DIM(IN_DIM), .KSIZE(K), .STRIDE(S), .PAD(PADP),
               .PAR(PAR), .KPR(KPR), .BURST_MULT(1)) dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .ctrl(ctrl), .fmem_wr(fmem_wr), .first_out(first_out_r),
    .in(in), .in_ready(in_ready), .out(out), .busy(busy), .done(done));

  always #5 clk = ~clk;

  data_t vol [IN_SZ];
  data_t w   [KPR][N_CH][K][K];
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

  data_t wl [3][N_CH][K][K];  // the layer's kernels
  int    lay_pts = 0;           // points the layer wrote in earlier runs

  // One run: kernels kb and kb+1 (when they exist) in FMem, the output unit
  // starting at layer point first_out.
  task automatic run(input int n_ker, input int first_out, input logic last, input act_e act);
    int exp_v, sum, iy, ix, pads, gaps_seen, kb, units, cnt;
    kb = first_out / (OD * OD);
    units = (n_ker - kb < KPR) ? n_ker - kb : KPR;
    cnt = units * OD * OD - first_out % (OD * OD);
    if (cnt > BURST_SIZE) cnt = BURST_SIZE;
    for (int k = 0; k < units; k++)
      for (int c = 0; c < N_CH; c++)
        for (int ky = 0; ky < K; ky++)
          for (int kx = 0; kx < K; kx++) begin
            w[k][c][ky][kx] = wl[kb + k][c][ky][kx];
            @(negedge clk);
            fmem_wr.we = 1;
            fmem_wr.addr = 16'(((k * N_CH + c) * K + ky) * K + kx);
            fmem_wr.data = w[k][c][ky][kx];
          end
    @(negedge clk);
    fmem_wr.we = 0;
    got.delete();
    idx = 0; ncyc = 0; nstall = 0;
    ctrl = '0; ctrl.start = 1; ctrl.last_run = last; ctrl.act = act; ctrl.run_units = 2'(units);
    first_out_r = first_out;
    @(negedge clk);
    ctrl.start = 0;
    feed = 1;
    @(posedge done);
    feed = 0;
    @(negedge clk);
    // reference for the run's points, in layer order
    for (int n = 0; n < cnt; n++) begin
      int gp, k, oy, ox;
      gp = first_out + n;
      k = gp / (OD * OD) - kb; oy = (gp % (OD * OD)) / OD; ox = gp % OD;
      sum = 0;
      for (int c = 0; c < N_CH; c++)
        for (int ky = 0; ky < K; ky++)
          for (int kx = 0; kx < K; kx++) begin
            iy = oy * S + ky - PADP; ix = ox * S + kx - PADP;
            if (iy >= 0 && ix >= 0 && iy < IN_DIM && ix < IN_DIM)
              sum += (int'(vol[(c * IN_DIM + iy) * IN_DIM + ix]) * int'(w[k][c][ky][kx])) >>> 8;
          end
      exp_v = (sum > 32767) ? 32767 : ((sum < -32768) ? -32768 : sum);
      if (act == ACT_RELU) exp_v = (exp_v <= 0) ? 0 : ((exp_v > 2560) ? 2560 : exp_v);
      checks++;
      if (n >= got.size() || got[n] != exp_v) begin
        failures++;
        $display("FAIL point %0d (k%0d %0d,%0d): got %0d expected %0d", gp, kb + k, oy, ox,
                 (n < got.size()) ? got[n] : -99999, exp_v);
      end
    end
    // burst padding: only the last run, which may hold less than a unit
    pads = got.size() - cnt;
    checks++;
    if (pads != (last ? (BURST_SIZE - (lay_pts + cnt) % BURST_SIZE) % BURST_SIZE : 0)) begin
      failures++;
      $display("FAIL padding: %0d points", pads);
    end
    for (int i = cnt; i < got.size(); i++) if (got[i] != 0) failures++;
    lay_pts = last ? 0 : lay_pts + cnt;
    // busy cycles = load ticks (with gaps) + compute ticks + pad ticks + 1 done state
    gaps_seen = ncyc - IN_SZ - cnt * (N_CH / PAR) - pads - 1;
    checks++;
    if (gaps_seen != nstall) begin
      failures++;
      $display("FAIL cycle count %0d, stalls %0d, excess %0d", ncyc, nstall, gaps_seen);
    end
  endtask

  task automatic new_layer(input int n_ker);
    for (int k = 0; k < n_ker; k++)
      for (int c = 0; c < N_CH; c++)
        for (int ky = 0; ky < K; ky++)
          for (int kx = 0; kx < K; kx++)
            wl[k][c][ky][kx] = data_t'($signed($urandom_range(0, 512)) - 256);
    for (int i = 0; i < IN_SZ; i++) vol[i] = data_t'($signed($urandom_range(0, 1024)) - 512);
  endtask

  initial begin
    ctrl = '0; fmem_wr = '0; feed = 0; idx = 0; first_out_r = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // layer of 3 kernels = 48 points = 2 units; the second run starts inside kernel 1
    new_layer(3);
    run(3, 0, 1'b0, ACT_RELU);
    run(3, BURST_SIZE, 1'b1, ACT_RELU);
    // layer of 1 kernel = 16 points: one run padded to a unit
    new_layer(1);
    run(1, 0, 1'b1, ACT_NONE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
