// tb_workloads: layer engines at the sizes of the large networks evaluated
// for this design, run as single kernel calls.
//
// The validation network's top fixes every engine's geometry, so the large
// networks need the engines re-instantiated with their own parameters, as
// each block is compiled for its network. This testbench does that for three
// layers and checks each output point, the burst padding and the run's cycle
// count:
//   - AlexNet conv1: 3x227x227 input, 11x11 kernels, stride 4, no padding,
//     BurstMult 125, Parallelism 1 (first layer of forward block 1); the
//     layer's last run (96 kernels, 290400 points, run 96 of 97 starting at
//     FirstOutput 288000 in kernel 95: 2400 points padded to 3000).
//   - VGG16 conv1: 3x224x224 input, 3x3 kernels, stride 1, padding 1,
//     BurstMult 2000, Parallelism 1; the layer's second run (FirstOutput
//     48000, a 48000-point unit spanning the end of kernel 0 and kernel 1).
//   - VGG16 last fully connected layer: tile engine with BurstMult 6 and
//     Parallelism 24 (forward block 8), so 144x144 tiles; two input tiles of
//     one output tile, the second adding the first's partial sums.
// The AlexNet and VGG16 layer sizes other than the VGG16 input are the
// standard ones of those networks. Weights and inputs are random.
module tb_workloads;
  import cnn_pkg::*;

  localparam int A_CH = 3, A_IN = 227, A_K = 11, A_S = 4, A_P = 0, A_BM = 125;
  localparam int A_OD = (A_IN - A_K + 2*A_P) / A_S + 1;
  localparam int V_CH = 3, V_IN = 224, V_K = 3, V_S = 1, V_P = 1, V_BM = 2000;
  localparam int V_OD = (V_IN - V_K + 2*V_P) / V_S + 1;
  // FirstOutput of the run checked: AlexNet's last run (96 kernels of 55x55,
  // unit 3000: run 96 starts at point 625 of kernel 95), VGG16's second run
  // (unit 48000: from point 48000 of kernel 0 into kernel 1)
  localparam logic [31:0] A_FO = 32'd288000, V_FO = 32'd48000;
  localparam int F_BM = 6, F_PAR = 24, FB = BURST_SIZE * F_BM;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  layer_ctrl_t a_ctrl = '0, v_ctrl = '0, f_ctrl = '0;
  fmem_wr_t    a_wr = '0, v_wr = '0, f_wr = '0;
  stream_t     a_in, a_out, v_in, v_out, f_in, f_ps, f_out;
  logic        a_rdy, a_busy, a_done, v_rdy, v_busy, v_done;
  logic        f_rdy, f_ps_rdy, f_stall, f_busy, f_done;

  conv_fprop #(.N_CH(A_CH), .IN_DIM(A_IN), .KSIZE(A_K), .STRIDE(A_S), .PAD(A_P),
               .PAR(1), .BURST_MULT(A_BM)) u_alex (
    .clk, .rst_n, .enable(1'b1), .ctrl(a_ctrl), .fmem_wr(a_wr), .first_out(A_FO), .in(a_in),
    .in_ready(a_rdy), .out(a_out), .busy(a_busy), .done(a_done));
  conv_fprop #(.N_CH(V_CH), .IN_DIM(V_IN), .KSIZE(V_K), .STRIDE(V_S), .PAD(V_P),
               .PAR(1), .BURST_MULT(V_BM)) u_vgg (
    .clk, .rst_n, .enable(1'b1), .ctrl(v_ctrl), .fmem_wr(v_wr), .first_out(V_FO), .in(v_in),
    .in_ready(v_rdy), .out(v_out), .busy(v_busy), .done(v_done));
  fcon_fprop #(.BURST_MULT(F_BM), .PAR(F_PAR)) u_fc (
    .clk, .rst_n, .enable(1'b1), .ctrl(f_ctrl), .fmem_wr(f_wr), .in(f_in),
    .in_ready(f_rdy), .psum(f_ps), .psum_ready(f_ps_rdy), .out(f_out),
    .stall(f_stall), .busy(f_busy), .done(f_done));

  tb_stream_src s_a (.clk, .ready(a_rdy), .gaps(1'b0), .s(a_in));
  tb_stream_src s_v (.clk, .ready(v_rdy), .gaps(1'b0), .s(v_in));
  tb_stream_src s_f (.clk, .ready(f_rdy), .gaps(1'b0), .s(f_in));
  tb_stream_src s_p (.clk, .ready(f_ps_rdy), .gaps(1'b0), .s(f_ps));

  int a_got [$], v_got [$], f_got [$];
  int a_cyc = 0, v_cyc = 0, f_cyc = 0;
  always @(posedge clk) if (rst_n) begin
    if (a_out.valid) a_got.push_back(int'(a_out.data));
    if (v_out.valid) v_got.push_back(int'(v_out.data));
    if (f_out.valid) f_got.push_back(int'(f_out.data));
    if (a_busy) a_cyc++;
    if (v_busy) v_cyc++;
    if (f_busy) f_cyc++;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(input int v);
    return (v > 32767) ? 32767 : ((v < -32768) ? -32768 : v);
  endfunction
  function automatic int mulq(input int a, input int b);
    return (a * b) >>> FRAC;
  endfunction
  function automatic int rnd(input int lo, input int hi);
    return $signed($urandom_range(0, hi - lo)) + lo;
  endfunction
  task automatic check(input int got, input int exp_v, input string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  int ax [], aw [], vx [], vw [], fx [], fw [], fp [];

  // reference of one convolution run: the unit from first_out, in layer order
  task automatic conv_check(input string nm, input int nch, input int dim, input int k,
                            input int s, input int p, input int od, input int unit,
                            input int first_out, input int units, input logic last,
                            const ref int x [], const ref int w [],
                            const ref int got [$], input int cyc);
    int pads, n, cnt, kb;
    kb  = first_out / (od * od);
    cnt = units * od * od - first_out % (od * od);
    if (cnt > unit) cnt = unit;
    n = 0;
    for (int gp = first_out; gp < first_out + cnt; gp++) begin
      int sum, kk, oy, ox;
      kk = gp / (od * od) - kb; oy = (gp % (od * od)) / od; ox = gp % od;
      sum = 0;
      for (int c = 0; c < nch; c++)
        for (int ky = 0; ky < k; ky++)
          for (int kx = 0; kx < k; kx++) begin
            int iy, ix;
            iy = oy * s + ky - p; ix = ox * s + kx - p;
            if (iy >= 0 && ix >= 0 && iy < dim && ix < dim)
              sum += mulq(x[(c * dim + iy) * dim + ix], w[((kk * nch + c) * k + ky) * k + kx]);
          end
      check((n < got.size()) ? got[n] : -99999, act_ref(sat(sum)),
            $sformatf("%s k%0d (%0d,%0d)", nm, kb + kk, oy, ox));
      n++;
    end
    // padding only on the layer's last run, up to a whole unit
    pads = got.size() - n;
    check(pads, last ? (unit - n % unit) % unit : 0, {nm, " padding"});
    for (int i = n; i < got.size(); i++) check(got[i], 0, {nm, " padding value"});
    check(cyc, nch * dim * dim + nch * n + pads + 1, {nm, " cycles"});
    $display("%s: %0d outputs, %0d padding points, %0d cycles", nm, n, pads, cyc);
  endtask

  function automatic int act_ref(input int v);
    return int'(fx_act(ACT_RELU, data_t'(v)));
  endfunction

  initial begin
    ax = new[A_CH * A_IN * A_IN]; aw = new[2 * A_CH * A_K * A_K];
    vx = new[V_CH * V_IN * V_IN]; vw = new[2 * V_CH * V_K * V_K];
    fx = new[2 * FB]; fw = new[2 * FB * FB]; fp = new[FB];
    foreach (ax[i]) ax[i] = rnd(-256, 256);
    foreach (aw[i]) aw[i] = rnd(-12, 12);
    foreach (vx[i]) vx[i] = rnd(-256, 256);
    foreach (vw[i]) vw[i] = rnd(-64, 64);
    foreach (fx[i]) fx[i] = rnd(-256, 256);
    foreach (fw[i]) fw[i] = rnd(-16, 16);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // weights: FMem address (k*NChannels + c)*K^2 + ky*K + kx, one per cycle
    for (int i = 0; i < 2 * A_CH * A_K * A_K; i++) begin
      @(negedge clk); a_wr = '{we: 1'b1, addr: 16'(i), data: data_t'(aw[i])};
    end
    for (int i = 0; i < 2 * V_CH * V_K * V_K; i++) begin
      @(negedge clk); v_wr = '{we: 1'b1, addr: 16'(i), data: data_t'(vw[i])};
    end
    @(negedge clk); a_wr = '0; v_wr = '0;
    foreach (ax[i]) s_a.push(data_t'(ax[i]));
    foreach (vx[i]) s_v.push(data_t'(vx[i]));
    a_ctrl = '0; a_ctrl.last_run = 1'b1; a_ctrl.act = ACT_RELU; a_ctrl.run_units = 2'd1;
    v_ctrl = '0; v_ctrl.last_run = 1'b0; v_ctrl.act = ACT_RELU; v_ctrl.run_units = 2'd2;
    a_ctrl.start = 1'b1; v_ctrl.start = 1'b1;
    @(negedge clk); a_ctrl.start = 1'b0; v_ctrl.start = 1'b0;
    // the fully connected tiles run alongside
    for (int t = 0; t < 2; t++) begin
      for (int i = 0; i < FB; i++)
        for (int o = 0; o < FB; o++) begin
          @(negedge clk); f_wr = '{we: 1'b1, addr: 16'(i * FB + o), data: data_t'(fw[(t * FB + i) * FB + o])};
        end
      @(negedge clk); f_wr = '0;
      f_got.delete(); f_cyc = 0;
      for (int i = 0; i < FB; i++) s_f.push(data_t'(fx[t * FB + i]));
      if (t == 1) for (int o = 0; o < FB; o++) s_p.push(data_t'(fp[o]));
      f_ctrl = '0; f_ctrl.first_in = (t == 0); f_ctrl.last_in = (t == 1); f_ctrl.act = ACT_NONE;
      f_ctrl.start = 1'b1;
      @(negedge clk); f_ctrl.start = 1'b0;
      @(posedge f_done); @(negedge clk);
      for (int o = 0; o < FB; o++) begin
        int sum;
        sum = (t == 1) ? fp[o] : 0;
        for (int i = 0; i < FB; i++) sum += mulq(fx[t * FB + i], fw[(t * FB + i) * FB + o]);
        check((o < f_got.size()) ? f_got[o] : -99999, sat(sum), $sformatf("vgg fc tile %0d out %0d", t, o));
        fp[o] = (o < f_got.size()) ? f_got[o] : 0;
      end
      check(f_got.size(), FB, "vgg fc output count");
      check(f_cyc, FB + (FB / F_PAR) * FB + 1, "vgg fc cycles");
      $display("vgg fc tile %0d: %0d outputs, %0d cycles", t, f_got.size(), f_cyc);
    end
    wait (!a_busy && !v_busy);
    @(negedge clk);
    conv_check("alexnet conv1", A_CH, A_IN, A_K, A_S, A_P, A_OD, BURST_SIZE * A_BM, int'(A_FO), 1, 1'b1,
               ax, aw, a_got, a_cyc);
    conv_check("vgg16 conv1", V_CH, V_IN, V_K, V_S, V_P, V_OD, BURST_SIZE * V_BM, int'(V_FO), 2, 1'b0,
               vx, vw, v_got, v_cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
