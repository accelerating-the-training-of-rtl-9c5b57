// tb_cnn_dfe: end-to-end test of the validation network on cnn_dfe at its
// default sizes (3x28x28 input, two 16-kernel 3x3 convolutions, 2x2 max
// pooling, fully connected 3136 -> 1000 -> 10).
//
// The testbench plays the host and the off-chip memory. It runs, block by
// block and layer by layer, one complete training step for one sample:
// forward block 1 (conv1, conv2, pool), forward block 2 (fc1, fc2), then
// backward block 2 (fc2, fc1) and backward block 1 (pool, conv2, conv1). For
// each kernel call it loads FMem with the weights the run needs, sets the
// run controls (start, last run, first/last input tile, run size, and for
// the convolutions FirstOutput: one 24*BurstMult output unit per run), streams
// the inputs the layer reads from memory and collects what the layer writes.
// Every output point, every weight-update value and the burst padding are
// compared with a reference computed here from the same inputs. MemControl
// bits are dropped at random to hold layers, and the partial-sum streams have
// random gaps so the fully connected engines stall. The test counts how often
// each mechanism happened and fails a mechanism that never did.
module tb_cnn_dfe;
  import cnn_pkg::*;

  // network, equal to the defaults of cnn_dfe
  localparam int IN_CH = 3, IN_DIM = 28, N_KER = 16, K = 3, S = 1, P = 1;
  localparam int PW = 2, PS = 2, C1BM = 15, C2PAR = 8, FCPAR = 12;
  localparam int FC1_OUT = 1000, FC2_OUT = 10;
  localparam int CD = (IN_DIM - K + 2*P) / S + 1;
  localparam int PD = (CD - PW) / PS + 1;
  localparam int FC1_IN = N_KER * PD * PD;
  localparam int B = BURST_SIZE, K2 = K * K, NL = 10;
  localparam int L_CONV1 = 0, L_CONV2 = 1, L_POOL = 2, L_FC1 = 3, L_FC2 = 4;
  localparam int L_FC2_B = 5, L_FC1_B = 6, L_POOL_B = 7, L_CONV2_B = 8, L_CONV1_B = 9;

  logic clk = 0, rst_n = 0;
  logic [NL-1:0] mem_control, active, busy, done;
  layer_ctrl_t ctrl [NL];
  fmem_wr_t fmem_wr [NL];
  logic hold = 0, gaps = 0;

  logic [31:0] c1_fo = '0, c2_fo = '0;
  stream_t conv1_in, conv1_out, conv2_in, conv2_out, pool_in, pool_out;
  stream_t fc1_in, fc1_psum, fc1_out, fc2_in, fc2_psum, fc2_out;
  stream_t fc2b_fo, fc2b_er, fc2b_fi, fc2b_ps, fc2b_out;
  stream_t fc1b_fo, fc1b_er, fc1b_fi, fc1b_ps, fc1b_out;
  stream_t poolb_fo, poolb_er, poolb_mk, poolb_out;
  stream_t conv2b_fo, conv2b_er, conv2b_fi, conv2b_out;
  stream_t conv1b_fo, conv1b_er, conv1b_fi, conv1b_out;
  logic conv1_rdy, conv2_rdy, pool_rdy, fc1_rdy, fc1_ps_rdy, fc2_rdy, fc2_ps_rdy;
  logic fc2b_de_rdy, fc2b_fi_rdy, fc2b_ps_rdy, fc1b_de_rdy, fc1b_fi_rdy, fc1b_ps_rdy;
  logic poolb_de_rdy, poolb_mk_rdy, conv2b_de_rdy, conv2b_fi_rdy, conv1b_de_rdy, conv1b_fi_rdy;
  logic fc2b_wu_valid, fc1b_wu_valid, conv2b_wu_valid, conv1b_wu_valid;
  data_t fc2b_wu [FCPAR], fc1b_wu [FCPAR], conv2b_wu [K2], conv1b_wu [K2];
  logic [1:0] fc_stall, fcb_stall;

  cnn_dfe dut (
    .clk, .rst_n, .mem_control, .ctrl, .fmem_wr, .busy, .done,
    .conv1_first_out(c1_fo), .conv2_first_out(c2_fo),
    .conv1_in, .conv1_in_ready(conv1_rdy), .conv1_out,
    .conv2_in, .conv2_in_ready(conv2_rdy), .conv2_out,
    .pool_in, .pool_in_ready(pool_rdy), .pool_out,
    .fc1_in, .fc1_in_ready(fc1_rdy), .fc1_psum, .fc1_psum_ready(fc1_ps_rdy), .fc1_out,
    .fc2_in, .fc2_in_ready(fc2_rdy), .fc2_psum, .fc2_psum_ready(fc2_ps_rdy), .fc2_out,
    .fc_stall,
    .fc2b_fwd_out(fc2b_fo), .fc2b_err(fc2b_er), .fc2b_de_ready(fc2b_de_rdy),
    .fc2b_fwd_in(fc2b_fi), .fc2b_fwd_in_ready(fc2b_fi_rdy),
    .fc2b_psum(fc2b_ps), .fc2b_psum_ready(fc2b_ps_rdy), .fc2b_out,
    .fc2b_wu_valid, .fc2b_wu,
    .fc1b_fwd_out(fc1b_fo), .fc1b_err(fc1b_er), .fc1b_de_ready(fc1b_de_rdy),
    .fc1b_fwd_in(fc1b_fi), .fc1b_fwd_in_ready(fc1b_fi_rdy),
    .fc1b_psum(fc1b_ps), .fc1b_psum_ready(fc1b_ps_rdy), .fc1b_out,
    .fc1b_wu_valid, .fc1b_wu, .fcb_stall,
    .poolb_fwd_out(poolb_fo), .poolb_err(poolb_er), .poolb_de_ready(poolb_de_rdy),
    .poolb_mask(poolb_mk), .poolb_mask_ready(poolb_mk_rdy), .poolb_out,
    .conv2b_fwd_out(conv2b_fo), .conv2b_err(conv2b_er), .conv2b_de_ready(conv2b_de_rdy),
    .conv2b_fwd_in(conv2b_fi), .conv2b_fwd_in_ready(conv2b_fi_rdy), .conv2b_out,
    .conv2b_wu_valid, .conv2b_wu,
    .conv1b_fwd_out(conv1b_fo), .conv1b_err(conv1b_er), .conv1b_de_ready(conv1b_de_rdy),
    .conv1b_fwd_in(conv1b_fi), .conv1b_fwd_in_ready(conv1b_fi_rdy), .conv1b_out,
    .conv1b_wu_valid, .conv1b_wu
  );

  // memory read streams
  tb_stream_src s_c1  (.clk, .ready(conv1_rdy),   .gaps(1'b0), .s(conv1_in));
  tb_stream_src s_c2  (.clk, .ready(conv2_rdy),   .gaps(1'b0), .s(conv2_in));
  tb_stream_src s_pl  (.clk, .ready(pool_rdy),    .gaps(gaps), .s(pool_in));
  tb_stream_src s_f1  (.clk, .ready(fc1_rdy),     .gaps(1'b0), .s(fc1_in));
  tb_stream_src s_f1p (.clk, .ready(fc1_ps_rdy),  .gaps(gaps), .s(fc1_psum));
  tb_stream_src s_f2  (.clk, .ready(fc2_rdy),     .gaps(1'b0), .s(fc2_in));
  tb_stream_src s_f2p (.clk, .ready(fc2_ps_rdy),  .gaps(gaps), .s(fc2_psum));
  tb_stream_src s_f2bo(.clk, .ready(fc2b_de_rdy), .gaps(1'b0), .s(fc2b_fo));
  tb_stream_src s_f2be(.clk, .ready(fc2b_de_rdy), .gaps(gaps), .s(fc2b_er));
  tb_stream_src s_f2bi(.clk, .ready(fc2b_fi_rdy), .gaps(1'b0), .s(fc2b_fi));
  tb_stream_src s_f2bp(.clk, .ready(fc2b_ps_rdy), .gaps(gaps), .s(fc2b_ps));
  tb_stream_src s_f1bo(.clk, .ready(fc1b_de_rdy), .gaps(1'b0), .s(fc1b_fo));
  tb_stream_src s_f1be(.clk, .ready(fc1b_de_rdy), .gaps(1'b0), .s(fc1b_er));
  tb_stream_src s_f1bi(.clk, .ready(fc1b_fi_rdy), .gaps(1'b0), .s(fc1b_fi));
  tb_stream_src s_f1bp(.clk, .ready(fc1b_ps_rdy), .gaps(gaps), .s(fc1b_ps));
  tb_stream_src s_pbo (.clk, .ready(poolb_de_rdy), .gaps(1'b0), .s(poolb_fo));
  tb_stream_src s_pbe (.clk, .ready(poolb_de_rdy), .gaps(gaps), .s(poolb_er));
  tb_stream_src s_pbm (.clk, .ready(poolb_mk_rdy), .gaps(1'b0), .s(poolb_mk));
  tb_stream_src s_c2bo(.clk, .ready(conv2b_de_rdy), .gaps(1'b0), .s(conv2b_fo));
  tb_stream_src s_c2be(.clk, .ready(conv2b_de_rdy), .gaps(1'b0), .s(conv2b_er));
  tb_stream_src s_c2bi(.clk, .ready(conv2b_fi_rdy), .gaps(1'b0), .s(conv2b_fi));
  tb_stream_src s_c1bo(.clk, .ready(conv1b_de_rdy), .gaps(1'b0), .s(conv1b_fo));
  tb_stream_src s_c1be(.clk, .ready(conv1b_de_rdy), .gaps(1'b0), .s(conv1b_er));
  tb_stream_src s_c1bi(.clk, .ready(conv1b_fi_rdy), .gaps(1'b0), .s(conv1b_fi));

  always #5 clk = ~clk;

  // memory write streams and host weight-update streams
  int oq [NL][$];
  int wq [NL][$];
  int n_hold = 0, n_stall = 0, n_pad = 0, n_psum = 0, n_part = 0, n_wu = 0, n_gap = 0;
  int checks = 0, failures = 0;

  always_comb mem_control = active & ~{NL{hold}};

  always @(posedge clk) if (rst_n) begin
    hold <= ($urandom_range(0, 15) == 0);
    if (conv1_out.valid)  oq[L_CONV1].push_back(int'(conv1_out.data));
    if (conv2_out.valid)  oq[L_CONV2].push_back(int'(conv2_out.data));
    if (pool_out.valid)   oq[L_POOL].push_back(int'(pool_out.data));
    if (fc1_out.valid)    oq[L_FC1].push_back(int'(fc1_out.data));
    if (fc2_out.valid)    oq[L_FC2].push_back(int'(fc2_out.data));
    if (fc2b_out.valid)   oq[L_FC2_B].push_back(int'(fc2b_out.data));
    if (fc1b_out.valid)   oq[L_FC1_B].push_back(int'(fc1b_out.data));
    if (poolb_out.valid)  oq[L_POOL_B].push_back(int'(poolb_out.data));
    if (conv2b_out.valid) oq[L_CONV2_B].push_back(int'(conv2b_out.data));
    if (conv1b_out.valid) oq[L_CONV1_B].push_back(int'(conv1b_out.data));
    if (fc2b_wu_valid)   for (int p = 0; p < FCPAR; p++) wq[L_FC2_B].push_back(int'(fc2b_wu[p]));
    if (fc1b_wu_valid)   for (int p = 0; p < FCPAR; p++) wq[L_FC1_B].push_back(int'(fc1b_wu[p]));
    if (conv2b_wu_valid) for (int t = 0; t < K2; t++) wq[L_CONV2_B].push_back(int'(conv2b_wu[t]));
    if (conv1b_wu_valid) for (int t = 0; t < K2; t++) wq[L_CONV1_B].push_back(int'(conv1b_wu[t]));
    if (hold && |(active & busy)) n_hold++;
    if (|fc_stall || |fcb_stall) n_stall++;
    if (gaps && |(active & busy)) n_gap++;
  end

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- helpers ----------------
  function automatic int sat(input int v);
    return (v > 32767) ? 32767 : ((v < -32768) ? -32768 : v);
  endfunction
  function automatic int mulq(input int a, input int b);
    return (a * b) >>> FRAC;
  endfunction
  function automatic int act_ref(input act_e f, input int v);
    return int'(fx_act(f, data_t'(v)));
  endfunction
  function automatic int der_ref(input act_e f, input int y);
    case (f)
      ACT_RELU:    return (y > 0) ? 256 : 0;
      ACT_SIGMOID: return sat(mulq(y, 256 - y));
      default:     return 256;
    endcase
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

  task automatic fmem_write(input int l, input int addr, input int v);
    @(negedge clk);
    fmem_wr[l].we = 1; fmem_wr[l].addr = 16'(addr); fmem_wr[l].data = data_t'(v);
  endtask

  task automatic launch(input int l, input layer_ctrl_t c);
    @(negedge clk);
    fmem_wr[l].we = 0;
    ctrl[l] = c; ctrl[l].start = 1;
    active[l] = 1'b1;
    @(negedge clk);
    ctrl[l].start = 0;
  endtask

  task automatic finish_run(input int l);
    @(posedge done[l]);
    @(negedge clk);
    active[l] = 1'b0;
  endtask

  // drop a layer's padding points and check that they are zero and fill a burst
  task automatic check_pad(input int l, input int nreal, input int unit);
    int pads;
    pads = oq[l].size() - nreal;
    check(pads, (unit - nreal % unit) % unit, $sformatf("layer %0d padding", l));
    for (int i = nreal; i < oq[l].size(); i++) check(oq[l][i], 0, "padding value");
    n_pad += pads;
  endtask

  // ---------------- network state ----------------
  int x0 [], a1 [], a2 [], pl [], h [], y [];
  int e_y [], e_h [], e_p [], e_a2 [], e_a1 [], e_x [], mask [];
  int wc1 [N_KER][IN_CH][K2], wc2 [N_KER][N_KER][K2];
  int wf1 [FC1_IN][FC1_OUT], wf2 [FC1_OUT][FC2_OUT];

  // ---------------- convolution, forward ----------------
  task automatic conv_fwd(input int l, input int nch, input int unit, input act_e act,
                          const ref int xin [], ref int yout []);
    int runs, nreal;
    oq[l].delete();
    nreal = N_KER * CD * CD;
    runs = (nreal + unit - 1) / unit;
    // one output unit per run, from FirstOutput = r * unit; FMem holds the
    // kernel containing that point and the next one
    for (int r = 0; r < runs; r++) begin
      int units, kb, fo;
      layer_ctrl_t c;
      fo = r * unit;
      kb = fo / (CD * CD);
      units = (kb + 1 < N_KER) ? 2 : 1;
      for (int kk = 0; kk < units; kk++)
        for (int ch = 0; ch < nch; ch++)
          for (int t = 0; t < K2; t++)
            fmem_write(l, (kk * nch + ch) * K2 + t,
                       (l == L_CONV1) ? wc1[kb+kk][ch][t] : wc2[kb+kk][ch][t]);
      for (int i = 0; i < nch * CD * CD; i++)
        if (l == L_CONV1) s_c1.push(data_t'(xin[i])); else s_c2.push(data_t'(xin[i]));
      if (l == L_CONV1) c1_fo = 32'(fo); else c2_fo = 32'(fo);
      c = '0; c.last_run = (r == runs - 1); c.act = act; c.run_units = 2'(units);
      if (fo % (CD * CD) != 0) n_part++;
      launch(l, c);
      finish_run(l);
    end
    // reference
    for (int k = 0; k < N_KER; k++)
      for (int oy = 0; oy < CD; oy++)
        for (int ox = 0; ox < CD; ox++) begin
          int sum, n;
          sum = 0;
          for (int ch = 0; ch < nch; ch++)
            for (int t = 0; t < K2; t++) begin
              int iy, ix, wv;
              iy = oy * S + t / K - P; ix = ox * S + t % K - P;
              wv = (l == L_CONV1) ? wc1[k][ch][t] : wc2[k][ch][t];
              if (iy >= 0 && ix >= 0 && iy < IN_DIM && ix < IN_DIM)
                sum += mulq(xin[(ch * IN_DIM + iy) * IN_DIM + ix], wv);
            end
          n = (k * CD + oy) * CD + ox;
          yout[n] = (n < oq[l].size()) ? oq[l][n] : 0;
          check(yout[n], act_ref(act, sat(sum)), $sformatf("conv%0d k%0d (%0d,%0d)", l + 1, k, oy, ox));
        end
    check_pad(l, nreal, unit);
  endtask

  // ---------------- fully connected, forward ----------------
  task automatic fc_fwd(input int l, input int nin, input int nout, input act_e act,
                        const ref int xin [], ref int yout []);
    int nit, nt;
    int prev [B];
    nit = (nin + B - 1) / B;
    nt  = (nout + B - 1) / B;
    for (int ot = 0; ot < nt; ot++)
      for (int it = 0; it < nit; it++) begin
        layer_ctrl_t c;
        oq[l].delete();
        for (int i = 0; i < B; i++)
          for (int o = 0; o < B; o++) begin
            int gi, go;
            gi = it * B + i; go = ot * B + o;
            fmem_write(l, i * B + o, (gi < nin && go < nout)
                       ? ((l == L_FC1) ? wf1[gi][go] : wf2[gi][go]) : 0);
          end
        for (int i = 0; i < B; i++) begin
          int v;
          v = (it * B + i < nin) ? xin[it * B + i] : 0;
          if (l == L_FC1) s_f1.push(data_t'(v)); else s_f2.push(data_t'(v));
          if (it > 0) begin
            if (l == L_FC1) s_f1p.push(data_t'(prev[i])); else s_f2p.push(data_t'(prev[i]));
          end
        end
        if (it > 0) n_psum++;
        c = '0; c.first_in = (it == 0); c.last_in = (it == nit - 1); c.act = act;
        launch(l, c);
        finish_run(l);
        check(oq[l].size(), B, "fc output count");
        for (int o = 0; o < B; o++) begin
          int sum, go;
          go = ot * B + o;
          sum = (it > 0) ? prev[o] : 0;
          for (int i = 0; i < B; i++)
            if (it * B + i < nin && go < nout)
              sum += mulq(xin[it * B + i], (l == L_FC1) ? wf1[it * B + i][go] : wf2[it * B + i][go]);
          sum = sat(sum);
          if (it == nit - 1) sum = act_ref(act, sum);
          prev[o] = (o < oq[l].size()) ? oq[l][o] : 0;
          check(prev[o], sum, $sformatf("fc%0d tile %0d/%0d out %0d", l - 2, it, ot, o));
          if (it == nit - 1 && go < nout) yout[go] = prev[o];
        end
      end
  endtask

  // ---------------- fully connected, backward ----------------
  task automatic fc_bwd(input int l, input int nin, input int nout, input act_e act,
                        const ref int fout [], const ref int ein [], const ref int fin [],
                        ref int eout []);
    int nit, nt;
    int prev [B];
    int dl [B];
    nit = (nin + B - 1) / B;
    nt  = (nout + B - 1) / B;
    for (int it = 0; it < nit; it++)
      for (int jt = 0; jt < nt; jt++) begin
        layer_ctrl_t c;
        oq[l].delete(); wq[l].delete();
        for (int i = 0; i < B; i++)
          for (int j = 0; j < B; j++) begin
            int gi, gj;
            gi = it * B + i; gj = jt * B + j;
            fmem_write(l, i * B + j, (gi < nin && gj < nout)
                       ? ((l == L_FC1_B) ? wf1[gi][gj] : wf2[gi][gj]) : 0);
          end
        for (int j = 0; j < B; j++) begin
          int gj, fo, er;
          gj = jt * B + j;
          fo = (gj < nout) ? fout[gj] : 0;
          er = (gj < nout) ? ein[gj] : 0;
          dl[j] = sat(mulq(er, der_ref(act, fo)));
          if (l == L_FC1_B) begin s_f1bo.push(data_t'(fo)); s_f1be.push(data_t'(er)); end
          else              begin s_f2bo.push(data_t'(fo)); s_f2be.push(data_t'(er)); end
        end
        for (int i = 0; i < B; i++) begin
          int v;
          v = (it * B + i < nin) ? fin[it * B + i] : 0;
          if (l == L_FC1_B) s_f1bi.push(data_t'(v)); else s_f2bi.push(data_t'(v));
          if (jt > 0) begin
            if (l == L_FC1_B) s_f1bp.push(data_t'(prev[i])); else s_f2bp.push(data_t'(prev[i]));
          end
        end
        if (jt > 0) n_psum++;
        c = '0; c.first_in = (jt == 0); c.act = act;
        launch(l, c);
        finish_run(l);
        check(oq[l].size(), B, "fc backward output count");
        for (int i = 0; i < B; i++) begin
          int sum, gi;
          gi = it * B + i;
          sum = (jt > 0) ? prev[i] : 0;
          for (int j = 0; j < B; j++)
            if (jt * B + j < nout && gi < nin)
              sum += mulq(dl[j], (l == L_FC1_B) ? wf1[gi][jt * B + j] : wf2[gi][jt * B + j]);
          prev[i] = (i < oq[l].size()) ? oq[l][i] : 0;
          check(prev[i], sat(sum), $sformatf("fc%0d bprop tile %0d/%0d out %0d", l == L_FC1_B ? 1 : 2, it, jt, i));
          if (jt == nt - 1 && gi < nin) eout[gi] = prev[i];
        end
        // weight updates, in (group, input, lane) order
        check(wq[l].size(), B * B, "fc weight-update count");
        for (int n = 0; n < B * B && n < wq[l].size(); n++) begin
          int g, i, p, fi;
          g = n / (B * FCPAR); i = (n / FCPAR) % B; p = n % FCPAR;
          fi = (it * B + i < nin) ? fin[it * B + i] : 0;
          check(wq[l][n], sat(mulq(dl[g + p * (B / FCPAR)], fi)), "fc weight update");
        end
        n_wu += wq[l].size();
      end
  endtask

  // ---------------- convolution, backward ----------------
  task automatic conv_bwd(input int l, input int nch, input act_e act,
                          const ref int fout [], const ref int ein [], const ref int fin [],
                          ref int eout []);
    int runs, nreal;
    int dl [N_KER*CD*CD];
    oq[l].delete(); wq[l].delete();
    for (int n = 0; n < N_KER * CD * CD; n++) dl[n] = sat(mulq(ein[n], der_ref(act, fout[n])));
    runs = (nch + 1) / 2;
    for (int r = 0; r < runs; r++) begin
      int units, base_o, base_w;
      layer_ctrl_t c;
      units = (2 * r + 1 < nch) ? 2 : 1;
      base_o = oq[l].size();
      base_w = wq[l].size();
      for (int k = 0; k < N_KER; k++)
        for (int cc = 0; cc < units; cc++)
          for (int t = 0; t < K2; t++)
            fmem_write(l, (k * 2 + cc) * K2 + t,
                       (l == L_CONV1_B) ? wc1[k][2*r+cc][t] : wc2[k][2*r+cc][t]);
      for (int n = 0; n < N_KER * CD * CD; n++)
        if (l == L_CONV1_B) begin s_c1bo.push(data_t'(fout[n])); s_c1be.push(data_t'(ein[n])); end
        else                begin s_c2bo.push(data_t'(fout[n])); s_c2be.push(data_t'(ein[n])); end
      for (int n = 0; n < units * IN_DIM * IN_DIM; n++)
        if (l == L_CONV1_B) s_c1bi.push(data_t'(fin[2 * r * IN_DIM * IN_DIM + n]));
        else                s_c2bi.push(data_t'(fin[2 * r * CD * CD + n]));
      c = '0; c.last_run = (r == runs - 1); c.act = act; c.run_units = 2'(units);
      if (units == 1) n_part++;
      launch(l, c);
      finish_run(l);
      // error, scatter-form reference
      for (int cc = 0; cc < units; cc++) begin
        int acc [IN_DIM*IN_DIM];
        for (int n = 0; n < IN_DIM * IN_DIM; n++) acc[n] = 0;
        for (int k = 0; k < N_KER; k++)
          for (int oy = 0; oy < CD; oy++)
            for (int ox = 0; ox < CD; ox++)
              for (int t = 0; t < K2; t++) begin
                int iy, ix;
                iy = oy * S + t / K - P; ix = ox * S + t % K - P;
                if (iy >= 0 && ix >= 0 && iy < IN_DIM && ix < IN_DIM)
                  acc[iy * IN_DIM + ix] += mulq(dl[(k * CD + oy) * CD + ox],
                      (l == L_CONV1_B) ? wc1[k][2*r+cc][t] : wc2[k][2*r+cc][t]);
              end
        for (int n = 0; n < IN_DIM * IN_DIM; n++) begin
          int gi;
          gi = base_o + cc * IN_DIM * IN_DIM + n;
          eout[(2 * r + cc) * IN_DIM * IN_DIM + n] = (gi < oq[l].size()) ? oq[l][gi] : 0;
          check(eout[(2 * r + cc) * IN_DIM * IN_DIM + n], sat(acc[n]),
                $sformatf("conv%0d bprop c%0d pt %0d", l == L_CONV1_B ? 1 : 2, 2 * r + cc, n));
        end
        // weight-update vectors of channel 2r+cc
        for (int k = 0; k < N_KER; k++)
          for (int q = 0; q < CD * CD; q++)
            for (int t = 0; t < K2; t++) begin
              int iy, ix, e, gi;
              iy = (q / CD) * S + t / K - P; ix = (q % CD) * S + t % K - P;
              e = 0;
              if (iy >= 0 && ix >= 0 && iy < IN_DIM && ix < IN_DIM)
                e = sat(mulq(dl[k * CD * CD + q], fin[((2 * r + cc) * IN_DIM + iy) * IN_DIM + ix]));
              gi = base_w + ((cc * N_KER + k) * CD * CD + q) * K2 + t;
              check((gi < wq[l].size()) ? wq[l][gi] : -99999, e, "conv weight update");
            end
      end
      n_wu += wq[l].size() - base_w;
    end
    nreal = nch * IN_DIM * IN_DIM;
    // padding comes after the error points of the last run, before nothing else
    check_pad(l, nreal, B);
  endtask

  // ---------------- the training step ----------------
  initial begin
    active = '0; gaps = 0;
    x0 = new[IN_CH*IN_DIM*IN_DIM]; e_x = new[IN_CH*IN_DIM*IN_DIM];
    a1 = new[N_KER*CD*CD]; a2 = new[N_KER*CD*CD]; e_a1 = new[N_KER*CD*CD];
    e_a2 = new[N_KER*CD*CD]; mask = new[N_KER*CD*CD];
    pl = new[FC1_IN]; e_p = new[FC1_IN];
    h = new[FC1_OUT]; e_h = new[FC1_OUT]; y = new[FC2_OUT]; e_y = new[FC2_OUT];
    for (int l = 0; l < NL; l++) begin ctrl[l] = '0; fmem_wr[l] = '0; end
    for (int i = 0; i < IN_CH * IN_DIM * IN_DIM; i++) x0[i] = rnd(-256, 256);
    for (int k = 0; k < N_KER; k++) begin
      for (int c = 0; c < IN_CH; c++) for (int t = 0; t < K2; t++) wc1[k][c][t] = rnd(-48, 48);
      for (int c = 0; c < N_KER; c++) for (int t = 0; t < K2; t++) wc2[k][c][t] = rnd(-24, 24);
    end
    for (int i = 0; i < FC1_IN; i++) for (int o = 0; o < FC1_OUT; o++) wf1[i][o] = rnd(-8, 8);
    for (int i = 0; i < FC1_OUT; i++) for (int o = 0; o < FC2_OUT; o++) wf2[i][o] = rnd(-16, 16);
    repeat (3) @(posedge clk);
    rst_n = 1;

    // forward block 1
    conv_fwd(L_CONV1, IN_CH, B * C1BM, ACT_RELU, x0, a1);
    conv_fwd(L_CONV2, N_KER, B, ACT_RELU, a1, a2);
    $display("forward block 1: convolutions done at %0t", $time);
    gaps = 1;
    oq[L_POOL].delete();
    for (int i = 0; i < N_KER * CD * CD; i++) s_pl.push(data_t'(a2[i]));
    begin
      layer_ctrl_t c;
      c = '0; c.last_run = 1; c.act = ACT_NONE; c.pool_mode = POOL_MAX;
      launch(L_POOL, c);
      finish_run(L_POOL);
    end
    for (int ch = 0; ch < N_KER; ch++)
      for (int oy = 0; oy < PD; oy++)
        for (int ox = 0; ox < PD; ox++) begin
          int mx, by, bx, n;
          mx = -100000;
          for (int t = 0; t < PW * PW; t++) begin
            int v;
            v = a2[(ch * CD + oy * PS + t / PW) * CD + ox * PS + t % PW];
            if (v > mx) begin mx = v; by = t / PW; bx = t % PW; end
          end
          for (int t = 0; t < PW * PW; t++)
            mask[(ch * CD + oy * PS + t / PW) * CD + ox * PS + t % PW] =
              (t / PW == by && t % PW == bx) ? 256 : 0;
          n = (ch * PD + oy) * PD + ox;
          pl[n] = (n < oq[L_POOL].size()) ? oq[L_POOL][n] : 0;
          check(pl[n], mx, "pool");
        end
    check_pad(L_POOL, FC1_IN, B);

    // forward block 2
    fc_fwd(L_FC1, FC1_IN, FC1_OUT, ACT_SIGMOID, pl, h);
    fc_fwd(L_FC2, FC1_OUT, FC2_OUT, ACT_NONE, h, y);
    $display("forward pass done at %0t", $time);

    // output error (host: softmax and cross entropy; here a fixed target)
    for (int j = 0; j < FC2_OUT; j++) e_y[j] = sat(y[j] - ((j == 3) ? 256 : 0));

    // backward block 2
    fc_bwd(L_FC2_B, FC1_OUT, FC2_OUT, ACT_NONE, y, e_y, h, e_h);
    fc_bwd(L_FC1_B, FC1_IN, FC1_OUT, ACT_SIGMOID, h, e_h, pl, e_p);
    $display("backward block 2 done at %0t", $time);

    // backward block 1: pooling
    oq[L_POOL_B].delete();
    for (int i = 0; i < FC1_IN; i++) begin s_pbo.push(data_t'(pl[i])); s_pbe.push(data_t'(e_p[i])); end
    for (int i = 0; i < N_KER * CD * CD; i++) s_pbm.push(data_t'(mask[i]));
    begin
      layer_ctrl_t c;
      c = '0; c.last_run = 1; c.act = ACT_NONE;
      launch(L_POOL_B, c);
      finish_run(L_POOL_B);
    end
    for (int ch = 0; ch < N_KER; ch++)
      for (int yy = 0; yy < CD; yy++)
        for (int xx = 0; xx < CD; xx++) begin
          int n, d;
          n = (ch * CD + yy) * CD + xx;
          d = (yy / PS < PD && xx / PS < PD) ? e_p[(ch * PD + yy / PS) * PD + xx / PS] : 0;
          e_a2[n] = (n < oq[L_POOL_B].size()) ? oq[L_POOL_B][n] : 0;
          check(e_a2[n], mulq(mask[n], d), "pool bprop");
        end
    check_pad(L_POOL_B, N_KER * CD * CD, B);
    gaps = 0;

    conv_bwd(L_CONV2_B, N_KER, ACT_RELU, a2, e_a2, a1, e_a1);
    conv_bwd(L_CONV1_B, IN_CH, ACT_RELU, a1, e_a1, x0, e_x);
    $display("training step done at %0t", $time);

    // every mechanism must have happened
    $display("mechanisms: holds=%0d stalls=%0d stream-gaps=%0d pad-points=%0d partial-sum runs=%0d partial runs=%0d weight updates=%0d",
             n_hold, n_stall, n_gap, n_pad, n_psum, n_part, n_wu);
    checks++; if (n_hold == 0) begin failures++; $display("FAIL no MemControl hold"); end
    checks++; if (n_stall == 0) begin failures++; $display("FAIL no partial-sum stall"); end
    checks++; if (n_pad == 0) begin failures++; $display("FAIL no burst padding"); end
    checks++; if (n_psum == 0) begin failures++; $display("FAIL no partial-sum addition"); end
    checks++; if (n_part == 0) begin failures++; $display("FAIL no single-unit run"); end
    checks++; if (n_wu == 0) begin failures++; $display("FAIL no weight updates"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
