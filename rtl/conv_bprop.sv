// conv_bprop: convolutional layer, backward propagation.
//
// One run produces, for up to CPR input channels of the forward layer (two in
// the design), the error to pass back to the previous layer and the
// weight-update vectors of those channels.
//   1. Delta load: FwdOut and Error (NKernels x OutDims^2 each) are read
//      together and delta = Error x f'(FwdOut) is stored.
//   2. FwdIn load: the forward input of the run's channels (CPR x InDims^2).
//   3. Error: for each run channel c and each point (y, x) of the input
//      volume, Out[c][y][x] = sum over k, ky, kx of
//      delta[k][(y+Pad-ky)/S][(x+Pad-kx)/S] * W[k][c][ky][kx], the convolution
//      with flipped kernels (a transposed convolution when S > 1). PAR kernels
//      (k, k+N_KER/PAR, ...) times KSIZE^2 taps are summed per tick and the
//      partial sum is carried across kernel groups, as in forward propagation
//      with kernels and channels exchanged. No activation is applied.
//   4. Weight update: for each run channel c, kernel k and delta point, the
//      conv_wupdate block streams the KSIZE^2 vector delta * FwdIn(window) to
//      the host, which sums the vectors into dW[k][c].
// After the error points of the layer's last run, zero points fill the output,
// counted over all the layer's runs, to a whole LMem burst. A run holds
// RUN_CH = min(CPR, N_CH) channels. FMem holds W[k][c'][ky][kx] for every
// kernel and the run's channels c' at address
// (k*RUN_CH + c')*KSIZE^2 + ky*KSIZE + kx.
//
// Following the design: two error channels per run, delta formation,
// parallelism over kernels with carry, the weight-update block and its
// vectors. This implementation's choices: fixed-point data, whole-volume
// buffering, and producing the error before the weight-update vectors.
// enable is the layer's MemControl bit.
//
// Timing: N_KER*OUT_DIM^2 + units*IN_DIM^2 load ticks, units*(N_KER/PAR)*
// IN_DIM^2 error ticks, units*N_KER*OUT_DIM^2 weight-update ticks.
module conv_bprop
  import cnn_pkg::*;
#(
  parameter int N_CH       = 3,
  parameter int IN_DIM     = 28,
  parameter int N_KER      = 16,
  parameter int KSIZE      = 3,
  parameter int STRIDE     = 1,
  parameter int PAD        = 1,
  parameter int PAR        = 1,
  parameter int CPR        = 2,
  parameter int BURST_MULT = 1,
  localparam int RUN_CH    = (CPR < N_CH) ? CPR : N_CH,
  localparam int OUT_DIM   = (IN_DIM - KSIZE + 2*PAD) / STRIDE + 1,
  localparam int K2        = KSIZE * KSIZE,
  localparam int D_SZ      = N_KER * OUT_DIM * OUT_DIM,
  localparam int X_SZ      = RUN_CH * IN_DIM * IN_DIM,
  localparam int W_SZ      = N_KER * RUN_CH * K2,
  localparam int NG        = N_KER / PAR,
  localparam int NT        = PAR * K2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  layer_ctrl_t ctrl,
  input  fmem_wr_t    fmem_wr,
  input  stream_t     fwd_out,
  input  stream_t     err,
  output logic        de_ready,
  input  stream_t     fwd_in,
  output logic        fwd_in_ready,
  output stream_t     out,
  output logic        wu_valid,
  output data_t       wu [K2],
  output logic        busy,
  output logic        done
);

  typedef enum logic [2:0] {S_IDLE, S_LDD, S_LDX, S_ERR, S_WU, S_PAD, S_DONE} state_e;
  state_e state;

  data_t dbuf  [D_SZ];
  data_t xbuf  [X_SZ];
  data_t fmem  [W_SZ];
  acc_t  carry [IN_DIM*IN_DIM];

  logic [31:0] cnt, pad_cnt;
  logic [31:0] lay_pos;   // layer's output position within a burst unit, over all runs
  logic [15:0] c, g, y, x;
  logic [1:0]  units;
  logic        last_run;
  act_e        act;

  initial begin
    assert (N_KER % PAR == 0) else $error("conv_bprop: PAR must divide N_KER");
  end

  always_ff @(posedge clk) begin
    if (fmem_wr.we && int'(fmem_wr.addr) < W_SZ) fmem[fmem_wr.addr] <= fmem_wr.data;
  end

  // Delta = Error x f'(FwdOut)
  logic  both, fo_ok, er_ok, er_rdy_unused;
  data_t fo_d, er_d, deriv;
  assign both = (state == S_LDD) && enable && fwd_out.valid && err.valid;
  input_control u_ic_fo (.in(fwd_out), .in_ready(de_ready), .data_in_enable(both),
                         .a('0), .out(fo_d), .out_valid(fo_ok));
  input_control u_ic_er (.in(err), .in_ready(er_rdy_unused), .data_in_enable(both),
                         .a('0), .out(er_d), .out_valid(er_ok));
  act_unit u_der (.func(act), .deriv(1'b1), .x(fo_d), .y(deriv));

  always_ff @(posedge clk) begin
    if (fo_ok && er_ok) dbuf[cnt] <= fx_sat(fx_mul(er_d, deriv));
  end

  // Forward input of the run's channels
  logic  x_ok;
  data_t x_d;
  input_control u_ic_x (.in(fwd_in), .in_ready(fwd_in_ready),
                        .data_in_enable(state == S_LDX && enable),
                        .a('0), .out(x_d), .out_valid(x_ok));
  always_ff @(posedge clk) begin
    if (x_ok) xbuf[cnt] <= x_d;
  end

  // Error taps: delta of kernel k at the forward output point that tap (ky,kx)
  // of input point (y,x) came from
  acc_t prod [NT];
  always_comb begin
    for (int t = 0; t < NT; t++) begin
      int p, ky, kx, kk, ty, tx;
      p  = t / K2;
      ky = (t / KSIZE) % KSIZE;
      kx = t % KSIZE;
      kk = int'(g) + p * NG;
      ty = int'(y) + PAD - ky;
      tx = int'(x) + PAD - kx;
      if (ty >= 0 && tx >= 0 && ty % STRIDE == 0 && tx % STRIDE == 0
          && ty / STRIDE < OUT_DIM && tx / STRIDE < OUT_DIM)
        prod[t] = fx_mul(dbuf[kk * OUT_DIM * OUT_DIM + (ty / STRIDE) * OUT_DIM + tx / STRIDE],
                         fmem[(kk * RUN_CH + int'(c)) * K2 + ky * KSIZE + kx]);
      else
        prod[t] = '0;
    end
  end

  acc_t sum, acc_new;
  int   pos;
  logic err_tick, last_g;
  always_comb begin
    sum = '0;
    for (int t = 0; t < NT; t++) sum += prod[t];
    pos      = int'(y) * IN_DIM + int'(x);
    acc_new  = (g == 0) ? sum : carry[pos] + sum;
    err_tick = (state == S_ERR) && enable;
    last_g   = (int'(g) == NG - 1);
  end

  always_ff @(posedge clk) begin
    if (err_tick && !last_g) carry[pos] <= acc_new;
  end

  localparam int UNIT = BURST_SIZE * BURST_MULT;
  logic pad_tick;
  assign pad_tick = (state == S_PAD) && enable;

  output_control u_oc (
    .clk(clk), .rst_n(rst_n), .acc(acc_new), .act(ACT_NONE),
    .act_enable(1'b0), .pad_enable(pad_tick),
    .data_out_enable((err_tick && last_g) || pad_tick), .out(out)
  );

  // Weight update: delta[g][y][x] with the FwdIn window of channel c
  // (in this phase g walks the kernels and y, x the delta points)
  logic  wu_tick;
  data_t wu_delta;
  data_t win [K2];
  always_comb begin
    wu_tick  = (state == S_WU) && enable;
    wu_delta = dbuf[(int'(g) * OUT_DIM + int'(y)) * OUT_DIM + int'(x)];
    for (int t = 0; t < K2; t++) begin
      int iy, ix;
      iy = int'(y) * STRIDE + t / KSIZE - PAD;
      ix = int'(x) * STRIDE + t % KSIZE - PAD;
      if (iy >= 0 && iy < IN_DIM && ix >= 0 && ix < IN_DIM)
        win[t] = xbuf[(int'(c) * IN_DIM + iy) * IN_DIM + ix];
      else
        win[t] = '0;
    end
  end

  conv_wupdate #(.KSIZE(KSIZE)) u_wu (
    .clk(clk), .rst_n(rst_n), .wupdate_enable(wu_tick), .delta(wu_delta),
    .win(win), .wu_valid(wu_valid), .wu(wu)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cnt <= '0; pad_cnt <= '0; lay_pos <= '0;
      c <= '0; g <= '0; y <= '0; x <= '0; units <= '0; last_run <= 1'b0;
      act <= ACT_NONE; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (ctrl.start) begin
          state <= S_LDD; cnt <= '0;
          units <= (ctrl.run_units == 0 || int'(ctrl.run_units) > RUN_CH) ? 2'(RUN_CH) : ctrl.run_units;
          last_run <= ctrl.last_run; act <= ctrl.act;
        end
        S_LDD: if (fo_ok && er_ok) begin
          cnt <= cnt + 1;
          if (cnt == D_SZ - 1) begin
            cnt <= '0; state <= S_LDX;
          end
        end
        S_LDX: if (x_ok) begin
          cnt <= cnt + 1;
          if (cnt == 32'(int'(units) * IN_DIM * IN_DIM) - 1) begin
            state <= S_ERR; c <= '0; g <= '0; y <= '0; x <= '0;
          end
        end
        S_ERR: if (err_tick) begin
          if (last_g) lay_pos <= (lay_pos + 1 == UNIT) ? '0 : lay_pos + 1;
          if (int'(x) == IN_DIM - 1) begin
            x <= '0;
            if (int'(y) == IN_DIM - 1) begin
              y <= '0;
              if (last_g) begin
                g <= '0;
                if (c == 16'(units - 1)) begin
                  c <= '0; state <= S_WU;
                end else c <= c + 1;
              end else g <= g + 1;
            end else y <= y + 1;
          end else x <= x + 1;
        end
        S_WU: if (wu_tick) begin
          if (int'(x) == OUT_DIM - 1) begin
            x <= '0;
            if (int'(y) == OUT_DIM - 1) begin
              y <= '0;
              if (int'(g) == N_KER - 1) begin
                g <= '0;
                if (c == 16'(units - 1)) begin
                  pad_cnt <= lay_pos;
                  state   <= (last_run && lay_pos != 0) ? S_PAD : S_DONE;
                end else c <= c + 1;
              end else g <= g + 1;
            end else y <= y + 1;
          end else x <= x + 1;
        end
        S_PAD: if (pad_tick) begin
          pad_cnt <= pad_cnt + 1;
          if (pad_cnt == UNIT - 1) state <= S_DONE;
        end
        S_DONE: begin
          done <= 1'b1;
          state <= S_IDLE;
          if (last_run) lay_pos <= '0;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
