// pool_bprop: pooling layer, backward propagation.
//
// Two streams arrive from LMem with the layer's output size: the forward
// output and the error from the next layer. Their element-wise product
// delta = Error x f'(FwdOut) is formed as they are read (f is the activation
// applied after pooling). The mask stream, with the input size, holds for
// every input point its share of the window's output: 1 at the maximum for
// max pooling, 1/WSIZE^2 for mean pooling; the host computes it. Each mask
// point is multiplied by the delta of the window it belongs to, which
// up-samples delta back to the input size:
//     Out[c][y][x] = Mask[c][y][x] * delta[c][y/STRIDE][x/STRIDE]
// Points outside every window get zero. The layer works channel by channel:
// it stores the OutDims^2 delta values of a channel, then streams the
// InDims^2 mask points of that channel through. After the last point of the
// layer's last run the output is filled with zeros to a whole LMem burst.
//
// Following the design: delta formation, mask multiplication, no
// parallelism, burst padding. This implementation's choices: fixed-point
// data, and buffering a whole channel of delta rather than one row.
// enable is the layer's MemControl bit.
//
// Timing: per channel OUT_DIM^2 delta ticks then IN_DIM^2 mask ticks.
module pool_bprop
  import cnn_pkg::*;
#(
  parameter int N_CH       = 16,
  parameter int IN_DIM     = 28,
  parameter int WSIZE      = 2,
  parameter int STRIDE     = 2,
  parameter int BURST_MULT = 1,
  localparam int OUT_DIM   = (IN_DIM - WSIZE) / STRIDE + 1,
  localparam int D_SZ      = OUT_DIM * OUT_DIM,
  localparam int M_SZ      = IN_DIM * IN_DIM
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  layer_ctrl_t ctrl,
  input  stream_t     fwd_out,
  input  stream_t     err,
  output logic        de_ready,
  input  stream_t     mask,
  output logic        mask_ready,
  output stream_t     out,
  output logic        busy,
  output logic        done
);

  typedef enum logic [2:0] {S_IDLE, S_DELTA, S_MASK, S_PAD, S_DONE} state_e;
  state_e state;

  data_t dbuf [D_SZ];
  logic [31:0] d_cnt, pad_cnt;
  logic [15:0] ch, y, x;
  logic        last_run;
  act_e        act;

  // Delta = Error x f'(FwdOut)
  data_t fo_d, er_d, fo_v, deriv, delta;
  logic  fo_ok, er_ok;
  input_control u_ic_fo (.in(fwd_out), .in_ready(de_ready),
    .data_in_enable(state == S_DELTA && enable && fwd_out.valid && err.valid),
    .a('0), .out(fo_d), .out_valid(fo_ok));
  logic er_rdy_unused;
  input_control u_ic_er (.in(err), .in_ready(er_rdy_unused),
    .data_in_enable(state == S_DELTA && enable && fwd_out.valid && err.valid),
    .a('0), .out(er_d), .out_valid(er_ok));
  assign fo_v = fo_d;
  act_unit u_der (.func(act), .deriv(1'b1), .x(fo_v), .y(deriv));
  assign delta = fx_sat(fx_mul(er_d, deriv));

  always_ff @(posedge clk) begin
    if (fo_ok && er_ok) dbuf[d_cnt] <= delta;
  end

  // Mask stream, multiplied by the delta of its window
  data_t m_d;
  logic  m_ok;
  input_control u_ic_m (.in(mask), .in_ready(mask_ready),
    .data_in_enable(state == S_MASK && enable),
    .a('0), .out(m_d), .out_valid(m_ok));

  int   dy, dx;
  acc_t prod;
  always_comb begin
    dy = int'(y) / STRIDE;
    dx = int'(x) / STRIDE;
    if (dy < OUT_DIM && dx < OUT_DIM) prod = fx_mul(m_d, dbuf[dy * OUT_DIM + dx]);
    else                              prod = '0;
  end

  localparam int UNIT  = BURST_SIZE * BURST_MULT;
  localparam int TOTAL = N_CH * M_SZ;
  logic pad_tick;
  assign pad_tick = (state == S_PAD) && enable;

  output_control u_oc (
    .clk(clk), .rst_n(rst_n), .acc(prod), .act(ACT_NONE),
    .act_enable(1'b0), .pad_enable(pad_tick),
    .data_out_enable(m_ok || pad_tick), .out(out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; d_cnt <= '0; pad_cnt <= '0; ch <= '0; y <= '0; x <= '0;
      last_run <= 1'b0; act <= ACT_NONE; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (ctrl.start) begin
          state <= S_DELTA; d_cnt <= '0; ch <= '0;
          last_run <= ctrl.last_run; act <= ctrl.act;
        end
        S_DELTA: if (fo_ok && er_ok) begin
          d_cnt <= d_cnt + 1;
          if (d_cnt == D_SZ - 1) begin
            state <= S_MASK; y <= '0; x <= '0;
          end
        end
        S_MASK: if (m_ok) begin
          if (int'(x) == IN_DIM - 1) begin
            x <= '0;
            if (int'(y) == IN_DIM - 1) begin
              y <= '0;
              d_cnt <= '0;
              if (int'(ch) == N_CH - 1) begin
                pad_cnt <= 32'(TOTAL % UNIT);
                state   <= (last_run && TOTAL % UNIT != 0) ? S_PAD : S_DONE;
              end else begin
                ch <= ch + 1;
                state <= S_DELTA;
              end
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
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
