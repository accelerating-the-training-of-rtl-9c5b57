// pool_fprop: pooling layer, forward propagation (max or mean).
//
// The layer consumes its input stream (NChannels x InDims x InDims,
// channel-major) at one point per tick, with no parallelism since pooling
// has no accumulation to split. Each accepted point is pushed into a
// DataOffset buffer holding the last (WSIZE-1)*InDims + WSIZE points; its
// WSIZE^2 taps, at offsets y*InDims + x back from the newest point, form the
// pooling window whose bottom-right corner is the point just read. When that
// corner closes a window on the stride grid, the window's maximum, or its
// mean, goes through the output control (with the configured activation,
// which a network applies after pooling rather than before it) to the output
// stream. No padding of the input is supported, as in the design. After the
// last point of the layer's last run the output is filled with zeros to a
// whole LMem burst.
//
// Following the design: the offset buffer and tap count, max/mean selection,
// the stride, burst padding. This implementation's choices: fixed-point data;
// mean pooling divides by WSIZE^2 with a divider (a shift for powers of two).
// enable is the layer's MemControl bit.
//
// Timing: one input per tick; an output point appears two cycles after the
// input point that completes its window.
module pool_fprop
  import cnn_pkg::*;
#(
  parameter int N_CH       = 16,
  parameter int IN_DIM     = 28,
  parameter int WSIZE      = 2,
  parameter int STRIDE     = 2,
  parameter int BURST_MULT = 1,
  localparam int OUT_DIM   = (IN_DIM - WSIZE) / STRIDE + 1,
  localparam int IN_SZ     = N_CH * IN_DIM * IN_DIM,
  localparam int DEPTH     = (WSIZE - 1) * IN_DIM + WSIZE,
  localparam int TAPS      = WSIZE * WSIZE,
  localparam int OW        = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  layer_ctrl_t ctrl,
  input  stream_t     in,
  output logic        in_ready,
  output stream_t     out,
  output logic        busy,
  output logic        done
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_PAD, S_DONE} state_e;
  state_e state;

  logic [31:0] in_cnt, out_cnt, pad_cnt;
  logic [15:0] row, col;
  logic        last_run;
  act_e        act;
  pool_e       mode;

  logic  ic_valid;
  data_t ic_data;
  input_control u_ic (
    .in(in), .in_ready(in_ready),
    .data_in_enable(state == S_RUN && enable),
    .a('0), .out(ic_data), .out_valid(ic_valid)
  );

  logic [OW-1:0] offs [TAPS];
  data_t         tap  [TAPS];
  for (genvar t = 0; t < TAPS; t++) begin : g_off
    assign offs[t] = OW'((WSIZE - 1 - t / WSIZE) * IN_DIM + (WSIZE - 1 - t % WSIZE));
  end

  data_offset #(.DEPTH(DEPTH), .TAPS(TAPS)) u_do (
    .clk(clk), .rst_n(rst_n), .push(ic_valid), .din(ic_data), .offset(offs), .tap(tap)
  );

  // A window closes when the point just read is its bottom-right corner
  logic win_close, emit;
  always_comb begin
    win_close = ic_valid
             && int'(row) >= WSIZE - 1 && int'(col) >= WSIZE - 1
             && ((int'(row) - WSIZE + 1) % STRIDE == 0)
             && ((int'(col) - WSIZE + 1) % STRIDE == 0);
  end

  // Max or sum-and-divide over the window taps
  acc_t  pooled;
  data_t mx;
  acc_t  sm;
  always_comb begin
    mx = tap[0];
    sm = '0;
    for (int t = 0; t < TAPS; t++) begin
      if (tap[t] > mx) mx = tap[t];
      sm += acc_t'(tap[t]);
    end
    if (mode == POOL_MAX)          pooled = acc_t'(mx);
    else if ((TAPS & (TAPS-1)) == 0) pooled = sm >>> $clog2(TAPS);
    else                             pooled = sm / acc_t'(TAPS);
  end

  localparam int UNIT = BURST_SIZE * BURST_MULT;
  logic pad_tick;
  assign pad_tick = (state == S_PAD) && enable && !emit;

  output_control u_oc (
    .clk(clk), .rst_n(rst_n), .acc(pooled), .act(act),
    .act_enable(emit), .pad_enable(pad_tick),
    .data_out_enable(emit || pad_tick), .out(out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; in_cnt <= '0; out_cnt <= '0; pad_cnt <= '0;
      row <= '0; col <= '0; last_run <= 1'b0; act <= ACT_NONE; mode <= POOL_MAX;
      emit <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      emit <= win_close;
      if (emit) out_cnt <= out_cnt + 1;
      case (state)
        S_IDLE: if (ctrl.start) begin
          state <= S_RUN; in_cnt <= '0; out_cnt <= '0; row <= '0; col <= '0;
          last_run <= ctrl.last_run; act <= ctrl.act; mode <= ctrl.pool_mode;
        end
        S_RUN: if (ic_valid) begin
          in_cnt <= in_cnt + 1;
          if (int'(col) == IN_DIM - 1) begin
            col <= '0;
            row <= (int'(row) == IN_DIM - 1) ? 16'd0 : row + 1;
          end else col <= col + 1;
          if (in_cnt == IN_SZ - 1) begin
            // out_cnt lags by the window in flight; total is known statically
            pad_cnt <= 32'((N_CH * OUT_DIM * OUT_DIM) % UNIT);
            state   <= (last_run && (N_CH * OUT_DIM * OUT_DIM) % UNIT != 0) ? S_PAD : S_DONE;
          end
        end
        S_PAD: if (pad_tick) begin
          pad_cnt <= pad_cnt + 1;
          if (pad_cnt == UNIT - 1) state <= S_DONE;
        end
        S_DONE: if (!emit) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
