// fcon_bprop: fully connected layer, backward propagation, one tile per run.
//
// A run covers B = BURST_SIZE*BURST_MULT forward outputs j (where the error
// arrives) by B forward inputs i (where the error goes), with the tile's
// weights W[i][j] in FMem at address i*B + j, the same layout as forward
// propagation. The host streams FwdOut and Error of the B outputs together,
// forming delta[j] = Error[j] x f'(FwdOut[j]), then the B forward inputs
// FwdIn[i]. The run visits, for each group g of PAR outputs
// (g, g + B/PAR, ...) and each input i, the products delta[j] * W[i][j],
// summed and carried across groups; on the last group, the partial result of
// earlier tiles (third stream, skipped on ctrl.first_in) is added and
// Out[i] is written. No activation is applied: the previous layer applies
// its derivative when it reads this error. In the same ticks the weight
// updates delta[j] * FwdIn[i] of the PAR (i, j) pairs are streamed to the
// host, which averages them over the batch and applies them.
//
// Following the design: tile structure, delta formation, error with carry,
// partial-sum stream, weight updates streamed to the host. This
// implementation's choices: fixed-point data, loading before computing, and
// streaming the weight updates as PAR-wide vectors in the compute order.
// enable is the layer's MemControl bit.
//
// Timing: 2B load ticks, then (B/PAR)*B compute ticks; outputs lag by one.
module fcon_bprop
  import cnn_pkg::*;
#(
  parameter int BURST_MULT = 1,
  parameter int PAR        = 12,
  localparam int B         = BURST_SIZE * BURST_MULT,
  localparam int NGJ       = B / PAR
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
  input  stream_t     psum,
  output logic        psum_ready,
  output stream_t     out,
  output logic        wu_valid,
  output data_t       wu [PAR],
  output logic        stall,
  output logic        busy,
  output logic        done
);

  typedef enum logic [2:0] {S_IDLE, S_LDD, S_LDX, S_COMP, S_DONE} state_e;
  state_e state;

  data_t dbuf  [B];
  data_t xbuf  [B];
  data_t fmem  [B*B];
  acc_t  carry [B];

  logic [15:0] cnt, g, i;
  logic        first_in;
  act_e        act;

  initial begin
    assert (B % PAR == 0) else $error("fcon_bprop: PAR must divide the tile size");
  end

  always_ff @(posedge clk) begin
    if (fmem_wr.we && int'(fmem_wr.addr) < B*B) fmem[fmem_wr.addr] <= fmem_wr.data;
  end

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

  logic  x_ok;
  data_t x_d;
  input_control u_ic_x (.in(fwd_in), .in_ready(fwd_in_ready),
                        .data_in_enable(state == S_LDX && enable),
                        .a('0), .out(x_d), .out_valid(x_ok));
  always_ff @(posedge clk) begin
    if (x_ok) xbuf[cnt] <= x_d;
  end

  acc_t  sum;
  data_t wu_d [PAR];
  always_comb begin
    sum = '0;
    for (int p = 0; p < PAR; p++) begin
      int j;
      j = int'(g) + p * NGJ;
      sum += fx_mul(dbuf[j], fmem[int'(i) * B + j]);
      wu_d[p] = fx_sat(fx_mul(dbuf[j], xbuf[i]));
    end
  end

  logic  last_g, need_psum, tick, ps_ok;
  data_t ps_d;
  acc_t  acc_new, acc_out;
  always_comb begin
    last_g    = (int'(g) == NGJ - 1);
    need_psum = (state == S_COMP) && last_g && !first_in;
    stall     = (state == S_COMP) && enable && need_psum && !psum.valid;
    tick      = (state == S_COMP) && enable && !stall;
    acc_new   = (g == 0) ? sum : carry[i] + sum;
  end

  input_control u_ic_ps (.in(psum), .in_ready(psum_ready),
                         .data_in_enable(tick && need_psum),
                         .a('0), .out(ps_d), .out_valid(ps_ok));
  assign acc_out = acc_new + (ps_ok ? acc_t'(ps_d) : acc_t'(0));

  always_ff @(posedge clk) begin
    if (tick && !last_g) carry[i] <= acc_new;
  end

  output_control u_oc (
    .clk(clk), .rst_n(rst_n), .acc(acc_out), .act(ACT_NONE),
    .act_enable(1'b0), .pad_enable(1'b0),
    .data_out_enable(tick && last_g), .out(out)
  );

  // Weight-update stream to the host
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wu_valid <= 1'b0;
      for (int p = 0; p < PAR; p++) wu[p] <= '0;
    end else begin
      wu_valid <= tick;
      for (int p = 0; p < PAR; p++) wu[p] <= tick ? wu_d[p] : data_t'(0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cnt <= '0; g <= '0; i <= '0;
      first_in <= 1'b1; act <= ACT_NONE; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (ctrl.start) begin
          state <= S_LDD; cnt <= '0;
          first_in <= ctrl.first_in; act <= ctrl.act;
        end
        S_LDD: if (fo_ok && er_ok) begin
          cnt <= cnt + 1;
          if (int'(cnt) == B - 1) begin
            cnt <= '0; state <= S_LDX;
          end
        end
        S_LDX: if (x_ok) begin
          cnt <= cnt + 1;
          if (int'(cnt) == B - 1) begin
            state <= S_COMP; g <= '0; i <= '0;
          end
        end
        S_COMP: if (tick) begin
          if (int'(i) == B - 1) begin
            i <= '0;
            if (last_g) state <= S_DONE;
            else        g <= g + 1;
          end else i <= i + 1;
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
