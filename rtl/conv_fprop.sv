// conv_fprop: convolutional layer, forward propagation.
//
// One run writes one LMem output unit, BURST_SIZE*BURST_MULT points of the
// layer's output (kernels in order, then rows, then columns), starting at
// layer point first_out (the host's FirstOutput). The layer takes
// ceil(NKernels*OutDims^2/unit) runs. FMem holds up to KPR kernels (two in the
// design, 2*NChannels*KSize^2 values): local kernel 0 is the one holding
// point first_out, local kernel 1 the next; ctrl.run_units says how many are
// loaded. The host writes the weights, sets first_out, pulses ctrl.start and
// streams the input volume (NChannels x InDims x InDims, channel-major) in.
// The run then walks its points kernel segment by kernel segment; for each
// segment, every channel group visits the segment's points. In one tick
// PAR x KSIZE^2 DataWeightOffset taps multiply input points of PAR channels
// (g, g+N_CH/PAR, ...) with their weights, and the sum is added to the carry
// value of the same output point from the previous channel group (the carry
// is bypassed for the first group). On the last group the point is complete
// and goes through the output control, with the activation applied, to the
// output stream. Zero padding of the input (PAD) and the stride are handled
// by the taps' addressing. On the layer's last run (ctrl.last_run), which
// may hold fewer points, zero points fill the run up to a whole unit.
//
// Following the design: the run count and one output unit per run from
// FirstOutput, tap count PAR*KSIZE^2, the offset formulas, the channel
// grouping, the carry over channel groups, two kernels in FMem, activation
// on output, burst padding. This implementation's choices: fixed-point
// data, the input volume is stored before computing instead of being
// consumed while computing (so each run reloads it), FMem local kernel 0 is
// the kernel of FirstOutput, and only strided output points are visited.
// enable is the layer's MemControl bit; while low the run holds.
//
// Timing: N_CH*IN_DIM^2 load ticks, then points*(N_CH/PAR) compute ticks,
// then padding, then one done cycle; outputs lag their compute tick by one
// cycle.
module conv_fprop
  import cnn_pkg::*;
#(
  parameter int N_CH       = 3,
  parameter int IN_DIM     = 28,
  parameter int KSIZE      = 3,
  parameter int STRIDE     = 1,
  parameter int PAD        = 1,
  parameter int PAR        = 1,
  parameter int KPR        = 2,
  parameter int BURST_MULT = 1,
  localparam int OUT_DIM   = (IN_DIM - KSIZE + 2*PAD) / STRIDE + 1,
  localparam int IN_SZ     = N_CH * IN_DIM * IN_DIM,
  localparam int OUT_SZ    = OUT_DIM * OUT_DIM,
  localparam int W_SZ      = KPR * N_CH * KSIZE * KSIZE,
  localparam int NG        = N_CH / PAR,
  localparam int NT        = PAR * KSIZE * KSIZE
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  layer_ctrl_t ctrl,
  input  fmem_wr_t    fmem_wr,
  input  logic [31:0] first_out,
  input  stream_t     in,
  output logic        in_ready,
  output stream_t     out,
  output logic        busy,
  output logic        done
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_COMP, S_PAD, S_DONE} state_e;
  state_e state;

  data_t inbuf [IN_SZ];
  data_t fmem  [W_SZ];
  acc_t  carry [OUT_SZ];

  logic [31:0] load_cnt, pad_cnt, out_cnt;
  logic [31:0] left;      // outputs of the run not yet finished
  logic [31:0] seg_len;   // outputs of the run in the current kernel
  logic [31:0] pcnt;      // position within the current kernel's segment
  logic [15:0] oy0, ox0;  // first output point of the current segment
  logic [7:0]  k;
  logic [15:0] g, oy, ox;
  logic        last_run;
  act_e        act;

  initial begin
    assert (N_CH % PAR == 0) else $error("conv_fprop: PAR must divide N_CH");
  end

  // FMem: written by the host between runs
  always_ff @(posedge clk) begin
    if (fmem_wr.we && int'(fmem_wr.addr) < W_SZ) fmem[fmem_wr.addr] <= fmem_wr.data;
  end

  // Input control: the stream is read only while loading
  logic  ic_valid;
  data_t ic_data;
  input_control u_ic (
    .in(in), .in_ready(in_ready),
    .data_in_enable(state == S_LOAD && enable),
    .a('0), .out(ic_data), .out_valid(ic_valid)
  );

  always_ff @(posedge clk) begin
    if (ic_valid) inbuf[load_cnt] <= ic_data;
  end

  // PAR*KSIZE^2 DataWeightOffset taps
  acc_t prod [NT];
  acc_t sum;
  for (genvar t = 0; t < NT; t++) begin : g_tap
    localparam int P  = t / (KSIZE*KSIZE);
    localparam int KY = (t / KSIZE) % KSIZE;
    localparam int KX = t % KSIZE;
    logic [31:0] d_addr, w_addr;
    data_t d_q, w_q;
    data_weight_offset #(
      .N_CH(N_CH), .IN_DIM(IN_DIM), .KSIZE(KSIZE), .STRIDE(STRIDE), .PAD(PAD), .AW(32)
    ) u_dwo (
      .kernel(k), .channel(16'(int'(g) + P*NG)), .ky(8'(KY)), .kx(8'(KX)),
      .oy(oy), .ox(ox), .d_addr(d_addr), .w_addr(w_addr),
      .d_q(d_q), .w_q(w_q), .prod(prod[t])
    );
    assign d_q = (d_addr < IN_SZ) ? inbuf[d_addr] : data_t'(0);
    assign w_q = (w_addr < W_SZ)  ? fmem[w_addr]  : data_t'(0);
  end

  int unsigned pos;
  acc_t acc_new;
  logic comp_tick, last_g;

  always_comb begin
    sum = '0;
    for (int t = 0; t < NT; t++) sum += prod[t];
    pos       = int'(oy) * OUT_DIM + int'(ox);
    // carry circuit: the multiplexer drops the carried value on the first group
    acc_new   = (g == 0) ? sum : carry[pos] + sum;
    comp_tick = (state == S_COMP) && enable;
    last_g    = (int'(g) == NG - 1);
  end

  always_ff @(posedge clk) begin
    if (comp_tick && !last_g) carry[pos] <= acc_new;
  end

  localparam int UNIT = BURST_SIZE * BURST_MULT;

  // Start of a run: FirstOutput is the layer output index of the run's first
  // point; the run's first kernel is the one holding it (local kernel 0).
  int unsigned st_pos, st_cnt, st_room;
  always_comb begin
    st_pos  = int'(first_out) % OUT_SZ;
    st_room = ((ctrl.run_units == 0 || int'(ctrl.run_units) > KPR) ? KPR : int'(ctrl.run_units))
              * OUT_SZ - st_pos;
    st_cnt  = (st_room < UNIT) ? st_room : UNIT;
  end
  logic pad_tick;
  assign pad_tick = (state == S_PAD) && enable;

  output_control u_oc (
    .clk(clk), .rst_n(rst_n), .acc(acc_new), .act(act),
    .act_enable(comp_tick && last_g), .pad_enable(pad_tick),
    .data_out_enable((comp_tick && last_g) || pad_tick), .out(out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; load_cnt <= '0; pad_cnt <= '0; out_cnt <= '0;
      left <= '0; seg_len <= '0; pcnt <= '0; oy0 <= '0; ox0 <= '0;
      k <= '0; g <= '0; oy <= '0; ox <= '0; last_run <= 1'b0;
      act <= ACT_NONE; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (ctrl.start) begin
          state    <= S_LOAD;
          load_cnt <= '0;
          out_cnt  <= '0;
          last_run <= ctrl.last_run;
          act      <= ctrl.act;
          left     <= st_cnt;
          seg_len  <= ((OUT_SZ - st_pos) < st_cnt) ? OUT_SZ - st_pos : st_cnt;
          oy0      <= 16'(st_pos / OUT_DIM);
          ox0      <= 16'(st_pos % OUT_DIM);
        end
        S_LOAD: if (ic_valid) begin
          load_cnt <= load_cnt + 1;
          if (load_cnt == IN_SZ - 1) begin
            state <= S_COMP; k <= '0; g <= '0; oy <= oy0; ox <= ox0; pcnt <= '0;
          end
        end
        S_COMP: if (comp_tick) begin
          if (last_g) out_cnt <= out_cnt + 1;
          if (pcnt == seg_len - 1) begin
            // end of the segment for this channel group
            pcnt <= '0;
            if (last_g) begin
              g <= '0;
              if (left == seg_len) begin
                state   <= (last_run && out_cnt + 1 < UNIT) ? S_PAD : S_DONE;
                pad_cnt <= out_cnt + 1;
              end else begin
                // continue with the next kernel from its first point
                k       <= k + 1;
                left    <= left - seg_len;
                seg_len <= (left - seg_len < OUT_SZ) ? left - seg_len : OUT_SZ;
                oy0 <= '0; ox0 <= '0; oy <= '0; ox <= '0;
              end
            end else begin
              g <= g + 1; oy <= oy0; ox <= ox0;
            end
          end else begin
            pcnt <= pcnt + 1;
            if (int'(ox) == OUT_DIM - 1) begin
              ox <= '0; oy <= oy + 1;
            end else ox <= ox + 1;
          end
        end
        S_PAD: if (pad_tick) begin
          pad_cnt <= pad_cnt + 1;
          if (pad_cnt == UNIT - 1) state <= S_DONE;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // a run never writes more than one output unit
  always_ff @(posedge clk) begin
    if (comp_tick && last_g)
      assert (out_cnt < UNIT) else $error("conv_fprop: run exceeds one output unit");
  end

endmodule
