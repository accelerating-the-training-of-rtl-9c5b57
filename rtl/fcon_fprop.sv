// fcon_fprop: fully connected layer, forward propagation, one tile per run.
//
// A layer's weight matrix is far larger than FMem, so a run covers one tile
// of B = BURST_SIZE*BURST_MULT inputs by B outputs, and FMem holds the B^2
// weights of that tile (address CurIn*B + CurOut). The host streams the
// tile's B input points in; the run then visits, for each input group g and
// each output o, the PAR inputs g, g + B/PAR, g + 2B/PAR, ... at once (with
// B = 24 and PAR = 12: inputs 0,2,...,22, then 1,3,...,23), multiplies them
// by their weights and adds the sum to the carried value of output o from the
// previous group. On the last group the output is complete for this tile;
// unless the tile is the first along the input dimension (ctrl.first_in), the
// partial result of the earlier tiles, read back from LMem through the third
// input stream, is added. On the last input tile (ctrl.last_in) the
// activation is applied. Outputs are written in order o = 0..B-1, so every
// stream is a whole number of bursts and needs no padding.
//
// Following the design: tile size, FMem layout, input grouping, carry over
// groups, partial-sum stream, activation on the last tile. This
// implementation's choices: fixed-point data, and loading the tile's inputs
// before computing. enable is the layer's MemControl bit; the run also
// stalls while a needed partial-sum point has not arrived.
//
// Timing: B load ticks, then (B/PAR)*B compute ticks; outputs lag by one.
module fcon_fprop
  import cnn_pkg::*;
#(
  parameter int BURST_MULT = 1,
  parameter int PAR        = 12,
  localparam int B         = BURST_SIZE * BURST_MULT,
  localparam int NGI       = B / PAR
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  layer_ctrl_t ctrl,
  input  fmem_wr_t    fmem_wr,
  input  stream_t     in,
  output logic        in_ready,
  input  stream_t     psum,
  output logic        psum_ready,
  output stream_t     out,
  output logic        stall,
  output logic        busy,
  output logic        done
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_COMP, S_DONE} state_e;
  state_e state;

  data_t inbuf [B];
  data_t fmem  [B*B];
  acc_t  carry [B];

  logic [15:0] cnt, g, o;
  logic        first_in, last_in;
  act_e        act;

  initial begin
    assert (B % PAR == 0) else $error("fcon_fprop: PAR must divide the tile size");
  end

  always_ff @(posedge clk) begin
    if (fmem_wr.we && int'(fmem_wr.addr) < B*B) fmem[fmem_wr.addr] <= fmem_wr.data;
  end

  logic  ic_valid;
  data_t ic_data;
  input_control u_ic (.in(in), .in_ready(in_ready),
                      .data_in_enable(state == S_LOAD && enable),
                      .a('0), .out(ic_data), .out_valid(ic_valid));
  always_ff @(posedge clk) begin
    if (ic_valid) inbuf[cnt] <= ic_data;
  end

  // PAR DataWeightOffset taps: data offset CurIn, weight offset CurIn*B + CurOut
  acc_t sum;
  always_comb begin
    sum = '0;
    for (int p = 0; p < PAR; p++) begin
      int ci;
      ci = int'(g) + p * NGI;
      sum += fx_mul(inbuf[ci], fmem[ci * B + int'(o)]);
    end
  end

  logic  last_g, need_psum, tick, ps_ok;
  data_t ps_d;
  acc_t  acc_new, acc_out;
  always_comb begin
    last_g    = (int'(g) == NGI - 1);
    need_psum = (state == S_COMP) && last_g && !first_in;
    stall     = (state == S_COMP) && enable && need_psum && !psum.valid;
    tick      = (state == S_COMP) && enable && !stall;
    acc_new   = (g == 0) ? sum : carry[o] + sum;
  end

  input_control u_ic_ps (.in(psum), .in_ready(psum_ready),
                         .data_in_enable(tick && need_psum),
                         .a('0), .out(ps_d), .out_valid(ps_ok));
  assign acc_out = acc_new + (ps_ok ? acc_t'(ps_d) : acc_t'(0));

  always_ff @(posedge clk) begin
    if (tick && !last_g) carry[o] <= acc_new;
  end

  output_control u_oc (
    .clk(clk), .rst_n(rst_n), .acc(acc_out), .act(act),
    .act_enable(tick && last_g && last_in), .pad_enable(1'b0),
    .data_out_enable(tick && last_g), .out(out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cnt <= '0; g <= '0; o <= '0;
      first_in <= 1'b1; last_in <= 1'b1; act <= ACT_NONE; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (ctrl.start) begin
          state <= S_LOAD; cnt <= '0;
          first_in <= ctrl.first_in; last_in <= ctrl.last_in; act <= ctrl.act;
        end
        S_LOAD: if (ic_valid) begin
          cnt <= cnt + 1;
          if (int'(cnt) == B - 1) begin
            state <= S_COMP; g <= '0; o <= '0;
          end
        end
        S_COMP: if (tick) begin
          if (int'(o) == B - 1) begin
            o <= '0;
            if (last_g) state <= S_DONE;
            else        g <= g + 1;
          end else o <= o + 1;
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
