// conv_wupdate: weight-update block of the convolutional backward layer.
//
// The full weight-gradient convolution would need more multipliers and FMem
// than the device has, so the gradient is split per delta point: for one
// delta value and the KSize x KSize input window it touched in forward
// propagation, the block forms the KSize^2 products delta * FwdIn(window) and
// streams them to the host, which sums all vectors of a kernel/channel pair
// into the update. WUpdateEnable filters out ticks whose values are not
// meaningful: the vector is then all zero, so the host's sum is unaffected.
//
// Interface: win[i] is the window point of tap i = ky*KSIZE + kx.
// Timing: one register stage.
module conv_wupdate
  import cnn_pkg::*;
#(
  parameter int KSIZE = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  wupdate_enable,
  input  data_t delta,
  input  data_t win [KSIZE*KSIZE],
  output logic  wu_valid,
  output data_t wu   [KSIZE*KSIZE]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wu_valid <= 1'b0;
      for (int i = 0; i < KSIZE*KSIZE; i++) wu[i] <= '0;
    end else begin
      wu_valid <= wupdate_enable;
      for (int i = 0; i < KSIZE*KSIZE; i++)
        wu[i] <= wupdate_enable ? fx_sat(fx_mul(delta, win[i])) : data_t'(0);
    end
  end

endmodule
