// output_control: output data control of a layer.
//
// Takes the accumulated value of an output point and prepares it for the
// LMem write stream. When ActEnable is set the value has been fully
// accumulated and goes through the layer's configured activation function;
// when PadEnable is set the point written is zero, used after the last real
// output to fill the stream up to a whole LMem burst; DataOutEnable decides
// whether anything is written on this tick. The value is saturated from
// accumulator width to the data width before the activation.
//
// Interface: acc is the computed value, act the activation function.
// Timing: one register stage; out is valid the cycle after the enables.
module output_control
  import cnn_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  acc_t    acc,
  input  act_e    act,
  input  logic    act_enable,
  input  logic    pad_enable,
  input  logic    data_out_enable,
  output stream_t out
);

  data_t sat_v, act_v;

  act_unit u_act (.func(act), .deriv(1'b0), .x(sat_v), .y(act_v));

  always_comb sat_v = fx_sat(acc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out <= '0;
    end else begin
      out.valid <= data_out_enable;
      if (pad_enable)      out.data <= '0;
      else if (act_enable) out.data <= act_v;
      else                 out.data <= sat_v;
    end
  end

endmodule
