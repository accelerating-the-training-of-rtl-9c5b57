// act_unit: activation function unit of the output-control path.
//
// Computes, combinationally, either the activation f(x) of a finished output
// point or the derivative f'(y) of the activation evaluated from a forward
// output y, which the backward-propagation layers multiply with the incoming
// error to form delta. The supported functions and their clipping regions
// (ReLU limited to 10, sigmoid zero below -17.32, tanh one above 8.66) follow
// the design; the piecewise-linear shape of sigmoid and tanh between those
// limits is this implementation's choice (see cnn_pkg).
//
// Interface: func selects the function, deriv selects f(x) (0) or f'(y) (1).
// Timing: purely combinational.
module act_unit
  import cnn_pkg::*;
(
  input  act_e  func,
  input  logic  deriv,
  input  data_t x,
  output data_t y
);

  always_comb begin
    if (deriv) y = fx_act_deriv(func, x);
    else       y = fx_act(func, x);
  end

endmodule
