// input_control: input data control of a layer (one per LMem input stream).
//
// A layer reads its LMem stream only on ticks where DataInEnable is set; on
// those ticks the stream point is passed on and the stream advances. On the
// other ticks the block returns the alternative value a instead, which each
// layer uses for its own purpose (zero for parameter padding in convolution,
// the held previous point in fully connected layers).
//
// Interface: in is the stream point (valid plus data), in_ready tells the
// stream source that the point is consumed this tick. out_valid is high when
// out carries a consumed stream point.
// Timing: combinational.
module input_control
  import cnn_pkg::*;
(
  input  stream_t in,
  output logic    in_ready,
  input  logic    data_in_enable,
  input  data_t   a,
  output data_t   out,
  output logic    out_valid
);

  always_comb begin
    in_ready  = data_in_enable;
    out_valid = data_in_enable && in.valid;
    out       = out_valid ? in.data : a;
  end

endmodule
