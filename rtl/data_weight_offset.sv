// data_weight_offset: one multiply tap of a convolution (DataWeightOffset).
//
// For the tap (channel, ky, kx) of output point (oy, ox) and kernel `kernel`
// it computes the input-volume address
//     DataOffset   = channel*InDims^2 + iy*InDims + ix,
//     iy = oy*Stride + ky - Pad,  ix = ox*Stride + kx - Pad
// and the weight-memory address
//     WeightOffset = kernel*NChannels*KSize^2 + channel*KSize^2 + ky*KSize + kx
// then multiplies the two fetched values. A tap that falls in the zero
// padding around the input gives a zero product, the a = 0 rule of the
// input control. The address formulas follow the design; taking the data
// offset from the start of a stored input volume rather than from the
// current stream point is this implementation's choice.
//
// Timing: combinational; the memories are read asynchronously by the parent.
module data_weight_offset
  import cnn_pkg::*;
#(
  parameter int N_CH   = 3,
  parameter int IN_DIM = 28,
  parameter int KSIZE  = 3,
  parameter int STRIDE = 1,
  parameter int PAD    = 1,
  parameter int AW     = 16
) (
  input  logic [7:0]    kernel,
  input  logic [15:0]   channel,
  input  logic [7:0]    ky,
  input  logic [7:0]    kx,
  input  logic [15:0]   oy,
  input  logic [15:0]   ox,
  output logic [AW-1:0] d_addr,
  output logic [AW-1:0] w_addr,
  input  data_t         d_q,
  input  data_t         w_q,
  output acc_t          prod
);

  int iy, ix;
  logic inb;

  always_comb begin
    iy  = int'(oy) * STRIDE + int'(ky) - PAD;
    ix  = int'(ox) * STRIDE + int'(kx) - PAD;
    inb = (iy >= 0) && (iy < IN_DIM) && (ix >= 0) && (ix < IN_DIM);
    d_addr = inb ? AW'(int'(channel) * IN_DIM * IN_DIM + iy * IN_DIM + ix) : '0;
    w_addr = AW'(int'(kernel) * N_CH * KSIZE * KSIZE + int'(channel) * KSIZE * KSIZE
                 + int'(ky) * KSIZE + int'(kx));
    prod   = inb ? fx_mul(d_q, w_q) : acc_t'(0);
  end

endmodule
