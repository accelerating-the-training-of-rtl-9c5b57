// cnn_dfe: the dataflow-engine kernels of the validation network.
//
// The network is split into blocks of layers; the device is loaded with one
// block at a time and every layer of the loaded block runs in the same
// kernel, each gated by its own MemControl enable bit, so a layer computes
// as soon as its input is in memory. Layers exchange data through the large
// off-chip memory (LMem), and weights and weight updates travel over the
// host link; both are outside this module, so every layer's streams are
// ports here. The network (3x28x28 input) is:
//   forward block 1  conv1 16 kernels 3x3 s1 p1, ReLU (burst multiple 15)
//                    conv2 16 kernels 3x3 s1 p1, ReLU (parallelism 8)
//                    max pool 2x2 stride 2
//   forward block 2  fc1 3136 -> 1000, sigmoid; fc2 1000 -> 10 (softmax on host)
//   backward block 2 fc2, fc1 (reverse order)
//   backward block 1 pool, conv2, conv1 (reverse order)
// All four block kernels stand side by side; on the device only the loaded
// one exists at a time. The fully connected layers compute one B x B tile
// per run (B = 24), so both instances of a direction share one tile engine
// shape.
//
// Interface: ctrl[l], mem_control[l], fmem_wr[l], busy[l] and done[l] belong
// to layer l (L_CONV1 ... L_CONV1_B below); pooling layers ignore fmem_wr.
// conv1_first_out and conv2_first_out are the forward convolutions'
// FirstOutput: the layer output point the run starts at.
// Timing: see each layer engine.
module cnn_dfe
  import cnn_pkg::*;
#(
  parameter int IN_CH      = 3,
  parameter int IN_DIM     = 28,
  parameter int N_KER      = 16,
  parameter int KSIZE      = 3,
  parameter int STRIDE     = 1,
  parameter int PAD        = 1,
  parameter int POOL_W     = 2,
  parameter int POOL_S     = 2,
  parameter int CONV1_BM   = 15,
  parameter int CONV2_PAR  = 8,
  parameter int FC_PAR     = 12,
  localparam int NL        = 10,
  localparam int CONV_OUT  = (IN_DIM - KSIZE + 2*PAD) / STRIDE + 1,
  localparam int K2        = KSIZE * KSIZE
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [NL-1:0] mem_control,
  input  layer_ctrl_t ctrl    [NL],
  input  fmem_wr_t    fmem_wr [NL],
  output logic [NL-1:0] busy,
  output logic [NL-1:0] done,
  // forward block 1
  input  logic [31:0] conv1_first_out, input logic [31:0] conv2_first_out,
  input  stream_t conv1_in,   output logic conv1_in_ready,  output stream_t conv1_out,
  input  stream_t conv2_in,   output logic conv2_in_ready,  output stream_t conv2_out,
  input  stream_t pool_in,    output logic pool_in_ready,   output stream_t pool_out,
  // forward block 2
  input  stream_t fc1_in,     output logic fc1_in_ready,
  input  stream_t fc1_psum,   output logic fc1_psum_ready,  output stream_t fc1_out,
  input  stream_t fc2_in,     output logic fc2_in_ready,
  input  stream_t fc2_psum,   output logic fc2_psum_ready,  output stream_t fc2_out,
  output logic [1:0] fc_stall,
  // backward block 2
  input  stream_t fc2b_fwd_out, input stream_t fc2b_err,    output logic fc2b_de_ready,
  input  stream_t fc2b_fwd_in,  output logic fc2b_fwd_in_ready,
  input  stream_t fc2b_psum,    output logic fc2b_psum_ready, output stream_t fc2b_out,
  output logic fc2b_wu_valid,   output data_t fc2b_wu [FC_PAR],
  input  stream_t fc1b_fwd_out, input stream_t fc1b_err,    output logic fc1b_de_ready,
  input  stream_t fc1b_fwd_in,  output logic fc1b_fwd_in_ready,
  input  stream_t fc1b_psum,    output logic fc1b_psum_ready, output stream_t fc1b_out,
  output logic fc1b_wu_valid,   output data_t fc1b_wu [FC_PAR],
  output logic [1:0] fcb_stall,
  // backward block 1
  input  stream_t poolb_fwd_out, input stream_t poolb_err,  output logic poolb_de_ready,
  input  stream_t poolb_mask,    output logic poolb_mask_ready, output stream_t poolb_out,
  input  stream_t conv2b_fwd_out, input stream_t conv2b_err, output logic conv2b_de_ready,
  input  stream_t conv2b_fwd_in,  output logic conv2b_fwd_in_ready, output stream_t conv2b_out,
  output logic conv2b_wu_valid,   output data_t conv2b_wu [K2],
  input  stream_t conv1b_fwd_out, input stream_t conv1b_err, output logic conv1b_de_ready,
  input  stream_t conv1b_fwd_in,  output logic conv1b_fwd_in_ready, output stream_t conv1b_out,
  output logic conv1b_wu_valid,   output data_t conv1b_wu [K2]
);

  localparam int L_CONV1 = 0, L_CONV2 = 1, L_POOL = 2, L_FC1 = 3, L_FC2 = 4;
  localparam int L_FC2_B = 5, L_FC1_B = 6, L_POOL_B = 7, L_CONV2_B = 8, L_CONV1_B = 9;

  // ---------------- forward block 1 ----------------
  conv_fprop #(.N_CH(IN_CH), .IN_DIM(IN_DIM), .KSIZE(KSIZE), .STRIDE(STRIDE), .PAD(PAD),
               .PAR(1), .KPR(2), .BURST_MULT(CONV1_BM)) u_conv1 (
    .clk, .rst_n, .enable(mem_control[L_CONV1]), .ctrl(ctrl[L_CONV1]),
    .fmem_wr(fmem_wr[L_CONV1]), .first_out(conv1_first_out), .in(conv1_in), .in_ready(conv1_in_ready),
    .out(conv1_out), .busy(busy[L_CONV1]), .done(done[L_CONV1]));

  conv_fprop #(.N_CH(N_KER), .IN_DIM(CONV_OUT), .KSIZE(KSIZE), .STRIDE(STRIDE), .PAD(PAD),
               .PAR(CONV2_PAR), .KPR(2), .BURST_MULT(1)) u_conv2 (
    .clk, .rst_n, .enable(mem_control[L_CONV2]), .ctrl(ctrl[L_CONV2]),
    .fmem_wr(fmem_wr[L_CONV2]), .first_out(conv2_first_out), .in(conv2_in), .in_ready(conv2_in_ready),
    .out(conv2_out), .busy(busy[L_CONV2]), .done(done[L_CONV2]));

  pool_fprop #(.N_CH(N_KER), .IN_DIM(CONV_OUT), .WSIZE(POOL_W), .STRIDE(POOL_S)) u_pool (
    .clk, .rst_n, .enable(mem_control[L_POOL]), .ctrl(ctrl[L_POOL]),
    .in(pool_in), .in_ready(pool_in_ready), .out(pool_out),
    .busy(busy[L_POOL]), .done(done[L_POOL]));

  // ---------------- forward block 2 ----------------
  fcon_fprop #(.BURST_MULT(1), .PAR(FC_PAR)) u_fc1 (
    .clk, .rst_n, .enable(mem_control[L_FC1]), .ctrl(ctrl[L_FC1]), .fmem_wr(fmem_wr[L_FC1]),
    .in(fc1_in), .in_ready(fc1_in_ready), .psum(fc1_psum), .psum_ready(fc1_psum_ready),
    .out(fc1_out), .stall(fc_stall[0]), .busy(busy[L_FC1]), .done(done[L_FC1]));

  fcon_fprop #(.BURST_MULT(1), .PAR(FC_PAR)) u_fc2 (
    .clk, .rst_n, .enable(mem_control[L_FC2]), .ctrl(ctrl[L_FC2]), .fmem_wr(fmem_wr[L_FC2]),
    .in(fc2_in), .in_ready(fc2_in_ready), .psum(fc2_psum), .psum_ready(fc2_psum_ready),
    .out(fc2_out), .stall(fc_stall[1]), .busy(busy[L_FC2]), .done(done[L_FC2]));

  // ---------------- backward block 2 ----------------
  fcon_bprop #(.BURST_MULT(1), .PAR(FC_PAR)) u_fc2_b (
    .clk, .rst_n, .enable(mem_control[L_FC2_B]), .ctrl(ctrl[L_FC2_B]),
    .fmem_wr(fmem_wr[L_FC2_B]), .fwd_out(fc2b_fwd_out), .err(fc2b_err),
    .de_ready(fc2b_de_ready), .fwd_in(fc2b_fwd_in), .fwd_in_ready(fc2b_fwd_in_ready),
    .psum(fc2b_psum), .psum_ready(fc2b_psum_ready), .out(fc2b_out),
    .wu_valid(fc2b_wu_valid), .wu(fc2b_wu), .stall(fcb_stall[1]),
    .busy(busy[L_FC2_B]), .done(done[L_FC2_B]));

  fcon_bprop #(.BURST_MULT(1), .PAR(FC_PAR)) u_fc1_b (
    .clk, .rst_n, .enable(mem_control[L_FC1_B]), .ctrl(ctrl[L_FC1_B]),
    .fmem_wr(fmem_wr[L_FC1_B]), .fwd_out(fc1b_fwd_out), .err(fc1b_err),
    .de_ready(fc1b_de_ready), .fwd_in(fc1b_fwd_in), .fwd_in_ready(fc1b_fwd_in_ready),
    .psum(fc1b_psum), .psum_ready(fc1b_psum_ready), .out(fc1b_out),
    .wu_valid(fc1b_wu_valid), .wu(fc1b_wu), .stall(fcb_stall[0]),
    .busy(busy[L_FC1_B]), .done(done[L_FC1_B]));

  // ---------------- backward block 1 ----------------
  pool_bprop #(.N_CH(N_KER), .IN_DIM(CONV_OUT), .WSIZE(POOL_W), .STRIDE(POOL_S)) u_pool_b (
    .clk, .rst_n, .enable(mem_control[L_POOL_B]), .ctrl(ctrl[L_POOL_B]),
    .fwd_out(poolb_fwd_out), .err(poolb_err), .de_ready(poolb_de_ready),
    .mask(poolb_mask), .mask_ready(poolb_mask_ready), .out(poolb_out),
    .busy(busy[L_POOL_B]), .done(done[L_POOL_B]));

  conv_bprop #(.N_CH(N_KER), .IN_DIM(CONV_OUT), .N_KER(N_KER), .KSIZE(KSIZE),
               .STRIDE(STRIDE), .PAD(PAD), .PAR(1), .CPR(2)) u_conv2_b (
    .clk, .rst_n, .enable(mem_control[L_CONV2_B]), .ctrl(ctrl[L_CONV2_B]),
    .fmem_wr(fmem_wr[L_CONV2_B]), .fwd_out(conv2b_fwd_out), .err(conv2b_err),
    .de_ready(conv2b_de_ready), .fwd_in(conv2b_fwd_in), .fwd_in_ready(conv2b_fwd_in_ready),
    .out(conv2b_out), .wu_valid(conv2b_wu_valid), .wu(conv2b_wu),
    .busy(busy[L_CONV2_B]), .done(done[L_CONV2_B]));

  conv_bprop #(.N_CH(IN_CH), .IN_DIM(IN_DIM), .N_KER(N_KER), .KSIZE(KSIZE),
               .STRIDE(STRIDE), .PAD(PAD), .PAR(1), .CPR(2)) u_conv1_b (
    .clk, .rst_n, .enable(mem_control[L_CONV1_B]), .ctrl(ctrl[L_CONV1_B]),
    .fmem_wr(fmem_wr[L_CONV1_B]), .fwd_out(conv1b_fwd_out), .err(conv1b_err),
    .de_ready(conv1b_de_ready), .fwd_in(conv1b_fwd_in), .fwd_in_ready(conv1b_fwd_in_ready),
    .out(conv1b_out), .wu_valid(conv1b_wu_valid), .wu(conv1b_wu),
    .busy(busy[L_CONV1_B]), .done(done[L_CONV1_B]));

endmodule
