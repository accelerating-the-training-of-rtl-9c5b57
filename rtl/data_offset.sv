// data_offset: stream offset buffer (DataOffset block).
//
// A dataflow layer that needs several points of its input stream in the same
// tick keeps the most recent |MaxOffset|+1 points and picks the ones it needs
// by offset. This block is a shift register of DEPTH points; each of the TAPS
// read ports returns the point that arrived offset[i] pushes before the newest
// one (offset 0 is the newest). The pooling layer uses it as its window
// buffer, with offsets y*InDims + x.
//
// Interface: push with din shifts in one point; taps are read combinationally.
// Timing: a pushed point is visible on the taps the cycle after the push.
module data_offset
  import cnn_pkg::*;
#(
  parameter int DEPTH = 29,
  parameter int TAPS  = 4,
  localparam int OW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            push,
  input  data_t           din,
  input  logic [OW-1:0]   offset [TAPS],
  output data_t           tap    [TAPS]
);

  data_t buf_q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) buf_q[i] <= '0;
    end else if (push) begin
      buf_q[0] <= din;
      for (int i = 1; i < DEPTH; i++) buf_q[i] <= buf_q[i-1];
    end
  end

  always_comb begin
    for (int t = 0; t < TAPS; t++)
      tap[t] = (int'(offset[t]) < DEPTH) ? buf_q[offset[t]] : data_t'(0);
  end

endmodule
