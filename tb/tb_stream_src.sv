// tb_stream_src: testbench stream source standing in for an LMem read stream.
// The test pushes points into a queue; the source offers the head point while
// it is not held, optionally with random one-cycle gaps, and drops it when the
// consumer's ready is high at a clock edge.
module tb_stream_src
  import cnn_pkg::*;
(
  input  logic    clk,
  input  logic    ready,
  input  logic    gaps,
  output stream_t s
);
  data_t q [$];
  logic  gap = 1'b0;

  always_comb begin
    s.valid = (q.size() > 0) && !(gaps && gap);
    s.data  = (q.size() > 0) ? q[0] : data_t'(0);
  end

  always @(posedge clk) begin
    if (s.valid && ready) void'(q.pop_front());
    gap <= ($urandom_range(0, 3) == 0);
  end

  task automatic push(input data_t v);
    q.push_back(v);
  endtask

  function automatic int size();
    return q.size();
  endfunction
endmodule
