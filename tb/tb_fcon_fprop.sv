// tb_fcon_fprop: runs the fully connected tile engine (B = 24, parallelism
// 12) on a layer of 48 inputs and 24 outputs: two runs, the second adding the
// partial result of the first from the partial-sum stream, which has random
// gaps so the engine stalls. Outputs of both runs are compared with a
// reference matrix product, with sigmoid on the last input tile, and the
// compute time is checked to be (B/PAR)*B ticks plus stalls.
module tb_fcon_fprop;
  import cnn_pkg::*;

  localparam int B = BURST_SIZE, PAR = 12, NIN = 2 * B;

  logic clk = 0, rst_n = 0, enable = 1;
  layer_ctrl_t ctrl;
  fmem_wr_t fmem_wr;
  stream_t in, ps, out;
  logic in_ready, ps_ready, stall, busy, done;
  int checks = 0, failures = 0;

  fcon_fprop #(.BURST_MULT(1), .PAR(PAR)) dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .ctrl(ctrl), .fmem_wr(fmem_wr),
    .in(in), .in_ready(in_ready), .psum(ps), .psum_ready(ps_ready), .out(out),
    .stall(stall), .busy(busy), .done(done));

  always #5 clk = ~clk;

  data_t xv [NIN];
  data_t w  [NIN][B];
  data_t psv [B];
  int    ii, pi, base, nstall, ncomp, nps;
  logic  feed, gap, use_ps;
  int    got [$];

  always_comb begin
    in.valid = feed && (ii < B);
    in.data  = xv[base + ((ii < B) ? ii : 0)];
    ps.valid = feed && use_ps && (pi < B) && !gap;
    ps.data  = psv[(pi < B) ? pi : 0];
  end
  always @(posedge clk) if (rst_n) begin
    if (in.valid && in_ready) ii <= ii + 1;
    if (ps.valid && ps_ready) pi <= pi + 1;
    gap <= ($urandom_range(0, 2) == 0);
    if (out.valid) got.push_back(int'(out.data));
    if (stall) nstall <= nstall + 1;
    if (busy && ii >= B) ncomp <= ncomp + 1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(input int v);
    return (v > 32767) ? 32767 : ((v < -32768) ? -32768 : v);
  endfunction

  task automatic run(input int tile, input logic first, input logic last, ref int res [B]);
    base = tile * B;
    for (int i = 0; i < B; i++)
      for (int o = 0; o < B; o++) begin
        @(negedge clk);
        fmem_wr.we = 1; fmem_wr.addr = 16'(i * B + o); fmem_wr.data = w[base + i][o];
      end
    @(negedge clk);
    fmem_wr.we = 0;
    got.delete();
    ii = 0; pi = 0; nstall = 0; ncomp = 0; use_ps = !first;
    ctrl = '0; ctrl.start = 1; ctrl.first_in = first; ctrl.last_in = last; ctrl.act = ACT_SIGMOID;
    @(negedge clk);
    ctrl.start = 0;
    feed = 1;
    @(posedge done);
    feed = 0;
    @(negedge clk);
    for (int o = 0; o < B; o++) begin
      int s;
      s = first ? 0 : int'(psv[o]);
      for (int i = 0; i < B; i++) s += (int'(xv[base + i]) * int'(w[base + i][o])) >>> 8;
      s = sat(s);
      if (last) s = int'(fx_sigmoid(data_t'(s)));
      res[o] = s;
      checks++;
      if (o >= got.size() || got[o] != s) begin
        failures++;
        $display("FAIL tile %0d out %0d: got %0d expected %0d", tile, o,
                 (o < got.size()) ? got[o] : -99999, s);
      end
    end
    checks++;
    if (got.size() != B) failures++;
    checks++;
    if (ncomp != (B / PAR) * B + nstall + 1) begin
      failures++;
      $display("FAIL compute cycles %0d with %0d stalls", ncomp, nstall);
    end
    if (!first) nps = nstall;
  endtask

  initial begin
    int r1 [B], r2 [B];
    ctrl = '0; fmem_wr = '0; feed = 0; ii = 0; pi = 0; use_ps = 0; base = 0; nps = 0;
    for (int i = 0; i < NIN; i++) begin
      xv[i] = data_t'($signed($urandom_range(0, 512)) - 256);
      for (int o = 0; o < B; o++) w[i][o] = data_t'($signed($urandom_range(0, 256)) - 128);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 1'b1, 1'b0, r1);
    for (int o = 0; o < B; o++) psv[o] = data_t'(r1[o]);
    run(1, 1'b0, 1'b1, r2);
    checks++;
    if (nps == 0) begin
      failures++;
      $display("FAIL the partial-sum stream never stalled the engine");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
