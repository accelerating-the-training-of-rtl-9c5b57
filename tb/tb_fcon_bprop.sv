// tb_fcon_bprop: runs the fully connected backward tile engine (B = 24,
// parallelism 12, ReLU) on one tile with a partial sum from an earlier tile.
// The output error is compared with delta x W^T plus the partial sum, every
// weight update with delta[j] * FwdIn[i] in the engine's (group, input,
// lane) order, and the compute time with (B/PAR)*B ticks.
module tb_fcon_bprop;
  import cnn_pkg::*;

  localparam int B = BURST_SIZE, PAR = 12, NG = B / PAR;

  logic clk = 0, rst_n = 0, enable = 1;
  layer_ctrl_t ctrl;
  fmem_wr_t fmem_wr;
  stream_t fo, er, fi, ps, out;
  logic de_ready, fi_ready, ps_ready, wu_valid, stall, busy, done;
  data_t wu [PAR];
  int checks = 0, failures = 0;

  fcon_bprop #(.BURST_MULT(1), .PAR(PAR)) dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .ctrl(ctrl), .fmem_wr(fmem_wr),
    .fwd_out(fo), .err(er), .de_ready(de_ready), .fwd_in(fi), .fwd_in_ready(fi_ready),
    .psum(ps), .psum_ready(ps_ready), .out(out), .wu_valid(wu_valid), .wu(wu),
    .stall(stall), .busy(busy), .done(done));

  always #5 clk = ~clk;

  data_t fov [B], erv [B], xv [B], psv [B];
  data_t w [B][B];
  int    di, xi, pi, ncomp;
  logic  feed;
  int    got [$];
  int    gwu [$];

  always_comb begin
    fo.valid = feed && (di < B);
    fo.data  = fov[(di < B) ? di : 0];
    er.valid = fo.valid;
    er.data  = erv[(di < B) ? di : 0];
    fi.valid = feed && (xi < B);
    fi.data  = xv[(xi < B) ? xi : 0];
    ps.valid = feed && (pi < B);
    ps.data  = psv[(pi < B) ? pi : 0];
  end
  always @(posedge clk) if (rst_n) begin
    if (fo.valid && de_ready) di <= di + 1;
    if (fi.valid && fi_ready) xi <= xi + 1;
    if (ps.valid && ps_ready) pi <= pi + 1;
    if (out.valid) got.push_back(int'(out.data));
    if (wu_valid) for (int p = 0; p < PAR; p++) gwu.push_back(int'(wu[p]));
    if (busy && xi >= B) ncomp <= ncomp + 1;
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

  initial begin
    int dl [B];
    int n;
    ctrl = '0; fmem_wr = '0; feed = 0; di = 0; xi = 0; pi = 0; ncomp = 0;
    for (int j = 0; j < B; j++) begin
      fov[j] = data_t'($signed($urandom_range(0, 1024)) - 512);
      erv[j] = data_t'($signed($urandom_range(0, 1024)) - 512);
      dl[j]  = (fov[j] > 0) ? int'(erv[j]) : 0;                 // ReLU'
      xv[j]  = data_t'($signed($urandom_range(0, 1024)) - 512);
      psv[j] = data_t'($signed($urandom_range(0, 1024)) - 512);
    end
    for (int i = 0; i < B; i++)
      for (int j = 0; j < B; j++) w[i][j] = data_t'($signed($urandom_range(0, 256)) - 128);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < B; i++)
      for (int j = 0; j < B; j++) begin
        @(negedge clk);
        fmem_wr.we = 1; fmem_wr.addr = 16'(i * B + j); fmem_wr.data = w[i][j];
      end
    @(negedge clk);
    fmem_wr.we = 0;
    ctrl.start = 1; ctrl.first_in = 0; ctrl.act = ACT_RELU;
    @(negedge clk);
    ctrl.start = 0;
    feed = 1;
    @(posedge done);
    feed = 0;
    @(negedge clk);
    for (int i = 0; i < B; i++) begin
      int s;
      s = int'(psv[i]);
      for (int j = 0; j < B; j++) s += (dl[j] * int'(w[i][j])) >>> 8;
      checks++;
      if (i >= got.size() || got[i] != sat(s)) begin
        failures++;
        $display("FAIL out %0d: got %0d expected %0d", i, (i < got.size()) ? got[i] : -99999, sat(s));
      end
    end
    checks++;
    if (gwu.size() != B * B) begin
      failures++;
      $display("FAIL %0d weight updates", gwu.size());
    end
    n = 0;
    for (int g = 0; g < NG; g++)
      for (int i = 0; i < B; i++)
        for (int p = 0; p < PAR; p++) begin
          int e;
          e = sat((dl[g + p * NG] * int'(xv[i])) >>> 8);
          checks++;
          if (n >= gwu.size() || gwu[n] != e) begin
            failures++;
            if (failures < 10) $display("FAIL wu g%0d i%0d p%0d: got %0d expected %0d", g, i, p,
                                        (n < gwu.size()) ? gwu[n] : -99999, e);
          end
          n++;
        end
    checks++;
    if (ncomp != NG * B + 1) begin
      failures++;
      $display("FAIL compute cycles %0d", ncomp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
