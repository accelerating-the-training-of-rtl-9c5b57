// tb_conv_wupdate: checks the weight-update vector delta * window against a
// reference product, zero vectors when WUpdateEnable is low, and latency.
module tb_conv_wupdate;
  import cnn_pkg::*;

  localparam int K = 3;
  logic clk = 0, rst_n = 0, en, wu_valid;
  data_t delta;
  data_t win [K*K];
  data_t wu  [K*K];
  int checks = 0, failures = 0;

  conv_wupdate #(.KSIZE(K)) dut (.clk(clk), .rst_n(rst_n), .wupdate_enable(en),
    .delta(delta), .win(win), .wu_valid(wu_valid), .wu(wu));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    en = 0; delta = '0;
    for (int i = 0; i < K*K; i++) win[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      en = 1'($urandom);
      delta = data_t'($signed($urandom_range(0, 2048)) - 1024);
      for (int i = 0; i < K*K; i++) win[i] = data_t'($signed($urandom_range(0, 2048)) - 1024);
      @(posedge clk); #1;
      checks++;
      if (wu_valid !== en) failures++;
      for (int i = 0; i < K*K; i++) begin
        e = en ? ((int'(delta) * int'(win[i])) >>> 8) : 0;
        checks++;
        if (int'(wu[i]) != e) begin
          failures++;
          $display("FAIL tap %0d: %0d expected %0d", i, wu[i], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
