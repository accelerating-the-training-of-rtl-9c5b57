// tb_output_control: checks saturation, activation on ActEnable, zero on
// PadEnable, write strobe on DataOutEnable and the one-cycle latency.
module tb_output_control;
  import cnn_pkg::*;

  logic clk = 0, rst_n = 0;
  acc_t acc;
  act_e act;
  logic act_en, pad_en, out_en;
  stream_t out;
  int checks = 0, failures = 0;

  output_control dut (.clk(clk), .rst_n(rst_n), .acc(acc), .act(act), .act_enable(act_en),
                      .pad_enable(pad_en), .data_out_enable(out_en), .out(out));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sat, exp_d;
    acc = '0; act = ACT_NONE; act_en = 0; pad_en = 0; out_en = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      acc    = acc_t'($signed($urandom_range(0, 40000)) - 20000) * acc_t'($urandom_range(1, 3));
      act    = ($urandom_range(0, 1) == 1) ? ACT_RELU : ACT_NONE;
      act_en = 1'($urandom);
      pad_en = ($urandom_range(0, 7) == 0);
      out_en = 1'($urandom);
      sat = (acc > 32767) ? 32767 : ((acc < -32768) ? -32768 : int'(acc));
      if (pad_en) exp_d = 0;
      else if (act_en && act == ACT_RELU) exp_d = (sat <= 0) ? 0 : ((sat > 2560) ? 2560 : sat);
      else exp_d = sat;
      @(posedge clk); #1;
      checks++;
      if (out.valid !== out_en || (out_en && int'(out.data) != exp_d)) begin
        failures++;
        $display("FAIL acc=%0d act_en=%b pad=%b -> %0d expected %0d", acc, act_en, pad_en,
                 out.data, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
