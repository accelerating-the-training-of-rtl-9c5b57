// tb_input_control: drives random stream points, enables and alternative
// values through the input control and checks selection and stream advance.
module tb_input_control;
  import cnn_pkg::*;

  stream_t in;
  logic    in_ready, en, out_valid;
  data_t   a, out;
  int checks = 0, failures = 0;

  input_control dut (.in(in), .in_ready(in_ready), .data_in_enable(en), .a(a),
                     .out(out), .out_valid(out_valid));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      in.valid = 1'($urandom);
      in.data  = data_t'($urandom);
      a        = data_t'($urandom);
      en       = 1'($urandom);
      #1;
      checks++;
      if (in_ready !== en || out_valid !== (en && in.valid)
          || out !== ((en && in.valid) ? in.data : a)) begin
        failures++;
        $display("FAIL en=%b v=%b d=%h a=%h -> out=%h", en, in.valid, in.data, a, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
