// tb_data_offset: pushes a random stream through the offset buffer and checks
// every tap against a reference history of the stream.
module tb_data_offset;
  import cnn_pkg::*;

  localparam int DEPTH = 29, TAPS = 4;
  logic clk = 0, rst_n = 0, push;
  data_t din;
  logic [4:0] offset [TAPS];
  data_t tap [TAPS];
  data_t hist [$];
  int checks = 0, failures = 0;

  data_offset #(.DEPTH(DEPTH), .TAPS(TAPS)) dut (
    .clk(clk), .rst_n(rst_n), .push(push), .din(din), .offset(offset), .tap(tap));

  always #50 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; din = '0;
    for (int t = 0; t < TAPS; t++) offset[t] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      push = ($urandom_range(0, 3) != 0);
      din  = data_t'($urandom);
      @(posedge clk);
      if (push) hist.push_front(din);
      #1;
      for (int t = 0; t < TAPS; t++) begin
        offset[t] = 5'($urandom_range(0, DEPTH - 1));
        #1;
        if (int'(offset[t]) < hist.size()) begin
          checks++;
          if (tap[t] !== hist[offset[t]]) begin
            failures++;
            $display("FAIL tap %0d offset %0d: %h expected %h", t, offset[t], tap[t],
                     hist[offset[t]]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
