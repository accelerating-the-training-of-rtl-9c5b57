// tb_data_weight_offset: checks the data and weight offsets of random taps
// against the offset formulas, the zero product in the padding border, and
// the product of the fetched values.
module tb_data_weight_offset;
  import cnn_pkg::*;

  localparam int N_CH = 3, IN_DIM = 28, KSIZE = 3, STRIDE = 2, PAD = 1;
  logic [7:0]  kernel, ky, kx;
  logic [15:0] channel, oy, ox;
  logic [15:0] d_addr, w_addr;
  data_t d_q, w_q;
  acc_t  prod;
  int checks = 0, failures = 0;

  data_weight_offset #(.N_CH(N_CH), .IN_DIM(IN_DIM), .KSIZE(KSIZE), .STRIDE(STRIDE),
                       .PAD(PAD), .AW(16)) dut (
    .kernel(kernel), .channel(channel), .ky(ky), .kx(kx), .oy(oy), .ox(ox),
    .d_addr(d_addr), .w_addr(w_addr), .d_q(d_q), .w_q(w_q), .prod(prod));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int iy, ix, ew, ed;
    longint ep;
    logic inb;
    for (int i = 0; i < 1000; i++) begin
      kernel  = 8'($urandom_range(0, 1));
      channel = 16'($urandom_range(0, N_CH - 1));
      ky = 8'($urandom_range(0, KSIZE - 1));
      kx = 8'($urandom_range(0, KSIZE - 1));
      oy = 16'($urandom_range(0, 13));
      ox = 16'($urandom_range(0, 13));
      d_q = data_t'($urandom);
      w_q = data_t'($urandom);
      #1;
      iy = oy * STRIDE + ky - PAD;
      ix = ox * STRIDE + kx - PAD;
      inb = iy >= 0 && ix >= 0 && iy < IN_DIM && ix < IN_DIM;
      ew = kernel * N_CH * 9 + channel * 9 + ky * 3 + kx;
      ed = channel * IN_DIM * IN_DIM + iy * IN_DIM + ix;
      ep = inb ? ((longint'(d_q) * longint'(w_q)) >>> 8) : 0;
      checks++;
      if (int'(w_addr) != ew || (inb && int'(d_addr) != ed) || longint'(prod) != ep) begin
        failures++;
        $display("FAIL k%0d c%0d ky%0d kx%0d oy%0d ox%0d: d %0d/%0d w %0d/%0d p %0d/%0d",
                 kernel, channel, ky, kx, oy, ox, d_addr, ed, w_addr, ew, prod, ep);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
