// tb_lenet_layers: runs the two LeNet-5 convolution layers through the engine.
//
// C1: a random 32x32x1 8-bit image, 6 filters of 5x5x1, giving 28x28x6
// convolution outputs pooled to 14x14x6 (196 engine convolutions of one
// channel). C3: a random 14x14x6 input, 16 filters of 5x5x6, giving 10x10x16
// pooled to 5x5x16 (25 convolutions of six channels). Weights are random +1/-1
// for C1 and 0/+1 for C3; unused filters get weight 0. For each pooled output
// position the testbench serves the four window pixels of every tap (MAC block
// b covers convolution output (2py + b/2, 2px + b%2)) and checks every MAC
// count and every pooled value against a reference computed from the image.
// C1 runs in 1x mode, C3 in 16x mode, both with 16-unit MDLs.
module tb_lenet_layers;
  import tdcnn_pkg::*;
  import tdcnn_ref_pkg::*;

  localparam int NF = 16, NB = 4, KT = 25;

  logic clk = 1'b0, rst_n = 1'b0;
  speed_mode_e mode = SPEED_1X;
  logic [4:0] mdl_len = 5'd16;
  logic [0:2] cal_bit [NF][NB];
  logic [NB-1:0] cal_enable [NF];
  logic start = 1'b0;
  logic [3:0] n_chan = 4'd1;
  logic busy, req_valid, out_valid;
  logic [3:0] req_chan;
  logic [4:0] req_tap;
  logic [PIX_W-1:0] pixel_in [NB];
  weight_t weight_in [NF];
  logic signed [11:0] out_pooled [NF];
  logic signed [11:0] out_count [NF][NB];

  int img [6][32][32];
  int wt  [NF][6][KT];
  int py = 0, px = 0;
  int checks = 0, failures = 0, convs = 0;

  always #5 clk = ~clk;

  tdcnn_engine dut (
    .clk, .rst_n, .mode, .mdl_len, .cal_bit, .cal_enable, .start, .n_chan,
    .busy, .req_valid, .req_chan, .req_tap, .pixel_in, .weight_in,
    .out_valid, .out_pooled, .out_count
  );

  always_comb begin
    int c, t, ky, kx;
    c = (int'(req_chan) < 6) ? int'(req_chan) : 0;
    t = (int'(req_tap) < KT) ? int'(req_tap) : 0;
    ky = t / 5;
    kx = t % 5;
    for (int b = 0; b < NB; b++)
      pixel_in[b] = PIX_W'(img[c][2 * py + b / 2 + ky][2 * px + b % 2 + kx]);
    for (int f = 0; f < NF; f++) begin
      weight_in[f].en   = (wt[f][c][t] != 0);
      weight_in[f].sign = (wt[f][c][t] > 0);
    end
  end

  task automatic layer(string name, int m, int nch, int in_sz, int nfilt, bit signed_w);
    int s, osz;
    s = shift_of(m);
    osz = (in_sz - 4) / 2;
    for (int c = 0; c < 6; c++)
      for (int y = 0; y < 32; y++)
        for (int x = 0; x < 32; x++) img[c][y][x] = (c < nch && y < in_sz && x < in_sz) ? $urandom_range(0, 255) : 0;
    for (int f = 0; f < NF; f++)
      for (int c = 0; c < 6; c++)
        for (int t = 0; t < KT; t++)
          wt[f][c][t] = (f >= nfilt || c >= nch) ? 0 : signed_w ? ($urandom_range(0, 1) ? 1 : -1) : $urandom_range(0, 1);
    mode = speed_mode_e'(m);
    n_chan = 4'(nch);
    for (py = 0; py < osz; py++)
      for (px = 0; px < osz; px++) begin
        int sum;
        @(negedge clk);
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        while (!out_valid) @(negedge clk);
        convs++;
        for (int f = 0; f < NF; f++) begin
          sum = 0;
          for (int b = 0; b < NB; b++) begin
            int v, ex;
            v = 0;
            for (int c = 0; c < nch; c++)
              for (int t = 0; t < KT; t++)
                v += (img[c][2 * py + b / 2 + t / 5][2 * px + b % 2 + t % 5] >> s) * wt[f][c][t];
            ex = wrap(mdl_count(v, 16, 0), 12);
            sum += ex;
            checks++;
            if (int'(out_count[f][b]) != ex) begin
              failures++;
              if (failures < 20)
                $display("FAIL: %s (%0d,%0d) f%0d b%0d count %0d exp %0d", name, py, px, f, b, out_count[f][b], ex);
            end
          end
          checks++;
          if (int'(out_pooled[f]) != floor_div(sum, 4)) failures++;
        end
        @(negedge clk);
      end
    $display("%s: %0dx%0dx%0d pooled outputs checked", name, osz, osz, nfilt);
  endtask

  initial begin
    for (int f = 0; f < NF; f++) begin
      cal_enable[f] = '0;
      for (int b = 0; b < NB; b++) cal_bit[f][b] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    layer("C1", 0, 1, 32, 6, 1'b1);
    layer("C3", 3, 6, 14, 16, 1'b0);
    checks++;
    if (convs != 196 + 25) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
