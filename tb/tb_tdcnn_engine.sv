// tb_tdcnn_engine: end-to-end test of the engine at its default size
// (16 filters x 4 MAC blocks, 16-unit MDLs, 12-bit counters, 5x5 taps).
//
// The testbench acts as the host: it generates random pixels and weights for
// every (channel, tap), serves them on the req_chan/req_tap request, and
// computes for every filter and MAC block the expected count
// floor((V + 2L - len) / 2L) (12-bit wrap), V = sum of (X >> s) * w, and the
// pooled average. Convolutions run in all four speed modes, with one channel
// (LeNet-5 C1 shape) and six channels (C3 shape), signed (+1/-1) and unsigned
// (0/+1) weights, several MDL lengths and calibration settings. The latency
// is checked against 2 + n_chan*26 MAC periods of 256 >> s cycles.
// Mechanisms counted: each speed mode, clockwise and anticlockwise
// accumulation, calibration stages in the loop, the per-channel gap, and
// counter wrap-around; each must happen at least once.
module tb_tdcnn_engine;
  import tdcnn_pkg::*;
  import tdcnn_ref_pkg::*;

  localparam int NF = 16, NB = 4, KT = 25, MAXC = 6;

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

  int pix [MAXC][KT][NB];
  int wt  [MAXC][KT][NF];
  int checks = 0, failures = 0;
  int used_mode [4];
  int n_cw = 0, n_ccw = 0, n_cal = 0, n_gap = 0, n_wrap = 0;

  always #5 clk = ~clk;

  tdcnn_engine dut (
    .clk, .rst_n, .mode, .mdl_len, .cal_bit, .cal_enable, .start, .n_chan,
    .busy, .req_valid, .req_chan, .req_tap, .pixel_in, .weight_in,
    .out_valid, .out_pooled, .out_count
  );

  // Host: serve the requested tap.
  always_comb begin
    int c, t;
    c = (int'(req_chan) < MAXC) ? int'(req_chan) : 0;
    t = (int'(req_tap) < KT) ? int'(req_tap) : 0;
    for (int b = 0; b < NB; b++) pixel_in[b] = PIX_W'(pix[c][t][b]);
    for (int f = 0; f < NF; f++) begin
      weight_in[f].en   = (wt[c][t][f] != 0);
      weight_in[f].sign = (wt[c][t][f] > 0);
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  // wmode: 0 signed +1/-1, 1 unsigned 0/+1, 2 all +1 with full-scale pixels
  task automatic convolve(int m, int nch, int len, bit use_cal, int wmode);
    int s, periods, v, ex, ex_raw, sum;
    int nc [NF][NB];
    s = shift_of(m);
    for (int c = 0; c < nch; c++)
      for (int t = 0; t < KT; t++) begin
        for (int b = 0; b < NB; b++) pix[c][t][b] = (wmode == 2) ? 255 : $urandom_range(0, 255);
        for (int f = 0; f < NF; f++)
          case (wmode)
            0: wt[c][t][f] = $urandom_range(0, 1) ? 1 : -1;
            1: wt[c][t][f] = $urandom_range(0, 1);
            default: wt[c][t][f] = 1;
          endcase
      end
    for (int f = 0; f < NF; f++)
      for (int b = 0; b < NB; b++) begin
        cal_enable[f][b] = use_cal ? 1'($urandom) : 1'b0;
        cal_bit[f][b]    = 3'($urandom);
        nc[f][b] = cal_enable[f][b] ? int'(cal_bit[f][b]) : 0;
        if (nc[f][b] > 0) n_cal++;
      end
    mode = speed_mode_e'(m);
    mdl_len = 5'(len);
    n_chan = 4'(nch);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!dut.u_pg.mac_tick) @(negedge clk);
    periods = 0;
    while (!out_valid) begin
      @(negedge clk);
      if (dut.u_pg.mac_tick) periods++;
      if (periods > 200) break;
    end
    used_mode[m]++;
    if (nch > 1) n_gap += nch - 1;
    // the result register follows the READ slot by one cycle
    check(periods == 2 + nch * (KT + 1),
          $sformatf("mode %0d nch %0d: %0d MAC periods", m, nch, periods));
    for (int f = 0; f < NF; f++) begin
      sum = 0;
      for (int b = 0; b < NB; b++) begin
        v = 0;
        for (int c = 0; c < nch; c++)
          for (int t = 0; t < KT; t++) v += (pix[c][t][b] >> s) * wt[c][t][f];
        ex_raw = mdl_count(v, len, nc[f][b]);
        ex = wrap(ex_raw, 12);
        if (ex != ex_raw) n_wrap++;
        if (v > 0) n_cw++;
        if (v < 0) n_ccw++;
        sum += ex;
        check(int'(out_count[f][b]) == ex,
              $sformatf("mode %0d nch %0d len %0d f%0d b%0d: count %0d exp %0d (V=%0d)",
                        m, nch, len, f, b, out_count[f][b], ex, v));
      end
      check(int'(out_pooled[f]) == floor_div(sum, 4),
            $sformatf("f%0d pooled %0d exp %0d", f, out_pooled[f], floor_div(sum, 4)));
    end
    @(negedge clk);
    check(!busy, "idle after result");
  endtask

  initial begin
    foreach (used_mode[i]) used_mode[i] = 0;
    for (int f = 0; f < NF; f++) begin
      cal_enable[f] = '0;
      for (int b = 0; b < NB; b++) cal_bit[f][b] = '0;
    end
    for (int c = 0; c < MAXC; c++)
      for (int t = 0; t < KT; t++) begin
        for (int b = 0; b < NB; b++) pix[c][t][b] = 0;
        for (int f = 0; f < NF; f++) wt[c][t][f] = 0;
      end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    convolve(0, 1, 16, 1'b0, 0);   // C1 shape, 1x, signed weights
    convolve(3, 6, 4,  1'b1, 1);   // C3 shape, 16x, unsigned weights, calibrated
    convolve(1, 2, 8,  1'b1, 0);   // 4x
    convolve(2, 6, 1,  1'b0, 2);   // 8x, full scale into the shortest loop: wraps
    convolve(0, 6, 16, 1'b1, 0);   // C3 shape at 1x
    for (int m = 0; m < 4; m++) check(used_mode[m] > 0, $sformatf("mode %0d never used", m));
    check(n_cw > 0,   "no clockwise accumulation");
    check(n_ccw > 0,  "no anticlockwise accumulation");
    check(n_cal > 0,  "no calibration stage used");
    check(n_gap > 0,  "no channel gap");
    check(n_wrap > 0, "no counter wrap");
    $display("modes 1x/4x/8x/16x: %0d/%0d/%0d/%0d; positive sums %0d, negative sums %0d, calibrated MDLs %0d, channel gaps %0d, wrapped counts %0d",
             used_mode[0], used_mode[1], used_mode[2], used_mode[3], n_cw, n_ccw, n_cal, n_gap, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
