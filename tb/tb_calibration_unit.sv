// tb_calibration_unit: checks the trimmable delay of the calibration unit.
//
// For every setting (cal_enable, cal_bit) the testbench streams random bits
// into in_fwd with EN=1, SIGN=1 and checks out_fwd is in_fwd delayed by n
// cycles, n = cal_enable ? cal_bit : 0 (0 means a direct connection); then the
// same for in_bwd/out_bwd with SIGN=0; then checks that EN=0 freezes the
// delayed samples.
module tb_calibration_unit;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0, sign = 1'b1;
  logic [0:2] cal_bit = '0;
  logic cal_enable = 1'b0;
  logic in_fwd = 1'b0, in_bwd = 1'b0, out_fwd, out_bwd;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  calibration_unit #(.CAL_STAGES(7)) dut (
    .clk, .rst, .en, .sign, .cal_bit, .cal_enable, .in_fwd, .in_bwd, .out_fwd, .out_bwd
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(bit dir_fwd, int n);
    bit hist [$];
    bit b, o;
    sign = dir_fwd;
    en   = 1'b1;
    for (int i = 0; i < 40; i++) begin
      b = 1'($urandom);
      if (dir_fwd) in_fwd = b; else in_bwd = b;
      #1;
      o = dir_fwd ? out_fwd : out_bwd;
      if (n == 0) check(o == b, $sformatf("n=0 passthrough dir=%0b", dir_fwd));
      else if (i >= n) check(o == hist[i - n], $sformatf("n=%0d dir=%0b i=%0d", n, dir_fwd, i));
      hist.push_back(b);
      @(negedge clk);
    end
    // hold: the delayed samples stay put
    if (n > 0) begin
      en = 1'b0;
      o = dir_fwd ? out_fwd : out_bwd;
      repeat (5) begin
        if (dir_fwd) in_fwd = ~in_fwd; else in_bwd = ~in_bwd;
        @(negedge clk);
        check((dir_fwd ? out_fwd : out_bwd) == o, $sformatf("hold n=%0d", n));
      end
    end
  endtask

  initial begin
    @(negedge clk);
    for (int ce = 0; ce < 2; ce++) begin
      for (int cb = 0; cb < 8; cb++) begin
        rst = 1'b1;
        cal_enable = 1'(ce);
        cal_bit = 3'(cb);
        @(negedge clk);
        rst = 1'b0;
        run(1'b1, ce ? cb : 0);
        run(1'b0, ce ? cb : 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
