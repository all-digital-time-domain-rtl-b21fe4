// tb_mdl: checks the bidirectional memory delay line as a time accumulator.
//
// For many random configurations (length 1..16, calibration on/off, cal_bit
// 0..7) the testbench applies random EN and SIGN streams with long runs, keeps
// the net signed number of EN-high cycles V, and checks every cycle that
//   - the state vector equals the twisted-ring pattern for phase V,
//   - the sum of up minus dn pulses equals floor((V + 2L - len) / 2L),
//   - units beyond len stay at their reset value.
// It counts clockwise turns, anticlockwise turns and memory (hold) cycles and
// fails if any never happened.
module tb_mdl;
  import tdcnn_ref_pkg::*;
  localparam int N = 16;

  logic clk = 1'b0, rst = 1'b1, en = 1'b0, sign = 1'b0;
  logic [4:0] len = 5'd16;
  logic [0:2] cal_bit = '0;
  logic cal_enable = 1'b0;
  logic e, up, dn;
  logic [N-1:0] state;
  int checks = 0, failures = 0;
  int n_up = 0, n_dn = 0, n_hold = 0;

  always #5 clk = ~clk;

  mdl #(.N_UNITS(N), .CAL_STAGES(7)) dut (
    .clk, .rst, .en, .sign, .len, .cal_bit, .cal_enable, .e, .state, .up, .dn
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int v, turns, ln, nc;
    int unsigned exp_state;
    @(negedge clk);
    for (int cfg = 0; cfg < 60; cfg++) begin
      ln = (cfg < 16) ? cfg + 1 : $urandom_range(1, N);
      cal_enable = 1'($urandom);
      cal_bit    = 3'($urandom);
      nc = cal_enable ? int'(cal_bit) : 0;
      len = 5'(ln);
      rst = 1'b1;
      @(negedge clk);
      rst = 1'b0;
      v = 0; turns = 0;
      for (int i = 0; i < 600; i++) begin
        if (i % 20 == 0) sign = 1'($urandom_range(0, 2) != 0);
        en = ($urandom_range(0, 3) != 0);
        #1;
        turns += int'(up) - int'(dn);
        n_up += int'(up);
        n_dn += int'(dn);
        if (en) v += sign ? 1 : -1;
        else n_hold++;
        @(negedge clk);
        exp_state = ring_units(v, ln, nc);
        check(state == N'(exp_state),
              $sformatf("len %0d cal %0d v %0d state %h exp %h", ln, nc, v, state, exp_state));
        check(turns == mdl_count(v, ln, nc),
              $sformatf("len %0d cal %0d v %0d turns %0d exp %0d", ln, nc, v, turns, mdl_count(v, ln, nc)));
        check(e == state[ln-1], "node E");
      end
    end
    check(n_up > 0 && n_dn > 0 && n_hold > 0, "mechanisms");
    $display("clockwise turns %0d, anticlockwise turns %0d, hold cycles %0d", n_up, n_dn, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
