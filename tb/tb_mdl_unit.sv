// tb_mdl_unit: checks one memory-delay-line unit against its switch table.
//
// Random EN, SIGN and neighbour values are applied every cycle. Expected next
// state: EN=1,SIGN=1 takes the clockwise input (delay line), EN=1,SIGN=0 takes
// the anticlockwise input, EN=0 keeps the state (memory line), RST clears it.
module tb_mdl_unit;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0, sign = 1'b0, from_prev = 1'b0, from_next = 1'b0;
  logic q, exp_q;
  int checks = 0, failures = 0;
  int n_fwd = 0, n_bwd = 0, n_hold = 0;

  always #5 clk = ~clk;

  mdl_unit dut (.clk, .rst, .en, .sign, .from_prev, .from_next, .q);

  initial begin
    exp_q = 1'b0;
    @(negedge clk);
    for (int i = 0; i < 4000; i++) begin
      rst       = ($urandom_range(0, 30) == 0);
      en        = 1'($urandom);
      sign      = 1'($urandom);
      from_prev = 1'($urandom);
      from_next = 1'($urandom);
      if (rst)            exp_q = 1'b0;
      else if (en && sign) begin exp_q = from_prev; n_fwd++;  end
      else if (en)         begin exp_q = from_next; n_bwd++;  end
      else                 n_hold++;
      @(negedge clk);
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL: cycle %0d en=%0b sign=%0b q=%0b exp=%0b", i, en, sign, q, exp_q);
      end
    end
    checks++;
    if (n_fwd == 0 || n_bwd == 0 || n_hold == 0) failures++;
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
