// tb_updown_counter: checks the 12-bit up/down counter, including wrap-around
// in both directions.
module tb_updown_counter;
  logic clk = 1'b0, rst = 1'b1, up = 1'b0, dn = 1'b0;
  logic signed [11:0] count;
  int exp_c = 0, checks = 0, failures = 0;

  always #5 clk = ~clk;

  updown_counter #(.W(12)) dut (.clk, .rst, .up, .dn, .count);

  task automatic step(bit u, bit d);
    up = u; dn = d;
    if (u && !d) exp_c++;
    if (d && !u) exp_c--;
    @(negedge clk);
    checks++;
    if (int'(count) != tdcnn_ref_pkg::wrap(exp_c, 12)) begin
      failures++;
      $display("FAIL: count %0d expected %0d", count, tdcnn_ref_pkg::wrap(exp_c, 12));
    end
  endtask

  initial begin
    @(negedge clk); rst = 1'b0;
    for (int i = 0; i < 3000; i++) step(1'($urandom), 1'($urandom));
    for (int i = 0; i < 2100; i++) step(1'b1, 1'b0);   // wraps past +2047
    for (int i = 0; i < 4300; i++) step(1'b0, 1'b1);   // wraps past -2048
    rst = 1'b1; exp_c = 0; @(negedge clk); rst = 1'b0;
    checks++;
    if (count != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
