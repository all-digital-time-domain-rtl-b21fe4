// tb_dtc: checks the digital-to-time converter.
//
// Part 1 drives random reference signals and checks that ps_out equals
// T[X[7:4]] while msb_en is high and T[X[3:0]] while it is low. Part 2 connects
// a pulse generator and checks, for many pixels in every speed mode, that the
// pulse is high for exactly X >> s quanta of each MAC period.
module tb_dtc;
  import tdcnn_pkg::*;
  import tdcnn_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  speed_mode_e mode = SPEED_1X;
  logic [N_PWM-1:0] pwm, pwm_tb, pwm_pg;
  logic msb_en, msb_tb, msb_pg, mac_tick, use_pg = 1'b0;
  logic [PIX_W-1:0] x;
  logic ps_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pulse_generator u_pg (.clk, .rst_n, .mode, .pwm(pwm_pg), .msb_en(msb_pg), .mac_tick);
  assign pwm    = use_pg ? pwm_pg : pwm_tb;
  assign msb_en = use_pg ? msb_pg : msb_tb;

  dtc dut (.x, .pwm, .msb_en, .ps_out);

  initial begin
    // Part 1: selection.
    for (int i = 0; i < 2000; i++) begin
      logic [3:0] nib;
      x      = PIX_W'($urandom);
      pwm_tb = N_PWM'($urandom);
      msb_tb = 1'($urandom);
      #1;
      nib = msb_tb ? x[7:4] : x[3:0];
      checks++;
      if (ps_out !== pwm_tb[nib]) begin
        failures++;
        $display("FAIL: x=%0d msb=%0b ps=%0b", x, msb_tb, ps_out);
      end
    end
    // Part 2: pulse width per MAC period.
    use_pg = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 4; m++) begin
      mode = speed_mode_e'(m);
      do @(negedge clk); while (!mac_tick);
      for (int i = 0; i < 40; i++) begin
        int w;
        do @(negedge clk); while (!mac_tick);
        x = (i == 0) ? 8'd255 : (i == 1) ? 8'd0 : (i == 2) ? 8'd214 : PIX_W'($urandom);
        w = 0;
        forever begin
          @(negedge clk);
          w += int'(ps_out);
          if (mac_tick) break;
        end
        checks++;
        if (w != (int'(x) >> shift_of(m))) begin
          failures++;
          $display("FAIL: mode %0d x=%0d width %0d", m, x, w);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
