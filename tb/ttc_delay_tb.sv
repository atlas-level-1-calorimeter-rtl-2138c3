// ttc_delay_tb: drives the delay model with a 40 MHz clock and, for a set of
// codes across the 10-bit range, measures the time from each input edge to
// the matching output edge. It must be 2200 ps + 10 ps * code (2.2 ns to
// 12.23 ns) for rising and falling edges alike.
module ttc_delay_tb;
  timeunit 1ps;
  timeprecision 1ps;

  logic       clk_in = 0, clk_out;
  logic [9:0] code = '0;
  int checks = 0, failures = 0;
  longint t_in_rise, t_in_fall;

  ttc_delay dut (.*);

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always #12500 clk_in = ~clk_in;
  always @(posedge clk_in) t_in_rise = $time;
  always @(negedge clk_in) t_in_fall = $time;

  initial begin
    int codes[8] = '{0, 1, 100, 255, 512, 777, 1000, 1023};
    foreach (codes[i]) begin
      longint exp_d;
      // Change the code while clk_in is stable, long before its next edge.
      @(posedge clk_in);
      #20; code = 10'(codes[i]);
      exp_d = 2200 + 10 * codes[i];
      // Let edges launched under the old code drain.
      repeat (2) @(posedge clk_in);
      repeat (4) begin
        @(posedge clk_out);
        checks++;
        if (($time - t_in_rise + 25000) % 25000 != exp_d % 25000) begin
          failures++;
          $display("code %0d: rising delay %0d ps, expected %0d", codes[i], $time - t_in_rise, exp_d);
        end
        @(negedge clk_out);
        checks++;
        if (($time - t_in_fall + 25000) % 25000 != exp_d % 25000) begin
          failures++;
          $display("code %0d: falling delay %0d ps, expected %0d", codes[i], $time - t_in_fall, exp_d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
