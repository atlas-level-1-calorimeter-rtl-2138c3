// mux_test_tb: checks the four bench test modes of the clock selection:
// mode 0 passes the register values through, mode 1 drives both selections
// from a counter that advances exactly every STEP_CYCLES clocks and wraps
// after 64 steps with the fibre transmitter on, mode 2 forces both
// selections to 0 and mode 3 forces 0 and 1, both with the transmitter off.
module mux_test_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import cam_pkg::*;

  localparam int STEP = 7;

  logic       clk = 0, rst_n = 0;
  muxtest_e   mode = MUXTEST_NORMAL;
  src_sel_t   reg_ref_sel = '0, reg_var_sel = '0, ref_sel, var_sel;
  logic       reg_fibre_tx_en = 0, fibre_tx_en;
  logic [5:0] count;
  int checks = 0, failures = 0;

  mux_test #(.STEP_CYCLES(STEP)) dut (.*);

  always #12.5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("%t: %s", $realtime, msg);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 30; k++) begin
      @(negedge clk);
      reg_ref_sel = 6'($urandom); reg_var_sel = 6'($urandom); reg_fibre_tx_en = 1'($urandom);
      #1;
      check(ref_sel == reg_ref_sel && var_sel == reg_var_sel && fibre_tx_en == reg_fibre_tx_en,
            "mode 0 does not follow the registers");
    end
    @(negedge clk) mode = MUXTEST_COUNTER;
    // The counter holds each value for STEP clocks.
    for (int n = 0; n < 70; n++) begin
      for (int c = 0; c < STEP; c++) begin
        #1;
        check(ref_sel == 6'(n) && var_sel == 6'(n), $sformatf("counter %0d at step %0d.%0d", ref_sel, n, c));
        check(fibre_tx_en, "fibre transmitter off in counter mode");
        @(negedge clk);
      end
    end
    @(negedge clk) mode = MUXTEST_ZERO;
    #1 check(ref_sel == 0 && var_sel == 0 && !fibre_tx_en, "mode 2");
    @(negedge clk) mode = MUXTEST_ZERO_ONE;
    #1 check(ref_sel == 0 && var_sel == 1 && !fibre_tx_en, "mode 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
