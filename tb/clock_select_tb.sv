// clock_select_tb: checks both selection multiplexers for every selection
// code against a direct index into the input vector, with random input
// levels, including the inverted TTC choice.
module clock_select_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import cam_pkg::*;

  logic [N_PROC-1:0]  cpm_clk;
  logic               ttc_clk, ttc_clk_dly;
  logic [N_FIBRE-1:0] fibre_clk;
  src_sel_t           ref_sel, var_sel;
  logic               ref_clk, var_clk;
  int checks = 0, failures = 0;

  clock_select dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_ref, exp_var;
    for (int rep = 0; rep < 40; rep++) begin
      cpm_clk     = N_PROC'($urandom);
      {ttc_clk, ttc_clk_dly} = 2'($urandom);
      fibre_clk   = N_FIBRE'($urandom);
      for (int s = 0; s < 64; s++) begin
        ref_sel = 6'(s);
        var_sel = 6'(63 - s);
        #1;
        case (s >> 4)
          0: exp_ref = cpm_clk[s & 15];
          1: exp_ref = ttc_clk;
          2: exp_ref = !ttc_clk;
          default: exp_ref = ttc_clk_dly;
        endcase
        case ((63 - s) >> 4)
          0: exp_var = cpm_clk[(63 - s) & 15];
          default: exp_var = fibre_clk[((63 - s) >> 4) - 1];
        endcase
        checks += 2;
        if (ref_clk !== exp_ref) begin
          failures++;
          $display("ref mismatch sel=%0d got %b exp %b", s, ref_clk, exp_ref);
        end
        if (var_clk !== exp_var) begin
          failures++;
          $display("var mismatch sel=%0d got %b exp %b", 63 - s, var_clk, exp_var);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
