// ttc_clock_recovery_tb: feeds a biphase-mark TTC stream of random channel A
// and B bits into the clock recovery model and checks, after a short lock-in
// of 8 cells, that the recovered clock rises exactly once per 12.5 ns cell,
// at the cell boundary, that its high time is the 4 ns reset delay and that
// the sampling clock follows 9 ns later. It also starts the model on a
// stream whose first transitions are mid-cell ones (a run of '1's) to show
// that it settles onto the boundaries.
module ttc_clock_recovery_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int CELL = 12500;
  localparam int T0   = 1000;

  logic a_in = 1, b_in = 1;
  logic ttc, is_b, bit_val;
  int   cells;
  logic clock80, clock80_sample;
  int checks = 0, failures = 0;
  int rises = 0, last_cell = -1;
  longint t_rise;

  ttc_source #(.CELL_PS(CELL), .T0_PS(T0)) src (.a_in, .b_in, .ttc, .is_b, .bit_val, .cells);
  ttc_clock_recovery dut (.ttc_in(ttc), .clock80, .clock80_sample);

  initial begin
    #(longint'(CELL) * 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Random data after the first 6 cells of '1's.
  always @(cells) begin
    if (cells >= 6) begin
      a_in = 1'($urandom);
      b_in = 1'($urandom);
    end
  end

  always @(posedge clock80) begin
    longint rel;
    t_rise = $time;
    rel = $time - T0;
    if (cells >= 8) begin
      checks += 2;
      if (rel % CELL != 0) begin
        failures++;
        $display("clock80 rise at %0d ps is not on a cell boundary", $time);
      end
      if (last_cell >= 0 && cells != last_cell + 1) begin
        failures++;
        $display("clock80 rise at %0d ps: cell %0d follows %0d", $time, cells, last_cell);
      end
      rises++;
    end
    last_cell = cells;
  end

  always @(negedge clock80) begin
    if (cells >= 8) begin
      checks++;
      if ($time - t_rise != 4000) begin
        failures++;
        $display("clock80 high for %0d ps", $time - t_rise);
      end
    end
  end

  always @(posedge clock80_sample) begin
    if (cells >= 9) begin
      checks++;
      if (($time - T0) % CELL != 9000) begin
        failures++;
        $display("sampling clock at %0d ps", $time);
      end
    end
  end

  initial begin
    #(T0 + longint'(CELL) * 2000);
    checks++;
    if (rises < 1990) begin
      failures++;
      $display("only %0d clock80 rises", rises);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
