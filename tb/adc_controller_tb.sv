// adc_controller_tb: runs the ADC controller against a serial ADC responder
// written here from the protocol (chip select low starts a conversion, DOUT
// high ends it, each falling SCLK edge shows the next bit, MSB first, then
// two zero bits). Each conversion uses a random value and conversion time.
// Checked per conversion: the start request is acknowledged once, Busy is
// set and DAV cleared while converting, the data register receives the value,
// DAV is set and Busy cleared at the end, and DAV follows the end of
// conversion after exactly 25 * SCLK_HALF + 3 clocks. The continuous test
// mode must then run conversions back to back without requests.
module adc_controller_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int H = 4;

  logic clk = 0, rst_n = 0, start = 0, test_continuous = 0;
  logic started, busy, dav;
  logic [9:0] data;
  logic adc_cs_n, adc_sclk, adc_dout = 0;
  int checks = 0, failures = 0;
  logic [9:0] value;
  logic [11:0] shreg;
  int conv_cycles;
  longint eoc_cycle, cyc = 0;

  adc_controller #(.SCLK_HALF(H)) dut (.*);

  always #12.5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #5ms;
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

  // ADC responder.
  always @(negedge adc_cs_n) begin
    adc_dout = 0;
    value = 10'($urandom);
    conv_cycles = 20 + ($urandom % 200);
    repeat (conv_cycles) @(posedge clk);
    #1;
    shreg = {value, 2'b00};
    adc_dout = 1;
    eoc_cycle = cyc;
  end
  always @(negedge adc_sclk) if (!adc_cs_n) begin
    adc_dout = shreg[11];
    shreg = {shreg[10:0], 1'b0};
  end
  always @(posedge adc_cs_n) adc_dout = 0;

  // Count acknowledgements.
  int n_started = 0;
  always @(posedge clk) if (started) n_started++;

  initial begin
    int n_conv;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    check(!busy && !dav, "flags not clear after reset");
    for (int k = 0; k < 20; k++) begin
      int st0;
      st0 = n_started;
      @(negedge clk) start = 1;
      wait (started);
      @(negedge clk) start = 0;
      check(busy && !dav, "busy/dav wrong at start");
      check(!adc_cs_n, "chip select not low");
      @(posedge dav);
      check(cyc - eoc_cycle == 25 * H + 3,
            $sformatf("DAV %0d clocks after end of conversion, expected %0d", cyc - eoc_cycle, 25 * H + 3));
      #1;
      check(data == value, $sformatf("data %h, ADC converted %h", data, value));
      check(!busy, "busy still set");
      check(n_started - st0 == 1, "start acknowledged more than once");
      repeat ($urandom % 10) @(posedge clk);
      check(dav && data == value, "result not held");
    end
    // Continuous test mode.
    test_continuous = 1;
    n_conv = 0;
    repeat (5) begin
      @(posedge dav);
      #1;
      check(data == value, "continuous mode: wrong data");
      n_conv++;
    end
    test_continuous = 0;
    check(n_conv == 5, "continuous mode stalled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
