// iz_nrz_decoder_tb: drives the decoder with a biphase-mark TTC stream of
// random bits and with ideal clocks (80 MHz rising 0.5 ns after each cell
// boundary, the sampling clock 9.5 ns after it). Just before each 80 MHz
// edge of cell k the decoded bit must equal the bit sent in cell k-1, and
// the IZ sample must equal the line level late in cell k-1.
module iz_nrz_decoder_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int CELL = 12500;
  localparam int NCELLS = 4000;

  logic a_in = 0, b_in = 1;
  logic ttc, is_b, bit_val;
  int   cells;
  logic clk80 = 0, clk_sample = 0, rst_n = 0;
  logic iz, nrz;
  logic sent [0:NCELLS+8];
  logic level [0:NCELLS+8];
  int checks = 0, failures = 0;

  ttc_source #(.CELL_PS(CELL)) src (.a_in, .b_in, .ttc, .is_b, .bit_val, .cells);
  iz_nrz_decoder dut (.ttc_in(ttc), .clk_sample, .clk80, .rst_n, .iz, .nrz);

  initial begin
    #(longint'(CELL) * longint'(NCELLS + 100));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // New random bits for every cell; record what is sent.
  always @(cells) begin
    a_in = 1'($urandom);
    b_in = 1'($urandom);
  end

  initial begin
    #1;
    for (int k = 0; k < NCELLS; k++) begin
      sent[k] = bit_val;
      #(CELL - 1500);
      level[k] = ttc;               // line level late in the cell
      #1500;
    end
  end

  initial begin
    for (int k = 0; k < NCELLS; k++) begin
      #300;
      if (k >= 4) begin
        checks += 2;
        if (nrz !== sent[k-1]) begin
          failures++;
          $display("cell %0d: nrz %b, sent %b", k - 1, nrz, sent[k-1]);
        end
        if (iz !== level[k-1]) begin
          failures++;
          $display("cell %0d: iz %b, line %b", k - 1, iz, level[k-1]);
        end
      end
      #200  clk80 = 1;
      #4000 clk80 = 0;
      #5000 clk_sample = 1;
      #2000 clk_sample = 0;
      #1000;
      if (k == 1) rst_n = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
