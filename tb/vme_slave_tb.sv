// vme_slave_tb: a VME-- master drives the slave, which sits in front of a
// 128-word memory kept in the testbench. Checked: writes reach the addressed
// word with the written data; reads return the word; each access produces
// exactly one strobe; DTACK* is asserted on the (DS_FILTER + 5)th clock edge
// after DS0* falls and released on the (DS_FILTER + 3)th after it rises;
// accesses outside the base address get no strobe and no DTACK*; a DS0*
// glitch shorter than the filter starts no cycle.
module vme_slave_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int F = 3;

  logic        clk = 0, rst_n = 0;
  logic        vme_ds0_n = 1, vme_write_n = 1;
  logic [23:1] vme_addr = '0;
  logic [15:0] vme_data_in = '0, vme_data_out;
  logic        vme_data_oe, vme_dtack_n;
  logic        reg_wr, reg_rd;
  logic [6:0]  reg_addr;
  logic [15:0] reg_wdata, reg_rdata;
  logic        access;
  logic [15:0] mem [128];
  int checks = 0, failures = 0, strobes = 0;

  vme_slave #(.DS_FILTER(F)) dut (.*);

  always #12.5 clk = ~clk;

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb reg_rdata = mem[reg_addr];
  always @(posedge clk) begin
    if (reg_wr && rst_n) mem[reg_addr] <= reg_wdata;   // strobes are random until reset
    if ((reg_wr || reg_rd) && rst_n) strobes++;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("%t: %s", $realtime, msg);
    end
  endtask

  // One VME cycle; DS0* changes on falling clock edges. Returns read data
  // and whether DTACK* came.
  task automatic vme_cycle(input logic [23:0] byte_addr, input bit wr, input logic [15:0] wd,
                           output logic [15:0] rd, output bit acked);
    int edges;
    @(negedge clk);
    vme_addr    = byte_addr[23:1];
    vme_write_n = !wr;
    vme_data_in = wd;
    @(negedge clk) vme_ds0_n = 0;
    edges = 0; acked = 0;
    while (edges < 40) begin
      @(posedge clk); edges++;
      #1;
      if (!vme_dtack_n) begin acked = 1; break; end
    end
    if (acked) begin
      check(edges == F + 5, $sformatf("DTACK after %0d edges, expected %0d", edges, F + 5));
      if (!wr) check(vme_data_oe, "read data not driven");
      rd = vme_data_out;
    end
    @(negedge clk) vme_ds0_n = 1;
    if (acked) begin
      edges = 0;
      while (edges < 40) begin
        @(posedge clk); edges++;
        #1;
        if (vme_dtack_n) break;
      end
      check(edges == F + 3, $sformatf("DTACK released after %0d edges, expected %0d", edges, F + 3));
      check(!vme_data_oe, "data bus not released");
    end
    repeat (3) @(posedge clk);
  endtask

  initial begin
    logic [15:0] model [128];
    logic [15:0] rd;
    bit acked;
    int s0;
    foreach (mem[i]) begin mem[i] = 16'(i * 3); model[i] = 16'(i * 3); end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      int w;
      logic [15:0] d;
      w = $urandom % 128;
      d = 16'($urandom);
      s0 = strobes;
      if ($urandom % 2) begin
        vme_cycle(24'h060000 + 24'(2 * w), 1, d, rd, acked);
        model[w] = d;
        check(acked, "write not acknowledged");
        check(mem[w] == d, $sformatf("word %0d holds %h after writing %h", w, mem[w], d));
      end else begin
        vme_cycle(24'h060000 + 24'(2 * w), 0, 0, rd, acked);
        check(acked, "read not acknowledged");
        check(rd == model[w], $sformatf("read word %0d gave %h, expected %h", w, rd, model[w]));
      end
      check(strobes - s0 == 1, "not exactly one strobe");
    end
    // Other modules' addresses.
    for (int k = 0; k < 20; k++) begin
      logic [23:0] a;
      a = 24'($urandom) & 24'hFFFFFE;
      if (a[23:8] == 16'h0600) a[23:8] = 16'h0700;
      s0 = strobes;
      vme_cycle(a, 1, 16'hDEAD, rd, acked);
      check(!acked && strobes == s0, "responded outside its address block");
    end
    // A DS0* glitch of F-1 clocks must be filtered out.
    s0 = strobes;
    @(negedge clk);
    vme_addr = 23'(24'h060000 >> 1); vme_write_n = 0;
    vme_ds0_n = 0;
    repeat (F - 1) @(negedge clk);
    vme_ds0_n = 1;
    repeat (20) begin
      @(posedge clk); #1;
      check(vme_dtack_n, "glitch acknowledged");
    end
    check(strobes == s0, "glitch produced a strobe");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
