// ab_align_tb: drives the A/B alignment logic with 80 Mb/s TTC data bits.
// Scenario 1: IDLE (A = 0, B = 1) with random Level-1 Accepts (A = 1); the
//   first '1' is a B bit, so the guess is right: the slot signal must match
//   the true slot on every bit, the 40 MHz clock must be the slot signal one
//   cycle later, every L1A must be reported and no violation raised.
// Scenario 2: the stream starts with an L1A, so the first guess is wrong.
//   The swapped IDLE then shows (A,B) = (1,0) pairs; the twelfth pair
//   (more than 11) completes in bit 24 counted from the guess, which must
//   raise exactly one violation there, after which the slots must be right.
// Scenario 3: correct alignment and a legal burst of 11 (1,0) pairs must not
//   cause a slip; a burst of 12 must, and the IDLE that follows (now seen
//   swapped) must cause a second slip that restores the alignment.
// A second instance runs the alternative rule (more than 23 consecutive A
// bits of 1 are illegal) on the same bits: it must stay quiet in scenarios 1
// and 3, slip once in scenario 2 (in the A slot holding bit 47, the 24th
// swapped IDLE '1'), and in scenario 4 accept a burst of 23 L1As but slip on
// 24, then slip back once the swapped IDLE has shown 24 ones.
module ab_align_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk80 = 0, rst_n = 0, nrz = 0;
  logic slot_b, clock40, locked, violation, l1a, a_bit, b_bit, pair_valid;
  int checks = 0, failures = 0;

  ab_align dut (.*);

  logic slot_b_x, clock40_x, locked_x, violation_x, l1a_x, a_bit_x, b_bit_x, pair_valid_x;
  ab_align #(.A_ONES_RULE(1'b1)) dut_x (
    .clk80, .rst_n, .nrz, .slot_b(slot_b_x), .clock40(clock40_x), .locked(locked_x),
    .violation(violation_x), .l1a(l1a_x), .a_bit(a_bit_x), .b_bit(b_bit_x),
    .pair_valid(pair_valid_x));
  int n_viol_x = 0;
  always @(posedge clk80) begin
    #0.1;
    if (violation_x) n_viol_x++;
  end

  always #6.25 clk80 = ~clk80;

  initial begin
    #2ms;
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

  // Present one bit before the next rising edge and return after that edge.
  task automatic send(input logic b);
    @(negedge clk80) nrz = b;
    @(posedge clk80);
    #0.1;
  endtask

  task automatic do_reset();
    rst_n = 0;
    repeat (3) @(posedge clk80);
    @(negedge clk80) rst_n = 1;
  endtask

  initial begin
    int n_l1a, n_rep, n_viol, guess_bit, slip_bit, slip_bit_x, vx;
    logic last_slot;
    // ---------------- scenario 1 ----------------
    do_reset();
    send(0);                          // an A bit before the first B
    n_l1a = 0; n_rep = 0; n_viol = 0;
    for (int i = 0; i < 2000; i++) begin
      logic is_b, v;
      is_b = (i % 2) == 0;            // bit 0 here is a B bit
      v = is_b ? 1'b1 : (($urandom % 8) == 0);
      if (!is_b && v && i > 4) n_l1a++;
      else if (!is_b) v = 0;
      last_slot = slot_b;
      send(v);
      if (l1a) n_rep++;
      if (violation) n_viol++;
      if (i >= 1) begin
        check(locked, "not locked");
        // After this edge slot_b describes the next bit.
        check(slot_b == ((i + 1) % 2 == 0), "scenario 1: wrong slot");
        check(clock40 == last_slot, "clock40 is not the retimed slot signal");
      end
    end
    send(0);
    if (l1a) n_rep++;
    check(n_rep == n_l1a, $sformatf("scenario 1: %0d L1A reported, %0d sent", n_rep, n_l1a));
    check(n_viol == 0, "scenario 1: unexpected violation");
    check(n_viol_x == 0, "scenario 1: unexpected violation, A-ones rule");

    // ---------------- scenario 2 ----------------
    do_reset();
    n_viol = 0; slip_bit = -1; slip_bit_x = -1; vx = n_viol_x;
    send(1);                          // L1A in the first A slot: wrong guess
    check(locked, "scenario 2: not locked after first 1");
    for (int i = 1; i < 200; i++) begin
      logic is_b;
      is_b = (i % 2) == 1;
      send(is_b ? 1'b1 : 1'b0);
      if (violation) begin
        n_viol++;
        if (slip_bit < 0) slip_bit = i;
      end
      if (i >= 24) check(slot_b == ((i + 1) % 2 == 1), "scenario 2: slot wrong after slip");
      if (violation_x && slip_bit_x < 0) slip_bit_x = i;
      if (i >= 47) check(slot_b_x == ((i + 1) % 2 == 1), "scenario 2: slot wrong after slip, A-ones rule");
    end
    check(n_viol_x - vx == 1, $sformatf("scenario 2: %0d violations, A-ones rule", n_viol_x - vx));
    check(slip_bit_x == 47, $sformatf("scenario 2: A-ones slip after bit %0d, expected 47", slip_bit_x));
    check(n_viol == 1, $sformatf("scenario 2: %0d violations", n_viol));
    // The flag is registered on the edge that takes bit 24.
    check(slip_bit == 24, $sformatf("scenario 2: slip seen after bit %0d, expected 24", slip_bit));

    // ---------------- scenario 3 ----------------
    do_reset();
    n_viol = 0; vx = n_viol_x;
    send(0);
    for (int i = 0; i < 41; i++) send((i % 2) == 0);   // idle, bit 0 is B
    for (int burst = 11; burst <= 12; burst++) begin
      int n_before;
      n_before = n_viol;
      for (int p = 0; p < burst; p++) begin
        send(1); if (violation) n_viol++;               // A = 1
        send(0); if (violation) n_viol++;               // B = 0
      end
      for (int i = 0; i < 40; i++) begin
        send((i % 2) == 0 ? 1'b0 : 1'b1);
        if (violation) n_viol++;
      end
      check((n_viol - n_before) == (burst > 11 ? 2 : 0),
            $sformatf("scenario 3: burst of %0d pairs gave %0d violations", burst, n_viol - n_before));
      if (burst == 12) begin
        // The false slip is undone by a second one once the swapped IDLE
        // has shown 12 (1,0) pairs; the last bit sent was a B bit.
        check(slot_b == 1'b0, "scenario 3: not realigned after false slip");
      end
    end
    check(n_viol_x == vx, "scenario 3: violation under the A-ones rule");

    // ---------------- scenario 4 ----------------
    do_reset();
    n_viol = 0; vx = n_viol_x;
    send(0);
    for (int i = 0; i < 41; i++) send((i % 2) == 0);   // idle, bit 0 is B
    for (int burst = 23; burst <= 24; burst++) begin
      int n_before;
      n_before = n_viol_x;
      for (int p = 0; p < burst; p++) begin
        send(1); if (violation) n_viol++;               // A = 1
        send(1); if (violation) n_viol++;               // B = 1
      end
      for (int i = 0; i < 60; i++) begin
        send((i % 2) == 0 ? 1'b0 : 1'b1);
        if (violation) n_viol++;
      end
      check((n_viol_x - n_before) == (burst > 23 ? 2 : 0),
            $sformatf("scenario 4: burst of %0d A ones gave %0d violations", burst, n_viol_x - n_before));
      check(slot_b_x == 1'b0, $sformatf("scenario 4: slots wrong after burst of %0d", burst));
    end
    check(n_viol == 0, "scenario 4: (1,1) pairs made the (1,0) rule slip");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
