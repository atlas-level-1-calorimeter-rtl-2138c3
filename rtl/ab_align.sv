// ab_align: finds the channel A / channel B time slots of the TTC data and
// makes the 40 MHz clock from them.
//
// The TTC stream carries channel A and channel B bits alternately at 80 Mb/s.
// After reset the logic assumes the TTC system is sending IDLE (A = 0,
// B = 1 in alternation) and takes the first '1' it sees as a B slot. From
// then on it toggles the A/B slot signal every 80 MHz cycle and counts
// consecutive A/B pairs equal to (1,0). A run of more than RUN_LIMIT such
// pairs cannot occur with correct alignment (it is what IDLE looks like with
// the slots swapped), so the logic then delays the A/B signal by one cycle
// and flags a violation. A flip-flop on the 80 MHz clock retimes the A/B
// signal; its output is the local 40 MHz clock, high during B-slot bits.
//
// Ports: clk80, rst_n (asynchronous), nrz (data bit at each clk80 edge);
// slot_b (1 while the current bit is a B-channel bit), clock40 (retimed A/B
// signal), locked (initial guess made), violation (one-cycle pulse on each
// slip), l1a (one-cycle pulse for an A-channel '1', i.e. a Level-1 Accept),
// a_bit / b_bit / pair_valid (the last A/B pair).
// RUN_LIMIT = 11 follows the specification, which notes that a different
// rule (more than 23 consecutive A bits of 1) is also quoted for the TTC
// receiver and that the rule may be changed later. The (1,0) rule is the
// default; A_ONES_RULE = 1 selects the other one, with A_RUN_LIMIT = 23. In
// that mode a slip is found in an A slot, and the offending bit is taken as
// a B bit (the A/B signal again holds for one cycle). Which level of clock40
// marks the B slot, and using the first '1' for the initial guess, are this
// design's choices.
module ab_align #(
  parameter int unsigned RUN_LIMIT   = 11,
  parameter bit          A_ONES_RULE = 1'b0,
  parameter int unsigned A_RUN_LIMIT = 23,
  parameter int unsigned CNT_W       = $clog2((A_ONES_RULE ? A_RUN_LIMIT : RUN_LIMIT) + 2)
) (
  input  logic clk80,
  input  logic rst_n,
  input  logic nrz,
  output logic slot_b,
  output logic clock40,
  output logic locked,
  output logic violation,
  output logic l1a,
  output logic a_bit,
  output logic b_bit,
  output logic pair_valid
);
  timeunit 1ns;
  timeprecision 1ps;

  logic             prev_a;   // A bit of the pair being assembled
  logic [CNT_W-1:0] run;      // consecutive (1,0) pairs, or A bits of 1
  logic             slip;     // too many (1,0) pairs: this bit becomes an A bit
  logic             slip_a;   // too many A ones: this bit becomes a B bit

  // A (1,0) pair completes in a B slot; a slip happens when it is one too
  // many. Under the other rule the run of A ones is checked in the A slot.
  assign slip   = !A_ONES_RULE && locked && slot_b && prev_a && !nrz &&
                  (run >= CNT_W'(RUN_LIMIT));
  assign slip_a = A_ONES_RULE && locked && !slot_b && nrz &&
                  (run >= CNT_W'(A_RUN_LIMIT));

  always_ff @(posedge clk80 or negedge rst_n) begin
    if (!rst_n) begin
      locked     <= 1'b0;
      slot_b     <= 1'b0;
      prev_a     <= 1'b0;
      run        <= '0;
      violation  <= 1'b0;
      l1a        <= 1'b0;
      a_bit      <= 1'b0;
      b_bit      <= 1'b0;
      pair_valid <= 1'b0;
    end else begin
      violation  <= 1'b0;
      l1a        <= 1'b0;
      pair_valid <= 1'b0;
      if (!locked) begin
        // Initial guess: under IDLE a '1' is a B bit, so the next is A.
        if (nrz) begin
          locked <= 1'b1;
          slot_b <= 1'b0;
        end
      end else if (slip) begin
        // Hold the slot signal for one cycle: this bit is taken as an A bit.
        violation <= 1'b1;
        run       <= '0;
        prev_a    <= nrz;
        slot_b    <= 1'b1;
      end else if (slip_a) begin
        // Hold the slot signal for one cycle: this bit is taken as a B bit.
        violation <= 1'b1;
        run       <= '0;
        slot_b    <= 1'b0;
      end else begin
        slot_b <= ~slot_b;
        if (!slot_b) begin
          prev_a <= nrz;
          l1a    <= nrz;
          if (A_ONES_RULE) run <= nrz ? run + 1'b1 : '0;
        end else begin
          a_bit      <= prev_a;
          b_bit      <= nrz;
          pair_valid <= 1'b1;
          if (!A_ONES_RULE) run <= (prev_a && !nrz) ? run + 1'b1 : '0;
        end
      end
    end
  end

  // Retiming flip-flop (a PECL part on the board).
  always_ff @(posedge clk80 or negedge rst_n) begin
    if (!rst_n) clock40 <= 1'b0;
    else        clock40 <= slot_b;
  end

endmodule
