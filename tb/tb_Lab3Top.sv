// tb_Lab3Top: end-to-end testbench for the combination lock, at the default
// parameters (2-bit digits, default combination 2'b11 then 2'b01).
//
// It acts as the user at the switches and buttons. The testbench remembers
// the combination it expects the lock to hold and plays random sessions:
//   * an attempt: two digits, each set on Code and confirmed with Enter;
//     the lock must open exactly when both match, otherwise show Error and
//     keep it through further Enter presses until Reset;
//   * after opening, a reprogramming pass: Enter, new first digit + Enter,
//     new second digit + Enter; Prog1 and Prog2 must show in turn and the lock
//     must reopen, and later attempts must use the new combination;
//   * Reset in the middle of an attempt, and ResetCombo back to the default.
// Enter pulses are one cycle long with random idle gaps, during which Code
// wanders. Every output is checked one edge after each Enter pulse (the
// single-cycle response latency) and also before that edge (no early change).
// Each mechanism is counted and must occur at least once.
module tb_Lab3Top;
  import lab3_pkg::*;

  logic       Clock = 1'b0;
  logic       Reset, ResetCombo, Enter;
  digit_t     Code;
  logic       Open, Error, Prog1, Prog2;
  logic [7:0] LED;

  int checks = 0, failures = 0;
  digit_t c1, c2;                    // combination the lock should hold

  // Mechanism counters.
  int n_open = 0, n_bad_first = 0, n_bad_second = 0, n_error_hold = 0;
  int n_reprogram = 0, n_reset_mid = 0, n_reset_combo = 0, n_reset_open = 0;

  Lab3Top dut (.*);

  always #5 Clock = ~Clock;

  initial begin
    repeat (200000) @(posedge Clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected status outputs: {Open, Error, Prog1, Prog2} and LED[6:0].
  task automatic expect_out(logic o, logic e, logic p1, logic p2, int led_bit, string tag);
    checks++;
    if (Open !== o || Error !== e || Prog1 !== p1 || Prog2 !== p2 ||
        LED[6:0] !== (7'b1 << led_bit)) begin
      failures++;
      $display("%0t %s: got O=%b E=%b P1=%b P2=%b LED=%b, expected O=%b E=%b P1=%b P2=%b state bit %0d",
               $time, tag, Open, Error, Prog1, Prog2, LED, o, e, p1, p2, led_bit);
    end
  endtask

  task automatic idle_gap();
    repeat ($urandom_range(0, 3)) begin
      @(negedge Clock);
      Code = digit_t'($urandom);
    end
  endtask

  // Set Code, pulse Enter for one cycle; the caller checks the result after.
  // Checks that the outputs are unchanged until the clock edge.
  task automatic press(digit_t d, logic o, logic e, logic p1, logic p2, int led_bit);
    idle_gap();
    @(negedge Clock);
    Code = d; Enter = 1;
    #1 expect_out(o, e, p1, p2, led_bit, "before edge");
    @(negedge Clock);
    Enter = 0;
  endtask

  task automatic pulse_reset(bit combo);
    @(negedge Clock);
    if (combo) ResetCombo = 1; else Reset = 1;
    @(negedge Clock);
    ResetCombo = 0; Reset = 0;
    if (combo) begin c1 = DEFAULT_DIGIT1; c2 = DEFAULT_DIGIT2; end
  endtask

  // From INIT: try digits a, b. Returns 1 if the lock opened.
  task automatic attempt(digit_t a, digit_t b, output bit opened);
    press(a, 0, 0, 0, 0, LED_INIT);
    if (a == c1) expect_out(0, 0, 0, 0, LED_OK1, "after good 1st digit");
    else         expect_out(0, 0, 0, 0, LED_BAD1, "after bad 1st digit");
    press(b, 0, 0, 0, 0, (a == c1) ? LED_OK1 : LED_BAD1);
    opened = (a == c1) && (b == c2);
    if (opened) begin
      expect_out(1, 0, 0, 0, LED_OK2, "open");
      n_open++;
    end else begin
      expect_out(0, 1, 0, 0, LED_BAD2, "error");
      if (a != c1) n_bad_first++; else n_bad_second++;
      // Error holds through further presses.
      repeat ($urandom_range(1, 3)) begin
        press(digit_t'($urandom), 0, 1, 0, 0, LED_BAD2);
        expect_out(0, 1, 0, 0, LED_BAD2, "error held");
      end
      n_error_hold++;
    end
  endtask

  // From OK2: program n1, n2 and come back to OK2.
  task automatic reprogram(digit_t n1, digit_t n2);
    press(digit_t'($urandom), 1, 0, 0, 0, LED_OK2);
    expect_out(0, 0, 1, 0, LED_PROG1, "prog1");
    press(n1, 0, 0, 1, 0, LED_PROG1);
    expect_out(0, 0, 0, 1, LED_PROG2, "prog2");
    press(n2, 0, 0, 0, 1, LED_PROG2);
    expect_out(1, 0, 0, 0, LED_OK2, "reopened");
    c1 = n1; c2 = n2;
    n_reprogram++;
  endtask

  initial begin
    bit opened;
    Reset = 1; ResetCombo = 1; Enter = 0; Code = '0;
    c1 = DEFAULT_DIGIT1; c2 = DEFAULT_DIGIT2;
    repeat (2) @(negedge Clock);
    Reset = 0; ResetCombo = 0;
    expect_out(0, 0, 0, 0, LED_INIT, "after reset");

    // The documented default combination opens the lock.
    attempt(2'b11, 2'b01, opened);
    if (!opened) begin failures++; $display("default combination did not open"); end
    reprogram(2'b00, 2'b10);
    pulse_reset(0);
    attempt(2'b11, 2'b01, opened);          // old combination now fails
    pulse_reset(0);
    attempt(2'b00, 2'b10, opened);          // new one opens
    pulse_reset(0);
    pulse_reset(1);                         // back to the default

    for (int s = 0; s < 400; s++) begin
      digit_t a, b;
      int r;
      r = $urandom_range(0, 9);
      expect_out(0, 0, 0, 0, LED_INIT, "session start");
      if (r == 0) begin
        // Reset after the first digit.
        press(digit_t'($urandom), 0, 0, 0, 0, LED_INIT);
        pulse_reset(0);
        expect_out(0, 0, 0, 0, LED_INIT, "reset mid-attempt");
        n_reset_mid++;
        continue;
      end
      if (r == 1) begin
        pulse_reset(1);
        n_reset_combo++;
        expect_out(0, 0, 0, 0, LED_INIT, "after ResetCombo");
      end
      // Right digits about half the time.
      a = ($urandom_range(0, 1) != 0) ? c1 : digit_t'($urandom);
      b = ($urandom_range(0, 2) != 0) ? c2 : digit_t'($urandom);
      attempt(a, b, opened);
      if (opened && ($urandom_range(0, 1) != 0)) reprogram(digit_t'($urandom), digit_t'($urandom));
      if (opened) n_reset_open++;
      pulse_reset(0);
    end

    $display("open=%0d bad_first=%0d bad_second=%0d error_hold=%0d reprogram=%0d reset_mid=%0d reset_combo=%0d reset_open=%0d",
             n_open, n_bad_first, n_bad_second, n_error_hold, n_reprogram,
             n_reset_mid, n_reset_combo, n_reset_open);
    if (n_open == 0)        begin failures++; $display("lock never opened"); end
    if (n_bad_first == 0)   begin failures++; $display("no wrong first digit"); end
    if (n_bad_second == 0)  begin failures++; $display("no wrong second digit"); end
    if (n_error_hold == 0)  begin failures++; $display("error never held"); end
    if (n_reprogram == 0)   begin failures++; $display("never reprogrammed"); end
    if (n_reset_mid == 0)   begin failures++; $display("no reset mid-attempt"); end
    if (n_reset_combo == 0) begin failures++; $display("no ResetCombo"); end
    if (n_reset_open == 0)  begin failures++; $display("no reset from open"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
