// tb_Lab3Lock: self-checking testbench for the lock controller.
//
// A transition table kept in the testbench (indexed by state and by the
// Decode inputs) serves as the reference. Directed sequences walk the
// operating scenarios: right combination opens, a wrong first or second
// digit ends in Error until Reset, and Open -> Prog1 -> Prog2 -> Open. Then
// random Enter / Decode / Reset stimulus is compared with the reference every
// cycle, on Open, Error, Prog1, Prog2 and the one-hot LED state. Each output
// must change exactly one clock edge after the Enter pulse that causes it.
module tb_Lab3Lock;
  import lab3_pkg::*;

  logic       Clock = 1'b0;
  logic       Reset, Enter, Decode1, Decode2;
  logic       Open, Error, Prog1, Prog2;
  logic [7:0] LED;

  int checks = 0, failures = 0;

  Lab3Lock dut (.*);

  always #5 Clock = ~Clock;

  initial begin
    repeat (50000) @(posedge Clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model: its own state enum, next state given by the arcs.
  typedef enum int {R_INIT, R_OK1, R_BAD1, R_OK2, R_BAD2, R_PROG1, R_PROG2} rstate_t;
  rstate_t ref_s;

  function automatic rstate_t ref_next(rstate_t s, logic en, logic d1, logic d2);
    if (!en) return s;
    case (s)
      R_INIT:  return d1 ? R_OK1 : R_BAD1;
      R_OK1:   return d2 ? R_OK2 : R_BAD2;
      R_BAD1:  return R_BAD2;
      R_OK2:   return R_PROG1;
      R_PROG1: return R_PROG2;
      R_PROG2: return R_OK2;
      default: return R_BAD2;
    endcase
  endfunction

  task automatic check(string tag);
    logic [6:0] exp_led;
    exp_led = 7'b1 << int'(ref_s);
    checks++;
    if (Open !== (ref_s == R_OK2) || Error !== (ref_s == R_BAD2) ||
        Prog1 !== (ref_s == R_PROG1) || Prog2 !== (ref_s == R_PROG2) ||
        LED[6:0] !== exp_led || LED[7] !== Enter) begin
      failures++;
      $display("%s: expected %s, got Open=%b Error=%b Prog1=%b Prog2=%b LED=%b",
               tag, ref_s.name(), Open, Error, Prog1, Prog2, LED);
    end
  endtask

  // One cycle: drive inputs after the falling edge, clock, update reference.
  task automatic cyc(logic rst, logic en, logic d1, logic d2, string tag);
    @(negedge Clock);
    Reset = rst; Enter = en; Decode1 = d1; Decode2 = d2;
    #1 check({tag, "/pre"});          // nothing moves before the edge
    @(posedge Clock);
    ref_s = rst ? R_INIT : ref_next(ref_s, en, d1, d2);
    #1;
    Enter = 0;
    #1 check(tag);
  endtask

  initial begin
    Reset = 1; Enter = 0; Decode1 = 0; Decode2 = 0;
    ref_s = R_INIT;
    @(posedge Clock); #1;
    Reset = 0;
    check("reset");

    // Right combination, idle cycles in between, then reprogram twice.
    cyc(0, 0, 1, 1, "idle");
    cyc(0, 1, 1, 0, "digit1-ok");
    cyc(0, 0, 0, 0, "idle");
    cyc(0, 1, 0, 1, "digit2-ok");
    if (!Open) begin failures++; $display("lock did not open"); end
    cyc(0, 1, 0, 0, "to-prog1");
    cyc(0, 1, 0, 0, "to-prog2");
    cyc(0, 1, 0, 0, "back-open");
    cyc(0, 1, 0, 0, "to-prog1-again");
    // Reset from PROG1.
    cyc(1, 0, 0, 0, "reset-prog1");
    // Wrong first digit, right second: Error, sticky.
    cyc(0, 1, 0, 1, "digit1-bad");
    cyc(0, 1, 1, 1, "digit2-any");
    cyc(0, 1, 1, 1, "stuck");
    cyc(0, 0, 0, 0, "stuck");
    cyc(1, 1, 1, 1, "reset-beats-enter");
    // Right first digit, wrong second.
    cyc(0, 1, 1, 0, "digit1-ok");
    cyc(0, 1, 1, 0, "digit2-bad");
    cyc(1, 0, 0, 0, "reset");

    // Random stimulus.
    for (int i = 0; i < 10000; i++)
      cyc(($urandom_range(0, 31) == 0), 1'($urandom), 1'($urandom),
          1'($urandom), "random");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
