// tb_Lab3Compare: self-checking testbench for the combination store.
//
// Drives random Code / Prog1 / Prog2 / Enable / Reset values, keeps its own
// copy of the two stored digits, and checks Decode1 and Decode2 against that
// copy every cycle, for every Code value. Directed steps first check the
// default combination (2'b11, 2'b01) after Reset, that a load needs both
// Enable and the matching Prog input, and that Reset wins over a load.
module tb_Lab3Compare;
  import lab3_pkg::*;

  logic   Clock = 1'b0;
  logic   Reset, Prog1, Prog2, Enable;
  digit_t Code;
  logic   Decode1, Decode2;

  int checks = 0, failures = 0;
  digit_t ref1, ref2;

  Lab3Compare dut (.*);

  always #5 Clock = ~Clock;

  initial begin
    repeat (20000) @(posedge Clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Check the decoders for every Code value against the reference digits.
  task automatic check_all(string tag);
    for (int c = 0; c < 4; c++) begin
      Code = digit_t'(c);
      #1;
      checks++;
      if (Decode1 !== (Code == ref1) || Decode2 !== (Code == ref2)) begin
        failures++;
        $display("%s: Code=%b Decode1=%b Decode2=%b expected digits %b %b",
                 tag, Code, Decode1, Decode2, ref1, ref2);
      end
    end
  endtask

  // Apply one clock edge with the given controls and update the reference.
  task automatic step(logic rst, logic p1, logic p2, logic en, digit_t code);
    @(negedge Clock);
    Reset = rst; Prog1 = p1; Prog2 = p2; Enable = en; Code = code;
    @(posedge Clock);
    if (rst) begin
      ref1 = 2'b11;
      ref2 = 2'b01;
    end else begin
      if (en && p1) ref1 = code;
      if (en && p2) ref2 = code;
    end
    #1;
    Reset = 0; Prog1 = 0; Prog2 = 0; Enable = 0;
  endtask

  initial begin
    Reset = 0; Prog1 = 0; Prog2 = 0; Enable = 0; Code = '0;
    step(1, 0, 0, 0, 2'b00);
    check_all("default");
    // Prog without Enable, Enable without Prog: no load.
    step(0, 1, 0, 0, 2'b00);
    step(0, 0, 1, 0, 2'b10);
    step(0, 0, 0, 1, 2'b10);
    check_all("no-load");
    // Load first, then second digit.
    step(0, 1, 0, 1, 2'b00);
    check_all("load1");
    step(0, 0, 1, 1, 2'b10);
    check_all("load2");
    // Reset beats a load.
    step(1, 1, 1, 1, 2'b00);
    check_all("reset-priority");
    // Random traffic.
    for (int i = 0; i < 2000; i++) begin
      step(($urandom_range(0, 15) == 0), 1'($urandom), 1'($urandom),
           1'($urandom), digit_t'($urandom));
      check_all("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
