// Lab3Compare: programmable combination store and digit comparators.
//
// Two DIGIT_W-bit registers hold the first and second digit of the lock's
// combination. Decode1 and Decode2 are combinational equality compares of the
// Code switches against those registers, so they follow Code in the same
// cycle. On a rising Clock edge:
//   * Reset (the ResetCombo button) loads the default combination
//     DEFAULT_DIGIT1 / DEFAULT_DIGIT2 (2'b11 / 2'b01) into both registers;
//   * otherwise, with Enable (the Enter pulse) high, Prog1 loads Code into
//     the first-digit register and Prog2 loads Code into the second.
// The registers, comparators, default values and load conditions follow the
// design's description. That Reset is synchronous and wins over a load is
// this design's choice. The registers are not cleared by the controller's
// Reset; nothing sets them at power-up except Reset, so the board asserts it
// once after configuration.
module Lab3Compare #(
  parameter int unsigned              DIGIT_W        = lab3_pkg::DIGIT_W,
  parameter logic [DIGIT_W-1:0]       DEFAULT_DIGIT1 = lab3_pkg::DEFAULT_DIGIT1,
  parameter logic [DIGIT_W-1:0]       DEFAULT_DIGIT2 = lab3_pkg::DEFAULT_DIGIT2
) (
  input  logic               Clock,
  input  logic               Reset,
  input  logic [DIGIT_W-1:0] Code,
  input  logic               Prog1,
  input  logic               Prog2,
  input  logic               Enable,
  output logic               Decode1,
  output logic               Decode2
);

  logic [DIGIT_W-1:0] digit1_q, digit2_q;

  always_ff @(posedge Clock) begin
    if (Reset) begin
      digit1_q <= DEFAULT_DIGIT1;
      digit2_q <= DEFAULT_DIGIT2;
    end else begin
      if (Enable && Prog1) digit1_q <= Code;
      if (Enable && Prog2) digit2_q <= Code;
    end
  end

  assign Decode1 = (Code == digit1_q);
  assign Decode2 = (Code == digit2_q);

endmodule
