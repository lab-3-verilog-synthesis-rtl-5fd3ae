// Lab3Top: two-digit, 2-bit programmable combination lock.
//
// Structural top that ties the lock controller (Lab3Lock) to the combination
// store and comparators (Lab3Compare). Code from the switches goes to the
// comparator, whose Decode1/Decode2 tell the controller whether the switches
// match the stored digits. The controller's Prog1/Prog2 outputs, together
// with the Enter pulse as the load enable, let the comparator capture a new
// combination after the lock has opened. Reset returns the controller to its
// initial state; ResetCombo restores the default combination 2'b11, 2'b01.
// All inputs are sampled on the rising edge of Clock; Enter must be a
// single-cycle pulse per press (debouncing and edge detection belong to the
// board I/O wrapper). Outputs are registered-state decodes and change one
// cycle after the Enter pulse that causes them.
//
// The partition, the port list and the use of Enter as the comparator's load
// enable follow the design. The controller never sees Code, so DIGIT_W only
// sizes the switches and the comparator.
module Lab3Top #(
  parameter int unsigned        DIGIT_W        = lab3_pkg::DIGIT_W,
  parameter logic [DIGIT_W-1:0] DEFAULT_DIGIT1 = lab3_pkg::DEFAULT_DIGIT1,
  parameter logic [DIGIT_W-1:0] DEFAULT_DIGIT2 = lab3_pkg::DEFAULT_DIGIT2
) (
  input  logic               Clock,
  input  logic               Reset,
  input  logic               ResetCombo,
  input  logic [DIGIT_W-1:0] Code,
  input  logic               Enter,
  output logic               Open,
  output logic               Error,
  output logic               Prog1,
  output logic               Prog2,
  output logic [7:0]         LED
);

  logic decode1, decode2;

  Lab3Compare #(
    .DIGIT_W        (DIGIT_W),
    .DEFAULT_DIGIT1 (DEFAULT_DIGIT1),
    .DEFAULT_DIGIT2 (DEFAULT_DIGIT2)
  ) u_compare (
    .Clock   (Clock),
    .Reset   (ResetCombo),
    .Code    (Code),
    .Prog1   (Prog1),
    .Prog2   (Prog2),
    .Enable  (Enter),
    .Decode1 (decode1),
    .Decode2 (decode2)
  );

  Lab3Lock u_lock (
    .Clock   (Clock),
    .Reset   (Reset),
    .Enter   (Enter),
    .Decode1 (decode1),
    .Decode2 (decode2),
    .Open    (Open),
    .Error   (Error),
    .Prog1   (Prog1),
    .Prog2   (Prog2),
    .LED     (LED)
  );

endmodule
