// lab3_pkg: types and constants shared by the two-digit combination lock.
//
// The lock stores a combination of two digits, each DIGIT_W bits wide
// (2 bits in this design, set on two code switches). The lock controller is a
// seven-state Moore machine; its states are declared here so that the
// controller and its testbenches agree on the encoding and on the layout of
// the one-hot debug LED vector. The default combination (first digit 2'b11,
// second digit 2'b01) is the value the combination registers take on
// ResetCombo. The state names follow the design; the 3-bit binary encoding
// and the LED layout are this design's own choices.
package lab3_pkg;

  localparam int unsigned DIGIT_W = 2;

  typedef logic [DIGIT_W-1:0] digit_t;

  localparam digit_t DEFAULT_DIGIT1 = 2'b11;
  localparam digit_t DEFAULT_DIGIT2 = 2'b01;

  // Controller states.
  //   INIT  : waiting for the first digit
  //   OK1   : first digit was right, waiting for the second
  //   BAD1  : first digit was wrong, waiting for the second (any value)
  //   OK2   : both digits right, lock open
  //   BAD2  : a digit was wrong, error shown until Reset
  //   PROG1 : accepting a new first digit
  //   PROG2 : accepting a new second digit
  typedef enum logic [2:0] {
    S_INIT  = 3'd0,
    S_OK1   = 3'd1,
    S_BAD1  = 3'd2,
    S_OK2   = 3'd3,
    S_BAD2  = 3'd4,
    S_PROG1 = 3'd5,
    S_PROG2 = 3'd6
  } lock_state_t;

  // Bit positions of each state in the one-hot debug LED vector.
  localparam int unsigned LED_INIT  = 0;
  localparam int unsigned LED_OK1   = 1;
  localparam int unsigned LED_BAD1  = 2;
  localparam int unsigned LED_OK2   = 3;
  localparam int unsigned LED_BAD2  = 4;
  localparam int unsigned LED_PROG1 = 5;
  localparam int unsigned LED_PROG2 = 6;
  localparam int unsigned LED_ENTER = 7;

endpackage
