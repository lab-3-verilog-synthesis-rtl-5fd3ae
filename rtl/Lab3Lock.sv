// Lab3Lock: combination-lock controller, a seven-state Moore FSM.
//
// The user enters two digits, each confirmed by an Enter pulse. Decode1 and
// Decode2 (from Lab3Compare) tell whether the switches currently match the
// first and second stored digit.
//   INIT  --Enter & Decode1--> OK1      INIT --Enter & !Decode1--> BAD1
//   OK1   --Enter & Decode2--> OK2      OK1  --Enter & !Decode2--> BAD2
//   BAD1  --Enter-----------> BAD2      (second digit is ignored)
//   OK2   --Enter-----------> PROG1     lock open; Enter starts reprogramming
//   PROG1 --Enter-----------> PROG2     Lab3Compare stores the new 1st digit
//   PROG2 --Enter-----------> OK2       Lab3Compare stores the new 2nd digit
//   BAD2  stays until Reset.
// Every transition needs Enter, so the next-state logic is gated by Enter
// once rather than on each arc. Reset (synchronous, active high) returns the
// FSM to INIT from any state and overrides Enter.
//
// Outputs are decoded from the registered state: Open in OK2, Error in BAD2,
// Prog1 in PROG1, Prog2 in PROG2. Because Prog1/Prog2 are high in the cycle
// the Enter pulse arrives, the comparator loads Code on the same edge that
// moves the FSM on. LED[6:0] show the state one-hot and LED[7] mirrors Enter.
//
// The states, their outputs and the operating sequence follow the design
// description; the return from PROG2 to the open state, the synchronous
// reset, the binary state encoding and the LED contents are this design's
// choices. Enter is expected to be one clock cycle long per button press.
module Lab3Lock
  import lab3_pkg::*;
(
  input  logic       Clock,
  input  logic       Reset,
  input  logic       Enter,
  input  logic       Decode1,
  input  logic       Decode2,
  output logic       Open,
  output logic       Error,
  output logic       Prog1,
  output logic       Prog2,
  output logic [7:0] LED
);

  lock_state_t state_q, state_d;

  always_comb begin
    state_d = state_q;
    if (Enter) begin
      unique case (state_q)
        S_INIT:  state_d = Decode1 ? S_OK1 : S_BAD1;
        S_OK1:   state_d = Decode2 ? S_OK2 : S_BAD2;
        S_BAD1:  state_d = S_BAD2;
        S_OK2:   state_d = S_PROG1;
        S_PROG1: state_d = S_PROG2;
        S_PROG2: state_d = S_OK2;
        S_BAD2:  state_d = S_BAD2;
        default: state_d = S_INIT;
      endcase
    end
  end

  always_ff @(posedge Clock) begin
    if (Reset) state_q <= S_INIT;
    else       state_q <= state_d;
  end

  assign Open  = (state_q == S_OK2);
  assign Error = (state_q == S_BAD2);
  assign Prog1 = (state_q == S_PROG1);
  assign Prog2 = (state_q == S_PROG2);

  always_comb begin
    LED            = '0;
    LED[LED_INIT]  = (state_q == S_INIT);
    LED[LED_OK1]   = (state_q == S_OK1);
    LED[LED_BAD1]  = (state_q == S_BAD1);
    LED[LED_OK2]   = Open;
    LED[LED_BAD2]  = Error;
    LED[LED_PROG1] = Prog1;
    LED[LED_PROG2] = Prog2;
    LED[LED_ENTER] = Enter;
  end

  // At most one status output is ever high.
  a_status_onehot: assert property (@(posedge Clock) disable iff (Reset)
                                    $onehot0({Open, Error, Prog1, Prog2}));
  // The error state is left only through Reset.
  a_error_sticky: assert property (@(posedge Clock) disable iff (Reset)
                                   Error |=> Error);

endmodule
