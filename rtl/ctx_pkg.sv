// Shared types and constants of the context-switched traffic light controller.
//
// The controller runs three tasks on one shared counter: the main loop over
// the six intersection states a0..a5 (context 0), a 59-second timer
// (context 1) and a 5-second timer (context 2). The state-to-timer table and
// the two times follow the example's directed graph; the phase encoding of
// the sequencer is a choice of this implementation.
package ctx_pkg;

  // One traffic light: red, yellow, green (1 = lamp lit).
  typedef struct packed {
    logic r;
    logic y;
    logic g;
  } lamp_t;

  // Phases of the context sequencer.
  //   PH_RESTORE : counter is loaded with the new context's value
  //   PH_RUN     : the context works (main loop: one step; timer: count down)
  //   PH_WRAP    : main loop wraps from a5 back to a0 (counter loaded with 0)
  //   PH_HOLD    : main loop keeps its new state one cycle so it is saved
  typedef enum logic [1:0] {
    PH_RESTORE = 2'd0,
    PH_RUN     = 2'd1,
    PH_WRAP    = 2'd2,
    PH_HOLD    = 2'd3
  } phase_t;

  localparam int unsigned TL_STATES = 6;   // main-loop states a0..a5
  localparam int unsigned CTX_MAIN  = 0;   // main loop, counts up
  localparam int unsigned CTX_LONG  = 1;   // red/green timer, counts down
  localparam int unsigned CTX_SHORT = 2;   // yellow / all-red timer, counts down
  localparam int unsigned T_LONG    = 59;  // seconds
  localparam int unsigned T_SHORT   = 5;   // seconds

endpackage
