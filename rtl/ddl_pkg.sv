// Shared types for the self-calibrating delay-line DPWM.
//
// The controller of the line moves its tap selection one step per clock
// cycle, either towards more delay (UP) or towards less (DOWN). The
// direction encoding below is the value of the sampled tap that causes it:
// a tap still low at the clock edge means the line is shorter than half a
// period, so the controller must go UP.
package ddl_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  typedef enum logic {
    DIR_UP   = 1'b0,
    DIR_DOWN = 1'b1
  } dir_e;

endpackage
