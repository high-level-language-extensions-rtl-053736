// rtr_pkg: types shared by the run-time reconfiguration resource control.
//
// A reconfigurable construct groups tasks that share reconfigurable
// hardware over time. When more tasks are referenced than the construct's
// hardware slots can hold, a resident task has to be displaced; the
// replacement policy chooses which one.
package rtr_pkg;

  typedef enum logic {
    REPL_FIFO = 1'b0,  // displace the task that was loaded first
    REPL_LFU  = 1'b1   // displace the task used least since it was loaded
  } repl_policy_e;

  typedef enum logic {
    RC_IDLE = 1'b0,    // accepting task references
    RC_CFG  = 1'b1     // waiting for a reconfiguration to finish
  } rc_state_e;

endpackage
