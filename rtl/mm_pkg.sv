// Shared types of the multimode architectures.
//
// A multimode architecture runs one of several time-wise mutually exclusive
// data flow graphs (modes) on one shared datapath. The mode is a single bit:
// "mode0" is selected when the mode signal is 1 and "mode1" when it is 0,
// the encoding used for the load-command equations (ld = Sk.mode0 + Sk.mode1).
// Which graph each mode stands for is given in each architecture's header.
package mm_pkg;

  typedef enum logic {
    MODE1 = 1'b0,  // "not mode": the second graph
    MODE0 = 1'b1   // "mode": the first graph
  } mode_e;

endpackage
