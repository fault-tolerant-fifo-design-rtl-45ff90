// Shared definitions of the fault-tolerant FIFO.
//
// The transparent SOA-MATS++ memory test visits every FIFO location in three
// runs, called j = 0, 1, 2 in its description: an invert run, a restore run and
// a final read run. test_run_e names them. NUM_COPIES is the redundancy of the
// triple modular redundancy (TMR) scheme the voter serves.
package ftf_pkg;

  localparam int unsigned NUM_COPIES = 3;

  typedef enum logic [1:0] {
    RUN_INVERT  = 2'd0,  // j = 0: temp <- lut, original <- temp, lut <- ~temp
    RUN_RESTORE = 2'd1,  // j = 1: temp <- lut, expect temp ^ original all 1s, lut <- ~temp
    RUN_READ    = 2'd2   // j = 2: temp <- lut, expect temp ^ original all 0s
  } test_run_e;

endpackage
