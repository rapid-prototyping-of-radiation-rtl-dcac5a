// ftu_pkg: types shared by the fault-emulation harness (Smart Table and
// SEU injector) and the system top.
package ftu_pkg;
  // Smart Table operating mode.
  typedef enum logic [1:0] {
    ST_IDLE   = 2'd0,   // ignore the watched output
    ST_GOLDEN = 2'd1,   // golden run: record [output, cycle] pairs
    ST_TEST   = 2'd2    // test run: compare against the recorded pairs
  } st_mode_t;

  // Classification of one test run.
  typedef enum logic [1:0] {
    V_NONE          = 2'd0,   // not classified yet
    V_NO_DAMAGE     = 2'd1,   // every output correct within T_crit
    V_OUTPUT_DAMAGE = 2'd2,   // a wrong value appeared before the deadline
    V_TIMEOUT       = 2'd3    // no output by expectedCycle + T_crit + 1
  } st_verdict_t;
endpackage
