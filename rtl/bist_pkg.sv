// bist_pkg: types and helper functions shared by the BIST blocks.
//
// ctrl_state_t is the state encoding of the test controller. bin2gray is
// the reflected binary Gray code, g = b ^ (b >> 1); it is the function of the
// TPG's Gray code generator, and the controller uses tpg_period to size one
// full pass of the test pattern generator. No timing: functions only.
package bist_pkg;

  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,  // waiting for BIST start, CUT sees the system inputs
    ST_INIT = 2'd1,  // one cycle: TPG and ORA return to their start values
    ST_RUN  = 2'd2,  // one test pattern applied and compacted per clock
    ST_DONE = 2'd3   // BIST done raised, pass/fail valid
  } ctrl_state_t;

  // Reflected binary Gray code of a value of up to 32 bits.
  function automatic logic [31:0] bin2gray(input logic [31:0] b);
    return b ^ (b >> 1);
  endfunction

  // Patterns in one full pass of an M-bit TPG whose seed register is a
  // maximal-length M-stage shift register: (2^M - 1) seeds, 2^M patterns each.
  function automatic int unsigned tpg_period(input int unsigned m);
    return ((32'd1 << m) - 32'd1) * (32'd1 << m);
  endfunction

endpackage
