// mulseq_pkg: types shared by the 2-bit-digit sequential multiplier.
// A 2-bit digit is the operand of one MGDI 2-bit multiplier and its 4-bit
// product is what the product registers (SR4/SR5) hold. The controller's
// state type lives here too so the testbench can name it.
package mulseq_pkg;
  typedef logic [1:0] digit_t;   // one 2-bit operand digit (A1A0, B3B2, ...)
  typedef logic [3:0] prod2_t;   // product of two digits, at most 3*3 = 9

  typedef enum logic {
    ST_IDLE = 1'b0,              // waiting for start, product held
    ST_RUN  = 1'b1               // pulses and accumulation in progress
  } ctrl_state_t;
endpackage
