// csa_pkg: shared types for the carry-save adder devices.
//
// The asynchronous-input adder (acsa) takes one command per clock cycle.
// Its command is the input type  In w = A w | B w | C w | Nop | Go : a
// tag plus one operand word. The tag values follow the constructor order
// of that type (A first); this numbering is a choice of this design.
package csa_pkg;

  typedef enum logic [2:0] {
    CMD_A   = 3'd0,  // store operand in register RA
    CMD_B   = 3'd1,  // store operand in register RB
    CMD_C   = 3'd2,  // store operand in register RC
    CMD_NOP = 3'd3,  // idle
    CMD_GO  = 3'd4   // run the staged carry-save computation
  } acsa_cmd_e;

endpackage
