// Types shared by the control flow checker and its testbenches.
//
// Each instruction address of the checked program has one entry in the
// control flow instruction graph (CFIG) memory: the kind of control flow
// instruction found at that address and, for direct ones, its target.
// Addresses are byte addresses of 32-bit instructions; sequential execution
// advances the program counter by one word (4 bytes).
package cfc_pkg;

  typedef enum logic [2:0] {
    CFI_NONE     = 3'd0,  // not a control flow instruction: PC+4 expected
    CFI_BRANCH   = 3'd1,  // direct conditional branch: target or PC+4
    CFI_JUMP     = 3'd2,  // direct unconditional jump: target
    CFI_CALL     = 3'd3,  // direct call: target, return address pushed
    CFI_CALL_IND = 3'd4,  // indirect call: any target, return address pushed
    CFI_JUMP_IND = 3'd5,  // indirect jump: not checkable
    CFI_RET      = 3'd6   // return: top of the return stack, popped
  } cfi_kind_e;

endpackage
