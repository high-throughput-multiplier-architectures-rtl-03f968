// Shared types and helpers for the intra-unit forwarding multiplier.
//
// An instruction sent to the multiplier names, for each of its two operands,
// a dependency distance: 0 means the operand value is on the port, d (1..S-1)
// means "the result of the multiply issued d instructions earlier". The pair
// of "dependent" flags gives the dependency type used throughout the design:
// type 01 (only OP2 dependent), type 10 (only OP1 dependent) and type 11
// (both dependent). The encoding of the enum follows that naming.
package ifwd_pkg;

  typedef enum logic [1:0] {
    DEP_NONE = 2'b00,
    DEP_01   = 2'b01,  // OP2 depends on an earlier product
    DEP_10   = 2'b10,  // OP1 depends on an earlier product
    DEP_11   = 2'b11   // both operands depend on earlier products
  } dep_type_e;

  // Architecture selector: ARCH1 forwards into one operand (the multiplier),
  // ARCH2 forwards into both operands.
  typedef enum int unsigned {
    ARCH1 = 1,
    ARCH2 = 2
  } arch_e;

  function automatic dep_type_e dep_type(input logic op1_dep, input logic op2_dep);
    return dep_type_e'({op1_dep, op2_dep});
  endfunction

endpackage
