// obf_pkg: shared types for the key-obfuscated multiplier datapath that
// computes f = e*(a*b)*(c*d).
//
// The design has two variants. They differ in when operation 4 (c*d) is
// scheduled and so in where the key multiplexers sit:
//   FIG6A : op4 in control step cs2. Key muxes sit on the loads of e, c and d
//           (3 key bits, correct key {k2,k1,k0} = 3'b100).
//   FIG6B : op4 in control step cs1. Key muxes sit on the load of e and on the
//           output of register R4 (2 key bits, correct key {k1,k0} = 2'b10).
// The control word carries every register load enable and every selector of
// the datapath. The controller is the same for a keyed and an unkeyed datapath,
// because the key only enters the datapath.
package obf_pkg;

  typedef enum logic [0:0] {
    FIG6A = 1'b0,
    FIG6B = 1'b1
  } variant_e;

  // Number of key bits per variant.
  function automatic int unsigned key_width(variant_e v);
    return (v == FIG6A) ? 3 : 2;
  endfunction

  // Correct key per variant, bit i drives key mux i.
  function automatic logic [2:0] correct_key(variant_e v);
    return (v == FIG6A) ? 3'b100 : 3'b010;
  endfunction

  // Controller FSM: cs0 is the cycle in which start is seen in S_IDLE.
  typedef enum logic [1:0] {
    S_IDLE = 2'd0,
    S_CS1  = 2'd1,
    S_CS2  = 2'd2,
    S_CS3  = 2'd3
  } state_e;

  // One control word per control step.
  typedef struct packed {
    logic r1_ld;    // R1 load
    logic r1_sel;   // R1 source: 0 = input a, 1 = multiplier M1 (t1/t2)
    logic r2_ld;    // R2 load (input b)
    logic r3_ld;    // R3 load (input e, through key mux 0)
    logic r4_ld;    // R4 load
    logic r4_sel;   // R4 source: 0 = input c path, 1 = multiplier M2 (t3)
    logic r5_ld;    // R5 load
    logic r5_sel;   // R5 source: 0 = input d path, 1 = multiplier M2 (f)
    logic m1b_sel;  // M1 second operand: 0 = R2, 1 = R3
    logic m2a_sel;  // M2 first operand : 0 = R1 (t2), 1 = R4 path (c/t3)
    logic m2b_sel;  // M2 second operand: 0 = R5 (d), 1 = R4 path (t3)
  } ctrl_t;

endpackage
