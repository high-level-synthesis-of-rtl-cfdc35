// obf_datapath: key-obfuscated datapath for f = e*(a*b)*(c*d) with two
// multipliers (M1, M2) and five registers (R1..R5).
//
// Binding: M1 runs operations 1 (a*b) and 2 (t1*e), M2 runs operations 4 (c*d)
// and 3 (t2*t3). Register sharing: R1 holds a, t1, t2; R2 holds b; R3 holds e;
// R4 holds c, then t3; R5 holds d, then f. The controller drives every load
// enable and selector through one control word (obf_pkg::ctrl_t); the key
// bits reach only this datapath.
//
// Key multiplexers (key_mux) sit on lines of operation 4, the one operation
// off the critical path:
//   FIG6A (op4 in cs2): key0 on the load of R3 (e, decoy c, correct 0),
//     key1 on the load of R4 (c, decoy d, correct 0), key2 on the load of R5
//     (d, decoy c, correct 1). With any key the result is
//     (k0?c:e)*(a*b)*(k1?d:c)*(k2?d:c).
//   FIG6B (op4 in cs1): key0 on the load of R3 (as above), key1 on the output
//     of R4 (c/t3, decoy primary input e, correct 1). The result is
//     (k0?c:e)*(a*b)*(k1?c*d:e).
// The register binding, the key positions, decoys and correct key values
// follow the published datapaths. One selector is this design's own: M2's
// second operand picks R5 (d, for op4) or the R4 path (t3, for op3), because
// op3 needs t2 and t3 at the same time and they sit in R1 and R4.
//
// Timing: one control step per clock cycle; registers load on the rising
// edge at the end of a step. f is register R5. Inputs a..e must hold during
// cs0; in FIG6B a wrong key1 also reads input e in cs1 and cs3.
module obf_datapath
  import obf_pkg::*;
#(
  parameter int unsigned WIDTH   = 16,
  parameter variant_e    VARIANT = FIG6A,
  parameter int unsigned KEY_W   = key_width(VARIANT)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  ctrl_t            ctrl,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  input  logic [WIDTH-1:0] d,
  input  logic [WIDTH-1:0] e,
  input  logic [KEY_W-1:0] key,
  output logic [WIDTH-1:0] f
);

  logic [WIDTH-1:0] r1_q, r2_q, r3_q, r4_q, r5_q;
  logic [WIDTH-1:0] e_in, c_in, d_in, r4_path;
  logic [WIDTH-1:0] m1_a, m1_b, m1_p;
  logic [WIDTH-1:0] m2_a, m2_b, m2_p;

  // ---------------------------------------------------------------- keys
  // key0 is common to both variants: input e into R3, decoy c.
  key_mux #(.WIDTH(WIDTH), .CORRECT_KEY(1'b0)) u_key0 (
    .orig(e), .decoy(c), .key_bit(key[0]), .y(e_in)
  );

  generate
    if (VARIANT == FIG6A) begin : g_fig6a
      if (KEY_W != 3) begin : g_bad_key
        $error("obf_datapath: FIG6A needs KEY_W = 3");
      end
      key_mux #(.WIDTH(WIDTH), .CORRECT_KEY(1'b0)) u_key1 (
        .orig(c), .decoy(d), .key_bit(key[1]), .y(c_in)
      );
      key_mux #(.WIDTH(WIDTH), .CORRECT_KEY(1'b1)) u_key2 (
        .orig(d), .decoy(c), .key_bit(key[KEY_W-1]), .y(d_in)
      );
      assign r4_path = r4_q;
    end else begin : g_fig6b
      if (KEY_W != 2) begin : g_bad_key
        $error("obf_datapath: FIG6B needs KEY_W = 2");
      end
      assign c_in = c;
      assign d_in = d;
      key_mux #(.WIDTH(WIDTH), .CORRECT_KEY(1'b1)) u_key1 (
        .orig(r4_q), .decoy(e), .key_bit(key[1]), .y(r4_path)
      );
    end
  endgenerate

  // ----------------------------------------------------------- registers
  sel_reg #(.WIDTH(WIDTH)) u_r1 (
    .clk, .rst_n, .ld(ctrl.r1_ld), .sel(ctrl.r1_sel), .d0(a), .d1(m1_p), .q(r1_q)
  );
  sel_reg #(.WIDTH(WIDTH)) u_r2 (
    .clk, .rst_n, .ld(ctrl.r2_ld), .sel(1'b0), .d0(b), .d1(b), .q(r2_q)
  );
  sel_reg #(.WIDTH(WIDTH)) u_r3 (
    .clk, .rst_n, .ld(ctrl.r3_ld), .sel(1'b0), .d0(e_in), .d1(e_in), .q(r3_q)
  );
  sel_reg #(.WIDTH(WIDTH)) u_r4 (
    .clk, .rst_n, .ld(ctrl.r4_ld), .sel(ctrl.r4_sel), .d0(c_in), .d1(m2_p), .q(r4_q)
  );
  sel_reg #(.WIDTH(WIDTH)) u_r5 (
    .clk, .rst_n, .ld(ctrl.r5_ld), .sel(ctrl.r5_sel), .d0(d_in), .d1(m2_p), .q(r5_q)
  );

  // --------------------------------------------------- operand selectors
  always_comb begin
    m1_a = r1_q;
    m1_b = ctrl.m1b_sel ? r3_q    : r2_q;
    m2_a = ctrl.m2a_sel ? r4_path : r1_q;
    m2_b = ctrl.m2b_sel ? r4_path : r5_q;
  end

  // --------------------------------------------------------- multipliers
  dp_mult #(.WIDTH(WIDTH)) u_m1 (.op_a(m1_a), .op_b(m1_b), .prod(m1_p));
  dp_mult #(.WIDTH(WIDTH)) u_m2 (.op_a(m2_a), .op_b(m2_b), .prod(m2_p));

  assign f = r5_q;

endmodule
