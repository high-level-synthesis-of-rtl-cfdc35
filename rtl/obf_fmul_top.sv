// obf_fmul_top: key-obfuscated RTL for f = e*(a*b)*(c*d).
//
// The controller (obf_controller) steps a two-multiplier, five-register
// datapath (obf_datapath) through the schedule cs0..cs3. Key multiplexers on
// the lines of the one operation off the critical path, c*d, make the datapath
// compute f only when the key primary inputs carry the correct key; any other
// key gives a different, well-formed product, so the netlist alone does not
// reveal the function. Key insertion costs no extra cycle: the keyed lines
// have slack in the schedule.
//
// VARIANT selects the schedule and with it the key layout:
//   FIG6A: op4 in cs2, 3 key bits, correct key 3'b100.
//   FIG6B: op4 in cs1, 2 key bits, correct key 2'b10.
// Interface: pulse or hold start for one cycle with a..e valid; done pulses
// four cycles later with the result on f, which holds until the next start.
// key must be stable while busy. WIDTH (data width) is this design's choice;
// results are products modulo 2**WIDTH.
module obf_fmul_top
  import obf_pkg::*;
#(
  parameter int unsigned WIDTH   = 16,
  parameter variant_e    VARIANT = FIG6A,
  parameter int unsigned KEY_W   = key_width(VARIANT)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  input  logic [WIDTH-1:0] d,
  input  logic [WIDTH-1:0] e,
  input  logic [KEY_W-1:0] key,
  output logic             busy,
  output logic             done,
  output logic [WIDTH-1:0] f
);

  ctrl_t ctrl;

  obf_controller #(.VARIANT(VARIANT)) u_ctrl (
    .clk, .rst_n, .start, .ctrl, .busy, .done
  );

  obf_datapath #(.WIDTH(WIDTH), .VARIANT(VARIANT), .KEY_W(KEY_W)) u_dp (
    .clk, .rst_n, .ctrl, .a, .b, .c, .d, .e, .key, .f
  );

endmodule
