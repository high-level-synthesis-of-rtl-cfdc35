// key_mux: one bit of obfuscation logic, a 2-input multiplexer whose select
// is a key bit.
//
// An original datapath line (orig) is cut and routed through this mux. A
// second line taken from elsewhere in the design (decoy) feeds the other mux
// input. CORRECT_KEY states which mux input the original line sits on: with
// CORRECT_KEY = 0 the original line is input 0, the decoy input 1; with
// CORRECT_KEY = 1 it is the other way round. Only the correct key bit passes
// the original line on, so the circuit computes its intended function for the
// correct key alone.
//
// Interface: in0/in1 are the two mux inputs as placed in the netlist, key_bit
// is the select, y the output. Purely combinational, no latency.
// The placement rule (original line on the input named by the key bit, key
// bit on the select) follows the obfuscation algorithm; WIDTH is free.
module key_mux #(
  parameter int unsigned WIDTH       = 16,
  parameter bit          CORRECT_KEY = 1'b0
) (
  input  logic [WIDTH-1:0] orig,
  input  logic [WIDTH-1:0] decoy,
  input  logic             key_bit,
  output logic [WIDTH-1:0] y
);

  logic [WIDTH-1:0] in0, in1;

  always_comb begin
    if (CORRECT_KEY) begin
      in0 = decoy;
      in1 = orig;
    end else begin
      in0 = orig;
      in1 = decoy;
    end
    y = key_bit ? in1 : in0;
  end

endmodule
