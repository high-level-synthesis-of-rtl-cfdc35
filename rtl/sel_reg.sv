// sel_reg: a datapath register (R1..R5) with its 2-input source selector.
//
// On a rising clock edge with ld = 1 the register takes d0 (sel = 0) or d1
// (sel = 1); with ld = 0 it holds. A synchronous active-low reset clears it.
// Registers that have only one source (R2, R3) tie sel low.
// Interface: q is the register output, valid from the edge after the load.
// The register/selector pairs follow the datapath; the load enable and the
// reset are this design's choices.
module sel_reg #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ld,
  input  logic             sel,
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)
      q <= '0;
    else if (ld)
      q <= sel ? d1 : d0;
  end

endmodule
