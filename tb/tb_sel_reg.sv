// tb_sel_reg: self-checking test of a datapath register with its selector.
// Random load/select/data sequences are applied; a testbench model register
// predicts q after every clock edge, including synchronous resets.
module tb_sel_reg;
  localparam int unsigned W = 16;
  int checks = 0, failures = 0;

  logic         clk = 1'b0, rst_n, ld, sel;
  logic [W-1:0] d0, d1, q, model;

  sel_reg #(.WIDTH(W)) dut (.clk, .rst_n, .ld, .sel, .d0, .d1, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; ld = 1'b0; sel = 1'b0; d0 = '0; d1 = '0;
    @(posedge clk); #1;
    model = '0;
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      ld    = ($urandom % 3) != 0;
      sel   = 1'($urandom);
      d0    = W'($urandom);
      d1    = W'($urandom);
      rst_n = ($urandom % 50) != 0;
      @(posedge clk);
      if (!rst_n)  model = '0;
      else if (ld) model = sel ? d1 : d0;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL step %0d: q=%h expected %h", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
