// tb_dp_mult: self-checking test of the multiplier resource.
// The product modulo 2**16 is recomputed in the testbench from a 64-bit
// product and compared; corner operands and random operands are used.
module tb_dp_mult;
  localparam int unsigned W = 16;
  int checks = 0, failures = 0;

  logic [W-1:0] op_a, op_b, prod;
  longint unsigned full;

  dp_mult #(.WIDTH(W)) dut (.op_a, .op_b, .prod);

  task automatic run(logic [W-1:0] x, logic [W-1:0] y);
    op_a = x; op_b = y; #1;
    full = longint'(x) * longint'(y);
    checks++;
    if (prod !== full[W-1:0]) begin
      failures++;
      $display("FAIL %h * %h: got %h expected %h", x, y, prod, full[W-1:0]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run('0, '0); run('1, '1); run('1, 16'h1234); run('1, '1);
    run('1, 0); run(16'hffff, 16'hffff); run(16'h8000, 16'h0002); run(16'h00ff, 16'h0101);
    for (int i = 0; i < 500; i++) run(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
