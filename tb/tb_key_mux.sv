// tb_key_mux: self-checking test of the key multiplexer.
// Both placements (original line on input 0 or on input 1) are checked with
// random data: the correct key bit must pass the original line, the wrong key
// bit the decoy.
module tb_key_mux;
  localparam int unsigned W = 16;
  int checks = 0, failures = 0;

  logic [W-1:0] orig, decoy, y0, y1;
  logic         k;

  key_mux #(.WIDTH(W), .CORRECT_KEY(1'b0)) dut0 (.orig, .decoy, .key_bit(k), .y(y0));
  key_mux #(.WIDTH(W), .CORRECT_KEY(1'b1)) dut1 (.orig, .decoy, .key_bit(k), .y(y1));

  task automatic check(logic [W-1:0] got, logic [W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    for (int i = 0; i < 200; i++) begin
      orig  = W'($urandom);
      decoy = W'($urandom);
      if (decoy == orig) decoy = ~orig;
      k = 1'b0; #1;
      check(y0, orig,  "CORRECT_KEY=0, key 0 passes original");
      check(y1, decoy, "CORRECT_KEY=1, key 0 passes decoy");
      k = 1'b1; #1;
      check(y0, decoy, "CORRECT_KEY=0, key 1 passes decoy");
      check(y1, orig,  "CORRECT_KEY=1, key 1 passes original");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
