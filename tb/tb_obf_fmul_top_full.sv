// tb_obf_fmul_top_full: the design at its default parameters (16-bit data,
// FIG6A key layout) takes two complete evaluations: one with the correct key
// 3'b100, which must give e*(a*b)*(c*d) four cycles after start, and one with
// the wrong key 3'b000, which must give the keyed product e*(a*b)*c*c.
module tb_obf_fmul_top_full;
  int checks = 0, failures = 0;

  logic        clk = 1'b0, rst_n, start, busy, done;
  logic [15:0] a, b, c, d, e, f;
  logic [2:0]  key;

  obf_fmul_top dut (.clk, .rst_n, .start, .a, .b, .c, .d, .e, .key, .busy, .done, .f);

  always #5 clk = ~clk;

  task automatic eval(logic [15:0] exp, string what);
    int lat = 0;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    lat = 1;
    while (!done && lat < 10) begin
      @(posedge clk); #1;
      lat++;
    end
    checks++;
    if (lat != 4) begin failures++; $display("FAIL %s latency %0d", what, lat); end
    checks++;
    if (f !== exp) begin failures++; $display("FAIL %s f=%h expected %h", what, f, exp); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; start = 1'b0;
    a = 16'd3; b = 16'd5; c = 16'd7; d = 16'd11; e = 16'd13;  // f = 15015
    key = 3'b100;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    eval(16'd15015, "correct key");
    key = 3'b000;
    eval(16'd13 * 16'd15 * 16'd7 * 16'd7, "wrong key");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
