// tb_obf_controller: self-checking test of the schedule controller.
// Two controllers, one per variant, are started together. Every cycle the
// control word is compared with the schedule written out here step by step;
// busy, the done pulse four edges after start, and the rule that start is
// ignored while busy are checked too.
module tb_obf_controller;
  import obf_pkg::*;
  int checks = 0, failures = 0;

  logic  clk = 1'b0, rst_n, start;
  ctrl_t ctrl_a, ctrl_b;
  logic  busy_a, busy_b, done_a, done_b;

  obf_controller #(.VARIANT(FIG6A)) dut_a (.clk, .rst_n, .start, .ctrl(ctrl_a), .busy(busy_a), .done(done_a));
  obf_controller #(.VARIANT(FIG6B)) dut_b (.clk, .rst_n, .start, .ctrl(ctrl_b), .busy(busy_b), .done(done_b));

  always #5 clk = ~clk;

  // Expected control word of a variant in control step cs (0..3), or idle (4).
  function automatic ctrl_t expected(variant_e v, int cs);
    ctrl_t w = '0;
    case (cs)
      0: begin
        w.r1_ld = 1; w.r2_ld = 1; w.r3_ld = 1; w.r4_ld = 1; w.r5_ld = 1;
      end
      1: begin
        w.r1_ld = 1; w.r1_sel = 1;
        if (v == FIG6B) begin w.m2a_sel = 1; w.r4_ld = 1; w.r4_sel = 1; end
      end
      2: begin
        w.r1_ld = 1; w.r1_sel = 1; w.m1b_sel = 1;
        if (v == FIG6A) begin w.m2a_sel = 1; w.r4_ld = 1; w.r4_sel = 1; end
      end
      3: begin
        w.m2b_sel = 1; w.r5_ld = 1; w.r5_sel = 1;
      end
      default: w = '0;
    endcase
    return w;
  endfunction

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; start = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    #1;
    chk(ctrl_a == '0 && ctrl_b == '0 && !busy_a && !busy_b, "idle after reset");
    for (int op = 0; op < 20; op++) begin
      // idle gap of 0..2 cycles
      repeat ($urandom % 3) begin
        @(posedge clk); #1;
        chk(ctrl_a == '0 && ctrl_b == '0, "no control while idle");
      end
      start = 1'b1; #1;
      chk(ctrl_a == expected(FIG6A, 0), "FIG6A cs0");
      chk(ctrl_b == expected(FIG6B, 0), "FIG6B cs0");
      for (int cs = 1; cs <= 3; cs++) begin
        @(posedge clk); #1;
        start = 1'($urandom);   // must be ignored while busy
        #1;
        chk(busy_a && busy_b, "busy in cs1..cs3");
        chk(!done_a && !done_b, "no done before the end");
        chk(ctrl_a == expected(FIG6A, cs), $sformatf("FIG6A cs%0d", cs));
        chk(ctrl_b == expected(FIG6B, cs), $sformatf("FIG6B cs%0d", cs));
      end
      start = 1'b0;
      @(posedge clk); #1;
      chk(done_a && done_b, "done four edges after start");
      chk(!busy_a && !busy_b, "idle when done");
      chk(ctrl_a == '0 && ctrl_b == '0, "idle control word");
      @(posedge clk); #1;
      chk(!done_a && !done_b, "done is one cycle");
      // back to idle; start is next applied in this cycle
      #0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
