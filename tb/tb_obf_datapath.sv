// tb_obf_datapath: self-checking test of the keyed datapath alone.
// The testbench plays the schedule itself by driving control words, for both
// variants and for every key value, and compares f with the keyed function:
//   FIG6A: f' = (k0?c:e)*(a*b)*(k1?d:c)*(k2?d:c)
//   FIG6B: f' = (k0?c:e)*(a*b)*(k1?c*d:e)
// all modulo 2**16. With the correct key both reduce to e*(a*b)*(c*d).
module tb_obf_datapath;
  import obf_pkg::*;
  localparam int unsigned W = 16;
  int checks = 0, failures = 0;

  logic         clk = 1'b0, rst_n;
  ctrl_t        ctrl;
  logic [W-1:0] a, b, c, d, e, f_a, f_b;
  logic [2:0]   key_a;
  logic [1:0]   key_b;

  obf_datapath #(.WIDTH(W), .VARIANT(FIG6A)) dut_a (
    .clk, .rst_n, .ctrl, .a, .b, .c, .d, .e, .key(key_a), .f(f_a));
  obf_datapath #(.WIDTH(W), .VARIANT(FIG6B)) dut_b (
    .clk, .rst_n, .ctrl, .a, .b, .c, .d, .e, .key(key_b), .f(f_b));

  always #5 clk = ~clk;

  // Drive one control step of the given variant for one clock cycle.
  task automatic step(variant_e v, int cs);
    ctrl = '0;
    case (cs)
      0: begin ctrl.r1_ld = 1; ctrl.r2_ld = 1; ctrl.r3_ld = 1; ctrl.r4_ld = 1; ctrl.r5_ld = 1; end
      1: begin
        ctrl.r1_ld = 1; ctrl.r1_sel = 1;
        if (v == FIG6B) begin ctrl.m2a_sel = 1; ctrl.r4_ld = 1; ctrl.r4_sel = 1; end
      end
      2: begin
        ctrl.r1_ld = 1; ctrl.r1_sel = 1; ctrl.m1b_sel = 1;
        if (v == FIG6A) begin ctrl.m2a_sel = 1; ctrl.r4_ld = 1; ctrl.r4_sel = 1; end
      end
      default: begin ctrl.m2b_sel = 1; ctrl.r5_ld = 1; ctrl.r5_sel = 1; end
    endcase
    @(posedge clk); #1;
    ctrl = '0;
  endtask

  function automatic logic [W-1:0] ref_a(logic [2:0] k);
    logic [W-1:0] x0 = k[0] ? c : e;
    logic [W-1:0] x1 = k[1] ? d : c;
    logic [W-1:0] x2 = k[2] ? d : c;
    return x0 * a * b * x1 * x2;
  endfunction

  function automatic logic [W-1:0] ref_b(logic [1:0] k);
    logic [W-1:0] x0 = k[0] ? c : e;
    logic [W-1:0] cd = c * d;
    logic [W-1:0] x1 = k[1] ? cd : e;
    return x0 * a * b * x1;
  endfunction

  task automatic chk(logic [W-1:0] got, logic [W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; ctrl = '0; key_a = '0; key_b = '0;
    {a, b, c, d, e} = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      a = W'($urandom); b = W'($urandom); c = W'($urandom);
      d = W'($urandom); e = W'($urandom);
      if (t == 0) begin a = 3; b = 5; c = 7; d = 11; e = 13; end
      key_a = 3'(t);      // every FIG6A key occurs
      key_b = 2'(t);      // every FIG6B key occurs
      for (int cs = 0; cs < 4; cs++) step(FIG6A, cs);
      chk(f_a, ref_a(key_a), $sformatf("FIG6A key=%b", key_a));
      if (key_a == 3'b100) chk(f_a, e * a * b * c * d, "FIG6A correct key gives f");
      for (int cs = 0; cs < 4; cs++) step(FIG6B, cs);
      chk(f_b, ref_b(key_b), $sformatf("FIG6B key=%b", key_b));
      if (key_b == 2'b10) chk(f_b, e * a * b * c * d, "FIG6B correct key gives f");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
