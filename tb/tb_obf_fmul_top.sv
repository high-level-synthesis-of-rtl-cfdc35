// tb_obf_fmul_top: end-to-end test of the obfuscated design, both variants.
// Each variant runs a stream of evaluations through the start/done handshake
// with random inputs and keys, and f is compared with the keyed function:
//   FIG6A: (k0?c:e)*(a*b)*(k1?d:c)*(k2?d:c)   correct key 3'b100
//   FIG6B: (k0?c:e)*(a*b)*(k1?c*d:e)          correct key 2'b10
// It also checks the four-cycle latency, busy, and that start is ignored
// while busy. Mechanisms counted (each must occur): correct-key evaluations,
// wrong-key evaluations whose output differs from f, a single flipped bit of
// every key position, back-to-back starts (start in the done cycle) and
// starts ignored while busy.
module tb_obf_fmul_top;
  import obf_pkg::*;
  localparam int unsigned W = 16;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  // ---------------------------------------------------------------- DUTs
  logic         start_a, start_b;
  logic [W-1:0] a, b, c, d, e;
  logic [2:0]   key_a;
  logic [1:0]   key_b;
  logic         busy_a, busy_b, done_a, done_b;
  logic [W-1:0] f_a, f_b;

  obf_fmul_top dut_a (
    .clk, .rst_n, .start(start_a), .a, .b, .c, .d, .e, .key(key_a),
    .busy(busy_a), .done(done_a), .f(f_a));
  obf_fmul_top #(.WIDTH(W), .VARIANT(FIG6B)) dut_b (
    .clk, .rst_n, .start(start_b), .a, .b, .c, .d, .e, .key(key_b),
    .busy(busy_b), .done(done_b), .f(f_b));

  // ------------------------------------------------------ mechanism counts
  int n_correct, n_wrong_differs, n_back_to_back, n_ignored_start;
  int n_flip_a [3];
  int n_flip_b [2];

  function automatic logic [W-1:0] f_true();
    return e * (a * b) * (c * d);
  endfunction

  function automatic logic [W-1:0] ref_a(logic [2:0] k);
    logic [W-1:0] x0 = k[0] ? c : e;
    logic [W-1:0] x1 = k[1] ? d : c;
    logic [W-1:0] x2 = k[2] ? d : c;
    return x0 * (a * b) * x1 * x2;
  endfunction

  function automatic logic [W-1:0] ref_b(logic [1:0] k);
    logic [W-1:0] x0 = k[0] ? c : e;
    logic [W-1:0] cd = c * d;
    logic [W-1:0] x1 = k[1] ? cd : e;
    return x0 * (a * b) * x1;
  endfunction

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One evaluation on one variant. If chain is set, the next start is raised
  // in the cycle done is seen (back-to-back). Returns with the done cycle
  // just sampled.
  task automatic run(variant_e v, bit poke_busy);
    int lat;
    logic [W-1:0] got, exp;
    if (v == FIG6A) start_a = 1'b1; else start_b = 1'b1;
    @(posedge clk); #1;
    start_a = 1'b0; start_b = 1'b0;
    lat = 1;
    while (!(v == FIG6A ? done_a : done_b)) begin
      chk(v == FIG6A ? busy_a : busy_b, "busy until done");
      if (poke_busy && lat == 2) begin
        // start during busy must be ignored: nothing may change
        if (v == FIG6A) start_a = 1'b1; else start_b = 1'b1;
        n_ignored_start++;
      end
      @(posedge clk); #1;
      start_a = 1'b0; start_b = 1'b0;
      lat++;
      if (lat > 10) break;
    end
    chk(lat == 4, $sformatf("latency 4 cycles (got %0d)", lat));
    got = (v == FIG6A) ? f_a : f_b;
    exp = (v == FIG6A) ? ref_a(key_a) : ref_b(key_b);
    chk(got == exp, $sformatf("%s key=%b f=%h expected %h", v.name(),
        (v == FIG6A) ? key_a : 3'(key_b), got, exp));
    if ((v == FIG6A && key_a == 3'b100) || (v == FIG6B && key_b == 2'b10)) begin
      chk(got == f_true(), "correct key gives e*(a*b)*(c*d)");
      n_correct++;
    end else if (got != f_true()) begin
      n_wrong_differs++;
    end
    if (v == FIG6A) begin
      for (int i = 0; i < 3; i++) if ((key_a ^ 3'b100) == 3'(1 << i)) n_flip_a[i]++;
    end else begin
      for (int i = 0; i < 2; i++) if ((key_b ^ 2'b10) == 2'(1 << i)) n_flip_b[i]++;
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; start_a = 1'b0; start_b = 1'b0;
    {a, b, c, d, e} = '0; key_a = 3'b100; key_b = 2'b10;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      variant_e v;
      v = (t % 2 == 0) ? FIG6A : FIG6B;
      a = W'($urandom) | 1; b = W'($urandom) | 1; c = W'($urandom) | 1;
      d = W'($urandom) | 1; e = W'($urandom) | 1;
      if (t < 20) begin a = W'(t + 2); b = 3; c = 5; d = 7; e = 11; end
      // half the runs use the correct key, the rest any key
      if (t % 4 < 2) begin key_a = 3'b100; key_b = 2'b10; end
      else begin key_a = 3'($urandom); key_b = 2'($urandom); end
      if (t % 5 == 0) begin
        // back-to-back: the next start comes in the done cycle
        run(v, 1'b0);
        n_back_to_back++;
        run(v, 1'b1);
      end else begin
        run(v, t % 3 == 0);
        @(posedge clk); #1;
        chk(!(v == FIG6A ? done_a : done_b), "done is a single pulse");
        chk((v == FIG6A ? f_a : f_b) == ((v == FIG6A) ? ref_a(key_a) : ref_b(key_b)),
            "f holds after done");
      end
    end
    chk(n_correct > 0,        "mechanism: correct-key evaluation");
    chk(n_wrong_differs > 0,  "mechanism: wrong key changes f");
    chk(n_back_to_back > 0,   "mechanism: back-to-back start");
    chk(n_ignored_start > 0,  "mechanism: start ignored while busy");
    for (int i = 0; i < 3; i++) chk(n_flip_a[i] > 0, $sformatf("mechanism: FIG6A key bit %0d flipped", i));
    for (int i = 0; i < 2; i++) chk(n_flip_b[i] > 0, $sformatf("mechanism: FIG6B key bit %0d flipped", i));
    $display("mechanisms: correct=%0d wrong_differs=%0d back_to_back=%0d ignored_start=%0d flipA=%0d/%0d/%0d flipB=%0d/%0d",
             n_correct, n_wrong_differs, n_back_to_back, n_ignored_start,
             n_flip_a[0], n_flip_a[1], n_flip_a[2], n_flip_b[0], n_flip_b[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
