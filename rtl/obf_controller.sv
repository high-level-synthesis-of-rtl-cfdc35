// obf_controller: schedule controller for the f = e*(a*b)*(c*d) datapath.
//
// A four-state FSM steps through control steps cs0..cs3 and emits one
// control word (obf_pkg::ctrl_t) per step:
//   cs0 (S_IDLE with start = 1): load a->R1, b->R2, e->R3, c->R4, d->R5.
//   cs1: op1 on M1, R1*R2 -> R1 (t1).        FIG6B also: op4 on M2, R4*R5 -> R4 (t3).
//   cs2: op2 on M1, R1*R3 -> R1 (t2).        FIG6A also: op4 on M2, R4*R5 -> R4 (t3).
//   cs3: op3 on M2, R1*R4 -> R5 (f).
// The controller carries no key; it is the same one that drives an
// unobfuscated datapath with this schedule.
//
// Interface: start is seen only in S_IDLE; busy is high in cs1..cs3; done
// pulses for one cycle after cs3, when f sits in R5. Latency: done rises four
// clock edges after the edge that sampled start. A new start may be given in
// the cycle done is high. The schedule and binding follow the design; the
// start/busy/done handshake and the reset are this design's choices.
module obf_controller
  import obf_pkg::*;
#(
  parameter variant_e VARIANT = FIG6A
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  output ctrl_t ctrl,
  output logic  busy,
  output logic  done
);

  state_e state_q, state_d;

  always_comb begin
    ctrl    = '0;
    state_d = state_q;
    unique case (state_q)
      S_IDLE: begin
        if (start) begin
          ctrl.r1_ld = 1'b1;  ctrl.r1_sel = 1'b0;
          ctrl.r2_ld = 1'b1;
          ctrl.r3_ld = 1'b1;
          ctrl.r4_ld = 1'b1;  ctrl.r4_sel = 1'b0;
          ctrl.r5_ld = 1'b1;  ctrl.r5_sel = 1'b0;
          state_d    = S_CS1;
        end
      end
      S_CS1: begin
        ctrl.r1_ld = 1'b1;  ctrl.r1_sel = 1'b1;  ctrl.m1b_sel = 1'b0;   // op1
        if (VARIANT == FIG6B) begin                                     // op4
          ctrl.m2a_sel = 1'b1;  ctrl.m2b_sel = 1'b0;
          ctrl.r4_ld   = 1'b1;  ctrl.r4_sel  = 1'b1;
        end
        state_d = S_CS2;
      end
      S_CS2: begin
        ctrl.r1_ld = 1'b1;  ctrl.r1_sel = 1'b1;  ctrl.m1b_sel = 1'b1;   // op2
        if (VARIANT == FIG6A) begin                                     // op4
          ctrl.m2a_sel = 1'b1;  ctrl.m2b_sel = 1'b0;
          ctrl.r4_ld   = 1'b1;  ctrl.r4_sel  = 1'b1;
        end
        state_d = S_CS3;
      end
      S_CS3: begin
        ctrl.m2a_sel = 1'b0;  ctrl.m2b_sel = 1'b1;                      // op3
        ctrl.r5_ld   = 1'b1;  ctrl.r5_sel  = 1'b1;
        state_d = S_IDLE;
      end
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      done    <= 1'b0;
    end else begin
      state_q <= state_d;
      done    <= (state_q == S_CS3);
    end
  end

  assign busy = (state_q != S_IDLE);

  // M2 writes one register per step, and never R4 and R5 together.
  a_m2_single_dest: assert property (@(posedge clk) disable iff (!rst_n)
    !(ctrl.r4_ld && ctrl.r4_sel && ctrl.r5_ld && ctrl.r5_sel));
  // done is a single-cycle pulse, given while the FSM is back in S_IDLE.
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> !busy ##1 !done);

endmodule
