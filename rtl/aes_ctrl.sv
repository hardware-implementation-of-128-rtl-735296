// aes_ctrl: control unit of one AES-128 core, built from a one-hot phase
// ring, a round counter and gate-level decoding.
//
// A block takes one load cycle and then ten rounds of four phases:
//   phase 0  SubBytes register        (p1)  / key S-box register
//   phase 1  ShiftRows register       (p2)  / R-con register        (p8)
//   phase 2  MixColumns register      (p3)  / Xor-1 register        (p9)
//   phase 3  AddRoundKey -> state     (p5)  / K-to-w reload         (p7)
// p4 selects the MixColumns result in rounds 1..9 and bypasses it in round
// 10; p10 captures the last round key in round 10, phase 3; p0 loads the
// input block XOR main key and p6 steers the key register between the main
// key (load) and the freshly generated round key. Because the round datapath
// and the key unit use the same phase strobes, a round key is ready exactly
// in the phase in which the state needs it.
//
// The strobe assignments and the 19-bit packing of ctrl_t are this design's
// reading of the control bus drawn in the block diagrams; the phase-per-
// transformation schedule follows the four-stage pipelining of the round.
//
// Interface/timing: start is sampled on a rising edge while idle; that edge
// loads the core. busy is high from the next cycle through the cycle in
// which done is high; done pulses for one cycle, rising 40 edges after the start
// edge, when the state register holds the result. A start while busy is
// ignored. phase and round read 0 while idle.
module aes_ctrl
  import aes_pkg::*;
#(
  parameter int unsigned ROUNDS = NUM_ROUNDS  // rounds per block
) (
  input  logic  clk,
  input  logic  rst_n,  // asynchronous, active low
  input  logic  start,  // begin a block (ignored while busy)
  output ctrl_t ctrl,   // control word
  output logic  busy,   // a block is in progress (includes the done cycle)
  output logic  done    // one-cycle pulse: result valid
);
  logic       run_q;    // rounds in progress
  logic [3:0] phase_q;  // one-hot phase ring
  logic [3:0] round_q;  // 1..ROUNDS
  logic       done_q;
  logic       load;
  logic       last;

  assign load = start & ~run_q;
  assign last = (round_q == 4'(ROUNDS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q   <= 1'b0;
      phase_q <= 4'b0001;
      round_q <= 4'd0;
      done_q  <= 1'b0;
    end else begin
      done_q <= run_q & phase_q[3] & last;
      if (load) begin
        run_q   <= 1'b1;
        phase_q <= 4'b0001;
        round_q <= 4'd1;
      end else if (run_q) begin
        phase_q <= {phase_q[2:0], phase_q[3]};
        if (phase_q[3]) begin
          if (last) begin
            run_q   <= 1'b0;
            round_q <= 4'd0;
          end else begin
            round_q <= round_q + 4'd1;
          end
        end
      end
    end
  end

  always_comb begin
    ctrl.phase = phase_q & {4{run_q}};
    ctrl.round = run_q ? round_q : 4'd0;
    ctrl.p0    = load;
    ctrl.p1    = run_q & phase_q[0];
    ctrl.p2    = run_q & phase_q[1];
    ctrl.p3    = run_q & phase_q[2];
    ctrl.p4    = run_q & ~last;
    ctrl.p5    = run_q & phase_q[3];
    ctrl.p6    = run_q;
    ctrl.p7    = load | (run_q & phase_q[3]);
    ctrl.p8    = run_q & phase_q[1];
    ctrl.p9    = run_q & phase_q[2];
    ctrl.p10   = run_q & phase_q[3] & last;
  end

  assign busy = run_q | done_q;
  assign done = done_q;

  // The phase ring must stay one-hot.
  a_onehot : assert property (@(posedge clk) disable iff (!rst_n) $onehot(phase_q));
endmodule
