// Two-mode 4-point radix-2 FFT: decimation in time (DIT) or in frequency (DIF).
//
// Both flow graphs have 4 butterflies, i.e. 4 additions, 4 subtractions and 4
// multiplications, but their dependencies differ: a DIT butterfly multiplies
// before it adds and subtracts, a DIF butterfly after. With one transform every
// 3 cycles (c-steps S0, S1, S2), 1-cycle adders/subtractors and 2-cycle
// multipliers, both graphs run on one datapath of 4 multipliers, 2 adders and
// 2 subtractors with one 3-state controller.
//
//   DIT (mode0): a0 = x0 + c0*x2   a1 = x0 - c0*x2   b0 = x1 + c1*x3   b1 = x1 - c1*x3
//                X0 = a0 + c2*b0   X2 = a0 - c2*b0   X1 = a1 + c3*b1   X3 = a1 - c3*b1
//   DIF (mode1): g0 = x0 + x2      h0 = c0*(x0 - x2) g1 = x1 + x3      h1 = c1*(x1 - x3)
//                X0 = g0 + g1      X2 = c2*(g0 - g1) X1 = h0 + h1      X3 = c3*(h0 - h1)
//
// c0..c3 are the butterfly coefficients (the twiddle factors), one real
// multiplication per butterfly. They are inputs that must be held while
// samples are in flight. Data are W-bit two's-complement values; sums and
// products wrap modulo 2^W (scale the coefficients and inputs as needed).
//
// Schedule (cycle 0 follows the edge that loads x0..x3, c-step = cycle mod 3):
//   unit          c-step   DIT                      DIF
//   MUL0, MUL1    S0-S1    c0*x2, c1*x3  cyc 0-1    c0*(x0-x2), c1*(x1-x3)  cyc 3-4
//   ADD0..SUB1    S2       stage-1 butterflies cyc 2   stage-1 sums/diffs   cyc 2
//   MUL2, MUL3    S1-S2    c2*b0, c3*b1  cyc 4-5    c2*(g0-g1), c3*(h0-h1)  cyc 7-8
//   ADD0..SUB1    S0       stage-2 sums/diffs cyc 6    stage-2 sums/diffs   cyc 6
// Both modes occupy the same units in the same c-steps and every register
// loads in the same c-step in both modes, so the load commands do not depend
// on the mode; only operand multiplexers do. The transform appears 7 (DIT) or
// 9 (DIF) cycles after the edge that accepted its inputs, for one cycle with
// out_valid; outputs are in natural order X0..X3.
// The operation counts, the 3-cycle throughput, the latencies of the units and
// the allocation (4 multipliers, 2 adders, 2 subtractors) follow the
// document; the flow graphs, the schedule and the binding are this design's
// own, made the way the document prescribes (same c-step usage in both modes).
module fft4_multimode
  import mm_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  mode_e        mode_req,  // MODE0: DIT, MODE1: DIF
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] din  [4],  // x0..x3
  input  logic [W-1:0] coef [4],  // c0..c3, held while busy
  output logic         out_valid,
  output logic [W-1:0] dout [4],  // X0..X3
  output mode_e        mode,
  output logic         busy,       // a sample is in flight
  output logic         switch_wait
);

  localparam int unsigned S0 = 0, S1 = 1, S2 = 2;

  logic [1:0] cstep;
  logic [2:0] enter;

  mm_controller #(.NSTEPS(3), .LAT0(7), .LAT1(9), .MODE_RST(MODE0)) u_ctrl (
    .clk, .rst_n, .mode_req, .in_valid, .in_ready,
    .cstep, .enter, .mode, .out_valid, .busy, .switch_wait
  );

  logic [W-1:0] x [4];
  logic [W-1:0] r_mul0, r_mul1, r_mul2, r_mul3;
  logic [W-1:0] ra_add0, ra_sub0, ra_add1, ra_sub1;  // stage-1 results
  logic [W-1:0] rb_add0, rb_sub0, rb_add1, rb_sub1;  // stage-2 results
  logic [W-1:0] p0, p1;                              // stage-1 values kept for stage 2

  logic dit;
  assign dit = (mode == MODE0);

  // Operand steering
  logic [W-1:0] mul0_b, mul1_b, mul2_b, mul3_b;
  logic [W-1:0] add0_a, add0_b, add1_a, add1_b, p1_d;
  always_comb begin
    mul0_b = dit ? x[2]    : ra_sub0;
    mul1_b = dit ? x[3]    : ra_sub1;
    mul2_b = dit ? ra_add1 : rb_sub0;
    mul3_b = dit ? ra_sub1 : rb_sub1;
    p1_d   = dit ? ra_sub0 : ra_add1;
    if (cstep == 2'(S0)) begin       // second butterfly stage
      add0_a = p0;
      add0_b = dit ? r_mul2 : p1;
      add1_a = dit ? p1     : r_mul0;
      add1_b = dit ? r_mul3 : r_mul1;
    end else begin                   // first butterfly stage (used in S2)
      add0_a = x[0];
      add0_b = dit ? r_mul0 : x[2];
      add1_a = x[1];
      add1_b = dit ? r_mul1 : x[3];
    end
  end

  // Functional units: ADD0 and SUB0 share operands, as do ADD1 and SUB1.
  logic [W-1:0] add0_y, sub0_y, add1_y, sub1_y, mul0_y, mul1_y, mul2_y, mul3_y;
  always_comb begin
    add0_y = add0_a + add0_b;
    sub0_y = add0_a - add0_b;
    add1_y = add1_a + add1_b;
    sub1_y = add1_a - add1_b;
    mul0_y = W'(coef[0] * mul0_b);
    mul1_y = W'(coef[1] * mul1_b);
    mul2_y = W'(coef[2] * mul2_b);
    mul3_y = W'(coef[3] * mul3_b);
  end

  // Registers; every load command is a bare c-step in both modes.
  always_ff @(posedge clk) begin
    if (enter[S0]) begin
      x       <= din;
      ra_add0 <= add0_y;
      ra_sub0 <= sub0_y;
      ra_add1 <= add1_y;
      ra_sub1 <= sub1_y;
      r_mul2  <= mul2_y;
      r_mul3  <= mul3_y;
    end
    if (enter[S1]) begin
      p0      <= ra_add0;
      p1      <= p1_d;
      rb_add0 <= add0_y;
      rb_sub0 <= sub0_y;
      rb_add1 <= add1_y;
      rb_sub1 <= sub1_y;
    end
    if (enter[S2]) begin
      r_mul0  <= mul0_y;
      r_mul1  <= mul1_y;
    end
  end

  always_comb begin
    dout[0] = rb_add0;
    dout[1] = rb_add1;
    dout[2] = dit ? rb_sub0 : r_mul2;
    dout[3] = dit ? rb_sub1 : r_mul3;
  end

  // 2-cycle units: MUL0/MUL1 keep their operands over S0-S1, MUL2/MUL3 over S1-S2.
  a_mul01_ops : assert property (@(posedge clk) disable iff (!rst_n)
    (cstep == 2'(S1)) |-> $stable({mul0_b, mul1_b}));
  a_mul23_ops : assert property (@(posedge clk) disable iff (!rst_n)
    (cstep == 2'(S2)) |-> $stable({mul2_b, mul3_b}));

  // The coefficients are configuration: they may change only when idle.
  a_coef_stable : assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> $stable({coef[0], coef[1], coef[2], coef[3]}));

endmodule
