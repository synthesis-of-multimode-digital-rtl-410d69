// Two-mode pipelined datapath for a pair of arithmetic expressions.
//
//   mode0 (DFG1): x = ((a+b)*(c-d) + e*f - shr(g,h)) * (i+j)
//   mode1 (DFG2): y = ((a*b) + (c-d) + (e+f)) * ((g+h) * (i-j))
//
// Both graphs share one datapath of 3 multipliers, 2 adders, 1 subtractor and
// 1 right shifter, and one controller with two c-steps S0/S1: a new sample
// enters every 2 cycles. Adders and the subtractor take 1 cycle; multipliers
// and the shifter take 2 cycles (their operand registers are held for both
// c-steps and the result register captures at the end of the second one).
// DFG2 is the main graph and runs in 3 pipeline stages; DFG1 is scheduled
// against DFG2's resource reservation table and runs in 4 stages, so both use
// per c-step 3 multipliers, 2 adders, 1 subtractor (and the shifter for DFG1).
//
// Schedule (cycle 0 is S0 of the first stage, the cycle after the edge that
// loads the input registers) and binding:
//   unit  c-step   DFG2 (mode1)           DFG1 (mode0)
//   MUL0  S0-S1    N0 a*b      cyc 0-1    O3 e*f          cyc 0-1
//   SHR0  S0-S1    -                      O4 shr(g,h)     cyc 0-1
//   ADD0  S0       N6 e+f      cyc 0      O0 a+b          cyc 0
//   ADD0  S1       N3 g+h      cyc 1      -
//   SUB0  S0       N1 c-d      cyc 0      O1 c-d          cyc 0
//   SUB0  S1       N4 i-j      cyc 1      O5 O3-O4        cyc 3
//   ADD1  S0       N2 N0+N1    cyc 2      O7 i+j          cyc 0
//   ADD1  S1       N7 N2+N6    cyc 3      O6 O2+O5        cyc 5
//   MUL1  S0-S1    N5 N3*N4    cyc 2-3    O2 O0*O1        cyc 2-3
//   MUL2  S0-S1    N8 N7*N5    cyc 4-5    O8 O6*O7        cyc 6-7
// The schedule, the unit counts, the latencies and the binding of DFG2 first
// and DFG1's compatible operations onto the same units follow the document;
// the exact pairing of operations onto units, the register set and the data
// width are this design's own choices. The result appears 6 cycles (DFG2) or
// 8 cycles (DFG1) after its sample is accepted, on one cycle with out_valid.
//
// Every register's load command is a product of a c-step and, where the two
// modes differ, the mode, as in "ld = S0.mode0 + S0.mode1 = S0". Arithmetic is
// unsigned modulo 2^W; shr(g,h) is a logical right shift of g by h bits.
module eq_multimode
  import mm_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  mode_e        mode_req,   // MODE0: DFG1 (x), MODE1: DFG2 (y)
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] din [10],   // a, b, c, d, e, f, g, h, i, j
  output logic         out_valid,
  output logic [W-1:0] dout,
  output mode_e        mode,
  output logic         busy,       // a sample is in flight
  output logic         switch_wait
);

  localparam int unsigned A = 0, B = 1, C = 2, D = 3, E = 4,
                          F = 5, G = 6, H = 7, I = 8, J = 9;
  localparam int unsigned S0 = 0, S1 = 1;

  logic [0:0] cstep;
  logic [1:0] enter;

  mm_controller #(.NSTEPS(2), .LAT0(8), .LAT1(6), .MODE_RST(MODE1)) u_ctrl (
    .clk, .rst_n, .mode_req, .in_valid, .in_ready,
    .cstep, .enter, .mode, .out_valid, .busy, .switch_wait
  );

  // ---------------------------------------------------------------- registers
  logic [W-1:0] r_in [10];
  logic [W-1:0] r_mul0, r_shr, r_mul1, r_mul2;
  logic [W-1:0] r_add0_0, r_add0_1, r_sub0_0, r_sub0_1, r_add1_0, r_add1_1;
  logic [W-1:0] p_add0, p_sub0;
  logic [W-1:0] p_o7 [3];

  // ------------------------------------------------------------ load commands
  logic m0, m1;
  logic ld_in, ld_mul0, ld_shr, ld_add0_0, ld_add0_1, ld_sub0_0, ld_sub0_1;
  logic ld_add1_0, ld_add1_1, ld_p_add0, ld_p_sub0, ld_p_o7, ld_mul1, ld_mul2;

  always_comb begin
    m0 = (mode == MODE0);
    m1 = (mode == MODE1);
    ld_in     = enter[S0];
    ld_mul0   = enter[S0];
    ld_shr    = enter[S0] & m0;
    ld_add0_0 = enter[S1];
    ld_add0_1 = enter[S0] & m1;
    ld_sub0_0 = enter[S1];
    ld_sub0_1 = enter[S0];
    ld_add1_0 = enter[S1];
    ld_add1_1 = enter[S0];
    ld_p_add0 = enter[S0];
    ld_p_sub0 = enter[S0] & m0;
    ld_p_o7   = enter[S0] & m0;
    ld_mul1   = enter[S0];
    ld_mul2   = enter[S0];
  end

  // ------------------------------------------------- operand steering (muxes)
  logic [W-1:0] mul0_a, mul0_b, mul1_a, mul1_b, mul2_a, mul2_b;
  logic [W-1:0] add0_a, add0_b, add1_a, add1_b, sub0_a, sub0_b;

  always_comb begin
    // 2-cycle units: same operands in both c-steps
    mul0_a = m0 ? r_in[E] : r_in[A];
    mul0_b = m0 ? r_in[F] : r_in[B];
    mul1_a = m0 ? p_add0  : r_add0_1;
    mul1_b = m0 ? p_sub0  : r_sub0_1;
    mul2_a = r_add1_1;
    mul2_b = m0 ? p_o7[2] : r_mul1;
    if (cstep == 1'(S0)) begin
      add0_a = m0 ? r_in[A] : r_in[E];
      add0_b = m0 ? r_in[B] : r_in[F];
      sub0_a = r_in[C];
      sub0_b = r_in[D];
      add1_a = m0 ? r_in[I] : r_mul0;
      add1_b = m0 ? r_in[J] : r_sub0_0;
    end else begin
      add0_a = r_in[G];
      add0_b = r_in[H];
      sub0_a = m0 ? r_mul0 : r_in[I];
      sub0_b = m0 ? r_shr  : r_in[J];
      add1_a = m0 ? r_mul1   : r_add1_0;
      add1_b = m0 ? r_sub0_1 : p_add0;
    end
  end

  // --------------------------------------------------------- functional units
  logic [W-1:0] add0_y, add1_y, sub0_y, mul0_y, mul1_y, mul2_y, shr0_y;

  always_comb begin
    add0_y = add0_a + add0_b;
    add1_y = add1_a + add1_b;
    sub0_y = sub0_a - sub0_b;
    mul0_y = W'(mul0_a * mul0_b);
    mul1_y = W'(mul1_a * mul1_b);
    mul2_y = W'(mul2_a * mul2_b);
    shr0_y = r_in[G] >> r_in[H];
  end

  always_ff @(posedge clk) begin
    if (ld_in)     r_in     <= din;
    if (ld_mul0)   r_mul0   <= mul0_y;
    if (ld_shr)    r_shr    <= shr0_y;
    if (ld_add0_0) r_add0_0 <= add0_y;
    if (ld_add0_1) r_add0_1 <= add0_y;
    if (ld_sub0_0) r_sub0_0 <= sub0_y;
    if (ld_sub0_1) r_sub0_1 <= sub0_y;
    if (ld_add1_0) r_add1_0 <= add1_y;
    if (ld_add1_1) r_add1_1 <= add1_y;
    if (ld_p_add0) p_add0   <= r_add0_0;
    if (ld_p_sub0) p_sub0   <= r_sub0_0;
    if (ld_p_o7)   p_o7     <= '{r_add1_0, p_o7[0], p_o7[1]};
    if (ld_mul1)   r_mul1   <= mul1_y;
    if (ld_mul2)   r_mul2   <= mul2_y;
  end

  assign dout = r_mul2;

  // 2-cycle units: the operands seen in S1 are those of S0.
  a_two_cycle_ops : assert property (@(posedge clk) disable iff (!rst_n)
    (cstep == 1'(S1)) |-> $stable({mul0_a, mul0_b, mul1_a, mul1_b, mul2_a, mul2_b,
                                   r_in[G], r_in[H]}));

endmodule
