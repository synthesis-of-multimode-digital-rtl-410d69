// Two-mode example datapath with control-similarity scheduling.
//
//   mode0 (DFG1): O0 = p+q, O1 = r+s, O2 = O0-O1, out = O2*t
//   mode1 (DFG2): N0 = p+q, N1 = r+s, N2 = N0-t,  out = N2*N1
//
// The two graphs share 2 adders (ADD1 runs O0/N0, ADD2 runs O1/N1), one
// subtractor and one 2-cycle multiplier. A sample enters every 2 cycles and
// runs in 2 pipeline stages of two c-steps: both adders in S0, the subtractor
// in S1, the multiplier over S0-S1 of the second stage. Because DFG2's N1 is
// scheduled in S0 like DFG1's O1, the merged adder input registers R1..R4 all
// load at the start of S0 in both modes (ld_R = S0.mode0 + S0.mode1 = S0), so
// register sharing costs no extra control gates. The adder inputs come from
// the same sources in both modes and need no multiplexer; the only steering is
// the subtractor's right operand (O1 result or t) and the multiplier's right
// operand register Rm (t or the N1 result).
//
// Registers: R1..R4 (adder operands, ld S0), R5 (t, ld S0), V15/V16 (adder
// results, ld S1), V17 (difference, ld S0), Rm (multiplier operand, ld S0),
// V19 (product, ld S0). The result appears 4 cycles after the edge that
// accepted the sample, for one cycle with out_valid.
// The graphs, schedule, unit counts, latencies, register sharing and load
// commands follow the document; the names p..t of the graph inputs, the
// register R5 that holds t for the second stage, and the width are this
// design's own. Arithmetic is unsigned modulo 2^W.
module fig2_multimode
  import mm_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  mode_e        mode_req,  // MODE0: DFG1, MODE1: DFG2
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] din [5],   // p, q, r, s, t
  output logic         out_valid,
  output logic [W-1:0] dout,
  output logic [3:0]   ld_r,      // load commands of R1..R4 (for observation)
  output mode_e        mode,
  output logic         busy,       // a sample is in flight
  output logic         switch_wait
);

  localparam int unsigned S0 = 0, S1 = 1;

  logic [0:0] cstep;
  logic [1:0] enter;

  mm_controller #(.NSTEPS(2), .LAT0(4), .LAT1(4), .MODE_RST(MODE0)) u_ctrl (
    .clk, .rst_n, .mode_req, .in_valid, .in_ready,
    .cstep, .enter, .mode, .out_valid, .busy, .switch_wait
  );

  logic [W-1:0] r [1:5];
  logic [W-1:0] v15, v16, v17, rm, v19;
  logic         m0;

  // Load commands: the OR of the single-mode commands. With this schedule
  // every one of them reduces to a bare c-step.
  logic ld_in, ld_v15, ld_v16, ld_v17, ld_rm, ld_v19;
  always_comb begin
    m0     = (mode == MODE0);
    ld_in  = (enter[S0] & m0) | (enter[S0] & ~m0);
    ld_v15 = enter[S1];
    ld_v16 = enter[S1];
    ld_v17 = enter[S0];
    ld_rm  = enter[S0];
    ld_v19 = enter[S0];
    ld_r   = {4{ld_in}};
  end

  logic [W-1:0] add1_y, add2_y, sub_b, sub_y, rm_d, mul_y;
  always_comb begin
    add1_y = r[1] + r[2];
    add2_y = r[3] + r[4];
    sub_b  = m0 ? v16 : r[5];
    sub_y  = v15 - sub_b;
    rm_d   = m0 ? r[5] : v16;
    mul_y  = W'(v17 * rm);
  end

  always_ff @(posedge clk) begin
    if (ld_in) begin
      r[1] <= din[0];
      r[2] <= din[1];
      r[3] <= din[2];
      r[4] <= din[3];
      r[5] <= din[4];
    end
    if (ld_v15) v15 <= add1_y;
    if (ld_v16) v16 <= add2_y;
    if (ld_v17) v17 <= sub_y;
    if (ld_rm)  rm  <= rm_d;
    if (ld_v19) v19 <= mul_y;
  end

  assign dout = v19;

  // R1..R4 load exactly at the end of S1, whatever the mode.
  a_ld_r_is_s0 : assert property (@(posedge clk) disable iff (!rst_n)
    (ld_r != '0) == (cstep == 1'(S1)));

endmodule
