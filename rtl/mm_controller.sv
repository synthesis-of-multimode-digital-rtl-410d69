// Shared controller of a multimode architecture.
//
// One controller serves every mode: its state is the current control step
// (c-step) S0..S(NSTEPS-1) of the pipelined schedule, which repeats every
// NSTEPS cycles (the throughput constraint). The datapath decodes its register
// load commands and multiplexer selects from the c-step and the mode, as the
// OR of the single-mode commands. `enter` is one-hot on the c-step that starts
// at the next clock edge; a register whose load command is "Sk" captures at
// the edge that begins Sk, so it holds its value during Sk.
//
// Interface and timing:
//  * in_ready is high in the last c-step: the datapath's input registers load
//    at the edge that starts S0, so a new sample can enter every NSTEPS cycles.
//    A sample is accepted when in_valid && in_ready. busy is high from the
//    accepting edge until the longer of the two latencies has passed.
//  * out_valid is high for one cycle, cycle LAT0 (mode0) or LAT1 (mode1) of the
//    sample, where cycle 0 is the cycle right after the accepting edge.
//  * mode_req selects the mode. The modes are mutually exclusive, so a change
//    is taken only once no sample is in flight: meanwhile in_ready stays low
//    (switch_wait is high) and the pipeline drains; the new mode starts with
//    a sample period, so it is constant from S0 to the last c-step.
//  * rst_n is a synchronous, active-low reset.
// The c-step encoding, the handshake and the drain-before-switch rule are this
// design's own choices; the document gives the shared controller and the
// c-step/mode form of the load commands.
module mm_controller
  import mm_pkg::*;
#(
  parameter int unsigned NSTEPS = 2,   // c-steps per sample period
  parameter int unsigned LAT0   = 8,   // output latency in mode0 (cycles)
  parameter int unsigned LAT1   = 6,   // output latency in mode1 (cycles)
  parameter mode_e       MODE_RST = MODE0,
  localparam int unsigned CW   = (NSTEPS > 1) ? $clog2(NSTEPS) : 1,
  localparam int unsigned LMAX = (LAT0 > LAT1) ? LAT0 : LAT1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mode_e             mode_req,
  input  logic              in_valid,
  output logic              in_ready,
  output logic [CW-1:0]     cstep,
  output logic [NSTEPS-1:0] enter,
  output mode_e             mode,
  output logic              out_valid,
  output logic              busy,
  output logic              switch_wait
);

  logic [CW-1:0] cstep_nxt;
  logic [LMAX:0] vld;  // vld[k]: a sample accepted k cycles ago
  logic          accept;

  always_comb begin
    cstep_nxt = (cstep == CW'(NSTEPS - 1)) ? '0 : cstep + CW'(1);
    enter     = '0;
    enter[cstep_nxt] = 1'b1;
  end

  assign busy        = |vld;
  assign switch_wait = (mode_req != mode);
  assign in_ready    = enter[0] && !switch_wait;
  assign accept      = in_valid && in_ready;
  assign out_valid   = (mode == MODE0) ? vld[LAT0] : vld[LAT1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cstep <= '0;
      vld   <= '0;
      mode  <= MODE_RST;
    end else begin
      cstep <= cstep_nxt;
      vld   <= {vld[LMAX-1:0], accept};
      if (switch_wait && !busy && enter[0]) mode <= mode_req;
    end
  end

  // The mode never changes while a sample is in flight.
  a_mode_stable : assert property (@(posedge clk) disable iff (!rst_n)
    busy |=> $stable(mode));
  // A new mode starts with a sample period.
  a_mode_at_s0 : assert property (@(posedge clk) disable iff (!rst_n)
    !$stable(mode) |-> (cstep == '0));
  // Samples enter only at the start of a sample period.
  a_accept_s0 : assert property (@(posedge clk) disable iff (!rst_n)
    accept |=> (cstep == '0));

endmodule
