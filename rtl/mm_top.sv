// Three multimode architectures side by side.
//
// Each instance is an independent multimode core: one shared datapath and one
// shared controller that run either of two time-wise mutually exclusive data
// flow graphs, chosen by its mode input, at a fixed throughput.
//   eq_*  : two arithmetic expressions, one sample every 2 cycles
//           (3 multipliers, 2 adders, 1 subtractor, 1 shifter)
//   f2_*  : the small two-graph example, one sample every 2 cycles
//           (2 adders, 1 subtractor, 1 multiplier)
//   fft_* : 4-point FFT, decimation in time or in frequency, one transform
//           every 3 cycles (4 multipliers, 2 adders, 2 subtractors)
// Every core has a valid/ready input (ready only at the start of a sample
// period, and low while a requested mode change waits for the pipeline to
// drain), a one-cycle out_valid, and busy while samples are in flight. See each core for its schedule and
// latencies. The cores share only the clock and the synchronous active-low
// reset.
module mm_top
  import mm_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  // two-expression core
  input  mode_e        eq_mode_req,
  input  logic         eq_in_valid,
  output logic         eq_in_ready,
  input  logic [W-1:0] eq_din [10],
  output logic         eq_out_valid,
  output logic [W-1:0] eq_dout,
  output mode_e        eq_mode,
  output logic         eq_busy,
  output logic         eq_switch_wait,
  // small two-graph example core
  input  mode_e        f2_mode_req,
  input  logic         f2_in_valid,
  output logic         f2_in_ready,
  input  logic [W-1:0] f2_din [5],
  output logic         f2_out_valid,
  output logic [W-1:0] f2_dout,
  output logic [3:0]   f2_ld_r,
  output mode_e        f2_mode,
  output logic         f2_busy,
  output logic         f2_switch_wait,
  // DIT/DIF FFT core
  input  mode_e        fft_mode_req,
  input  logic         fft_in_valid,
  output logic         fft_in_ready,
  input  logic [W-1:0] fft_din [4],
  input  logic [W-1:0] fft_coef [4],
  output logic         fft_out_valid,
  output logic [W-1:0] fft_dout [4],
  output mode_e        fft_mode,
  output logic         fft_busy,
  output logic         fft_switch_wait
);

  eq_multimode #(.W(W)) u_eq (
    .clk, .rst_n,
    .mode_req(eq_mode_req), .in_valid(eq_in_valid), .in_ready(eq_in_ready),
    .din(eq_din), .out_valid(eq_out_valid), .dout(eq_dout),
    .mode(eq_mode), .busy(eq_busy), .switch_wait(eq_switch_wait)
  );

  fig2_multimode #(.W(W)) u_f2 (
    .clk, .rst_n,
    .mode_req(f2_mode_req), .in_valid(f2_in_valid), .in_ready(f2_in_ready),
    .din(f2_din), .out_valid(f2_out_valid), .dout(f2_dout), .ld_r(f2_ld_r),
    .mode(f2_mode), .busy(f2_busy), .switch_wait(f2_switch_wait)
  );

  fft4_multimode #(.W(W)) u_fft (
    .clk, .rst_n,
    .mode_req(fft_mode_req), .in_valid(fft_in_valid), .in_ready(fft_in_ready),
    .din(fft_din), .coef(fft_coef), .out_valid(fft_out_valid), .dout(fft_dout),
    .mode(fft_mode), .busy(fft_busy), .switch_wait(fft_switch_wait)
  );

endmodule
