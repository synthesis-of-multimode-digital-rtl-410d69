// End-to-end testbench of the three multimode cores, all at their default
// sizes. All three are driven at once with random data; each goes through
// full-rate streaming, gapped input, and several mode changes requested while
// samples are in flight (so the input waits for the pipeline to drain). Every
// result is compared with the graphs evaluated here, with its latency. At the
// end it counts, per core, mode switches, drain waits and full-rate input
// intervals, and fails if any of these never happened.
module tb_mm_top;
  import mm_pkg::*;
  localparam int unsigned W = 16;
  typedef logic [W-1:0] word_t;

  logic  clk = 0, rst_n = 0;
  mode_e eq_mode_req = MODE1, f2_mode_req = MODE0, fft_mode_req = MODE0;
  logic  eq_in_valid = 0, f2_in_valid = 0, fft_in_valid = 0;
  logic  eq_in_ready, f2_in_ready, fft_in_ready;
  logic  eq_out_valid, f2_out_valid, fft_out_valid;
  logic  eq_switch_wait, f2_switch_wait, fft_switch_wait;
  logic  eq_busy, f2_busy, fft_busy;
  word_t eq_din [10], f2_din [5], fft_din [4], fft_coef [4], fft_dout [4];
  word_t eq_dout, f2_dout;
  logic [3:0] f2_ld_r;
  mode_e eq_mode, f2_mode, fft_mode;

  mm_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // per core: 0 = eq, 1 = f2, 2 = fft
  typedef struct { word_t v [4]; longint t; int lat; } exp_t;
  exp_t q [3][$];
  int n_acc [3], n_out [3], n_switch [3], n_wait [3], n_fast [3];
  longint last_acc [3];
  mode_e prev_mode [3];
  int period [3] = '{2, 2, 3};

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  function automatic word_t ref_eq(logic m0, word_t v [10]);
    if (m0) return W'((W'((v[0] + v[1]) * (v[2] - v[3])) + W'(v[4] * v[5]) - (v[6] >> v[7]))
                      * (v[8] + v[9]));
    return W'((W'(v[0] * v[1]) + (v[2] - v[3]) + (v[4] + v[5])) * W'((v[6] + v[7]) * (v[8] - v[9])));
  endfunction

  function automatic word_t ref_f2(logic m0, word_t v [5]);
    if (m0) return W'(((v[0] + v[1]) - (v[2] + v[3])) * v[4]);
    return W'(((v[0] + v[1]) - v[4]) * (v[2] + v[3]));
  endfunction

  function automatic void ref_fft(logic dit, word_t x [4], word_t c [4], output word_t X [4]);
    word_t a0, a1, b0, b1;
    if (dit) begin
      a0 = x[0] + W'(c[0] * x[2]);  a1 = x[0] - W'(c[0] * x[2]);
      b0 = x[1] + W'(c[1] * x[3]);  b1 = x[1] - W'(c[1] * x[3]);
      X = '{a0 + W'(c[2] * b0), a1 + W'(c[3] * b1), a0 - W'(c[2] * b0), a1 - W'(c[3] * b1)};
    end else begin
      a0 = x[0] + x[2];  a1 = W'(c[0] * (x[0] - x[2]));
      b0 = x[1] + x[3];  b1 = W'(c[1] * (x[1] - x[3]));
      X = '{a0 + b0, a1 + b1, W'(c[2] * (a0 - b0)), W'(c[3] * (a1 - b1))};
    end
  endfunction

  task automatic note_accept(int k, exp_t e);
    e.t = cyc;
    q[k].push_back(e);
    if (cyc - last_acc[k] == longint'(period[k])) n_fast[k]++;
    last_acc[k] = cyc;
    n_acc[k]++;
  endtask

  task automatic note_output(int k, word_t got [4], int nwords);
    exp_t e;
    chk(q[k].size() > 0, "output without input");
    if (q[k].size() > 0) begin
      e = q[k].pop_front();
      for (int i = 0; i < nwords; i++) chk(got[i] === e.v[i], $sformatf("core %0d word %0d", k, i));
      // out_valid is seen at the edge that ends its cycle, one edge later
      chk(cyc - e.t - 1 == longint'(e.lat), $sformatf("core %0d latency %0d", k, cyc - e.t - 1));
    end
    n_out[k]++;
  endtask

  always @(posedge clk) if (rst_n) begin
    exp_t e;
    word_t got [4];
    if (eq_in_valid && eq_in_ready) begin
      chk(eq_mode == eq_mode_req, "eq runs the requested mode");
      e.v[0] = ref_eq(eq_mode == MODE0, eq_din);
      e.lat  = (eq_mode == MODE0) ? 8 : 6;
      note_accept(0, e);
    end
    if (f2_in_valid && f2_in_ready) begin
      chk(f2_mode == f2_mode_req, "f2 runs the requested mode");
      e.v[0] = ref_f2(f2_mode == MODE0, f2_din);
      e.lat  = 4;
      note_accept(1, e);
    end
    if (fft_in_valid && fft_in_ready) begin
      chk(fft_mode == fft_mode_req, "fft runs the requested mode");
      ref_fft(fft_mode == MODE0, fft_din, fft_coef, e.v);
      e.lat = (fft_mode == MODE0) ? 7 : 9;
      note_accept(2, e);
    end
    got = '{eq_dout, 0, 0, 0};
    if (eq_out_valid) note_output(0, got, 1);
    got = '{f2_dout, 0, 0, 0};
    if (f2_out_valid) note_output(1, got, 1);
    if (fft_out_valid) note_output(2, fft_dout, 4);
    if (eq_switch_wait && eq_in_valid) n_wait[0]++;
    if (f2_switch_wait && f2_in_valid) n_wait[1]++;
    if (fft_switch_wait && fft_in_valid) n_wait[2]++;
    if (eq_mode != prev_mode[0]) n_switch[0]++;
    if (f2_mode != prev_mode[1]) n_switch[1]++;
    if (fft_mode != prev_mode[2]) n_switch[2]++;
    prev_mode <= '{eq_mode, f2_mode, fft_mode};
  end

  // Stimulus: each cycle new random data; valid is high always (dense phase)
  // or 2 cycles in 3 (sparse phase).
  logic dense = 1;
  always @(posedge clk) begin
    eq_in_valid  <= rst_n && (dense || $urandom_range(0, 2) != 0);
    f2_in_valid  <= rst_n && (dense || $urandom_range(0, 2) != 0);
    fft_in_valid <= rst_n && (dense || $urandom_range(0, 2) != 0);
    foreach (eq_din[i])  eq_din[i]  <= (i == 7) ? W'($urandom_range(0, 17)) : W'($urandom);
    foreach (f2_din[i])  f2_din[i]  <= W'($urandom);
    foreach (fft_din[i]) fft_din[i] <= W'($urandom);
  end

  initial begin
    foreach (eq_din[i]) eq_din[i] = '0;
    foreach (f2_din[i]) f2_din[i] = '0;
    foreach (fft_din[i]) fft_din[i] = '0;
    foreach (fft_coef[i]) fft_coef[i] = W'($urandom);
    foreach (last_acc[k]) last_acc[k] = -10;
    prev_mode = '{MODE1, MODE0, MODE0};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int ph = 0; ph < 8; ph++) begin
      dense <= (ph % 3 != 2);
      repeat (60) @(posedge clk);
      // request the other mode while samples are in flight
      eq_mode_req <= (eq_mode_req == MODE0) ? MODE1 : MODE0;
      f2_mode_req <= (f2_mode_req == MODE0) ? MODE1 : MODE0;
      // the FFT coefficients are configuration: hold input, drain, then change
      fft_in_valid <= 0;
      force fft_in_valid = 0;
      @(posedge clk);
      while (fft_busy) @(posedge clk);
      foreach (fft_coef[i]) fft_coef[i] <= W'($urandom);
      fft_mode_req <= (fft_mode_req == MODE0) ? MODE1 : MODE0;
      @(posedge clk);
      release fft_in_valid;
    end
    dense <= 0;
    force eq_in_valid = 0;
    force f2_in_valid = 0;
    force fft_in_valid = 0;
    repeat (20) @(posedge clk);
    for (int k = 0; k < 3; k++) begin
      chk(q[k].size() == 0 && n_acc[k] == n_out[k] && n_acc[k] > 100, $sformatf("core %0d delivered all", k));
      chk(n_switch[k] >= 8, $sformatf("core %0d mode switches", k));
      chk(n_fast[k] >= 50, $sformatf("core %0d full-rate input", k));
      $display("core %0d: %0d samples, %0d mode switches, %0d full-rate accepts, %0d drain-wait cycles",
               k, n_acc[k], n_switch[k], n_fast[k], n_wait[k]);
    end
    chk(n_wait[0] > 0, "eq drain wait");
    chk(n_wait[1] > 0, "f2 drain wait");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
