// Self-checking testbench of the two-mode 4-point FFT. Streams random inputs
// through the DIT and the DIF flow graphs with random coefficients and checks
// each transform against the flow-graph equations evaluated here, the latency
// (7 cycles DIT, 9 DIF) and the rate of one transform every 3 cycles. With all
// coefficients 1 it also checks bins 0 and 2 against the 4-point DFT sums,
// X0 = x0+x1+x2+x3 and X2 = x0-x1+x2-x3, in both modes.
module tb_fft4_multimode;
  import mm_pkg::*;
  localparam int unsigned W = 16;
  typedef logic [W-1:0] word_t;

  logic   clk = 0, rst_n = 0;
  mode_e  mode_req = MODE0;
  logic   in_valid = 0, in_ready, out_valid, switch_wait, busy;
  word_t  din [4], coef [4], dout [4];
  mode_e  mode;

  fft4_multimode #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { word_t v [4]; longint t; int lat; logic dft; word_t s0, s2; } exp_t;
  exp_t q[$];
  int n_acc = 0, n_out = 0, n_switch = 0, back_to_back = 0, n_dft = 0;
  longint last_acc = -10;
  mode_e prev_mode;

  function automatic void ref_fft(input logic dit, input word_t x [4], input word_t c [4],
                                  output word_t X [4]);
    word_t a0, a1, b0, b1;
    if (dit) begin
      a0 = x[0] + W'(c[0] * x[2]);  a1 = x[0] - W'(c[0] * x[2]);
      b0 = x[1] + W'(c[1] * x[3]);  b1 = x[1] - W'(c[1] * x[3]);
      X[0] = a0 + W'(c[2] * b0);    X[2] = a0 - W'(c[2] * b0);
      X[1] = a1 + W'(c[3] * b1);    X[3] = a1 - W'(c[3] * b1);
    end else begin
      a0 = x[0] + x[2];  a1 = W'(c[0] * (x[0] - x[2]));
      b0 = x[1] + x[3];  b1 = W'(c[1] * (x[1] - x[3]));
      X[0] = a0 + b0;    X[2] = W'(c[2] * (a0 - b0));
      X[1] = a1 + b1;    X[3] = W'(c[3] * (a1 - b1));
    end
  endfunction

  always @(posedge clk) if (rst_n && in_valid && in_ready) begin
    exp_t e;
    ref_fft(mode == MODE0, din, coef, e.v);
    e.t   = cyc;
    e.lat = (mode == MODE0) ? 7 : 9;
    e.dft = (coef[0] == 1) && (coef[1] == 1) && (coef[2] == 1) && (coef[3] == 1);
    e.s0  = din[0] + din[1] + din[2] + din[3];
    e.s2  = din[0] - din[1] + din[2] - din[3];
    q.push_back(e);
    if (cyc - last_acc == 3) back_to_back++;
    last_acc = cyc;
    n_acc++;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin
      failures++; $display("FAIL: unexpected output");
    end else begin
      e = q.pop_front();
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (dout[k] !== e.v[k]) begin
          failures++; $display("FAIL: mode %0d X%0d=%h exp %h", mode, k, dout[k], e.v[k]);
        end
      end
      checks++;
      // out_valid is seen at the edge that ends its cycle, one edge later
      if (cyc - e.t - 1 != longint'(e.lat)) begin
        failures++; $display("FAIL: latency %0d exp %0d", cyc - e.t - 1, e.lat);
      end
      if (e.dft) begin
        checks += 2;
        n_dft++;
        if (dout[0] !== e.s0) begin failures++; $display("FAIL: DFT bin 0"); end
        if (dout[2] !== e.s2) begin failures++; $display("FAIL: DFT bin 2"); end
      end
    end
    n_out++;
  end

  always @(posedge clk) if (rst_n) begin
    prev_mode <= mode;
    if (prev_mode != mode) n_switch++;
  end

  task automatic drive(int n, int gaps);
    int sent = 0;
    while (sent < n) begin
      in_valid <= (gaps == 0) || ($urandom_range(0, 2) != 0);
      foreach (din[k]) din[k] <= W'($urandom);
      @(posedge clk);
      if (in_valid && in_ready) sent++;
    end
    in_valid <= 0;
  endtask

  // change mode and coefficients once the pipeline has drained
  task automatic reconfigure(mode_e m, logic ones);
    @(posedge clk);
    while (busy) @(posedge clk);
    foreach (coef[k]) coef[k] <= ones ? W'(1) : W'($urandom);
    mode_req <= m;
    @(posedge clk);
  endtask

  initial begin
    foreach (din[k]) din[k] = '0;
    foreach (coef[k]) coef[k] = W'($urandom);
    prev_mode = MODE0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    drive(20, 0);
    reconfigure(MODE1, 0); drive(20, 0);
    reconfigure(MODE0, 1); drive(10, 1);
    reconfigure(MODE1, 1); drive(10, 1);
    reconfigure(MODE0, 0); drive(10, 1);
    repeat (15) @(posedge clk);
    checks++;
    if (q.size() != 0 || n_out != n_acc) begin failures++; $display("FAIL: %0d in, %0d out", n_acc, n_out); end
    checks++;
    if (n_switch < 4) begin failures++; $display("FAIL: %0d mode switches", n_switch); end
    checks++;
    if (back_to_back < 30) begin failures++; $display("FAIL: rate, %0d back-to-back", back_to_back); end
    checks++;
    if (n_dft < 20) begin failures++; $display("FAIL: %0d DFT checks", n_dft); end
    $display("fft4_multimode: %0d transforms, %0d mode switches, %0d DFT-bin checks",
             n_acc, n_switch, n_dft);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
