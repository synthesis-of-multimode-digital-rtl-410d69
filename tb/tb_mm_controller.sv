// Self-checking testbench of the shared multimode controller, at 3 c-steps
// with latencies 5 (mode0) and 2 (mode1). Checks the c-step sequence, the
// one-hot "entering" vector, that inputs are taken only in the last c-step,
// the output-valid latency in each mode, and that a mode change waits until
// no sample is in flight while in_ready stays low.
module tb_mm_controller;
  import mm_pkg::*;
  localparam int unsigned N = 3, L0 = 5, L1 = 2;

  logic         clk = 0, rst_n = 0;
  mode_e        mode_req = MODE0, mode;
  logic         in_valid = 0, in_ready, out_valid, busy, switch_wait;
  logic         accept;
  assign accept = in_valid && in_ready;
  logic [1:0]   cstep;
  logic [N-1:0] enter;

  mm_controller #(.NSTEPS(N), .LAT0(L0), .LAT1(L1), .MODE_RST(MODE0)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_switch = 0, n_wait = 0, n_acc = 0, n_out = 0;
  longint cyc = 0;
  longint acc_t[$];
  logic [1:0] exp_step = 0;
  mode_e prev_mode = MODE0;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      chk(cstep == exp_step, "c-step sequence");
      chk(enter == N'(1) << ((exp_step + 1) % N), "enter one-hot");
      chk(in_ready == (exp_step == N - 1 && mode_req == mode), "in_ready");
      exp_step <= (exp_step + 1) % N;
      if (accept) begin acc_t.push_back(cyc); n_acc++; end
      if (out_valid) begin
        n_out++;
        chk(acc_t.size() > 0, "output without input");
        if (acc_t.size() > 0)
          chk(cyc - acc_t.pop_front() - 1 == ((mode == MODE0) ? L0 : L1), "latency");
      end
      if (switch_wait) n_wait++;
      if (mode != prev_mode) begin
        n_switch++;
        chk(acc_t.size() == 0, "mode changed with samples in flight");
      end
      prev_mode <= mode;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int ph = 0; ph < 6; ph++) begin
      repeat (40) begin
        in_valid <= ($urandom_range(0, 3) != 0);
        @(posedge clk);
      end
      mode_req <= (mode_req == MODE0) ? MODE1 : MODE0;
    end
    in_valid <= 0;
    repeat (12) @(posedge clk);
    chk(n_acc == n_out && n_acc > 40, "all samples delivered");
    chk(n_switch >= 5, "mode switches happened");
    chk(n_wait > 0, "drain wait happened");
    $display("mm_controller: %0d samples, %0d switches, %0d drain cycles", n_acc, n_switch, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
