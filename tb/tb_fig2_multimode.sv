// Self-checking testbench of the two-mode example datapath. Streams random
// samples in both modes with mode switches, compares each result with the two
// graphs evaluated here, checks the 4-cycle latency and the one-sample-per-2-
// cycles rate, and checks that the load commands of R1..R4 are high exactly at
// the edges that start S0 in both modes.
module tb_fig2_multimode;
  import mm_pkg::*;
  localparam int unsigned W = 16;

  logic         clk = 0, rst_n = 0;
  mode_e        mode_req = MODE0;
  logic         in_valid = 0, in_ready, out_valid, switch_wait, busy;
  logic [W-1:0] din [5];
  logic [W-1:0] dout;
  logic [3:0]   ld_r;
  mode_e        mode;

  fig2_multimode #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { logic [W-1:0] val; longint t; } exp_t;
  exp_t q[$];
  int n_acc = 0, n_out = 0, n_switch = 0, back_to_back = 0, ld_checks = 0;
  longint last_acc = -10;
  mode_e prev_mode;

  always @(posedge clk) if (rst_n && in_valid && in_ready) begin
    exp_t e;
    if (mode == MODE0) e.val = W'(((din[0] + din[1]) - (din[2] + din[3])) * din[4]);
    else               e.val = W'(((din[0] + din[1]) - din[4]) * (din[2] + din[3]));
    e.t = cyc;
    q.push_back(e);
    if (cyc - last_acc == 2) back_to_back++;
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
      if (dout !== e.val) begin failures++; $display("FAIL: dout=%h exp=%h", dout, e.val); end
      checks++;
      // out_valid is seen at the edge that ends its cycle, one edge later
      if (cyc - e.t - 1 != 4) begin failures++; $display("FAIL: latency %0d", cyc - e.t - 1); end
    end
    n_out++;
  end

  // R1..R4 load at every edge where S1 ends (entering S0), in either mode,
  // and never otherwise; in_ready marks the same edges.
  always @(posedge clk) if (rst_n) begin
    checks++;
    ld_checks++;
    if (ld_r !== {4{dut.cstep == 1'b1}}) begin
      failures++; $display("FAIL: ld_r=%b cstep=%0d", ld_r, dut.cstep);
    end
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

  initial begin
    foreach (din[k]) din[k] = '0;
    prev_mode = MODE0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    drive(20, 0);
    mode_req <= MODE1; drive(20, 0);
    mode_req <= MODE0; drive(10, 1);
    mode_req <= MODE1; drive(10, 1);
    repeat (12) @(posedge clk);
    checks++;
    if (q.size() != 0 || n_out != n_acc) begin failures++; $display("FAIL: %0d in, %0d out", n_acc, n_out); end
    checks++;
    if (n_switch < 3) begin failures++; $display("FAIL: %0d mode switches", n_switch); end
    checks++;
    if (back_to_back < 30) begin failures++; $display("FAIL: rate, %0d back-to-back", back_to_back); end
    $display("fig2_multimode: %0d samples, %0d mode switches, %0d load-command checks",
             n_acc, n_switch, ld_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
