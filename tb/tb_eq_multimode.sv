// Self-checking testbench of the two-expression multimode datapath.
// Streams random samples in both modes, switches mode several times, and
// compares every result with the expressions evaluated here. It also checks
// the latency (8 cycles in mode0, 6 in mode1), that a sample is accepted every
// 2 cycles when in_valid stays high, and that no result is lost or invented.
module tb_eq_multimode;
  import mm_pkg::*;
  localparam int unsigned W = 16;

  logic         clk = 0, rst_n = 0;
  mode_e        mode_req = MODE1;
  logic         in_valid = 0, in_ready, out_valid, switch_wait, busy;
  logic [W-1:0] din [10];
  logic [W-1:0] dout;
  mode_e        mode;

  eq_multimode #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { logic [W-1:0] val; longint t; int lat; } exp_t;
  exp_t q[$];
  int n_acc = 0, n_out = 0, n_switch = 0, back_to_back = 0;
  longint last_acc = -10;

  function automatic logic [W-1:0] ref_x(logic [W-1:0] v [10]);
    logic [W-1:0] t1, t2;
    t1 = W'((v[0] + v[1]) * (v[2] - v[3]));
    t2 = W'(v[4] * v[5]);
    return W'((t1 + t2 - (v[6] >> v[7])) * (v[8] + v[9]));
  endfunction
  function automatic logic [W-1:0] ref_y(logic [W-1:0] v [10]);
    logic [W-1:0] s1, s2;
    s1 = W'(v[0] * v[1]) + (v[2] - v[3]) + (v[4] + v[5]);
    s2 = W'((v[6] + v[7]) * (v[8] - v[9]));
    return W'(s1 * s2);
  endfunction

  // record accepted samples
  always @(posedge clk) if (rst_n && in_valid && in_ready) begin
    exp_t e;
    e.val = (mode == MODE0) ? ref_x(din) : ref_y(din);
    e.t   = cyc;
    e.lat = (mode == MODE0) ? 8 : 6;
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
      if (dout !== e.val) begin
        failures++; $display("FAIL: dout=%h exp=%h", dout, e.val);
      end
      checks++;
      // out_valid is seen at the edge that ends its cycle, one edge later
      if (cyc - e.t - 1 != longint'(e.lat)) begin
        failures++; $display("FAIL: latency %0d exp %0d", cyc - e.t - 1, e.lat);
      end
    end
    n_out++;
  end

  mode_e prev_mode;
  always @(posedge clk) begin
    prev_mode <= mode;
    if (rst_n && prev_mode != mode) n_switch++;
  end

  task automatic drive(int n, int gaps);
    int sent = 0;
    while (sent < n) begin
      in_valid <= (gaps == 0) || ($urandom_range(0, 3) != 0);
      foreach (din[k]) din[k] <= W'($urandom);
      if (($urandom_range(0, 9) == 0)) din[7] <= W'($urandom_range(0, 20));
      @(posedge clk);
      if (in_valid && in_ready) sent++;
    end
    in_valid <= 0;
  endtask

  initial begin
    foreach (din[k]) din[k] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    drive(20, 0);                 // mode1, back to back
    mode_req <= MODE0; drive(20, 0);
    mode_req <= MODE1; drive(15, 1);
    mode_req <= MODE0; drive(15, 1);
    repeat (20) @(posedge clk);
    checks++;
    if (q.size() != 0 || n_out != n_acc) begin
      failures++; $display("FAIL: %0d accepted, %0d produced", n_acc, n_out);
    end
    checks++;
    if (n_switch < 3) begin failures++; $display("FAIL: only %0d mode switches", n_switch); end
    checks++;
    if (back_to_back < 30) begin failures++; $display("FAIL: throughput, %0d back-to-back", back_to_back); end
    $display("eq_multimode: %0d samples, %0d mode switches, %0d accepts 2 cycles apart",
             n_acc, n_switch, back_to_back);
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
