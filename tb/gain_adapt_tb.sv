// gain_adapt_tb: checks the gradient law and the gain register.
//
// A reference accumulator computes acc += hn * ve with the same clamp and
// the theta it implies; after every sample the block's theta must match it.
// The test covers adaptation on and off (theta held), loading a gain,
// saturation at both limits, and a closed loop in which the voltage error
// is made from the gain error, ve = -hn * (theta - theta_true) / 4096,
// where theta must converge to theta_true from above and from below.
module gain_adapt_tb;
  localparam int HW = 12, EW = 10, TW = 16, G = 6;
  logic clk = 0, rst_n = 0, valid = 0, adapt = 0, load = 0;
  logic signed [TW-1:0] load_val = '0;
  logic signed [HW-1:0] hn = '0;
  logic signed [EW-1:0] ve = '0;
  logic signed [TW-1:0] theta;
  int checks = 0, failures = 0;

  function automatic real abs_r(input real v);
    return (v < 0.0) ? -v : v;
  endfunction
  longint acc_ref;
  int n_sat_hi = 0, n_sat_lo = 0;

  gain_adapt #(.HW(HW), .EW(EW), .THETA_W(TW), .G_SHIFT(G)) dut (.*);

  always #5 clk = ~clk;

  localparam longint AMAX = (longint'(32767) << G) + (1 << G) - 1;

  task automatic sample(input int h, input int e, input bit ad);
    @(negedge clk);
    hn = HW'(h); ve = EW'(e); adapt = ad; valid = 1;
    @(negedge clk);
    valid = 0;
    if (ad) begin
      acc_ref = acc_ref + longint'(h) * longint'(e);
      if (acc_ref > AMAX) begin acc_ref = AMAX; n_sat_hi++; end
      if (acc_ref < 0)    begin acc_ref = 0;    n_sat_lo++; end
    end
    checks++;
    if (int'(theta) != int'(acc_ref >>> G)) begin
      failures++;
      $display("FAIL theta=%0d ref=%0d", theta, acc_ref >>> G);
    end
  endtask

  task automatic do_load(input int v);
    @(negedge clk);
    load = 1; load_val = TW'(v);
    @(negedge clk);
    load = 0;
    acc_ref = longint'(v) << G;
    checks++;
    if (int'(theta) != v) begin failures++; $display("FAIL load %0d", theta); end
  endtask

  task automatic converge(input int theta_true);
    int h, e;
    for (int i = 0; i < 4000; i++) begin
      h = int'($urandom % 401) - 200;
      e = (-h * (int'(theta) - theta_true)) / 4096;
      if (e > 511) e = 511;
      if (e < -512) e = -512;
      sample(h, e, 1);
    end
    checks++;
    if (abs_r(real'(theta) - real'(theta_true)) > 64) begin
      failures++;
      $display("FAIL no convergence: theta=%0d target=%0d", theta, theta_true);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    acc_ref = longint'(3723) << G;
    checks++;
    if (theta != 3723) begin failures++; $display("FAIL reset theta %0d", theta); end
    // random updates with adaptation on and off
    for (int i = 0; i < 500; i++)
      sample(int'($urandom % 4096) - 2048, int'($urandom % 1024) - 512, ($urandom % 4) != 0);
    // adaptation off: theta held whatever the inputs
    do_load(4096);
    for (int i = 0; i < 50; i++) sample(1000, 300, 0);
    // saturation at both ends
    do_load(32000);
    for (int i = 0; i < 200; i++) sample(2000, 500, 1);
    do_load(100);
    for (int i = 0; i < 200; i++) sample(2000, -500, 1);
    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0) begin failures++; $display("FAIL no saturation"); end
    // closed-loop convergence from +30 % and -30 % gain error
    do_load(5325); converge(4096);
    do_load(2867); converge(4096);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
