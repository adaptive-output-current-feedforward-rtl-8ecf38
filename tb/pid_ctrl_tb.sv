// pid_ctrl_tb: checks the PID controller against a reference model.
//
// The reference keeps the error history and an accumulator of
// KP*(e-e1) + KI*e + KD*(e-2e1+e2), written in the positional PID terms
// rather than the block's K0/K1/K2 form, with the same clamp. After every
// sample u must equal acc/256 and u_valid must pulse one clock after valid.
// Constant errors drive the output into both clamps (anti-windup).
module pid_ctrl_tb;
  localparam int EW = 10, UW = 12;
  localparam int KP = 256, KI = 16, KD = 2560;
  logic clk = 0, rst_n = 0, valid = 0;
  logic signed [EW-1:0] e = '0;
  logic signed [UW-1:0] u;
  logic u_valid;
  int checks = 0, failures = 0;
  longint acc = 0;
  int e1 = 0, e2 = 0, n_hi = 0, n_lo = 0;
  localparam longint AMAX = (longint'(2047) << 8) + 255;

  pid_ctrl #(.EW(EW), .UW(UW), .KP(KP), .KI(KI), .KD(KD)) dut (.*);

  always #5 clk = ~clk;

  task automatic sample(input int ev);
    @(negedge clk);
    e = EW'(ev); valid = 1;
    @(negedge clk);
    valid = 0;
    acc = acc + longint'(KP) * (ev - e1) + longint'(KI) * ev
              + longint'(KD) * (ev - 2 * e1 + e2);
    if (acc > AMAX) begin acc = AMAX; n_hi++; end
    if (acc < 0)    begin acc = 0;    n_lo++; end
    e2 = e1; e1 = ev;
    checks++;
    if (int'(u) != int'(acc >>> 8) || !u_valid) begin
      failures++;
      $display("FAIL e=%0d u=%0d ref=%0d v=%0b", ev, u, acc >>> 8, u_valid);
    end
    @(negedge clk);
    checks++;
    if (u_valid) begin failures++; $display("FAIL u_valid longer than 1"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) sample(20);
    for (int i = 0; i < 300; i++) sample(-30);
    for (int i = 0; i < 2000; i++) sample(int'($urandom % 61) - 30);
    for (int i = 0; i < 200; i++) sample(int'($urandom % 1024) - 512);
    checks++;
    if (n_hi == 0 || n_lo == 0) begin failures++; $display("FAIL clamps not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
