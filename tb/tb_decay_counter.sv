// tb_decay_counter: self-checking test of the per-module decay counter.
//
// A reference model counts the consecutive idle cycles before the current
// one. The module must be wanted on while accessed or while fewer than 15
// idle cycles precede the current cycle, i.e. the off request appears in the
// 16th consecutive idle cycle; the count must equal 15 minus the idle run,
// floored at zero. A directed phase checks that latency exactly, then a
// random phase mixes dense and sparse access patterns.
module tb_decay_counter;
  localparam int unsigned WIDTH = 4;
  logic clk = 1'b0, rst_n = 1'b0, access = 1'b0;
  logic want_on;
  logic [WIDTH-1:0] count;
  int checks = 0, failures = 0;
  int idle = 0;
  int cyc = 0;

  decay_counter #(.WIDTH(WIDTH)) dut (.clk, .rst_n, .access, .want_on, .count);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    int exp_cnt;
    logic exp_want;
    exp_cnt  = (idle >= 15) ? 0 : 15 - idle;
    exp_want = access || (idle < 15);
    checks++;
    if (want_on !== exp_want || int'(count) != exp_cnt) begin
      failures++;
      $display("cycle %0d: access=%0b idle=%0d want_on=%0b (exp %0b) count=%0d (exp %0d)",
               cyc, access, idle, want_on, exp_want, count, exp_cnt);
    end
  endtask

  // Drive one cycle: apply access, check before the edge, update the model.
  task automatic step(logic a);
    access = a;
    #1 check_now();
    @(posedge clk);
    #1;
    cyc++;
    idle = a ? 0 : idle + 1;
  endtask

  initial begin
    int first_off;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // Directed: one access, then idle; want_on must drop in the 16th idle cycle.
    step(1'b1);
    first_off = -1;
    for (int i = 1; i <= 20; i++) begin
      access = 1'b0;
      #1;
      if (!want_on && first_off < 0) first_off = i;
      check_now();
      @(posedge clk); #1; cyc++; idle++;
    end
    checks++;
    if (first_off != 16) begin
      failures++;
      $display("off request in idle cycle %0d, expected 16", first_off);
    end
    // A new access while decayed raises want_on in the same cycle.
    step(1'b1);
    // Random phases of dense and sparse accesses.
    for (int ph = 0; ph < 200; ph++) begin
      int unsigned p = (ph % 3 == 0) ? 80 : (ph % 3 == 1) ? 10 : 3;
      for (int i = 0; i < 40; i++) step(($urandom % 100) < p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
