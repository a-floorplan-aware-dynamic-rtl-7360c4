// tb_didt_queue: self-checking test of the di/dt gating queue.
//
// Part 1 replays the worked example of the controller on the default
// five-entry queue (I-cache 3, branch predictor 2, ALU-1 1, ALU-2 1, ALU-3 1,
// threshold 3): with the head on the branch predictor and both it and ALU-1
// requesting activation, both are granted (step +3) and the head moves two
// entries to ALU-2. A second queue in which ALU-1 weighs 2 grants only the
// branch predictor and the head moves one entry. With ALU-1 requesting
// deactivation instead, both are granted (step +1), and a pending ALU-2
// activation joins the window as well.
// Part 2 drives random request levels into both queues and compares every
// grant, step, state, head and clock enable with a reference model written
// here, and checks that no request waits longer than the bound of a full
// rotation of the head.
module tb_didt_queue;
  import didt_pkg::*;
  localparam int N = 5;
  localparam int DELTA = 3;
  localparam logic [2*N-1:0] W_A = {2'd1, 2'd1, 2'd1, 2'd2, 2'd3};
  localparam logic [2*N-1:0] W_B = {2'd1, 2'd1, 2'd2, 2'd2, 2'd3};
  localparam int SW = WEIGHT_BITS + $clog2(N + 1) + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] want_a, want_b;
  logic [N-1:0] clk_en_a, avail_a, grant_a, clk_en_b, avail_b, grant_b;
  gate_state_e state_a [N], state_b [N];
  logic signed [SW-1:0] step_a, step_b;
  logic [2:0] head_a, head_b;
  int checks = 0, failures = 0;

  didt_queue #(.N(N), .WEIGHTS(W_A), .DELTA(DELTA)) dut_a (
    .clk, .rst_n, .want_on(want_a), .clk_en(clk_en_a), .avail(avail_a),
    .state(state_a), .grant(grant_a), .step(step_a), .head(head_a));
  didt_queue #(.N(N), .WEIGHTS(W_B), .DELTA(DELTA)) dut_b (
    .clk, .rst_n, .want_on(want_b), .clk_en(clk_en_b), .avail(avail_b),
    .state(state_b), .grant(grant_b), .step(step_b), .head(head_b));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  // Bring queue A (and B) to the given stable ON/OFF pattern, then wait until
  // the head of queue A is at position h-1 so that a request raised now is
  // registered just as the head reaches h.
  task automatic settle(logic [N-1:0] on_pattern, int h, bit use_b = 0);
    want_a = on_pattern;
    want_b = on_pattern;
    repeat (4 * N) @(posedge clk);
    #1;
    while (int'(use_b ? head_b : head_a) != (h + N - 1) % N) begin
      @(posedge clk); #1;
    end
  endtask

  // ---------------------------------------------------------------- model
  gate_state_e m_state [N];
  int m_head;
  int m_wait [N];

  function automatic int wgt(int i);
    return int'(W_A[2*i +: 2]);
  endfunction

  task automatic model_check_and_step();
    logic [N-1:0] g;
    int sum, len;
    bit open;
    g = '0; sum = 0; len = 0; open = 1;
    for (int k = 0; k < N; k++) begin
      int idx = (m_head + k) % N;
      if (open) begin
        if (m_state[idx] == G_OFF_ON && sum + wgt(idx) <= DELTA) begin
          sum += wgt(idx); g[idx] = 1; len++;
        end else if (m_state[idx] == G_ON_OFF && sum - wgt(idx) >= -DELTA) begin
          sum -= wgt(idx); g[idx] = 1; len++;
        end else open = 0;
      end
    end
    expect_eq("grant", int'(grant_a), int'(g));
    expect_eq("step", int'(step_a), sum);
    expect_eq("head", int'(head_a), m_head);
    for (int i = 0; i < N; i++) begin
      expect_eq($sformatf("state[%0d]", i), int'(state_a[i]), int'(m_state[i]));
      expect_eq($sformatf("clk_en[%0d]", i), int'(clk_en_a[i]),
                int'(m_state[i] == G_ON || m_state[i] == G_ON_OFF));
    end
    // next state
    m_head = (m_head + (len == 0 ? 1 : len)) % N;
    for (int i = 0; i < N; i++) begin
      if (g[i]) m_state[i] = (m_state[i] == G_OFF_ON) ? G_ON : G_OFF;
      else if (m_state[i] == G_ON && !want_a[i]) m_state[i] = G_ON_OFF;
      else if (m_state[i] == G_OFF && want_a[i]) m_state[i] = G_OFF_ON;
      else if (m_state[i] == G_OFF_ON && !want_a[i]) m_state[i] = G_OFF;
      else if (m_state[i] == G_ON_OFF && want_a[i]) m_state[i] = G_ON;
      if (m_state[i] == G_OFF_ON || m_state[i] == G_ON_OFF) m_wait[i]++;
      else m_wait[i] = 0;
      // A pending request is reached by the head within one rotation and each
      // weight fits the threshold, so it is granted within N cycles.
      if (m_wait[i] > N) begin
        failures++;
        $display("entry %0d pending for %0d cycles", i, m_wait[i]);
      end
    end
  endtask

  initial begin
    want_a = '1; want_b = '1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // Example 1: I-cache ON, Bpred and ALU-1 OFF->ON, ALU-2/ALU-3 OFF.
    settle(5'b00001, 1);
    want_a = 5'b00111; want_b = 5'b00111;
    @(posedge clk); #1;
    expect_eq("ex1 head", int'(head_a), 1);
    expect_eq("ex1 Bpred pending", int'(state_a[1]), int'(G_OFF_ON));
    expect_eq("ex1 ALU-1 pending", int'(state_a[2]), int'(G_OFF_ON));
    expect_eq("ex1 grant", int'(grant_a), 5'b00110);
    expect_eq("ex1 gamma", int'(step_a), 3);
    @(posedge clk); #1;
    expect_eq("ex1 head after", int'(head_a), 3);
    expect_eq("ex1 clk_en", int'(clk_en_a), 5'b00111);

    // Example 2 (queue B, ALU-1 weight 2): only Bpred is granted.
    settle(5'b00001, 1, 1);
    want_b = 5'b00111;
    @(posedge clk); #1;
    expect_eq("ex2 head", int'(head_b), 1);
    expect_eq("ex2 grant", int'(grant_b), 5'b00010);
    expect_eq("ex2 gamma", int'(step_b), 2);
    @(posedge clk); #1;
    expect_eq("ex2 head after", int'(head_b), 2);
    expect_eq("ex2 ALU-1 granted next", int'(grant_b), 5'b00100);

    // Example 3: ALU-1 ON->OFF while Bpred OFF->ON: gamma = 1.
    settle(5'b00101, 1);
    want_a = 5'b00011;
    @(posedge clk); #1;
    expect_eq("ex3 grant", int'(grant_a), 5'b00110);
    expect_eq("ex3 gamma", int'(step_a), 1);
    @(posedge clk); #1;
    expect_eq("ex3 head after", int'(head_a), 3);
    // Example 3 with ALU-2 also requesting activation: the window takes it.
    settle(5'b00101, 1);
    want_a = 5'b01011;
    @(posedge clk); #1;
    expect_eq("ex3b grant", int'(grant_a), 5'b01110);
    expect_eq("ex3b gamma", int'(step_a), 2);
    @(posedge clk); #1;
    expect_eq("ex3b head after", int'(head_a), 4);
    expect_eq("ex3b clk_en", int'(clk_en_a), 5'b01011);

    // Random phase against the model.
    settle('1, 0);
    for (int i = 0; i < N; i++) begin
      m_state[i] = state_a[i];
      m_wait[i]  = 0;
    end
    m_head = int'(head_a);
    for (int c = 0; c < 20000; c++) begin
      if ($urandom % 4 == 0) want_a = N'($urandom);
      want_b = N'($urandom);
      #1 model_check_and_step();
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
