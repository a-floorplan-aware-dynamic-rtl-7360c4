// tb_didt_controller: end-to-end test of the complete di/dt controller at
// its default configuration (23 modules, four quadrant queues, threshold 3,
// 4-bit decay counters, 8-wide fetch).
//
// A synthetic pipeline drives per-module demand and fetch groups through
// four kinds of phases: high ILP (almost every module busy), low ILP with
// long memory stalls (short bursts, then hundreds of idle cycles), a power
// virus that switches the whole machine between full activity and idle every
// 20-40 cycles, and ALU-sparse phases whose fetched ALU instructions only
// exercise the preemptive turn-on. Preemptive gating is enabled in some
// phases and disabled in others.
//
// Every cycle the testbench checks, with its own bookkeeping:
//   * the current step of each power-pin domain, computed from the observed
//     clock enables and the entry weights, equals the step the queue granted
//     one cycle before and never exceeds the threshold;
//   * a module (or L2 bank) is gated off only after no access in the 16
//     cycles that lead to its off request, and gated on only after an access
//     (a pipeline request, or a fetched ALU instruction while preemption is
//     enabled) within the 16 cycles before;
//   * availability equals the clock enable, the L2 being available only with
//     all banks clocked;
//   * a module that keeps being requested becomes available within a bounded
//     number of cycles.
// It counts how often each mechanism acted (gate-off, gate-on, a transition
// held back by the threshold, a stall on an unavailable module, a
// preemptive ALU turn-on, an L2 partly on while ramping, a withdrawn
// request) and fails if one never did. It also reports the average
// per-cycle current variation with the controller against ideal clock gating
// (module on exactly when requested), and checks that the controller's is
// lower.
module tb_didt_controller;
  import didt_pkg::*;
  localparam int DELTA = 3;
  localparam int FETCH_W = 8;
  localparam int CYCLES = 12000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NUM_MODULES-1:0] mod_req = '0;
  logic preempt_en = 1'b0;
  logic [FETCH_W-1:0][31:0] fetch_instr = '0;
  logic [FETCH_W-1:0] fetch_valid = '0;
  logic [NUM_MODULES-1:0] mod_clk_en, mod_avail;
  logic [L2_BANKS-1:0] l2_bank_clk_en;
  logic signed [7:0] q_step [NUM_QUEUES];
  logic [NUM_QUEUES-1:0][QID_BITS-1:0] q_head;
  logic [MAX_Q_ENTRIES-1:0] q_pending [NUM_QUEUES], q_grant [NUM_QUEUES];

  didt_controller dut (
    .clk, .rst_n, .mod_req, .preempt_en, .fetch_instr, .fetch_valid,
    .mod_clk_en, .mod_avail, .l2_bank_clk_en, .q_step, .q_head, .q_pending, .q_grant);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("%t %s", $time, msg);
  endtask

  // ------------------------------------------------------------ bookkeeping
  int cyc = 0;
  int last_access [NUM_MODULES];      // last cycle the module counted as accessed
  int stall_run [NUM_MODULES];
  logic [NUM_MODULES-1:0] en_prev;
  logic [L2_BANKS-1:0] bank_prev;
  int step_prev [NUM_QUEUES];
  logic [NUM_MODULES-1:0] req_prev;

  int n_off = 0, n_on = 0, n_held = 0, n_stall = 0, n_pre = 0, n_l2_ramp = 0,
      n_withdraw = 0, n_step_at_delta = 0;
  longint var_ctrl = 0, var_ideal = 0;
  int cur_prev_ctrl = 0, cur_prev_ideal = 0;

  function automatic int mod_weight(module_e m);
    for (int q = 0; q < NUM_QUEUES; q++)
      for (int i = 0; i < int'(Q_SIZE[q]); i++)
        if (Q_CFG[q][i].mod == m) return int'(Q_CFG[q][i].weight);
    return 0;
  endfunction

  // Expected preemptive requests, decoded independently from the fetch group.
  function automatic logic [NUM_MODULES-1:0] preempt_mask();
    automatic logic [NUM_MODULES-1:0] p = '0;
    automatic int ni = 0, nf = 0;
    for (int i = 0; i < FETCH_W; i++)
      if (fetch_valid[i]) begin
        if (fetch_instr[i][31:26] >= 6'h10 && fetch_instr[i][31:26] <= 6'h13) ni++;
        else if (fetch_instr[i][31:26] >= 6'h14 && fetch_instr[i][31:26] <= 6'h17) nf++;
      end
    for (int u = 0; u < 8; u++) if (u < ni) p[int'(M_ALU1) + u] = 1'b1;
    for (int u = 0; u < 4; u++) if (u < nf) p[int'(M_FALU1) + u] = 1'b1;
    return p;
  endfunction

  // Sampled just before each rising edge: inputs are stable, outputs are the
  // registered values of this cycle.
  always @(negedge clk) if (rst_n) begin
    logic [NUM_MODULES-1:0] acc;
    int cur_ctrl, cur_ideal;
    acc = mod_req | (preempt_en ? preempt_mask() : '0);

    // Per-domain current step seen at the clock enables.
    for (int q = 0; q < NUM_QUEUES; q++) begin
      automatic int d = 0;
      for (int i = 0; i < int'(Q_SIZE[q]); i++) begin
        logic now_en, was_en;
        if (Q_CFG[q][i].mod == M_DL2) begin
          now_en = l2_bank_clk_en[Q_CFG[q][i].bank];
          was_en = bank_prev[Q_CFG[q][i].bank];
        end else begin
          now_en = mod_clk_en[Q_CFG[q][i].mod];
          was_en = en_prev[Q_CFG[q][i].mod];
        end
        d += (int'(now_en) - int'(was_en)) * int'(Q_CFG[q][i].weight);
      end
      checks++;
      if (cyc > 0 && d != step_prev[q]) fail($sformatf("queue %0d: step %0d seen, %0d granted", q, d, step_prev[q]));
      checks++;
      if (d > DELTA || d < -DELTA) fail($sformatf("queue %0d: current step %0d beyond threshold", q, d));
      step_prev[q] = int'(q_step[q]);
      if (q_step[q] == 8'(DELTA) || q_step[q] == -8'(DELTA)) n_step_at_delta++;
    end

    // Gating decisions against the access history.
    for (int m = 0; m < NUM_MODULES; m++) begin
      if (m == int'(M_DL2)) continue;
      if (en_prev[m] && !mod_clk_en[m]) begin
        n_off++;
        checks++;
        // The off request needs 16 idle cycles; an access in the grant cycle
        // itself (the one just before) cannot stop the transition any more.
        if (acc_hist[m][16:1] != '0) fail($sformatf("module %0d gated off with access history %b", m, acc_hist[m]));
      end
      if (!en_prev[m] && mod_clk_en[m]) begin
        n_on++;
        checks++;
        if (last_access[m] < cyc - 17) fail($sformatf("module %0d gated on without access", m));
        // An ALU turned on although the pipeline did not ask for it recently.
        if (m <= int'(M_FALU4) && req_hist[m] == '0 && !mod_req[m]) n_pre++;
      end
    end
    for (int b = 0; b < L2_BANKS; b++) begin
      if (bank_prev[b] && !l2_bank_clk_en[b]) begin
        checks++;
        if (acc_hist[M_DL2][16:1] != '0) fail("L2 bank gated off too early");
      end
      if (!bank_prev[b] && l2_bank_clk_en[b]) begin
        checks++;
        if (last_access[M_DL2] < cyc - 17) fail("L2 bank gated on without access");
      end
    end
    if (l2_bank_clk_en != '0 && l2_bank_clk_en != '1) n_l2_ramp++;

    // Availability outputs.
    checks++;
    if (mod_avail[M_DL2] != (&l2_bank_clk_en) || mod_clk_en[M_DL2] != (|l2_bank_clk_en))
      fail("L2 availability/enable does not match its banks");
    for (int m = 0; m < NUM_MODULES; m++)
      if (m != int'(M_DL2)) begin
        checks++;
        if (mod_avail[m] != mod_clk_en[m]) fail($sformatf("module %0d availability differs from enable", m));
      end

    // Stalls and their bound.
    for (int m = 0; m < NUM_MODULES; m++) begin
      if (mod_req[m] && !mod_avail[m]) begin
        n_stall++;
        stall_run[m]++;
      end else stall_run[m] = 0;
      checks++;
      if (stall_run[m] > 2 * 8 + 4) fail($sformatf("module %0d stalled for %0d cycles", m, stall_run[m]));
    end

    // Transitions held back by the threshold, and withdrawn requests.
    for (int q = 0; q < NUM_QUEUES; q++) begin
      automatic int pend = $countones(q_pending[q]);
      automatic int gr = $countones(q_grant[q]);
      if (gr > 0 && pend > gr) n_held++;
    end
    for (int m = 0; m < NUM_MODULES; m++)
      if (m != int'(M_DL2) && en_prev[m] == mod_clk_en[m] && was_pending[m] && !is_pending(m))
        n_withdraw++;

    // Current variability: controller vs. ideal clock gating.
    cur_ctrl = 0; cur_ideal = 0;
    for (int m = 0; m < NUM_MODULES; m++) begin
      if (m == int'(M_DL2)) cur_ctrl += $countones(l2_bank_clk_en);
      else if (mod_clk_en[m]) cur_ctrl += mod_weight(module_e'(m));
      if (mod_req[m]) cur_ideal += (m == int'(M_DL2)) ? L2_BANKS : mod_weight(module_e'(m));
    end
    var_ctrl  += longint'((cur_ctrl > cur_prev_ctrl) ? cur_ctrl - cur_prev_ctrl : cur_prev_ctrl - cur_ctrl);
    var_ideal += longint'((cur_ideal > cur_prev_ideal) ? cur_ideal - cur_prev_ideal : cur_prev_ideal - cur_ideal);
    cur_prev_ctrl = cur_ctrl;
    cur_prev_ideal = cur_ideal;

    for (int m = 0; m < NUM_MODULES; m++) begin
      if (acc[m]) last_access[m] = cyc;
      acc_hist[m] = {acc_hist[m][15:0], acc[m]};
      req_hist[m] = {req_hist[m][15:0], mod_req[m]};
      was_pending[m] = is_pending(m);
    end
    en_prev = mod_clk_en;
    bank_prev = l2_bank_clk_en;
    req_prev = mod_req;
    cyc++;
  end

  logic [16:0] req_hist [NUM_MODULES];
  logic [16:0] acc_hist [NUM_MODULES];   // bit 0: previous cycle
  logic [NUM_MODULES-1:0] was_pending;

  // Pending state of a module's queue entry (non-L2 modules only).
  function automatic logic is_pending(int m);
    for (int q = 0; q < NUM_QUEUES; q++)
      for (int i = 0; i < int'(Q_SIZE[q]); i++)
        if (int'(Q_CFG[q][i].mod) == m) return q_pending[q][i];
    return 1'b0;
  endfunction

  // ------------------------------------------------------------- stimulus
  function automatic logic [31:0] instr(int unsigned kind);
    // kind 0: integer operate, 1: FP operate, 2: load/store/branch
    logic [5:0] opc;
    case (kind)
      0: opc = 6'h10 + 6'($urandom % 4);
      1: opc = 6'h14 + 6'($urandom % 4);
      default: opc = ($urandom % 2) ? 6'h28 : 6'h39;
    endcase
    return {opc, 26'($urandom)};
  endfunction

  task automatic drive(int unsigned p_busy, int unsigned p_int, int unsigned p_fp, bit alu_req);
    for (int m = 0; m < NUM_MODULES; m++) begin
      automatic bit is_alu = (m <= int'(M_FALU4));
      mod_req[m] = (is_alu && !alu_req) ? 1'b0 : (($urandom % 100) < p_busy);
    end
    for (int i = 0; i < FETCH_W; i++) begin
      int unsigned r = $urandom % 100;
      fetch_instr[i] = instr((r < p_int) ? 0 : (r < p_int + p_fp) ? 1 : 2);
      fetch_valid[i] = ($urandom % 100) < 85;
    end
  endtask

  initial begin
    automatic int c = 0;
    for (int m = 0; m < NUM_MODULES; m++) begin
      last_access[m] = -100; stall_run[m] = 0; req_hist[m] = '0; acc_hist[m] = '0;
    end
    for (int q = 0; q < NUM_QUEUES; q++) step_prev[q] = 0;
    en_prev = '1; bank_prev = '1; was_pending = '0; req_prev = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (c < CYCLES) begin
      automatic int kind = $urandom % 4;
      int len;
      preempt_en = ($urandom % 2);
      case (kind)
        0: begin // high ILP
          len = 300 + $urandom % 300;
          for (int i = 0; i < len; i++) begin @(posedge clk); #1; drive(85, 50, 15, 1); end
          c += len;
        end
        1: begin // low ILP: burst then long memory stall
          len = 100 + $urandom % 100;
          for (int i = 0; i < len; i++) begin @(posedge clk); #1; drive(40, 30, 5, 1); end
          c += len;
          len = 300 + $urandom % 300;
          for (int i = 0; i < len; i++) begin @(posedge clk); #1; drive(2, 2, 0, 1); end
          c += len;
        end
        2: begin // power virus: all on, then all idle
          for (int r = 0; r < 6; r++) begin
            len = 20 + $urandom % 21;
            for (int i = 0; i < len; i++) begin @(posedge clk); #1; drive(100, 60, 20, 1); end
            len = 20 + $urandom % 21;
            for (int i = 0; i < len; i++) begin @(posedge clk); #1; drive(0, 0, 0, 1); end
            c += 80;
          end
        end
        default: begin // ALU instructions fetched, ALUs not yet requested
          preempt_en = 1'b1;
          len = 200;
          for (int i = 0; i < len; i++) begin @(posedge clk); #1; drive(30, (i % 40 < 3) ? 40 : 0, (i % 50 < 2) ? 20 : 0, 0); end
          c += len;
        end
      endcase
    end
    @(posedge clk); #1;
    $display("events: gate_off=%0d gate_on=%0d held_by_threshold=%0d stalls=%0d preemptive_on=%0d l2_ramp=%0d withdrawn=%0d step_at_delta=%0d",
             n_off, n_on, n_held, n_stall, n_pre, n_l2_ramp, n_withdraw, n_step_at_delta);
    $display("average current variation per cycle (weight units): controller %0.3f, ideal clock gating %0.3f",
             real'(var_ctrl) / cyc, real'(var_ideal) / cyc);
    checks += 8;
    if (n_off == 0) fail("no module was gated off");
    if (n_on == 0) fail("no module was gated on");
    if (n_held == 0) fail("the threshold never held back a transition");
    if (n_stall == 0) fail("no stall on an unavailable module");
    if (n_pre == 0) fail("no preemptive ALU turn-on");
    if (n_l2_ramp == 0) fail("the L2 never ramped bank by bank");
    if (n_withdraw == 0) fail("no pending request was withdrawn");
    if (var_ctrl >= var_ideal) fail("controller did not reduce current variation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
