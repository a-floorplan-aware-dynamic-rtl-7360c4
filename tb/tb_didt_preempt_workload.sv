// tb_didt_preempt_workload: performance of the controller with and without
// preemptive ALU gating on the same instruction stream.
//
// Two controllers at default parameters each drive a small in-order
// pipeline model. A fetch group of 8 instructions is fetched, spends FE_DEPTH
// cycles in the front end, and issues only when every module it needs is
// available (ALUs for its ALU instructions, register files, RUU, LSQ and
// caches). Otherwise the whole pipeline stalls, as a pipeline that treats
// module availability as a structural hazard would. Fetch uses the I-cache,
// I-TLB, branch predictor and BTB every active cycle. Controller 0 runs with
// preemption off, controller 1 with it on; both see the same program.
//
// The program alternates ALU-intensive stretches (up to 8 integer and 4 FP
// operations per group) with stretches of loads and branches only, long
// enough for the ALUs to decay and be gated off. Without preemption, the
// first ALU group after such a gap stalls until its ALUs are woken. With
// preemption, the pre-decoder wakes them while the group is still in the
// front end.
//
// Checked: both runs complete the whole program; every domain's granted
// step stays within the threshold; the run with preemption takes fewer
// cycles and stalls less than the one without. Normalised performance
// (ungated cycles / controlled cycles) is printed for both.
module tb_didt_preempt_workload;
  import didt_pkg::*;
  localparam int GROUPS   = 3000;
  localparam int FE_DEPTH = 4;
  localparam int DELTA    = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Program: per group, number of integer/FP ALU ops and whether it uses
  // memory (loads) and the FP register file.
  int  g_int [GROUPS];
  int  g_fp  [GROUPS];
  bit  g_mem [GROUPS];

  initial begin : watchdog
    repeat (GROUPS * 20) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g = 0;
    while (g < GROUPS) begin
      int busy = 20 + $urandom % 40;
      int gap  = 20 + $urandom % 40;
      for (int i = 0; i < busy && g < GROUPS; i++, g++) begin
        g_int[g] = 2 + $urandom % 7;
        g_fp[g]  = ($urandom % 3 == 0) ? 1 + $urandom % 4 : 0;
        g_mem[g] = ($urandom % 2);
      end
      for (int i = 0; i < gap && g < GROUPS; i++, g++) begin
        g_int[g] = 0;
        g_fp[g]  = 0;
        g_mem[g] = 1'b1;
      end
    end
  end

  function automatic logic [31:0] make_instr(int slot, int n_int, int n_fp);
    logic [5:0] opc;
    if (slot < n_int) opc = 6'h10 + 6'(slot % 4);
    else if (slot < n_int + n_fp) opc = 6'h16;
    else opc = (slot % 2) ? 6'h28 : 6'h39;   // load / branch
    return {opc, 26'(slot * 1237)};
  endfunction

  int cycles [2];
  int stalls [2];
  bit done [2];

  for (genvar r = 0; r < 2; r++) begin : g_run
    logic [NUM_MODULES-1:0] mod_req;
    logic [7:0][31:0] fetch_instr;
    logic [7:0] fetch_valid;
    logic [NUM_MODULES-1:0] mod_clk_en, mod_avail;
    logic [L2_BANKS-1:0] l2_bank_clk_en;
    logic signed [7:0] q_step [NUM_QUEUES];
    logic [NUM_QUEUES-1:0][QID_BITS-1:0] q_head;
    logic [MAX_Q_ENTRIES-1:0] q_pending [NUM_QUEUES], q_grant [NUM_QUEUES];

    didt_controller dut (
      .clk, .rst_n, .mod_req, .preempt_en(r == 1), .fetch_instr, .fetch_valid,
      .mod_clk_en, .mod_avail, .l2_bank_clk_en, .q_step, .q_head, .q_pending, .q_grant);

    // Front-end pipe: group index per stage, -1 for a bubble.
    int fe [FE_DEPTH];
    int pc;
    int issued;

    function automatic logic [NUM_MODULES-1:0] issue_need(int g);
      logic [NUM_MODULES-1:0] n = '0;
      if (g < 0) return n;
      for (int u = 0; u < 8; u++) if (u < g_int[g]) n[int'(M_ALU1) + u] = 1'b1;
      for (int u = 0; u < 4; u++) if (u < g_fp[g]) n[int'(M_FALU1) + u] = 1'b1;
      n[M_RUU] = 1'b1;
      n[M_IRF] = 1'b1;
      if (g_fp[g] > 0) n[M_FRF] = 1'b1;
      if (g_mem[g]) begin
        n[M_LSQ] = 1'b1; n[M_DL1] = 1'b1; n[M_DTLB] = 1'b1;
      end
      return n;
    endfunction

    // Combinational stimulus from the pipe state.
    always_comb begin
      logic [NUM_MODULES-1:0] fetch_need;
      fetch_need = '0;
      if (pc < GROUPS) begin
        fetch_need[M_IL1] = 1'b1; fetch_need[M_ITLB] = 1'b1;
        fetch_need[M_BPRED] = 1'b1; fetch_need[M_BTB] = 1'b1;
      end
      mod_req = fetch_need | issue_need(fe[FE_DEPTH-1]);
      for (int s = 0; s < 8; s++) begin
        fetch_instr[s] = (pc < GROUPS) ? make_instr(s, g_int[pc], g_fp[pc]) : 32'h0;
        fetch_valid[s] = (pc < GROUPS);
      end
    end

    always @(posedge clk) begin
      if (!rst_n) begin
        for (int s = 0; s < FE_DEPTH; s++) fe[s] <= -1;
        pc <= 0;
        issued <= 0;
        cycles[r] = 0;
        stalls[r] = 0;
        done[r] = 1'b0;
      end else if (!done[r]) begin
        logic [NUM_MODULES-1:0] need;
        logic fetch_ok;
        need = issue_need(fe[FE_DEPTH-1]);
        fetch_ok = (pc >= GROUPS) || (mod_avail[M_IL1] && mod_avail[M_ITLB] &&
                                      mod_avail[M_BPRED] && mod_avail[M_BTB]);
        cycles[r]++;
        for (int q = 0; q < NUM_QUEUES; q++) begin
          checks++;
          if (q_step[q] > 8'(DELTA) || q_step[q] < -8'(DELTA)) begin
            failures++;
            $display("run %0d queue %0d: step %0d", r, q, q_step[q]);
          end
        end
        if (((need & ~mod_avail) != '0) || !fetch_ok) begin
          stalls[r]++;
        end else begin
          if (fe[FE_DEPTH-1] >= 0) issued <= issued + 1;
          for (int s = FE_DEPTH - 1; s > 0; s--) fe[s] <= fe[s-1];
          fe[0] <= (pc < GROUPS) ? pc : -1;
          if (pc < GROUPS) pc <= pc + 1;
          if (issued == GROUPS - 1 && fe[FE_DEPTH-1] >= 0) done[r] = 1'b1;
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1]);
    @(posedge clk);
    begin
      real ideal;
      ideal = real'(GROUPS + FE_DEPTH);
      $display("without preemption: %0d cycles, %0d stall cycles, normalised performance %0.3f",
               cycles[0], stalls[0], ideal / cycles[0]);
      $display("with preemption:    %0d cycles, %0d stall cycles, normalised performance %0.3f",
               cycles[1], stalls[1], ideal / cycles[1]);
    end
    checks++;
    if (stalls[0] == 0) begin failures++; $display("no stall without preemption"); end
    checks++;
    if (!(cycles[1] < cycles[0])) begin failures++; $display("preemption did not shorten the run"); end
    checks++;
    if (!(stalls[1] < stalls[0])) begin failures++; $display("preemption did not reduce stalls"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
