// didt_controller: floorplan-aware dynamic inductive-noise (di/dt) controller
// for the 23-module processor of the 2D floorplan.
//
// Clock gating saves power but makes a module's supply current jump when it
// is gated on or off; if several modules fed by the same power pins switch in
// the same cycle, the current step at those pins and the resulting supply
// ringing become large. This controller bounds that step per power-pin
// domain:
//   * one decay_counter per module filters the module's access stream, so a
//     module is only asked to turn off after 16 idle cycles and is asked to
//     turn on as soon as it is needed again;
//   * the alu_predecoder inspects each fetch group and, when preempt_en is
//     set, treats the ALUs that the fetched ALU instructions will need as
//     accessed, which keeps them on or turns them on early;
//   * four didt_queue instances, one per floorplan quadrant (power-pin
//     domain), grant the resulting on/off requests in queue order such that
//     the signed sum of the current weights switched in one cycle stays
//     within DELTA;
//   * the L2 cache has one queue entry per bank with a low weight each, so it
//     is turned on and off progressively, one or a few banks per cycle.
// The queue state drives each module's clock-gate enable, and the same signal
// tells the pipeline's stall logic whether the module may be used.
//
// Following the description: the decay counters, the queue mechanism, the
// pre-decoder override, the per-bank L2 entries, one queue per quadrant of
// the floorplan and the module placement of the 2D floorplan. This design's
// own choices (see didt_pkg): the bank count, most weights, queue order, and
// that the L2 counts as available only when all of its banks are clocked.
//
// Interface: mod_req[m] is high in every cycle in which the pipeline needs
// module m (indexed by didt_pkg::module_e), whether or not m is currently
// available. fetch_instr/fetch_valid carry the current fetch group.
// mod_clk_en/mod_avail are registered; a request from a gated-off module
// becomes a pending activation at the next edge and, if granted at once,
// the module is clocked one edge later. q_step[q] is the signed current
// step (in weight units) granted in queue q this cycle; q_pending[q] and
// q_grant[q] show, per entry of queue q, a pending transition and a grant in
// this cycle (entry order as in didt_pkg::Q_CFG).
module didt_controller
  import didt_pkg::*;
#(
  parameter int          DELTA      = 3,
  parameter int unsigned DECAY_BITS = 4,
  parameter int unsigned FETCH_W    = 8
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [NUM_MODULES-1:0]          mod_req,
  input  logic                            preempt_en,
  input  logic [FETCH_W-1:0][31:0]        fetch_instr,
  input  logic [FETCH_W-1:0]              fetch_valid,
  output logic [NUM_MODULES-1:0]          mod_clk_en,
  output logic [NUM_MODULES-1:0]          mod_avail,
  output logic [L2_BANKS-1:0]             l2_bank_clk_en,
  output logic signed [7:0]               q_step [NUM_QUEUES],
  output logic [NUM_QUEUES-1:0][QID_BITS-1:0] q_head,
  output logic [MAX_Q_ENTRIES-1:0]        q_pending [NUM_QUEUES],
  output logic [MAX_Q_ENTRIES-1:0]        q_grant [NUM_QUEUES]
);

  // ---------------------------------------------------------------- pre-decode
  logic [NUM_IALU-1:0] ialu_pre;
  logic [NUM_FALU-1:0] falu_pre;

  alu_predecoder #(
    .FETCH_W (FETCH_W),
    .NUM_IALU(NUM_IALU),
    .NUM_FALU(NUM_FALU)
  ) u_predec (
    .fetch_instr (fetch_instr),
    .fetch_valid (fetch_valid),
    .ialu_preempt(ialu_pre),
    .falu_preempt(falu_pre)
  );

  // Access seen by each decay counter: the pipeline's request, merged with the
  // preemptive request for ALUs.
  logic [NUM_MODULES-1:0] access;
  always_comb begin
    access = mod_req;
    if (preempt_en) begin
      for (int u = 0; u < NUM_IALU; u++)
        access[int'(M_ALU1) + u] = mod_req[int'(M_ALU1) + u] | ialu_pre[u];
      for (int u = 0; u < NUM_FALU; u++)
        access[int'(M_FALU1) + u] = mod_req[int'(M_FALU1) + u] | falu_pre[u];
    end
  end

  // ------------------------------------------------------------ decay counters
  logic [NUM_MODULES-1:0] want_on;

  for (genvar m = 0; m < NUM_MODULES; m++) begin : g_decay
    logic [DECAY_BITS-1:0] count;   // observation only
    decay_counter #(.WIDTH(DECAY_BITS)) u_decay (
      .clk    (clk),
      .rst_n  (rst_n),
      .access (access[m]),
      .want_on(want_on[m]),
      .count  (count)
    );
  end

  // -------------------------------------------------------------------- queues
  logic [MAX_Q_ENTRIES-1:0] e_clk_en [NUM_QUEUES];

  for (genvar q = 0; q < NUM_QUEUES; q++) begin : g_queue
    localparam int unsigned NQ = Q_SIZE[q];
    localparam logic [MAX_Q_ENTRIES*WEIGHT_BITS-1:0] WALL = queue_weights(q);
    localparam int unsigned SWQ = WEIGHT_BITS + $clog2(NQ + 1) + 2;

    logic [NQ-1:0]          q_want, q_clk_en, q_avail, q_gr, q_pend;
    gate_state_e            q_state [NQ];
    logic signed [SWQ-1:0]  step;
    logic [$clog2(NQ)-1:0]  head;

    for (genvar i = 0; i < NQ; i++) begin : g_in
      assign q_want[i] = want_on[int'(Q_CFG[q][i].mod)];
    end

    didt_queue #(
      .N      (NQ),
      .WEIGHTS(WALL[NQ*WEIGHT_BITS-1:0]),
      .DELTA  (DELTA)
    ) u_queue (
      .clk    (clk),
      .rst_n  (rst_n),
      .want_on(q_want),
      .clk_en (q_clk_en),
      .avail  (q_avail),
      .state  (q_state),
      .grant  (q_gr),
      .step   (step),
      .head   (head)
    );

    for (genvar i = 0; i < NQ; i++) begin : g_pend
      assign q_pend[i] = (q_state[i] == G_OFF_ON) || (q_state[i] == G_ON_OFF);
    end

    // The queue's avail equals its clk_en; the L2 rule is applied below.
    assign e_clk_en[q]  = MAX_Q_ENTRIES'(q_clk_en & q_avail);
    assign q_pending[q] = MAX_Q_ENTRIES'(q_pend);
    assign q_grant[q]   = MAX_Q_ENTRIES'(q_gr);
    assign q_step[q]   = 8'(step);
    assign q_head[q]   = QID_BITS'(head);
  end

  // ----------------------------------------- entries back to module enables
  always_comb begin
    logic [L2_BANKS-1:0] banks;
    mod_clk_en = '0;
    banks      = '0;
    for (int q = 0; q < NUM_QUEUES; q++)
      for (int i = 0; i < MAX_Q_ENTRIES; i++)
        if (i < int'(Q_SIZE[q])) begin
          if (Q_CFG[q][i].mod == M_DL2)
            banks[Q_CFG[q][i].bank] = e_clk_en[q][i];
          else
            mod_clk_en[Q_CFG[q][i].mod] = e_clk_en[q][i];
        end
    l2_bank_clk_en     = banks;
    mod_clk_en[M_DL2]  = |banks;
    mod_avail          = mod_clk_en;
    mod_avail[M_DL2]   = &banks;
  end

endmodule
