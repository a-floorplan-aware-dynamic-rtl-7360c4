// didt_pkg: shared types and the floorplan-derived configuration of the
// di/dt controller.
//
// A queue entry holds a 2-bit gating state (ON, OFF, or one of the two pending
// transitions) and a 2-bit integer current weight; a module's id inside its
// queue is 3 bits, so a queue has at most eight entries. With the 4-bit decay
// counter this is 11 bits of state per module.
//
// The processor has the 23 modules of the 2D floorplan: eight integer ALUs,
// four FP ALUs, branch predictor, BTB, I-TLB, D-TLB, L1 I- and D-cache, L2
// cache, load/store queue (LSQ), register update unit (RUU), integer and FP
// register files. The floorplan is cut into four quadrants, each one
// power-pin domain with its own queue. The module-to-quadrant assignment below
// is read from the module positions of the 2D floorplan; the L2 cache, which
// lies in the lower-right quadrant, gets one entry per bank (progressive
// gating). The quadrant numbering, the queue order (descending weight, as in
// the worked example of the controller) and all weights except I-cache = 3,
// branch predictor = 2 and integer ALU = 1 are this design's choices.
package didt_pkg;

  // Gating state of one queue entry. ON_OFF and OFF_ON are pending requests
  // that wait for the queue to grant them.
  typedef enum logic [1:0] {
    G_OFF    = 2'b00,
    G_ON     = 2'b01,
    G_OFF_ON = 2'b10,   // activation requested (positive current step)
    G_ON_OFF = 2'b11    // deactivation requested (negative current step)
  } gate_state_e;

  localparam int unsigned WEIGHT_BITS = 2;   // four current levels
  localparam int unsigned QID_BITS    = 3;   // at most eight entries per queue
  localparam int unsigned MAX_Q_ENTRIES = 1 << QID_BITS;

  // Microarchitectural modules of the 2D floorplan.
  localparam int unsigned NUM_MODULES = 23;
  typedef enum logic [4:0] {
    M_ALU1, M_ALU2, M_ALU3, M_ALU4, M_ALU5, M_ALU6, M_ALU7, M_ALU8,
    M_FALU1, M_FALU2, M_FALU3, M_FALU4,
    M_BPRED, M_BTB, M_ITLB, M_DTLB, M_IL1, M_DL1, M_DL2,
    M_LSQ, M_RUU, M_IRF, M_FRF
  } module_e;

  localparam int unsigned NUM_IALU = 8;   // M_ALU1 .. M_ALU8
  localparam int unsigned NUM_FALU = 4;   // M_FALU1 .. M_FALU4

  localparam int unsigned NUM_QUEUES = 4;   // one per floorplan quadrant
  localparam int unsigned L2_BANKS   = 4;   // queue entries given to the L2

  // One queue entry: the module it gates, the L2 bank (for M_DL2 only) and
  // its current weight.
  typedef struct packed {
    module_e                mod;
    logic [1:0]             bank;
    logic [WEIGHT_BITS-1:0] weight;
  } entry_cfg_t;

  localparam int unsigned Q_SIZE [NUM_QUEUES] = '{7, 6, 6, 7};

  localparam entry_cfg_t NO_ENTRY = '{mod: M_ALU1, bank: 2'd0, weight: 2'd0};

  // Queue 0: upper-left quadrant. Queue 1: upper-right. Queue 2: lower-left.
  // Queue 3: lower-right.
  localparam entry_cfg_t Q_CFG [NUM_QUEUES][MAX_Q_ENTRIES] = '{
    '{ '{M_BPRED, 2'd0, 2'd2}, '{M_ITLB, 2'd0, 2'd1}, '{M_ALU1, 2'd0, 2'd1},
       '{M_ALU2,  2'd0, 2'd1}, '{M_ALU4, 2'd0, 2'd1}, '{M_ALU5, 2'd0, 2'd1},
       '{M_ALU8,  2'd0, 2'd1}, NO_ENTRY },
    '{ '{M_IL1,   2'd0, 2'd3}, '{M_LSQ,  2'd0, 2'd3}, '{M_BTB,  2'd0, 2'd2},
       '{M_FALU4, 2'd0, 2'd2}, '{M_FRF,  2'd0, 2'd1}, '{M_ALU6, 2'd0, 2'd1},
       NO_ENTRY, NO_ENTRY },
    '{ '{M_RUU,   2'd0, 2'd3}, '{M_IRF,  2'd0, 2'd2}, '{M_FALU2, 2'd0, 2'd2},
       '{M_FALU3, 2'd0, 2'd2}, '{M_DTLB, 2'd0, 2'd1}, '{M_ALU3,  2'd0, 2'd1},
       NO_ENTRY, NO_ENTRY },
    '{ '{M_DL1,   2'd0, 2'd3}, '{M_FALU1, 2'd0, 2'd2}, '{M_DL2, 2'd0, 2'd1},
       '{M_DL2,   2'd1, 2'd1}, '{M_DL2,   2'd2, 2'd1}, '{M_DL2, 2'd3, 2'd1},
       '{M_ALU7,  2'd0, 2'd1}, NO_ENTRY }
  };

  // Weights of queue q packed for the didt_queue WEIGHTS parameter
  // (entry i in bits [2i+1:2i]).
  function automatic logic [MAX_Q_ENTRIES*WEIGHT_BITS-1:0] queue_weights(int unsigned q);
    logic [MAX_Q_ENTRIES*WEIGHT_BITS-1:0] w;
    w = '0;
    for (int unsigned i = 0; i < MAX_Q_ENTRIES; i++)
      w[i*WEIGHT_BITS +: WEIGHT_BITS] = Q_CFG[q][i].weight;
    return w;
  endfunction

endpackage
