// alu_predecoder: preemptive ALU turn-on from pre-decoded fetch groups.
//
// In parallel with instruction fetch, the 6-bit major opcode of every valid
// instruction in the fetch group (bits [31:26], as in the Alpha ISA) is
// inspected. The number of integer-operate and floating-point-operate
// instructions is counted, and the same number of integer ALUs and FP ALUs
// (lowest-numbered first, saturating at the number of units) receive a
// preemptive turn-on request. The controller treats such a request like an
// access of the ALU: it overrides a pending turn-off of the ALU's decay
// counter, or requests the ALU's activation if it is gated off, before the
// instruction reaches issue.
//
// Following the description: pre-decoding the opcode bits during fetch, an
// 8-wide fetch group, 8 integer and 4 FP ALUs, and the override of the
// decay-counter turn-off. This design's own choices: which opcodes count as
// ALU instructions (Alpha integer-operate groups 0x10-0x13 for the integer
// ALUs, floating-point groups 0x14-0x17 for the FP ALUs; loads, stores and
// branches request no ALU) and the allocation of requests to the
// lowest-numbered units.
//
// Interface and timing: purely combinational; fetch_instr/fetch_valid in,
// ialu_preempt/falu_preempt out in the same cycle.
module alu_predecoder #(
  parameter int unsigned FETCH_W  = 8,
  parameter int unsigned NUM_IALU = 8,
  parameter int unsigned NUM_FALU = 4
) (
  input  logic [FETCH_W-1:0][31:0] fetch_instr,
  input  logic [FETCH_W-1:0]       fetch_valid,
  output logic [NUM_IALU-1:0]      ialu_preempt,
  output logic [NUM_FALU-1:0]      falu_preempt
);

  localparam int unsigned CW = $clog2(FETCH_W + 1);

  function automatic logic is_int_op(logic [5:0] opc);
    return opc inside {6'h10, 6'h11, 6'h12, 6'h13};
  endfunction

  function automatic logic is_fp_op(logic [5:0] opc);
    return opc inside {6'h14, 6'h15, 6'h16, 6'h17};
  endfunction

  logic [CW-1:0] n_int, n_fp;

  always_comb begin
    n_int = '0;
    n_fp  = '0;
    for (int i = 0; i < FETCH_W; i++) begin
      if (fetch_valid[i] && is_int_op(fetch_instr[i][31:26])) n_int = n_int + 1'b1;
      if (fetch_valid[i] && is_fp_op(fetch_instr[i][31:26]))  n_fp  = n_fp + 1'b1;
    end
    for (int u = 0; u < NUM_IALU; u++) ialu_preempt[u] = (int'(n_int) > u);
    for (int u = 0; u < NUM_FALU; u++) falu_preempt[u] = (int'(n_fp) > u);
  end

endmodule
