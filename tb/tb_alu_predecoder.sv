// tb_alu_predecoder: self-checking test of the ALU instruction pre-decoder.
//
// Fetch groups of eight random instructions are built with a chosen mix of
// integer-operate (major opcode 0x10-0x13), FP-operate (0x14-0x17) and other
// opcodes and random valid bits. The expected preemptive requests are a
// thermometer code of the number of valid ALU instructions of each class,
// saturated at 8 integer and 4 FP units.
module tb_alu_predecoder;
  localparam int unsigned FETCH_W = 8, NI = 8, NF = 4;
  logic [FETCH_W-1:0][31:0] fetch_instr;
  logic [FETCH_W-1:0]       fetch_valid;
  logic [NI-1:0] ialu_preempt;
  logic [NF-1:0] falu_preempt;
  int checks = 0, failures = 0;

  alu_predecoder #(.FETCH_W(FETCH_W), .NUM_IALU(NI), .NUM_FALU(NF)) dut (
    .fetch_instr, .fetch_valid, .ialu_preempt, .falu_preempt);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [5:0] pick_opcode(int unsigned kind);
    // kind 0: integer operate, 1: FP operate, 2: anything else
    case (kind)
      0: return 6'h10 + 6'($urandom % 4);
      1: return 6'h14 + 6'($urandom % 4);
      default: begin
        logic [5:0] o;
        do o = 6'($urandom); while (o >= 6'h10 && o <= 6'h17);
        return o;
      end
    endcase
  endfunction

  task automatic run(int unsigned p_int, int unsigned p_fp, int unsigned p_valid);
    int n_int = 0, n_fp = 0;
    logic [NI-1:0] exp_i;
    logic [NF-1:0] exp_f;
    for (int i = 0; i < FETCH_W; i++) begin
      int unsigned r = $urandom % 100;
      int unsigned kind = (r < p_int) ? 0 : (r < p_int + p_fp) ? 1 : 2;
      fetch_instr[i] = {pick_opcode(kind), 26'($urandom)};
      fetch_valid[i] = ($urandom % 100) < p_valid;
      if (fetch_valid[i] && kind == 0) n_int++;
      if (fetch_valid[i] && kind == 1) n_fp++;
    end
    for (int u = 0; u < NI; u++) exp_i[u] = (u < n_int);
    for (int u = 0; u < NF; u++) exp_f[u] = (u < n_fp);
    #1;
    checks++;
    if (ialu_preempt !== exp_i || falu_preempt !== exp_f) begin
      failures++;
      $display("int=%0d fp=%0d: ialu=%b (exp %b) falu=%b (exp %b)",
               n_int, n_fp, ialu_preempt, exp_i, falu_preempt, exp_f);
    end
  endtask

  initial begin
    run(100, 0, 100);   // eight integer ALU instructions
    run(0, 100, 100);   // eight FP instructions, saturates at four units
    run(0, 0, 100);     // no ALU instructions
    run(100, 0, 0);     // nothing valid
    for (int k = 0; k < 3000; k++)
      run($urandom % 70, $urandom % 30, 50 + $urandom % 51);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
