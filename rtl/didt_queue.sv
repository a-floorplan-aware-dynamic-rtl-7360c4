// didt_queue: floorplan-aware clock-gating queue of one power-pin domain.
//
// The queue has one static, pre-wired entry per module that draws current
// from the domain's power pins. Each entry holds the module's gating state
// (ON, OFF, or a pending OFF->ON / ON->OFF transition) and a 2-bit current
// weight. A pending activation counts +weight, a pending deactivation
// -weight.
//
// Every cycle a sliding window starts at the head entry and takes the
// consecutive entries that have a pending transition, in queue order, while
// the running sum of their signed weights stays within the current-demand
// threshold DELTA. It stops at the first entry without a pending transition,
// at the first entry that would break the threshold, or after WIN_MAX
// entries. The transitions in the window are granted (they take effect at the
// next clock edge) and the head moves to the entry after the window. If the
// head entry has no pending transition, nothing is granted and the head
// moves on by one, so the queue behaves as a circular queue. The net current
// step of the domain in one cycle is therefore at most DELTA weight units.
//
// Following the description: the state and weight encoding, the window of
// consecutive transitioning entries with sum <= DELTA, the head movement and
// the worked example that the parameter defaults reproduce (five entries of
// weight 3, 2, 1, 1, 1 and DELTA = 3). This design's own choices: the window
// also keeps the running sum >= -DELTA (so a dip is bounded like a surge),
// WIN_MAX defaults to the queue length, a pending request whose want_on
// reverts before it is granted is withdrawn, and all modules are ON after
// reset.
//
// Interface: want_on[i] is the level request of entry i (from its decay
// counter). clk_en[i] is the registered clock-gate enable of the module; it
// stays high while a deactivation is pending. avail[i] equals clk_en[i] and
// goes to the pipeline's stall logic. grant[i] and step show the transitions
// granted in the current cycle and their signed weight sum. A want_on change
// becomes a pending request one cycle later; a granted transition changes
// clk_en one cycle after that.
module didt_queue
  import didt_pkg::*;
#(
  parameter int unsigned N       = 5,
  parameter logic [N*WEIGHT_BITS-1:0] WEIGHTS = {2'd1, 2'd1, 2'd1, 2'd2, 2'd3},
  parameter int          DELTA   = 3,
  parameter int unsigned WIN_MAX = N,
  localparam int unsigned PW     = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned SW     = WEIGHT_BITS + $clog2(N + 1) + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         want_on,
  output logic [N-1:0]         clk_en,
  output logic [N-1:0]         avail,
  output gate_state_e          state [N],
  output logic [N-1:0]         grant,
  output logic signed [SW-1:0] step,
  output logic [PW-1:0]        head
);

  gate_state_e state_q [N];
  logic [PW-1:0] head_q;

  // Sliding window over the registered states.
  logic [PW:0] win_len;
  always_comb begin
    logic signed [SW-1:0] sum;
    logic                 open;
    int unsigned          idx;
    logic signed [SW-1:0] w;
    grant   = '0;
    sum     = '0;
    open    = 1'b1;
    win_len = '0;
    for (int unsigned k = 0; k < N; k++) begin
      idx = (int'(head_q) + k) % N;
      w   = SW'(WEIGHTS[idx*WEIGHT_BITS +: WEIGHT_BITS]);
      if (open && k < WIN_MAX) begin
        if (state_q[idx] == G_OFF_ON && sum + w <= SW'(DELTA)) begin
          sum = sum + w;
          grant[idx] = 1'b1;
          win_len = win_len + 1'b1;
        end else if (state_q[idx] == G_ON_OFF && sum - w >= -SW'(DELTA)) begin
          sum = sum - w;
          grant[idx] = 1'b1;
          win_len = win_len + 1'b1;
        end else begin
          open = 1'b0;
        end
      end
    end
    step = sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q <= '0;
      for (int i = 0; i < N; i++) state_q[i] <= G_ON;
    end else begin
      head_q <= PW'((int'(head_q) + ((win_len == '0) ? 1 : int'(win_len))) % N);
      for (int i = 0; i < N; i++) begin
        if (grant[i])
          state_q[i] <= (state_q[i] == G_OFF_ON) ? G_ON : G_OFF;
        else
          unique case (state_q[i])
            G_ON:     if (!want_on[i]) state_q[i] <= G_ON_OFF;
            G_OFF:    if (want_on[i])  state_q[i] <= G_OFF_ON;
            G_OFF_ON: if (!want_on[i]) state_q[i] <= G_OFF;
            G_ON_OFF: if (want_on[i])  state_q[i] <= G_ON;
          endcase
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      state[i]  = state_q[i];
      clk_en[i] = (state_q[i] == G_ON) || (state_q[i] == G_ON_OFF);
    end
  end
  assign avail = clk_en;
  assign head  = head_q;

  // A single entry must always fit under the threshold, or it could starve.
  initial begin
    for (int i = 0; i < N; i++)
      assert (int'(WEIGHTS[i*WEIGHT_BITS +: WEIGHT_BITS]) <= DELTA)
        else $error("didt_queue: weight of entry %0d exceeds DELTA", i);
    assert (N <= MAX_Q_ENTRIES) else $error("didt_queue: more than %0d entries", MAX_Q_ENTRIES);
  end

  // The granted current step never exceeds the threshold.
  property p_step_bounded;
    @(posedge clk) disable iff (!rst_n) (step <= SW'(DELTA)) && (step >= -SW'(DELTA));
  endproperty
  a_step_bounded: assert property (p_step_bounded);

endmodule
