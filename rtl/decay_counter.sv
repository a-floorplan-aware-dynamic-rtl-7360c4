// decay_counter: access-history filter that decides when a module may be
// clock-gated off.
//
// Every access reloads the counter with its maximum (2**WIDTH - 1); every
// cycle without an access it counts down by one and it stays at zero. The
// module is wanted on while it is being accessed or the counter is not yet
// zero, so with the default 4-bit counter the off request appears in the
// 16th consecutive cycle without an access. A module that is accessed again
// after being gated off raises want_on in the same cycle as the access.
// The 4-bit width, the reload on access and the decay otherwise follow the
// controller's description; the reset value (counter full, module wanted on)
// is this design's choice.
//
// Interface: access is the module's demand for this cycle (from the pipeline,
// or a preemptive request from the ALU pre-decoder); want_on is
// combinational from access and the registered count. count exposes the
// counter for observation.
module decay_counter #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             access,
  output logic             want_on,
  output logic [WIDTH-1:0] count
);

  localparam logic [WIDTH-1:0] FULL = '1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      count <= FULL;
    else if (access)
      count <= FULL;
    else if (count != '0)
      count <= count - 1'b1;
  end

  assign want_on = access || (count != '0);

endmodule
