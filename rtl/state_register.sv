// state_register: the memory elements of a Moore machine.
//
// Loads next_state on every rising edge of the event clock, one edge per
// event cycle, and returns to INIT while rst_n is low. The initial state of
// the machine is its reset state, as the skeleton-based model prescribes;
// the reset being asynchronous and active low is this design's own choice.
//
// Timing: state changes only at a rising event_clk edge or when rst_n falls.
module state_register #(
  parameter int               WIDTH = 8,
  parameter logic [WIDTH-1:0] INIT  = '0
) (
  input  logic             event_clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] next_state,
  output logic [WIDTH-1:0] state
);

  always_ff @(posedge event_clk or negedge rst_n) begin
    if (!rst_n) state <= INIT;
    else        state <= next_state;
  end

endmodule
