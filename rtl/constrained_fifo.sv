// constrained_fifo: bounded FIFO with parallel inputs, built as a Moore machine.
//
// The FIFO buffers a stream of item lists into a stream of single items.
// On each event cycle the input is either absent or a list of 0..MAX_INPUTS
// items (in_items[0] first); the output is either absent (buffer empty) or
// the oldest buffered item. The buffer holds BUFFER_SIZE items; items that
// arrive when it is full are dropped, newest first.
//
// Structure (a Moore machine): fifo_next_state_decoder computes the next
// bounded list from the current one and the input, state_register holds it,
// and fifo_output_decoder shows the head of the held list. The state record
// is {number, item[BUFFER_SIZE]}, with item[0] the head and the empty list
// (number = 0) as reset state.
//
// Timing: one event cycle per rising edge of event_clk. Input items sampled
// at an edge are in the buffer after it; an item entering an empty FIFO
// appears on the output one event cycle later, and one item leaves per
// event cycle while the buffer is non-empty. The consumer is always ready.
//
// Eight items, four parallel inputs and the parallel-input architecture are
// the sizes and decisions of the described FIFO; the item width and the
// reset style are this design's own.
module constrained_fifo
  import fifo_pkg::*;
#(
  parameter int B  = BUFFER_SIZE,
  parameter int I  = MAX_INPUTS,
  parameter int W  = DATA_W,
  parameter int NW = count_w(B),
  parameter int IW = count_w(I)
) (
  input  logic                event_clk,
  input  logic                rst_n,
  input  logic                in_present,
  input  logic [IW-1:0]       in_number,
  input  logic [I-1:0][W-1:0] in_items,
  output logic                out_present,
  output logic [W-1:0]        out_value
);

  // Bounded list: item count plus item array, head in slot 0.
  typedef struct packed {
    logic [NW-1:0]       number;
    logic [B-1:0][W-1:0] item;
  } list_t;

  list_t state, next_state;

  fifo_next_state_decoder #(.B(B), .I(I), .W(W), .NW(NW), .IW(IW)) u_next_state (
    .cur_number (state.number),
    .cur_items  (state.item),
    .in_present (in_present),
    .in_number  (in_number),
    .in_items   (in_items),
    .nxt_number (next_state.number),
    .nxt_items  (next_state.item)
  );

  state_register #(.WIDTH($bits(list_t)), .INIT('0)) u_memory (
    .event_clk  (event_clk),
    .rst_n      (rst_n),
    .next_state (next_state),
    .state      (state)
  );

  fifo_output_decoder #(.B(B), .W(W), .NW(NW)) u_output (
    .cur_number (state.number),
    .cur_items  (state.item),
    .out_present(out_present),
    .out_value  (out_value)
  );

  // The bounded list never holds more than B items.
  a_bounded: assert property (@(posedge event_clk) disable iff (!rst_n)
                              int'(state.number) <= B);
  // An event is output exactly when the buffer is non-empty.
  a_present: assert property (@(posedge event_clk) disable iff (!rst_n)
                              out_present == (state.number != '0));

endmodule
