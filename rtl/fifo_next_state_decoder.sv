// fifo_next_state_decoder: next-state function of the bounded FIFO.
//
// The FIFO state is a bounded list: a count of valid items plus an item
// array whose slot 0 is the head. On every event cycle the head of a
// non-empty buffer leaves (it is the item shown on the output during that
// cycle), then the items of a present input event are appended behind the
// remaining ones. Both lists are cut to their bounds: the input list to
// MAX_INPUTS items and the result to BUFFER_SIZE items, so when the buffer
// overflows the newest items are lost. An absent input, or a present one
// with an empty list, only removes the head.
//
// This follows the three-case definition of the FIFO next-state function
// (drop the head, append the input, or both) with bounded lists. The case
// of an empty buffer with no input, which that definition leaves open, keeps
// the buffer empty here; clipping an oversized in_number and zeroing unused
// slots are this design's own choices.
//
// Purely combinational. in_items[0] is the first input item to be enqueued.
module fifo_next_state_decoder
  import fifo_pkg::*;
#(
  parameter int B   = BUFFER_SIZE,
  parameter int I   = MAX_INPUTS,
  parameter int W   = DATA_W,
  parameter int NW  = count_w(B),
  parameter int IW  = count_w(I)
) (
  input  logic [NW-1:0]       cur_number,
  input  logic [B-1:0][W-1:0] cur_items,
  input  logic                in_present,
  input  logic [IW-1:0]       in_number,
  input  logic [I-1:0][W-1:0] in_items,
  output logic [NW-1:0]       nxt_number,
  output logic [B-1:0][W-1:0] nxt_items
);

  int kept;    // items left after the head has been removed
  int n_in;    // items taken from the input list after cutting it to I
  int total;   // kept + n_in before cutting to B

  always_comb begin
    kept  = (int'(cur_number) > 0) ? int'(cur_number) - 1 : 0;
    if (kept > B - 1) kept = B - 1;
    n_in  = in_present ? int'(in_number) : 0;
    if (n_in > I) n_in = I;
    total = kept + n_in;
    nxt_number = NW'((total > B) ? B : total);

    for (int k = 0; k < B; k++) begin
      nxt_items[k] = '0;
      if (k < kept) begin
        nxt_items[k] = cur_items[k + 1];
      end else begin
        for (int j = 0; j < I; j++) begin
          if (j < n_in && k == kept + j) nxt_items[k] = in_items[j];
        end
      end
    end
  end

endmodule
