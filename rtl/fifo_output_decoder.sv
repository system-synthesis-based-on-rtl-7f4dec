// fifo_output_decoder: output function of the bounded FIFO.
//
// Looks only at the registered state. An empty buffer gives an absent
// output event (out_present low, out_value zero); otherwise the output is a
// present event carrying the head item, slot 0 of the item array. This is
// the two-pattern output function of the FIFO (empty list -> absent,
// x:xs -> present x) written as a comparison on the item count.
//
// Purely combinational.
module fifo_output_decoder
  import fifo_pkg::*;
#(
  parameter int B  = BUFFER_SIZE,
  parameter int W  = DATA_W,
  parameter int NW = count_w(B)
) (
  input  logic [NW-1:0]       cur_number,
  input  logic [B-1:0][W-1:0] cur_items,
  output logic                out_present,
  output logic [W-1:0]        out_value
);

  always_comb begin
    if (cur_number == '0) begin
      out_present = 1'b0;           // empty list: absent event
      out_value   = '0;
    end else begin
      out_present = 1'b1;           // non-empty list: present head
      out_value   = cur_items[0];
    end
  end

endmodule
