// tb_fifo_output_decoder: exhaustive count sweep with random item arrays.
// Expects an absent, zero-valued output for an empty list and the slot-0
// item otherwise.
module tb_fifo_output_decoder;
  localparam int B = 8, W = 8, NW = 4;

  logic [NW-1:0]       cur_number;
  logic [B-1:0][W-1:0] cur_items;
  logic                out_present;
  logic [W-1:0]        out_value;
  int checks = 0, failures = 0;

  fifo_output_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 50; rep++) begin
      for (int n = 0; n <= B; n++) begin
        cur_number = NW'(n);
        for (int k = 0; k < B; k++) cur_items[k] = W'($urandom);
        #1;
        checks++;
        if (out_present !== (n != 0) || out_value !== ((n != 0) ? cur_items[0] : '0)) begin
          failures++;
          $display("FAIL n=%0d present=%0b value=%0h head=%0h", n, out_present, out_value, cur_items[0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
