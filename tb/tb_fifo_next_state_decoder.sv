// tb_fifo_next_state_decoder: compares the combinational next state with a
// queue-based model of "drop the head, append the input list cut to I
// items, cut the result to B items" over every count combination and
// random items.
module tb_fifo_next_state_decoder;
  localparam int B = 8, I = 4, W = 8, NW = 4, IW = 3;

  logic [NW-1:0]       cur_number;
  logic [B-1:0][W-1:0] cur_items;
  logic                in_present;
  logic [IW-1:0]       in_number;
  logic [I-1:0][W-1:0] in_items;
  logic [NW-1:0]       nxt_number;
  logic [B-1:0][W-1:0] nxt_items;
  int checks = 0, failures = 0;

  fifo_next_state_decoder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] q[$];
    for (int rep = 0; rep < 20; rep++)
      for (int n = 0; n <= B; n++)
        for (int p = 0; p < 2; p++)
          for (int m = 0; m < (1 << IW); m++) begin
            cur_number = NW'(n);
            for (int k = 0; k < B; k++) cur_items[k] = W'($urandom);
            for (int k = 0; k < I; k++) in_items[k] = W'($urandom);
            in_present = p[0];
            in_number  = IW'(m);
            // reference model
            q.delete();
            for (int k = 1; k < n; k++) q.push_back(cur_items[k]);
            if (p == 1)
              for (int k = 0; k < m && k < I; k++) q.push_back(in_items[k]);
            while (q.size() > B) void'(q.pop_back());
            #1;
            checks++;
            if (int'(nxt_number) != q.size()) begin
              failures++;
              $display("FAIL count n=%0d p=%0d m=%0d: got %0d expected %0d", n, p, m, nxt_number, q.size());
            end else begin
              for (int k = 0; k < q.size(); k++) begin
                checks++;
                if (nxt_items[k] !== q[k]) begin
                  failures++;
                  $display("FAIL item %0d n=%0d p=%0d m=%0d: got %0h expected %0h", k, n, p, m, nxt_items[k], q[k]);
                end
              end
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
