// tb_constrained_fifo: end-to-end test of the FIFO at its default sizes
// (8 items, 4 parallel inputs, 8-bit items).
//
// A cycle-accurate reference model (a queue) predicts the output of every
// event cycle: the head of the buffer as it was registered at the start of
// the cycle, or an absent event. Random traffic is run in phases of light,
// heavy and bursty load so that each mechanism of the FIFO occurs; the test
// counts each occurrence and fails if one never happened:
//   absent input, present input with an empty list, 1..4 items per cycle,
//   an oversized in_number cut to 4 items, empty buffer (absent output),
//   full buffer, overflow (items dropped), and the one-cycle latency from an
//   empty buffer to the output.
module tb_constrained_fifo;
  localparam int B = fifo_pkg::BUFFER_SIZE;
  localparam int I = fifo_pkg::MAX_INPUTS;
  localparam int W = fifo_pkg::DATA_W;
  localparam int IW = fifo_pkg::count_w(I);

  logic                event_clk = 1'b0;
  logic                rst_n = 1'b1;
  logic                in_present = 1'b0;
  logic [IW-1:0]       in_number = '0;
  logic [I-1:0][W-1:0] in_items = '0;
  logic                out_present;
  logic [W-1:0]        out_value;

  int checks = 0, failures = 0;
  int n_absent_in = 0, n_empty_list = 0, n_cut = 0, n_empty_out = 0, n_full = 0;
  int n_overflow = 0, n_latency1 = 0, n_out = 0;
  int n_width[I+1];

  constrained_fifo dut (.*);

  always #5 event_clk = ~event_clk;

  initial begin
    repeat (20000) @(posedge event_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] model[$];
  logic [W-1:0] tag = '0;
  bit was_empty_prev = 1'b1;
  bit wrote_into_empty = 1'b0;

  task automatic drive(input int load);
    int m;
    in_present = ($urandom_range(0, 99) < load);
    m = $urandom_range(0, (1 << IW) - 1);
    if (!in_present) m = $urandom_range(0, I);
    in_number = IW'(m);
    for (int k = 0; k < I; k++) in_items[k] = tag + W'(k);
  endtask

  task automatic cycle(input int load);
    int n;
    @(negedge event_clk);
    // output of this event cycle comes from the registered state
    checks++;
    if (model.size() == 0) begin
      n_empty_out++;
      if (out_present !== 1'b0) begin
        failures++;
        $display("FAIL %0t: output present from an empty buffer", $time);
      end
    end else begin
      n_out++;
      if (out_present !== 1'b1 || out_value !== model[0]) begin
        failures++;
        $display("FAIL %0t: out=%0b/%0h expected %0h", $time, out_present, out_value, model[0]);
      end
    end
    if (wrote_into_empty && model.size() != 0) n_latency1++;
    if (model.size() == B) n_full++;
    was_empty_prev = (model.size() == 0);
    drive(load);
    // advance the model over the coming edge
    if (model.size() != 0) void'(model.pop_front());
    n = in_present ? int'(in_number) : 0;
    if (!in_present) n_absent_in++;
    else begin
      if (n == 0) n_empty_list++;
      if (n > I) begin n_cut++; n = I; end
      n_width[n]++;
    end
    wrote_into_empty = was_empty_prev && n > 0;
    for (int k = 0; k < n; k++) begin
      if (model.size() < B) model.push_back(in_items[k]);
      else n_overflow++;
    end
    tag += W'(I);
  endtask

  initial begin
    #1 rst_n = 1'b0;                     // power-on reset
    #11 rst_n = 1'b1;
    for (int ph = 0; ph < 60; ph++) begin
      int load;
      case (ph % 3)
        0: load = 10;
        1: load = 60;
        default: load = 35;
      endcase
      repeat (40) cycle(load);
    end
    repeat (B + 2) cycle(0);   // drain
    checks++;
    if (model.size() != 0 || out_present !== 1'b0) begin
      failures++;
      $display("FAIL: buffer did not drain");
    end
    $display("absent inputs %0d, empty lists %0d, cut inputs %0d, 1..4 items %0d %0d %0d %0d",
             n_absent_in, n_empty_list, n_cut, n_width[1], n_width[2], n_width[3], n_width[4]);
    $display("items out %0d, empty cycles %0d, full cycles %0d, dropped items %0d, empty-to-output %0d",
             n_out, n_empty_out, n_full, n_overflow, n_latency1);
    foreach (n_width[k]) if (k > 0) begin
      checks++;
      if (n_width[k] == 0) begin failures++; $display("FAIL: never %0d items at once", k); end
    end
    checks += 7;
    if (n_absent_in == 0) begin failures++; $display("FAIL: no absent input"); end
    if (n_empty_list == 0) begin failures++; $display("FAIL: no empty input list"); end
    if (n_cut == 0) begin failures++; $display("FAIL: no input list cut"); end
    if (n_empty_out == 0) begin failures++; $display("FAIL: buffer never empty"); end
    if (n_full == 0) begin failures++; $display("FAIL: buffer never full"); end
    if (n_overflow == 0) begin failures++; $display("FAIL: no overflow"); end
    if (n_latency1 == 0) begin failures++; $display("FAIL: no empty-to-output transfer"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
