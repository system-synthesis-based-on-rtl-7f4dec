// tb_state_register: checks asynchronous reset to INIT, loading on each
// rising clock edge and holding between edges.
module tb_state_register;
  localparam int WIDTH = 12;
  localparam logic [WIDTH-1:0] INIT = 12'hA5C;

  logic             event_clk = 1'b0;
  logic             rst_n = 1'b1;
  logic [WIDTH-1:0] next_state = '0;
  logic [WIDTH-1:0] state;
  int checks = 0, failures = 0;

  state_register #(.WIDTH(WIDTH), .INIT(INIT)) dut (.*);

  always #5 event_clk = ~event_clk;

  task automatic check(input logic [WIDTH-1:0] exp, input string what);
    checks++;
    if (state !== exp) begin
      failures++;
      $display("FAIL %s: state=%0h expected %0h", what, state, exp);
    end
  endtask

  initial begin
    repeat (1000) @(posedge event_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] v, prev;
    #1 rst_n = 1'b0;                       // power-on reset
    #1 check(INIT, "reset");
    @(negedge event_clk) rst_n = 1'b1;
    @(posedge event_clk) #1 check(next_state, "first load after reset");
    prev = next_state;
    for (int i = 0; i < 100; i++) begin
      v = WIDTH'($urandom);
      @(negedge event_clk) next_state = v;
      #2 check(prev, "hold between edges");
      @(posedge event_clk) #1 check(v, "load");
      prev = v;
    end
    // asynchronous reset away from a clock edge
    @(negedge event_clk) next_state = ~INIT;
    #2 rst_n = 1'b0;
    #1 check(INIT, "async reset");
    @(posedge event_clk) #1 check(INIT, "held in reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
