// tb_state_delay: checks the feedback delay line. Random values are applied
// at every clock and q must equal d as it was STAGES clocks earlier, for the
// default depth (2) and for depths 1 and 5. Reset must load zero into every
// stage, so q reads 0 for the first STAGES clocks after reset.
module tb_state_delay;
  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n;
  logic [2:0] d;
  logic [2:0] q2, q1, q5;

  always #5 clk = ~clk;

  state_delay                     u_d2 (.clk(clk), .rst_n(rst_n), .d(d), .q(q2));
  state_delay #(.STAGES(1))       u_d1 (.clk(clk), .rst_n(rst_n), .d(d), .q(q1));
  state_delay #(.WIDTH(3), .STAGES(5)) u_d5 (.clk(clk), .rst_n(rst_n), .d(d), .q(q5));

  logic [2:0] hist [$];  // d applied before each rising edge, newest last

  task automatic check(string what, logic [2:0] got, logic [2:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s t=%0t got=%0d exp=%0d", what, $time, got, exp);
    end
  endtask

  function automatic logic [2:0] past(int n);
    // value applied n edges ago (n = 1: the latest edge); 0 before reset ended
    if (n > hist.size()) return 3'd0;
    return hist[hist.size() - n];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    d = 3'd7;
    repeat (3) @(negedge clk);
    check("reset d2", q2, 3'd0);
    check("reset d1", q1, 3'd0);
    check("reset d5", q5, 3'd0);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      d = 3'($urandom);
      @(posedge clk);
      hist.push_back(d);
      @(negedge clk);
      check("depth 1", q1, past(1));
      check("depth 2", q2, past(2));
      check("depth 5", q5, past(5));
    end
    // Asynchronous reset in the middle of operation.
    #2 rst_n = 1'b0;
    #1;
    check("async reset d2", q2, 3'd0);
    check("async reset d5", q5, 3'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
