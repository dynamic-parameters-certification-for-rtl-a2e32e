// tb_cert_fsm_case2: end-to-end test of the machine programmed with memory
// map PROM_CASE2 and a three-stage loop delay.
//
// S runs free as a 50% duty square wave of 2*HALF clocks. The test has a
// directed part and a random part. Directed: the x1x0 = 01 -> 00 change in
// Q1 (the change that makes a gate-level version of the four-state machine
// skip its output state) must give one Z pulse exactly one high phase of S
// long; Z in Q2 must last exactly as long as x1x0 = 11; leaving Q2 on
// x1x0 = 00 while S is low must hold Q2 (Z = 1) until S rises and then go
// straight to Q4, so Z never drops between the two output states;
// a move must reach y exactly DELAY_STAGES clocks after the input change.
// Random: x1x0 changes at random times while S runs; y and Z are compared
// at every clock with a reference built from the transition graph and the
// same loop delay. Inputs obey fundamental mode: x1x0 never changes within
// DELAY_STAGES + 1 clocks of an S edge. Each mechanism is counted and one
// that never happened counts as a failure.
module tb_cert_fsm_case2;
  import cert_fsm_pkg::*;
  import cert_fsm_ref_pkg::*;

  localparam prom_case_e CASE   = PROM_CASE2;  // map without the Q3 gap
  localparam int         STAGES = 3;           // longer loop delay
  localparam int         HALF   = 20;          // S high (and low) phase, clocks
  localparam int         SEGS   = 3000;        // random input segments

  int checks = 0;
  int failures = 0;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [1:0] x;
  logic       s;
  logic [2:0] y;
  logic       z;

  always #5 clk = ~clk;

  cert_fsm_top #(.CONTENT(CASE), .DELAY_STAGES(STAGES)) dut (.clk(clk), .rst_n(rst_n), .x(x), .s(s), .y(y), .z(z));

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at t=%0t y=%0d z=%b x=%b s=%b", what, $time, y, z, x, s);
    end
  endtask

  // ---------------------------------------------------------------- S source
  logic s_run;
  int   s_pos;  // clocks since the last S edge
  always @(negedge clk) begin
    if (!s_run) begin
      s     <= 1'b0;
      s_pos <= 0;
    end else if (s_pos == HALF - 1) begin
      s     <= ~s;
      s_pos <= 0;
    end else begin
      s_pos <= s_pos + 1;
    end
  end

  // ------------------------------------------------------ reference model
  state_e ref_line [STAGES];
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < STAGES; i++) ref_line[i] <= Q0;
    end else begin
      ref_line[0] <= graph_next(CASE, ref_line[STAGES-1], x, s);
      for (int i = 1; i < STAGES; i++) ref_line[i] <= ref_line[i-1];
    end
  end

  logic compare_on;
  always @(negedge clk) begin
    if (compare_on) begin
      check("y matches graph", y == ref_line[STAGES-1]);
      check("z matches graph", z == graph_z(ref_line[STAGES-1]));
    end
  end

  // ------------------------------------------------- mechanism monitoring
  int n_s_pulse, n_x_held, n_q2_q4_direct, n_q1_hazard, n_latency, n_visit [8];
  state_e prev_y, q4_from;
  int     q4_len;
  always @(posedge clk) begin
    if (rst_n && compare_on) begin
      n_visit[y]++;
      if (y == Q4 && prev_y != Q4) begin
        q4_from = prev_y;
        q4_len  = 1;
        if (prev_y == Q2) n_q2_q4_direct++;
      end else if (y == Q4) begin
        q4_len++;
      end else if (prev_y == Q4 && q4_from == Q3) begin
        // an S-timed pulse that started from Q3: exactly one high phase
        check("Q4 pulse is one S high phase", q4_len == HALF);
        n_s_pulse++;
      end
      prev_y = state_e'(y);
    end
  end

  // ------------------------------------------------------------ helpers
  task automatic wait_s_edge(logic level, int after);
    // wait until S has just reached 'level', then 'after' more clocks
    while (!(s == level && s_pos == 0)) @(negedge clk);
    repeat (after) @(negedge clk);
  endtask

  task automatic settle();
    repeat (STAGES + 2) @(negedge clk);
  endtask

  initial begin
    #10ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, w, hold, gap;
    bit seen_q3;
    rst_n = 1'b0;
    x = 2'b00;
    s_run = 1'b0;
    compare_on = 1'b0;
    prev_y = Q0;
    q4_from = Q0;
    q4_len = 0;
    n_s_pulse = 0; n_x_held = 0; n_q2_q4_direct = 0; n_q1_hazard = 0; n_latency = 0;
    foreach (n_visit[i]) n_visit[i] = 0;
    repeat (3) @(negedge clk);
    check("reset state Q0", y == 3'(Q0) && z == 1'b0);
    rst_n = 1'b1;
    s_run = 1'b1;
    compare_on = 1'b1;
    @(negedge clk);

    // --- latency: Q0 --01--> Q1 lands after exactly STAGES clocks
    wait_s_edge(1'b1, STAGES + 2);
    x = 2'b01;
    lat = 0;
    while (y != 3'(Q1) && lat < 50) begin @(negedge clk); lat++; end
    check("Q0->Q1 latency equals loop delay", lat == STAGES);
    if (lat == STAGES) n_latency++;

    // --- Q1, x 01 -> 00 while S is high: stay in Q1 until S falls, then
    //     Q3, then one Z pulse of one S high phase, then back to Q0
    settle();
    x = 2'b00;
    settle();
    check("Q1 held while S high", y == 3'(Q1) && z == 1'b0);
    wait_s_edge(1'b0, STAGES);
    check("Q3 after S falls", y == 3'(Q3) && z == 1'b0);
    w = 0;
    while (!z && w < 10 * HALF) begin @(negedge clk); w++; end
    check("Q4 after S rises", y == 3'(Q4) && z == 1'b1);
    w = 0;
    while (z && w < 10 * HALF) begin @(negedge clk); w++; end
    check("hazard case: Z pulse is one S high phase", w == HALF);
    check("hazard case: back to Q0", y == 3'(Q0));
    if (w == HALF) n_q1_hazard++;

    // --- Q2: Z lasts as long as x1x0 = 11
    settle();
    hold = 23;
    wait_s_edge(1'b0, STAGES + 2);
    x = 2'b11;
    repeat (STAGES) @(negedge clk);
    check("Q2 entered", y == 3'(Q2) && z);
    repeat (hold - STAGES) @(negedge clk);
    x = 2'b10;
    w = 0;
    while (z && w < 100) begin @(negedge clk); w++; end
    check("Q2 output lasts while x = 11", w == STAGES);
    check("Q2 left to Q0 on 10", y == 3'(Q0));
    n_x_held++;

    // --- Q2 left on x1x0 = 00 while S is low (map case 2): Q2 holds Z = 1
    //     until S rises, then Q4 keeps it until S falls; no Z = 0 gap
    settle();
    wait_s_edge(1'b0, STAGES + 2);
    x = 2'b11;
    settle();
    x = 2'b00;
    gap = 0;
    seen_q3 = 0;
    w = 0;
    while (y != 3'(Q0) && w < 10 * HALF) begin
      @(negedge clk);
      w++;
      if (y == 3'(Q3)) seen_q3 = 1;
      if (y != 3'(Q0) && !z) gap++;
    end
    check("Q2 -> Q4 without Q3", !seen_q3 && y == 3'(Q0));
    check("Z continuous from Q2 through Q4", gap == 0);

    // --- random inputs under fundamental mode
    for (int seg = 0; seg < SEGS; seg++) begin
      int len;
      len = 3 + int'($urandom_range(0, 40));
      repeat (len) @(negedge clk);
      while (s_pos <= STAGES || s_pos >= HALF - STAGES - 2) @(negedge clk);
      x = 2'($urandom);
    end
    settle();

    $display("mechanisms: s_pulse=%0d x_held=%0d q2_q4_direct=%0d q1_hazard=%0d latency=%0d",
             n_s_pulse, n_x_held, n_q2_q4_direct, n_q1_hazard, n_latency);
    $display("visits: Q0=%0d Q1=%0d Q2=%0d Q3=%0d Q4=%0d", n_visit[0], n_visit[1],
             n_visit[2], n_visit[3], n_visit[4]);
    check("S-timed pulse happened", n_s_pulse > 10);
    check("x-held output happened", n_x_held > 0);
    check("Q2-Q4 direct path happened", n_q2_q4_direct > 0);
    check("Q1 01->00 case happened", n_q1_hazard > 0);
    check("loop latency measured", n_latency > 0);
    for (int i = 0; i < 5; i++) check("every used state visited", n_visit[i] > 0);
    check("no unused state visited", n_visit[5] + n_visit[6] + n_visit[7] == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
