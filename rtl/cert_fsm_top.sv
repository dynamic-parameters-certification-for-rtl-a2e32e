// cert_fsm_top: asynchronous Moore machine whose active output has a
// guaranteed minimum width, set by a synchronizing input S.
//
// A plain asynchronous machine holds an output only for as long as the
// machine stays in the output state, which may be as short as a gate delay,
// and glitches in the next-state logic can skip an output state entirely.
// Here the whole machine is a 64x4 PROM (fsm_prom) whose next-state outputs
// return to its state address lines through a delay (state_delay). The
// input vector x1x0 is extended by S, a free-running 50% duty square wave
// much slower than the loop. When the machine must leave the state Q1 on
// x1x0 = 00, it waits for S to fall (Q1 -> Q3), waits for S to rise
// (Q3 -> Q4), holds Z = 1 for the whole high phase of S and returns to Q0
// when S falls. Z is therefore exactly one high phase of S long. In Q2, Z
// stays high for as long as x1x0 = 11. CONTENT selects which published PROM
// map is programmed (see cert_fsm_pkg); the structure, the pin assignment
// and both maps follow the published design.
//
// Design choices: the loop delay is a clocked transport delay of
// DELAY_STAGES time-base clocks (clk), reset (rst_n, asynchronous, active
// low) starts the machine in Q0, and the PROM output enable is tied active.
//
// Interface: x (x1x0) and s are sampled by the PROM at every time-base
// clock; y is the present state and z the output. Timing: an input change
// that moves the machine reaches y after DELAY_STAGES clocks; z follows y
// combinationally through the PROM.
module cert_fsm_top
  import cert_fsm_pkg::*;
#(
  parameter prom_case_e  CONTENT      = PROM_CASE1,
  parameter int unsigned DELAY_STAGES = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [X_W-1:0]     x,
  input  logic               s,
  output logic [STATE_W-1:0] y,
  output logic               z
);

  prom_addr_t addr;
  prom_data_t data;
  state_e     state;

  assign addr = '{state: state, x: x, s: s};

  fsm_prom #(.CONTENT(CONTENT)) u_prom (
    .addr (addr),
    .oe_n (1'b0),
    .data (data)
  );

  logic [STATE_W-1:0] state_q;

  state_delay #(.WIDTH(STATE_W), .STAGES(DELAY_STAGES)) u_delay (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (data.next),
    .q     (state_q)
  );

  assign state = state_e'(state_q);
  assign y     = state_q;
  assign z     = data.z;

  // The PROM never produces an unused state code, so after reset the
  // machine must stay within Q0..Q4.
  a_used_states : assert property (@(posedge clk) disable iff (!rst_n)
    state inside {Q0, Q1, Q2, Q3, Q4});

  // Z is active exactly in the two output states.
  a_z_states : assert property (@(posedge clk) disable iff (!rst_n)
    z == (state inside {Q2, Q4}));

  // The S-controlled output: Q4 is entered only from Q3 or Q2 on a high S.
  a_q4_entry : assert property (@(posedge clk) disable iff (!rst_n)
    (data.next == Q4 && state != Q4) |-> (s && state inside {Q2, Q3}));

endmodule
