// state_delay: the delay element in the state feedback loop of the
// PROM-based machine.
//
// The PROM alone would feed its next-state outputs straight back to its own
// address lines, so the loop delay would be only the PROM access time. An
// extra delay is placed in the loop so that a new state settles on the
// address lines only after the old one has been fully decoded. Here that
// delay is a transport delay line of STAGES flip-flops clocked by a fast
// time-base clock: q is d as it was STAGES clock edges earlier. The time-base
// clock is this design's own choice for a synthesizable delay; it is not a
// clock of the machine and its period stands for one gate-level delay step.
// The machine's inputs must stay put for longer than STAGES clocks.
//
// Interface: clk time base, rst_n asynchronous active-low reset that loads
// Q0 (code 0) into every stage, d next state in, q present state out.
// Timing: latency STAGES clocks; STAGES = 0 is not allowed.
module state_delay #(
  parameter int unsigned WIDTH  = 3,
  parameter int unsigned STAGES = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] line [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(STAGES); i++) line[i] <= '0;
    end else begin
      line[0] <= d;
      for (int i = 1; i < int'(STAGES); i++) line[i] <= line[i-1];
    end
  end

  assign q = line[STAGES-1];

  initial assert (STAGES >= 1) else $error("state_delay: STAGES must be at least 1");

endmodule
