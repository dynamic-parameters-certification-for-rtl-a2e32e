// cert_fsm_pkg: types and constants shared by the PROM-based asynchronous
// Moore machine with a synchronizing input.
//
// The machine has eight state codes (five used, Q0..Q4, three unused,
// Q5..Q7), a two-bit input vector x1x0 and one synchronizing input S. The
// 64x4 PROM is addressed by {state, x1x0, S} and returns {next state, Z}.
// The state codes and the address/data bit order follow the published
// state encoding (Q0 -> 000 ... Q7 -> 111) and PROM pin assignment
// (A5..A3 = y2y1y0, A2..A1 = x1x0, A0 = S, D3..D1 = next y2y1y0, D0 = Z).
package cert_fsm_pkg;

  localparam int unsigned STATE_W = 3;
  localparam int unsigned X_W     = 2;
  localparam int unsigned ADDR_W  = STATE_W + X_W + 1;  // 6 address lines
  localparam int unsigned DATA_W  = STATE_W + 1;        // 4 data lines
  localparam int unsigned DEPTH   = 1 << ADDR_W;        // 64 words

  // State register code y2y1y0.
  typedef enum logic [STATE_W-1:0] {
    Q0 = 3'b000,  // idle, Z = 0
    Q1 = 3'b001,  // x1x0 = 01 seen, Z = 0
    Q2 = 3'b010,  // x1x0 = 11, Z = 1 for as long as the inputs stay 11
    Q3 = 3'b011,  // waiting for the rising edge of S, Z = 0
    Q4 = 3'b100,  // Z = 1 for as long as S is high
    Q5 = 3'b101,  // unused, returns to Q0
    Q6 = 3'b110,  // unused, returns to Q0
    Q7 = 3'b111   // unused, returns to Q0
  } state_e;

  // Which of the two published PROM contents is programmed.
  //   PROM_CASE1: leaving Q2 on x1x0 = 00 goes through Q3 (Z drops to 0
  //               until S rises).
  //   PROM_CASE2: leaving Q2 on x1x0 = 00 waits in Q2 for S to rise and
  //               then jumps to Q4, so Z stays 1 without a gap.
  typedef enum logic {
    PROM_CASE1 = 1'b0,
    PROM_CASE2 = 1'b1
  } prom_case_e;

  // PROM address word: A5..A0.
  typedef struct packed {
    state_e         state;  // A5..A3
    logic [X_W-1:0] x;      // A2..A1 = x1x0
    logic           s;      // A0    = S
  } prom_addr_t;

  // PROM data word: D3..D0.
  typedef struct packed {
    state_e next;  // D3..D1
    logic   z;     // D0, output of the present state
  } prom_data_t;

endpackage
