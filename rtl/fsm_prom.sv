// fsm_prom: the 64x4 PROM that holds the whole asynchronous machine.
//
// Each address is one combination of present state y2y1y0 (A5..A3), input
// vector x1x0 (A2..A1) and synchronizing input S (A0). The word stored there
// is the next state (D3..D1) and the output Z of the present state (D0). The
// contents are the two published memory maps: PROM_CASE1 (Q2 left through Q3
// on x1x0 = 00) and PROM_CASE2 (Q2 held until S rises, then straight to Q4).
// The three unused state codes map to Q0 with Z = 0 for every input.
//
// Interface: addr in, data out, oe_n active-low output enable. The read is
// purely combinational, as in a PROM chip: data follows addr with no clock.
// A real PROM floats its outputs when OE is high; this two-state model drives
// all zeros instead (design choice), which reads as "go to Q0, Z = 0". The
// machine ties oe_n low, as the published schematic does.
//
// The table is built at elaboration by rom_word(), which lists the memory
// map row by row; it synthesizes to a 64x4 constant table.
module fsm_prom
  import cert_fsm_pkg::*;
#(
  parameter prom_case_e CONTENT = PROM_CASE1
) (
  input  prom_addr_t addr,
  input  logic       oe_n,
  output prom_data_t data
);

  // One row of the published memory map: next state and Z for an address.
  function automatic prom_data_t rom_word(prom_case_e c, prom_addr_t a);
    prom_data_t w;
    w = '{next: Q0, z: 1'b0};
    unique case (a.state)
      Q0: begin                                  // rows 00..07
        unique case (a.x)
          2'b00:   w = '{next: Q0, z: 1'b0};
          2'b01:   w = '{next: Q1, z: 1'b0};
          2'b10:   w = '{next: Q0, z: 1'b0};
          default: w = '{next: Q2, z: 1'b0};
        endcase
      end
      Q1: begin                                  // rows 08..0F
        unique case (a.x)
          2'b00:   w = a.s ? '{next: Q1, z: 1'b0} : '{next: Q3, z: 1'b0};
          2'b01:   w = '{next: Q1, z: 1'b0};
          2'b10:   w = '{next: Q0, z: 1'b0};
          default: w = '{next: Q2, z: 1'b0};
        endcase
      end
      Q2: begin                                  // rows 10..17
        unique case (a.x)
          2'b00: begin
            if (c == PROM_CASE1)
              w = a.s ? '{next: Q2, z: 1'b1} : '{next: Q3, z: 1'b1};
            else
              w = a.s ? '{next: Q4, z: 1'b1} : '{next: Q2, z: 1'b1};
          end
          2'b01:   w = '{next: Q0, z: 1'b1};
          2'b10:   w = '{next: Q0, z: 1'b1};
          default: w = '{next: Q2, z: 1'b1};
        endcase
      end
      Q3:      w = a.s ? '{next: Q4, z: 1'b0} : '{next: Q3, z: 1'b0};  // 18..1F
      Q4:      w = a.s ? '{next: Q4, z: 1'b1} : '{next: Q0, z: 1'b1};  // 20..27
      default: w = '{next: Q0, z: 1'b0};                                // 28..3F
    endcase
    return w;
  endfunction

  typedef logic [DEPTH-1:0][DATA_W-1:0] rom_t;

  function automatic rom_t build_rom(prom_case_e c);
    rom_t r;
    r = '0;
    for (int i = 0; i < int'(DEPTH); i++) r[i] = rom_word(c, prom_addr_t'(i[ADDR_W-1:0]));
    return r;
  endfunction

  localparam rom_t ROM = build_rom(CONTENT);

  always_comb begin
    if (oe_n) data = '0;
    else      data = prom_data_t'(ROM[addr]);
  end

endmodule
