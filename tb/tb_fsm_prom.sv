// tb_fsm_prom: exhaustive check of both PROM memory maps. Every one of the
// 64 addresses is applied to a PROM programmed with each map and the word
// read back is compared with the next state and output taken from the
// transition graph (cert_fsm_ref_pkg). The output enable is also checked:
// with oe_n high the model drives all zeros.
module tb_fsm_prom;
  import cert_fsm_pkg::*;
  import cert_fsm_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  prom_addr_t addr;
  logic       oe_n;
  prom_data_t data1, data2;

  fsm_prom #(.CONTENT(PROM_CASE1)) u_case1 (.addr(addr), .oe_n(oe_n), .data(data1));
  fsm_prom #(.CONTENT(PROM_CASE2)) u_case2 (.addr(addr), .oe_n(oe_n), .data(data2));

  task automatic check(string what, logic [3:0] got, logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s addr=%02h got=%b exp=%b", what, addr, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    oe_n = 1'b0;
    for (int a = 0; a < 64; a++) begin
      addr = prom_addr_t'(a[5:0]);
      #1;
      check("case1", data1, {graph_next(PROM_CASE1, addr.state, addr.x, addr.s), graph_z(addr.state)});
      check("case2", data2, {graph_next(PROM_CASE2, addr.state, addr.x, addr.s), graph_z(addr.state)});
    end
    // A few hand-read words of the published maps.
    addr = prom_addr_t'(6'h08); #1; check("case1 08", data1, 4'b0110);
    addr = prom_addr_t'(6'h10); #1; check("case1 10", data1, 4'b0111);
    check("case2 10", data2, 4'b0101);
    addr = prom_addr_t'(6'h11); #1; check("case2 11", data2, 4'b1001);
    addr = prom_addr_t'(6'h19); #1; check("case1 19", data1, 4'b1000);
    addr = prom_addr_t'(6'h25); #1; check("case1 25", data1, 4'b1001);
    addr = prom_addr_t'(6'h3F); #1; check("case1 3F", data1, 4'b0000);
    // Output enable inactive.
    oe_n = 1'b1;
    for (int a = 0; a < 64; a += 5) begin
      addr = prom_addr_t'(a[5:0]);
      #1;
      check("oe_n case1", data1, 4'b0000);
      check("oe_n case2", data2, 4'b0000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
