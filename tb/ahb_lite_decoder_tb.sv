// Self-checking testbench for ahb_lite_decoder.
//
// Sweeps every byte address from 0x000 to 0x1FF and a set of random 32-bit
// addresses, and compares HSEL, HSELDEF and mux_sel with the address map of
// the three-slave system worked out here: slave 0 for 0x00-0x40, slave 1 for
// 0x41-0x60, slave 2 for 0x61-0x99, the default slave for everything else.
// The range edges (0x40/0x41, 0x60/0x61, 0x99/0x9A) are checked by name too.
module ahb_lite_decoder_tb;
  import ahb_lite_pkg::*;

  logic [31:0] HADDR;
  logic [2:0]  HSEL;
  logic        HSELDEF;
  logic [1:0]  mux_sel;

  ahb_lite_decoder dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int expected_slave(logic [31:0] a);
    if (a <= 32'h40) return 0;
    if (a <= 32'h60) return 1;
    if (a <= 32'h99) return 2;
    return 3;
  endfunction

  task automatic probe(input logic [31:0] a);
    int e;
    HADDR = a;
    #1;
    e = expected_slave(a);
    check(mux_sel == 2'(e), $sformatf("mux_sel %0d for %h, expected %0d", mux_sel, a, e));
    check(HSEL == ((e < 3) ? 3'(1 << e) : 3'b000), $sformatf("HSEL %b for %h", HSEL, a));
    check(HSELDEF == (e == 3), $sformatf("HSELDEF for %h", a));
  endtask

  int hits [4];

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 512; a++) begin
      probe(32'(a));
      hits[expected_slave(32'(a))]++;
    end
    for (int n = 0; n < 1000; n++) probe($urandom);
    probe(32'h40); check(HSEL == 3'b001, "0x40 belongs to slave 0");
    probe(32'h41); check(HSEL == 3'b010, "0x41 belongs to slave 1");
    probe(32'h60); check(HSEL == 3'b010, "0x60 belongs to slave 1");
    probe(32'h61); check(HSEL == 3'b100, "0x61 belongs to slave 2");
    probe(32'h99); check(HSEL == 3'b100, "0x99 belongs to slave 2");
    probe(32'h9A); check(HSELDEF,        "0x9A is unmapped");
    check(hits[0] == 65 && hits[1] == 32 && hits[2] == 57, "range sizes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
