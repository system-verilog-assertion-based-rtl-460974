// Directed testbench for ahb_lite_top at its default parameters.
//
// It replays the reference transactions of the design description on the
// full interconnect: a 4-beat wrapping burst of 32-bit words, written with
// the value 0xAA from address 0x34, which must visit 0x34, 0x38, 0x3C, 0x30
// in slave 0 and take 4 back-to-back address phases; a wrapping read of the
// same words; an 8-beat wrapping burst from 0x34, which wraps at 0x40 back to
// 0x20; then single writes and reads of 0xAA at 0x54 (slave 1) and
// 0x94 (slave 2), each selecting only its own slave; and a read at 0xA0,
// outside the map, which must end in ERROR.
module ahb_lite_top_full_tb;
  import ahb_lite_pkg::*;

  logic HCLK = 1'b0, HRESETn = 1'b0;
  always #5 HCLK = ~HCLK;

  logic        cmd_valid, cmd_ready, cmd_write, pause, wr_pop;
  logic [31:0] cmd_addr, wr_data;
  hsize_t      cmd_size;
  hburst_t     cmd_burst;
  logic [7:0]  cmd_len;
  logic        rsp_valid, rsp_write, rsp_error;
  logic [31:0] rsp_rdata;
  logic [31:0] HADDR;
  htrans_t     HTRANS;
  logic        HWRITE, HREADY, HRESP, HSELDEF;
  logic [2:0]  HSEL;

  ahb_lite_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  assign wr_data = 32'h0000_00AA;
  assign pause   = 1'b0;

  // record every accepted beat and every response
  logic [31:0] beat_addr[$];
  logic [3:0]  beat_sel[$];
  int          beat_cycle[$];
  logic [31:0] rsp_data[$];
  bit          rsp_err[$];
  int          rsp_cycle[$];
  int          cycle = 0;

  always @(posedge HCLK) begin
    if (HRESETn && HREADY && HTRANS[1]) begin
      beat_addr.push_back(HADDR);
      beat_sel.push_back({HSELDEF, HSEL});
      beat_cycle.push_back(cycle);
    end
    if (HRESETn && rsp_valid) begin
      rsp_data.push_back(rsp_rdata);
      rsp_err.push_back(rsp_error);
      rsp_cycle.push_back(cycle);
    end
    cycle++;
  end

  task automatic run(input logic [31:0] a, input bit wr, input hburst_t burst, input int beats);
    beat_addr.delete(); beat_sel.delete(); beat_cycle.delete();
    rsp_data.delete(); rsp_err.delete(); rsp_cycle.delete();
    @(negedge HCLK);
    cmd_valid = 1; cmd_addr = a; cmd_write = wr; cmd_size = HSIZE_WORD;
    cmd_burst = burst; cmd_len = 8'd1;
    #4;
    while (!cmd_ready) begin @(negedge HCLK); #4; end
    @(posedge HCLK);
    #1 cmd_valid = 0;
    for (int g = 0; g < 50 && rsp_data.size() < beats; g++) @(posedge HCLK);
    repeat (2) @(posedge HCLK);
    check(rsp_data.size() == beats, $sformatf("%0d responses for %0d beats", rsp_data.size(), beats));
  endtask

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [31:0] wrap_order [4] = '{32'h34, 32'h38, 32'h3C, 32'h30};
    static logic [31:0] wrap8_order [8] = '{32'h34, 32'h38, 32'h3C, 32'h20, 32'h24, 32'h28, 32'h2C, 32'h30};
    cmd_valid = 0; cmd_addr = 0; cmd_write = 0; cmd_size = HSIZE_WORD;
    cmd_burst = HBURST_SINGLE; cmd_len = 0;
    repeat (3) @(posedge HCLK);
    HRESETn = 1;
    repeat (2) @(posedge HCLK);

    // wrapping write burst, 4 beats of 32 bits from 0x34
    run(32'h34, 1, HBURST_WRAP4, 4);
    check(beat_addr.size() == 4, "4 beats");
    for (int k = 0; k < 4 && k < beat_addr.size(); k++) begin
      check(beat_addr[k] == wrap_order[k], $sformatf("beat %0d at %h", k, beat_addr[k]));
      check(beat_sel[k] == 4'b0001, "slave 0 selected");
      check(beat_cycle[k] == beat_cycle[0] + k, "beats back to back");
      check(!rsp_err[k], "write OKAY");
    end
    check(rsp_cycle[3] == beat_cycle[0] + 4, "last write completes one cycle after the last address");

    // wrapping read of the same words
    run(32'h34, 0, HBURST_WRAP4, 4);
    for (int k = 0; k < 4 && k < rsp_data.size(); k++)
      check(rsp_data[k] == 32'hAA && !rsp_err[k], $sformatf("read beat %0d = %h", k, rsp_data[k]));

    // 8-beat wrapping word burst from 0x34: wraps at the 32-byte boundary
    run(32'h34, 1, HBURST_WRAP8, 8);
    for (int k = 0; k < 8 && k < beat_addr.size(); k++)
      check(beat_addr[k] == wrap8_order[k], $sformatf("wrap8 beat %0d at %h", k, beat_addr[k]));

    // slave 1 and slave 2
    run(32'h54, 1, HBURST_SINGLE, 1);
    check(beat_sel[0] == 4'b0010, "0x54 selects slave 1");
    run(32'h54, 0, HBURST_SINGLE, 1);
    check(rsp_data[0] == 32'hAA, "0x54 reads back");
    run(32'h94, 1, HBURST_SINGLE, 1);
    check(beat_sel[0] == 4'b0100, "0x94 selects slave 2");
    run(32'h94, 0, HBURST_SINGLE, 1);
    check(rsp_data[0] == 32'hAA, "0x94 reads back");
    // a word of slave 0 that was never written
    run(32'h14, 0, HBURST_SINGLE, 1);
    check(beat_sel[0] == 4'b0001 && rsp_data[0] == 32'h0, "unwritten word reads 0");

    // outside the map
    run(32'hA0, 0, HBURST_SINGLE, 1);
    check(beat_sel[0] == 4'b1000 && rsp_err[0], "0xA0 answers ERROR");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
