// Self-checking testbench for ahb_lite_mux.
//
// Each of the four responder inputs (three slaves and the default slave)
// carries random read data, ready and response values every cycle. The
// decoder select changes at random. The testbench keeps its own copy of the
// data-phase select, which may only take the decoder's value on a clock edge
// at which the routed HREADY is high, and checks that HRDATA, HREADY and HRESP
// come from that responder. After reset the default responder must be routed.
module ahb_lite_mux_tb;
  import ahb_lite_pkg::*;

  logic HCLK = 1'b0, HRESETn = 1'b0;
  always #5 HCLK = ~HCLK;

  logic [1:0]        mux_sel;
  logic [3:0][31:0]  HRDATA_S;
  logic [3:0]        HREADYOUT_S, HRESP_S;
  logic [31:0]       HRDATA;
  logic              HREADY, HRESP;

  ahb_lite_mux dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  int ref_sel = 3;
  int n_stall = 0, n_switch = 0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mux_sel = 2'd0; HRDATA_S = '0; HREADYOUT_S = '1; HRESP_S = '0;
    repeat (2) @(posedge HCLK);
    #1;
    check(HREADY && !HRESP && HRDATA == 32'h0, "default slave routed after reset");
    HRESETn = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge HCLK);
      mux_sel = 2'($urandom_range(0, 3));
      for (int i = 0; i < 4; i++) begin
        HRDATA_S[i]    = $urandom;
        HREADYOUT_S[i] = ($urandom_range(0, 3) != 0);
        HRESP_S[i]     = ($urandom_range(0, 5) == 0);
      end
      #1;
      check(HRDATA == HRDATA_S[ref_sel], "HRDATA routed");
      check(HREADY == HREADYOUT_S[ref_sel], "HREADY routed");
      check(HRESP == HRESP_S[ref_sel], "HRESP routed");
      @(posedge HCLK);
      if (HREADY) begin
        if (ref_sel != int'(mux_sel)) n_switch++;
        ref_sel = int'(mux_sel);
      end else begin
        n_stall++;
      end
    end
    check(n_stall > 0 && n_switch > 0, "stalls and switches happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
