// Self-checking testbench for ahb_lite_slave.
//
// The testbench plays the master and the bus: a pipelined driver puts one
// transfer per address phase on the bus (back to back, so a read can follow a
// write to the same word directly), with random byte, halfword and word
// sizes, random HSEL, IDLE gaps and misaligned addresses. HREADY is the
// slave's own HREADYOUT, as on a bus with one slave. A reference memory in the
// testbench predicts every read.
//
// Checks: read data; that deselected and IDLE transfers change nothing and
// answer OKAY at once; the two-cycle ERROR response for misaligned
// transfers; and the data-phase length: WAIT_STATES + 1 cycles for OKAY,
// WAIT_STATES + 2 for ERROR. The slave is run with WAIT_STATES = 2.
module ahb_lite_slave_tb;
  import ahb_lite_pkg::*;

  localparam int unsigned WAITS = 2;
  localparam int unsigned WORDS = 64;

  logic HCLK = 1'b0, HRESETn = 1'b0;
  always #5 HCLK = ~HCLK;

  logic        HSEL, HWRITE, HREADY, HREADYOUT, HRESP;
  logic [31:0] HADDR, HWDATA, HRDATA;
  hsize_t      HSIZE;
  hburst_t     HBURST;
  htrans_t     HTRANS;

  ahb_lite_slave #(.MEM_WORDS(WORDS), .WAIT_STATES(WAITS)) dut (.*);
  assign HREADY = HREADYOUT;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  typedef struct {
    bit          valid;   // NONSEQ with HSEL
    bit          sel;
    bit          nonseq;
    bit          write;
    logic [31:0] addr;
    int          size;
    logic [31:0] wdata;
  } xfer_t;

  xfer_t       ap, dp;               // address phase, data phase
  logic [31:0] ref_mem [WORDS];
  int          dp_cycles;
  int          n_err = 0, n_rd = 0, n_wr = 0, n_idle = 0;

  function automatic xfer_t random_xfer();
    xfer_t x;
    x.sel    = ($urandom_range(0, 7) != 0);
    x.nonseq = ($urandom_range(0, 5) != 0);
    x.valid  = x.sel && x.nonseq;
    x.write  = 1'($urandom_range(0, 1));
    x.size   = $urandom_range(0, 2);
    x.addr   = {24'h0, 8'($urandom)};
    if ($urandom_range(0, 7) != 0) x.addr = x.addr & ~((32'h1 << x.size) - 1);
    x.wdata  = $urandom;
    return x;
  endfunction

  function automatic bit misaligned(xfer_t x);
    return (x.addr & ((32'h1 << x.size) - 1)) != 0;
  endfunction

  // drive the address phase from ap and the data phase from dp
  always_comb begin
    HSEL   = ap.sel;
    HTRANS = ap.nonseq ? HTRANS_NONSEQ : HTRANS_IDLE;
    HADDR  = ap.addr;
    HWRITE = ap.write;
    HSIZE  = hsize_t'(ap.size);
    HBURST = HBURST_SINGLE;
    HWDATA = dp.wdata;
  end

  bit running = 0;
  always @(posedge HCLK) if (running) begin
    dp_cycles++;
    if (dp.valid) begin
      // inside a data phase
      if (!HREADY) begin
        check(dp_cycles <= WAITS + 2, "data phase too long");
        if (misaligned(dp)) check(HRESP || dp_cycles <= WAITS, "error first cycle");
      end else begin
        if (misaligned(dp)) begin
          check(HRESP == 1'b1, "ERROR expected");
          check(dp_cycles == WAITS + 2, $sformatf("error phase %0d cycles", dp_cycles));
          n_err++;
        end else begin
          check(HRESP == 1'b0, "OKAY expected");
          check(dp_cycles == WAITS + 1, $sformatf("data phase %0d cycles", dp_cycles));
          if (dp.write) begin
            int lo;
            lo = int'(dp.addr[1:0]);
            for (int b = lo; b < lo + (1 << dp.size); b++)
              ref_mem[dp.addr[7:2]][8*b +: 8] = dp.wdata[8*b +: 8];
            n_wr++;
          end else begin
            check(HRDATA == ref_mem[dp.addr[7:2]],
                  $sformatf("read %h got %h exp %h", dp.addr, HRDATA, ref_mem[dp.addr[7:2]]));
            n_rd++;
          end
        end
      end
    end else begin
      check(HREADY && !HRESP, "idle data phase must be ready and OKAY");
      n_idle++;
    end
    if (HREADY) begin
      dp <= ap;
      dp_cycles = 0;
      ap <= random_xfer();
    end
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < WORDS; i++) ref_mem[i] = 32'h0;
    ap = '{default: 0};
    dp = '{default: 0};
    repeat (3) @(posedge HCLK);
    HRESETn = 1;
    // a write followed directly by a read of the same word
    @(negedge HCLK);
    ap = '{1, 1, 1, 1, 32'h34, 2, 32'h0000_00AA};
    running = 1;
    @(posedge HCLK);
    while (!HREADY) @(posedge HCLK);
    #1 ap = '{1, 1, 1, 0, 32'h34, 2, 32'h0};
    repeat (3000) @(posedge HCLK);
    check(n_err > 0 && n_rd > 0 && n_wr > 0 && n_idle > 0, "every kind of transfer happened");
    $display("reads=%0d writes=%0d errors=%0d idle=%0d", n_rd, n_wr, n_err, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
