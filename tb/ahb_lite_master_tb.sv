// Self-checking testbench for ahb_lite_master.
//
// A behavioural slave in this file answers the master: a 256-word memory,
// random wait states, and the two-cycle ERROR response for addresses
// 0x300-0x3FF. A generator issues random bursts (every HBURST, byte, halfword
// and word sizes, reads and writes, random BUSY requests) plus the reference
// burst of the design description: a 4-beat wrapping word burst from 0x34,
// which must visit 0x34, 0x38, 0x3C, 0x30.
//
// Checks, against values the testbench computes itself:
//  * the address, HTRANS (NONSEQ first, SEQ after) and HWRITE of every
//    accepted beat, in order, including wrap-around;
//  * HWDATA of every write data phase equals the word handed over on wr_pop;
//  * read responses equal the model memory; error flags match the map;
//  * after an ERROR the rest of that burst is dropped;
//  * BUSY carries the next beat's address;
//  * timing: with no wait states and no BUSY, a 4-beat burst occupies 4
//    consecutive address-phase cycles and its last response arrives one cycle
//    after its last address phase.
module ahb_lite_master_tb;
  import ahb_lite_pkg::*;

  logic HCLK = 1'b0, HRESETn = 1'b0;
  always #5 HCLK = ~HCLK;

  logic              HREADY, HRESP;
  logic [31:0]       HRDATA, HADDR, HWDATA;
  logic              HWRITE;
  hsize_t            HSIZE;
  hburst_t           HBURST;
  htrans_t           HTRANS;
  logic              cmd_valid, cmd_ready, cmd_write, pause, wr_pop;
  logic [31:0]       cmd_addr, wr_data;
  hsize_t            cmd_size;
  hburst_t           cmd_burst;
  logic [7:0]        cmd_len;
  logic              rsp_valid, rsp_write, rsp_error;
  logic [31:0]       rsp_rdata;

  ahb_lite_master dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // ------------------------------------------------------------ slave model
  logic [31:0] mem [256];
  bit          wait_enable = 1'b1;
  int          s_wait;               // wait cycles left in the data phase
  bit          s_dp, s_wr, s_err, s_err2;
  logic [31:0] s_addr;
  hsize_t      s_size;

  function automatic bit in_error_region(logic [31:0] a);
    return a[11:8] == 4'h3;
  endfunction

  always_comb begin
    HREADY = 1'b1; HRESP = 1'b0; HRDATA = 32'h0;
    if (s_dp) begin
      if (s_wait > 0) HREADY = 1'b0;
      else if (s_err) begin HRESP = 1'b1; HREADY = s_err2; end
      else if (!s_wr) HRDATA = mem[s_addr[9:2]];
    end
  end

  always @(posedge HCLK) begin
    if (!HRESETn) begin
      s_dp <= 0; s_wait <= 0; s_err <= 0; s_err2 <= 0;
    end else begin
      if (s_dp && s_wait > 0) s_wait <= s_wait - 1;
      if (s_dp && s_wait == 0 && s_err) s_err2 <= 1;
      if (s_dp && HREADY && s_wr && !s_err)
        for (int b = 0; b < 4; b++)
          if (((int'(s_addr[1:0]) & ~((1 << s_size) - 1)) <= b) && (b < (int'(s_addr[1:0]) & ~((1 << s_size) - 1)) + (1 << s_size)))
            mem[s_addr[9:2]][8*b +: 8] <= HWDATA[8*b +: 8];
      if (HREADY) begin
        s_dp   <= HTRANS[1];
        s_wr   <= HWRITE;
        s_addr <= HADDR;
        s_size <= HSIZE;
        s_err  <= in_error_region(HADDR);
        s_err2 <= 0;
        s_wait <= wait_enable ? int'($urandom_range(0, 2)) : 0;
      end
    end
  end

  // ------------------------------------------------------- expected traffic
  typedef struct {
    logic [31:0] addr;
    bit          first;
    bit          write;
    int          cmd;
  } beat_t;
  beat_t       exp_beats[$];
  logic [31:0] shadow [256];        // what the memory should hold

  // independent burst address list: wrap = keep the aligned block, walk the
  // offset modulo the block size
  task automatic push_burst(input int id, input logic [31:0] a, input bit wr,
                            input int sz, input int burst, input int len);
    int beats, step, block;
    beats = (burst == 0) ? 1 : (burst == 1) ? ((len == 0) ? 1 : len) :
            (burst <= 3) ? 4 : (burst <= 5) ? 8 : 16;
    step  = 1 << sz;
    block = beats * step;
    for (int k = 0; k < beats; k++) begin
      beat_t bt;
      if (burst == 2 || burst == 4 || burst == 6)
        bt.addr = (a / block) * block + ((a % block) + k * step) % block;
      else
        bt.addr = a + k * step;
      bt.first = (k == 0);
      bt.write = wr;
      bt.cmd   = id;
      exp_beats.push_back(bt);
    end
  endtask

  // ------------------------------------------------------------ write data
  int wcount = 0;
  function automatic logic [31:0] wword(int n);
    return 32'h9E37_79B9 * (n + 1) ^ 32'h0000_00AA;
  endfunction
  assign wr_data = wword(wcount);

  // ------------------------------------------------------------- monitor
  typedef struct { logic [31:0] addr; bit write; hsize_t size; logic [31:0] wdata; int cmd; } dp_t;
  dp_t   dp_q[$];
  logic [31:0] exp_beats_prev;
  int    cancelled_cmd = -1;
  int    n_busy = 0, n_err = 0, n_wrap = 0, n_reads = 0, n_writes = 0;
  int    last_rsp_cycle, first_cycle, cycle = 0;


  always @(posedge HCLK) if (HRESETn) begin
    // data phase completes
    if (rsp_valid) begin
      dp_t d;
      check(dp_q.size() > 0, "response without a data phase");
      if (dp_q.size() > 0) begin
        d = dp_q.pop_front();
        check(rsp_write == d.write, "rsp_write");
        check(rsp_error == in_error_region(d.addr), $sformatf("rsp_error at %h", d.addr));
        if (d.write) begin
          check(HWDATA == d.wdata, $sformatf("HWDATA %h exp %h", HWDATA, d.wdata));
          n_writes++;
        end
        if (!d.write && !rsp_error) begin
          check(rsp_rdata == shadow[d.addr[9:2]], $sformatf("read %h got %h exp %h",
                d.addr, rsp_rdata, shadow[d.addr[9:2]]));
          n_reads++;
        end
        if (d.write && !rsp_error)
          for (int b = 0; b < 4; b++)
            if (b >= (int'(d.addr[1:0]) & ~((1 << d.size) - 1)) &&
                b < (int'(d.addr[1:0]) & ~((1 << d.size) - 1)) + (1 << d.size))
              shadow[d.addr[9:2]][8*b +: 8] = d.wdata[8*b +: 8];
        if (rsp_error) begin
          n_err++;
          // the rest of this burst must not appear
          while (exp_beats.size() > 0 && exp_beats[0].cmd == d.cmd && !exp_beats[0].first)
            void'(exp_beats.pop_front());
        end
        last_rsp_cycle = cycle;
      end
    end
    if (HREADY && HTRANS == HTRANS_BUSY) begin
      n_busy++;
      check(exp_beats.size() > 0 && HADDR == exp_beats[0].addr, "BUSY address");
    end
    // address phase accepted
    if (HREADY && HTRANS[1]) begin
      beat_t e;
      check(exp_beats.size() > 0, "unexpected beat");
      if (exp_beats.size() > 0) begin
        e = exp_beats.pop_front();
        check(HADDR == e.addr, $sformatf("HADDR %h exp %h", HADDR, e.addr));
        check((HTRANS == HTRANS_NONSEQ) == e.first, "NONSEQ/SEQ");
        check(HWRITE == e.write, "HWRITE");
        if (HTRANS == HTRANS_SEQ && HADDR < exp_beats_prev) n_wrap++;
        dp_q.push_back('{HADDR, HWRITE, HSIZE, wr_data, e.cmd});
        if (e.first) first_cycle = cycle;
      end
    end
    if (wr_pop) wcount <= wcount + 1;
    cycle++;
  end
  always @(posedge HCLK) if (HREADY && HTRANS[1]) exp_beats_prev <= HADDR;

  // ------------------------------------------------------------- driver
  int n_cmd = 0;
  bit pause_enable = 0;
  // BUSY requests: a random third of the cycles while enabled
  always @(negedge HCLK) pause = pause_enable && ($urandom_range(0, 2) == 0);
  task automatic issue(input logic [31:0] a, input bit wr, input int sz, input int burst, input int len);
    // drive between clock edges, sample cmd_ready just before the edge
    @(negedge HCLK);
    cmd_valid = 1; cmd_addr = a; cmd_write = wr; cmd_size = hsize_t'(sz);
    cmd_burst = hburst_t'(burst); cmd_len = 8'(len);
    #4;
    while (!cmd_ready) begin @(negedge HCLK); #4; end
    @(posedge HCLK);
    push_burst(n_cmd, a, wr, sz, burst, len);
    n_cmd++;
    #1 cmd_valid = 0;
  endtask

  task automatic drain();
    int guard = 0;
    while ((exp_beats.size() > 0 || dp_q.size() > 0) && guard < 1000) begin
      @(posedge HCLK); guard++;
    end
    repeat (2) @(posedge HCLK);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cmd_valid = 0; pause = 0; cmd_addr = 0; cmd_write = 0; cmd_size = HSIZE_WORD;
    cmd_burst = HBURST_SINGLE; cmd_len = 0;
    for (int i = 0; i < 256; i++) begin mem[i] = 32'h0; shadow[i] = 32'h0; end
    repeat (3) @(posedge HCLK);
    HRESETn <= 1;
    @(posedge HCLK);

    // reference burst: write then read a 4-beat word wrap from 0x34,
    // no wait states, to check the address order and the timing
    wait_enable = 0;
    issue(32'h34, 1, 2, 2, 0);
    drain();
    // NONSEQ accepted at edge n, SEQs at n+1..n+3, last response at n+4
    check(last_rsp_cycle - first_cycle == 4, $sformatf("4-beat burst: last response %0d edges after NONSEQ",
          last_rsp_cycle - first_cycle));
    issue(32'h34, 0, 2, 2, 0);
    drain();

    // back-to-back bursts: the next NONSEQ follows the last SEQ directly
    issue(32'h10, 1, 2, 3, 0);
    issue(32'h80, 1, 2, 1, 3);
    drain();

    // random traffic with wait states, BUSY and errors
    wait_enable = 1;
    pause_enable = 1;
    for (int n = 0; n < 300; n++) begin
      int sz, burst, len;
      logic [31:0] a;
      sz    = $urandom_range(0, 2);
      burst = $urandom_range(0, 7);
      len   = $urandom_range(1, 6);
      a     = {24'h0, 8'($urandom)} & ~((32'h1 << sz) - 1);
      a[9:8] = 2'($urandom_range(0, 2));
      if ($urandom_range(0, 7) == 0) a[9:8] = 2'b11;    // error region
      issue(a, 1'($urandom_range(0, 1)), sz, burst, len);
      if ($urandom_range(0, 4) == 0) drain();
    end
    pause_enable = 0;
    drain();

    check(exp_beats.size() == 0 && dp_q.size() == 0, "all beats done");
    check(n_busy > 0,  "BUSY never issued");
    check(n_err > 0,   "ERROR never seen");
    check(n_wrap > 0,  "no wrap-around");
    $display("beats: reads=%0d writes=%0d busy=%0d errors=%0d wraps=%0d",
             n_reads, n_writes, n_busy, n_err, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
