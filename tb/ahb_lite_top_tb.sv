// End-to-end testbench for ahb_lite_top.
//
// A generator makes random burst commands over the whole address map
// (0x000-0x0FF, so each of the three slaves and the unmapped range above 0x99
// are hit) with every HBURST type, byte, halfword and word sizes, some
// misaligned start addresses, and random BUSY requests. The driver hands them
// to the master's command port; write data comes from a counter-based
// sequence. The monitor follows the bus and the response port and compares
// them with a reference model kept here: the address map, the burst address
// sequence and one memory per slave.
//
// The slaves run with 0, 1 and 2 wait states, so the interconnect's HREADY
// routing is exercised. Every mechanism of the design is counted and must
// occur: selection of each slave and of the default slave, wrapping and
// incrementing bursts, BUSY cycles, wait states, ERROR from the default slave
// and from a misaligned transfer, and a read directly after a write to the
// same word.
module ahb_lite_top_tb;
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

  ahb_lite_top #(.WAIT_S0(0), .WAIT_S1(1), .WAIT_S2(2)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // ------------------------------------------------------- reference model
  function automatic int slave_of(logic [31:0] a);
    if (a <= 32'h40) return 0;
    if (a <= 32'h60) return 1;
    if (a <= 32'h99) return 2;
    return 3;                        // default slave
  endfunction

  function automatic bit is_misaligned(logic [31:0] a, int sz);
    return (a & ((32'h1 << sz) - 1)) != 0;
  endfunction

  logic [31:0] ref_mem [3][64];

  typedef struct {
    logic [31:0] addr;
    bit          first;
    bit          write;
    int          size;
    int          cmd;
  } beat_t;
  beat_t exp_beats[$];

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
      bt.size  = sz;
      bt.cmd   = id;
      exp_beats.push_back(bt);
    end
  endtask

  // ------------------------------------------------------------ write data
  int wcount = 0;
  assign wr_data = 32'h9E37_79B9 * (wcount + 1) ^ 32'h0000_00AA;

  // ------------------------------------------------------------- monitor
  typedef struct { beat_t b; logic [31:0] wdata; } dp_t;
  dp_t dp_q[$];

  int n_sel[4];
  int n_busy = 0, n_wait = 0, n_err_def = 0, n_err_align = 0, n_wrap = 0, n_incr = 0;
  int n_raw = 0, n_reads = 0, n_writes = 0;
  logic [31:0] prev_addr;
  bit          prev_write_dp;
  logic [31:0] prev_write_addr;

  always @(posedge HCLK) if (HRESETn) begin
    if (rsp_valid) begin
      dp_t d;
      check(dp_q.size() > 0, "response without a data phase");
      if (dp_q.size() > 0) begin
        int s, lo;
        bit exp_err;
        d = dp_q.pop_front();
        s = slave_of(d.b.addr);
        exp_err = (s == 3) || is_misaligned(d.b.addr, d.b.size);
        check(rsp_error == exp_err, $sformatf("rsp_error %0d at %h", rsp_error, d.b.addr));
        check(rsp_write == d.b.write, "rsp_write");
        if (rsp_error) begin
          if (s == 3) n_err_def++; else n_err_align++;
          while (exp_beats.size() > 0 && exp_beats[0].cmd == d.b.cmd && !exp_beats[0].first)
            void'(exp_beats.pop_front());
        end else if (d.b.write) begin
          lo = int'(d.b.addr[1:0]);
          for (int b = lo; b < lo + (1 << d.b.size); b++)
            ref_mem[s][d.b.addr[7:2]][8*b +: 8] = d.wdata[8*b +: 8];
          n_writes++;
        end else begin
          check(rsp_rdata == ref_mem[s][d.b.addr[7:2]],
                $sformatf("read %h from slave %0d: got %h expected %h", d.b.addr, s, rsp_rdata,
                          ref_mem[s][d.b.addr[7:2]]));
          n_reads++;
          if (prev_write_dp && prev_write_addr[31:2] == d.b.addr[31:2]) n_raw++;
        end
        prev_write_dp   = d.b.write && !rsp_error;
        prev_write_addr = d.b.addr;
      end
    end else if (!HREADY) begin
      n_wait++;
    end
    if (HREADY && HTRANS == HTRANS_BUSY) n_busy++;
    if (HREADY && HTRANS[1]) begin
      beat_t e;
      check(exp_beats.size() > 0, "unexpected beat");
      if (exp_beats.size() > 0) begin
        int s;
        e = exp_beats.pop_front();
        s = slave_of(e.addr);
        check(HADDR == e.addr, $sformatf("HADDR %h expected %h", HADDR, e.addr));
        check((HTRANS == HTRANS_NONSEQ) == e.first, "NONSEQ/SEQ");
        check(HWRITE == e.write, "HWRITE");
        check({HSELDEF, HSEL} == 4'(1 << s), $sformatf("select %b for %h", {HSELDEF, HSEL}, HADDR));
        n_sel[s]++;
        if (!e.first && HADDR < prev_addr) n_wrap++;
        if (!e.first && HADDR > prev_addr) n_incr++;
        prev_addr = HADDR;
        dp_q.push_back('{e, wr_data});
      end
    end
    if (wr_pop) wcount <= wcount + 1;
  end

  // ------------------------------------------------------------- driver
  int n_cmd = 0;
  bit pause_enable = 0;
  always @(negedge HCLK) pause = pause_enable && ($urandom_range(0, 3) == 0);

  task automatic issue(input logic [31:0] a, input bit wr, input int sz, input int burst, input int len);
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
    check(guard < 1000, "bus drained");
    repeat (2) @(posedge HCLK);
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cmd_valid = 0; pause = 0; cmd_addr = 0; cmd_write = 0; cmd_size = HSIZE_WORD;
    cmd_burst = HBURST_SINGLE; cmd_len = 0;
    for (int s = 0; s < 3; s++) for (int i = 0; i < 64; i++) ref_mem[s][i] = 32'h0;
    repeat (3) @(posedge HCLK);
    HRESETn <= 1;
    @(posedge HCLK);

    // the reference burst: 4-beat wrapping word write from 0x34, a wrapping
    // read of the same block from 0x30, then a write and a read-back of one
    // word in slave 1 and one in slave 2
    issue(32'h34, 1, 2, 2, 0);
    issue(32'h30, 0, 2, 2, 0);
    issue(32'h54, 1, 2, 0, 0);
    issue(32'h54, 0, 2, 0, 0);
    issue(32'h94, 1, 2, 0, 0);
    issue(32'h94, 0, 2, 0, 0);
    drain();

    pause_enable = 1;
    for (int n = 0; n < 600; n++) begin
      int sz, burst, len;
      logic [31:0] a;
      sz    = $urandom_range(0, 2);
      burst = $urandom_range(0, 7);
      len   = $urandom_range(1, 6);
      a     = {24'h0, 8'($urandom_range(0, 8'hB0))};
      if ($urandom_range(0, 15) != 0) a = a & ~((32'h1 << sz) - 1);
      issue(a, 1'($urandom_range(0, 1)), sz, burst, len);
      if ($urandom_range(0, 7) == 0) drain();
    end
    pause_enable = 0;
    drain();

    check(exp_beats.size() == 0 && dp_q.size() == 0, "all beats done");
    check(n_sel[0] > 0 && n_sel[1] > 0 && n_sel[2] > 0, "each slave selected");
    check(n_sel[3] > 0,     "default slave selected");
    check(n_busy > 0,       "BUSY cycles");
    check(n_wait > 0,       "wait states");
    check(n_err_def > 0,    "ERROR from the default slave");
    check(n_err_align > 0,  "ERROR from a misaligned transfer");
    check(n_wrap > 0,       "wrapping bursts wrapped");
    check(n_incr > 0,       "incrementing beats");
    check(n_raw > 0,        "read directly after write");
    $display("slaves %0d/%0d/%0d default %0d, reads %0d writes %0d, busy %0d, wait %0d, err %0d+%0d, wrap %0d, raw %0d",
             n_sel[0], n_sel[1], n_sel[2], n_sel[3], n_reads, n_writes, n_busy, n_wait,
             n_err_def, n_err_align, n_wrap, n_raw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
