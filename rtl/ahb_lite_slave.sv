// AHB-Lite memory slave.
//
// The slave responds to a transfer when the decoder selects it (HSEL) in an
// address phase that the bus accepts (HREADY high) and that is NONSEQ or SEQ;
// IDLE and BUSY transfers get a zero-wait OKAY. It samples address and control
// in the address phase and completes the transfer in the data phase that
// follows: a write stores HWDATA into the byte lanes HSIZE and HADDR[1:0]
// select, a read returns the whole 32-bit word on HRDATA (the master picks its
// byte lanes). The slave accepts the data one clock after the address, so with
// WAIT_STATES = 0 every transfer takes one data-phase cycle; WAIT_STATES > 0
// holds HREADYOUT low for that many extra cycles before each transfer
// completes.
//
// A transfer whose address is not aligned to its size gets the two-cycle
// ERROR response (HRESP high with HREADYOUT low, then HRESP high with
// HREADYOUT high) and does not touch the memory.
//
// The memory holds MEM_WORDS 32-bit words, indexed by the low address bits, so
// each slave sees the address map modulo its size; it is cleared by reset.
// The ports are those of an AHB-Lite slave; the memory behind it, the wait
// states and the alignment error are this design's own choices.
module ahb_lite_slave
  import ahb_lite_pkg::*;
#(
  parameter int unsigned MEM_WORDS   = 64,
  parameter int unsigned WAIT_STATES = 0
) (
  input  logic                HCLK,
  input  logic                HRESETn,
  input  logic                HSEL,
  input  logic [ADDR_W-1:0]   HADDR,
  input  logic                HWRITE,
  input  hsize_t              HSIZE,
  input  hburst_t             HBURST,
  input  htrans_t             HTRANS,
  input  logic [DATA_W-1:0]   HWDATA,
  input  logic                HREADY,
  output logic                HREADYOUT,
  output logic                HRESP,
  output logic [DATA_W-1:0]   HRDATA
);

  localparam int unsigned IDX_W  = (MEM_WORDS > 1) ? $clog2(MEM_WORDS) : 1;
  localparam int unsigned WAIT_W = (WAIT_STATES > 0) ? $clog2(WAIT_STATES + 1) : 1;

  logic [DATA_W-1:0] mem [MEM_WORDS];

  logic              dp_valid;    // this slave owns the current data phase
  logic              dp_write;
  logic              dp_error;
  logic              err_second;  // in the second cycle of an ERROR response
  logic [IDX_W-1:0]  dp_index;
  logic [3:0]        dp_strobe;
  logic [WAIT_W-1:0] wait_cnt;

  logic              start;
  logic              misaligned;
  logic [3:0]        strobe;

  assign start = HSEL && HREADY && HTRANS[1];   // NONSEQ or SEQ

  always_comb begin
    unique case (HSIZE)
      HSIZE_BYTE: begin misaligned = 1'b0;              strobe = 4'b0001 << HADDR[1:0]; end
      HSIZE_HALF: begin misaligned = HADDR[0];          strobe = HADDR[1] ? 4'b1100 : 4'b0011; end
      HSIZE_WORD: begin misaligned = |HADDR[1:0];       strobe = 4'b1111; end
      default:    begin misaligned = 1'b1;              strobe = 4'b0000; end  // wider than the bus
    endcase
  end

  // Response of the data phase
  always_comb begin
    HREADYOUT = 1'b1;
    HRESP     = HRESP_OKAY;
    if (dp_valid) begin
      if (wait_cnt != '0) begin
        HREADYOUT = 1'b0;
      end else if (dp_error) begin
        HRESP     = HRESP_ERROR;
        HREADYOUT = err_second;
      end
    end
  end

  assign HRDATA = (dp_valid && !dp_write && !dp_error) ? mem[dp_index] : '0;

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      dp_valid   <= 1'b0;
      dp_write   <= 1'b0;
      dp_error   <= 1'b0;
      err_second <= 1'b0;
      dp_index   <= '0;
      dp_strobe  <= '0;
      wait_cnt   <= '0;
      for (int i = 0; i < MEM_WORDS; i++) mem[i] <= '0;
    end else begin
      if (dp_valid && wait_cnt != '0) wait_cnt <= wait_cnt - 1'b1;
      if (dp_valid && wait_cnt == '0 && dp_error) err_second <= 1'b1;

      // write completes at the end of the data phase
      if (dp_valid && HREADYOUT && dp_write && !dp_error) begin
        for (int b = 0; b < 4; b++)
          if (dp_strobe[b]) mem[dp_index][8*b +: 8] <= HWDATA[8*b +: 8];
      end

      if (HREADY) begin
        dp_valid   <= start;
        dp_write   <= HWRITE;
        dp_error   <= misaligned;
        err_second <= 1'b0;
        dp_index   <= HADDR[IDX_W+1:2];
        dp_strobe  <= strobe;
        wait_cnt   <= WAIT_W'(WAIT_STATES);
      end
    end
  end

  // ---------------------------------------------------------------------
  // Protocol rules the slave keeps
  // ---------------------------------------------------------------------
  // ERROR is a two-cycle response: the first cycle has HREADYOUT low.
  a_error_two_cycle: assert property (@(posedge HCLK) disable iff (!HRESETn)
    (HRESP && !HREADYOUT) |=> (HRESP && HREADYOUT));
  // A slave that is not in a data phase is always ready with OKAY.
  a_idle_okay: assert property (@(posedge HCLK) disable iff (!HRESETn)
    !dp_valid |-> (HREADYOUT && !HRESP));
  // A SEQ beat of a fixed-length burst is never the first beat of a burst.
  a_seq_follows: assert property (@(posedge HCLK) disable iff (!HRESETn)
    (HREADY && HSEL && HTRANS == HTRANS_SEQ) |-> (HBURST != HBURST_SINGLE));

endmodule
