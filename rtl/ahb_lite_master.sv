// AHB-Lite bus master.
//
// The master is the only source of address, control and write data on the
// bus, so it never arbitrates. A user accepts one burst command at a time on
// the cmd_* port (start address, read/write, HSIZE, HBURST and, for an
// undefined-length INCR burst, a beat count). The master puts the first beat on
// the bus as NONSEQ and the following beats as SEQ, computing each address
// itself: incrementing bursts add the beat size, wrapping bursts wrap at a
// boundary of (beats x bytes per beat). While pause is high during a burst the
// master inserts BUSY cycles, which carry the address of the next beat.
//
// Pipelining: the address phase of a beat overlaps the data phase of the
// previous one. Everything the master drives moves only on a clock edge at
// which HREADY is high; a low HREADY (a slave wait state) holds the address
// phase and the data phase. Write data for the beat in the address phase is
// read from wr_data on the edge that accepts that address phase (wr_pop is high
// in that cycle) and appears on HWDATA for the data phase that follows. Every
// completed data phase is reported once on rsp_valid; rsp_rdata and rsp_error
// are HRDATA and HRESP themselves, valid while rsp_valid is high. A new command is accepted (cmd_ready) in the cycle the last
// beat of the previous burst is accepted, so bursts run back to back.
//
// ERROR: when a slave starts the two-cycle ERROR response, the master drops the
// rest of that burst and drives IDLE during the second error cycle; the
// dropped beats produce no response. If the next burst's NONSEQ is already in
// the address phase, it is kept.
//
// The port list follows the AHB-Lite master interface (HREADY, HRESP, HRESETn,
// HCLK, HRDATA in; HADDR, HWRITE, HSIZE, HBURST, HTRANS, HWDATA out). The
// command port, the BUSY control and the error handling are this design's
// own choices. HPROT, HMASTLOCK are not driven.
module ahb_lite_master
  import ahb_lite_pkg::*;
(
  input  logic                HCLK,
  input  logic                HRESETn,
  // AHB-Lite bus
  input  logic                HREADY,
  input  logic                HRESP,
  input  logic [DATA_W-1:0]   HRDATA,
  output logic [ADDR_W-1:0]   HADDR,
  output logic                HWRITE,
  output hsize_t              HSIZE,
  output hburst_t             HBURST,
  output htrans_t             HTRANS,
  output logic [DATA_W-1:0]   HWDATA,
  // command side
  input  logic                cmd_valid,
  output logic                cmd_ready,
  input  logic                cmd_write,
  input  logic [ADDR_W-1:0]   cmd_addr,
  input  hsize_t              cmd_size,
  input  hburst_t             cmd_burst,
  input  logic [7:0]          cmd_len,
  input  logic                pause,
  // write data, one word per write beat
  input  logic [DATA_W-1:0]   wr_data,
  output logic                wr_pop,
  // responses, one per completed data phase
  output logic                rsp_valid,
  output logic                rsp_write,
  output logic                rsp_error,
  output logic [DATA_W-1:0]   rsp_rdata
);

  logic [7:0] remaining;     // SEQ beats still to issue after the current one
  logic       dp_valid;      // a data phase is in progress
  logic       dp_write;

  logic active_beat;         // current address phase is NONSEQ or SEQ
  logic err_first;           // first cycle of a two-cycle ERROR response
  logic last_beat;

  assign active_beat = (HTRANS == HTRANS_NONSEQ) || (HTRANS == HTRANS_SEQ);
  assign err_first   = dp_valid && HRESP && !HREADY;
  assign last_beat   = active_beat && (remaining == 8'd0);
  assign cmd_ready   = HREADY && ((HTRANS == HTRANS_IDLE) || last_beat);
  assign wr_pop      = HREADY && active_beat && HWRITE;

  assign rsp_valid   = dp_valid && HREADY;
  assign rsp_write   = dp_write;
  assign rsp_error   = HRESP;
  assign rsp_rdata   = HRDATA;

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      HADDR     <= '0;
      HWRITE    <= 1'b0;
      HSIZE     <= HSIZE_WORD;
      HBURST    <= HBURST_SINGLE;
      HTRANS    <= HTRANS_IDLE;
      HWDATA    <= '0;
      remaining <= '0;
      dp_valid  <= 1'b0;
      dp_write  <= 1'b0;
    end else if (err_first) begin
      // cancel what is left of the erroring burst during the second error
      // cycle; a new burst already waiting as NONSEQ goes ahead
      if (HTRANS != HTRANS_NONSEQ) begin
        HTRANS    <= HTRANS_IDLE;
        remaining <= '0;
      end
    end else if (HREADY) begin
      // the current address phase is accepted and becomes the data phase
      dp_valid <= active_beat;
      dp_write <= HWRITE;
      if (active_beat && HWRITE) HWDATA <= wr_data;

      if (cmd_valid && cmd_ready) begin
        HADDR     <= cmd_addr;
        HWRITE    <= cmd_write;
        HSIZE     <= cmd_size;
        HBURST    <= cmd_burst;
        HTRANS    <= HTRANS_NONSEQ;
        remaining <= burst_beats(cmd_burst, cmd_len) - 8'd1;
      end else if (active_beat && remaining != 8'd0) begin
        HADDR <= next_beat_addr(HADDR, HSIZE, HBURST);
        if (pause) begin
          HTRANS <= HTRANS_BUSY;
        end else begin
          HTRANS    <= HTRANS_SEQ;
          remaining <= remaining - 8'd1;
        end
      end else if (HTRANS == HTRANS_BUSY) begin
        if (!pause) begin
          HTRANS    <= HTRANS_SEQ;
          remaining <= remaining - 8'd1;
        end
      end else begin
        HTRANS <= HTRANS_IDLE;
      end
    end
  end

  // ---------------------------------------------------------------------
  // Protocol rules the master keeps
  // ---------------------------------------------------------------------
  // An address phase that is held by a wait state keeps its address and
  // control (unless the master is cancelling after an ERROR).
  a_hold_in_wait: assert property (@(posedge HCLK) disable iff (!HRESETn)
    (!HREADY && !HRESP && active_beat) |=> ($stable(HADDR) && $stable(HTRANS) && $stable(HWRITE)));
  // A SEQ or BUSY transfer only continues a burst.
  a_seq_in_burst: assert property (@(posedge HCLK) disable iff (!HRESETn)
    (HREADY && (HTRANS == HTRANS_IDLE) && !(cmd_valid && cmd_ready)) |=> (HTRANS != HTRANS_SEQ));
  // Write data stays put while its data phase waits.
  a_wdata_stable: assert property (@(posedge HCLK) disable iff (!HRESETn)
    (dp_valid && dp_write && !HREADY) |=> $stable(HWDATA));

endmodule
