// AHB-Lite default slave.
//
// Answers the transfers whose address no real slave owns: a NONSEQ or SEQ
// transfer gets the two-cycle ERROR response (HRESP high with HREADYOUT low,
// then both high); IDLE and BUSY transfers get a zero-wait OKAY. It returns no
// read data. It is selected by the decoder's HSELDEF output; like a real
// slave it samples HSEL and HTRANS only on clock edges with HREADY high, and
// its ERROR starts in the cycle after that address phase. The reference
// system does not describe a default slave; it is added so that an
// unmapped address cannot hang the bus.
module ahb_lite_default_slave
  import ahb_lite_pkg::*;
(
  input  logic    HCLK,
  input  logic    HRESETn,
  input  logic    HSEL,
  input  htrans_t HTRANS,
  input  logic    HREADY,
  output logic    HREADYOUT,
  output logic    HRESP
);

  typedef enum logic [1:0] {DS_OKAY, DS_ERR1, DS_ERR2} ds_state_t;
  ds_state_t state;

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn)                      state <= DS_OKAY;
    else if (state == DS_ERR1)         state <= DS_ERR2;
    else if (HREADY)                   state <= (HSEL && HTRANS[1]) ? DS_ERR1 : DS_OKAY;
  end

  assign HRESP     = (state != DS_OKAY);
  assign HREADYOUT = (state != DS_ERR1);

endmodule
