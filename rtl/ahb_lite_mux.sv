// AHB-Lite slave-to-master multiplexer.
//
// Routes the read data and the transfer response (HRDATA, HREADYOUT, HRESP)
// of one responder back to the master. Input NUM_SLAVES is the default
// slave. The select comes from the decoder during the address phase; the
// multiplexer registers it on every clock edge at which HREADY is high, so the
// response of the data phase comes from the slave that was addressed one
// transfer earlier, while the decoder already looks at the next address.
// The routed HREADYOUT is the bus HREADY, which goes back to the master and to
// every slave. After reset the default slave, which is idle and ready, is
// selected. That the multiplexer carries read data and response under the
// decoder's control follows the reference system; registering the select for
// the data phase is the standard AHB pipeline, chosen here.
module ahb_lite_mux
  import ahb_lite_pkg::*;
#(
  parameter int unsigned NUM_SLAVES = 3,
  localparam int unsigned NUM_IN = NUM_SLAVES + 1,
  localparam int unsigned SEL_W  = $clog2(NUM_SLAVES + 1)
) (
  input  logic                          HCLK,
  input  logic                          HRESETn,
  input  logic [SEL_W-1:0]              mux_sel,
  input  logic [NUM_IN-1:0][DATA_W-1:0] HRDATA_S,
  input  logic [NUM_IN-1:0]             HREADYOUT_S,
  input  logic [NUM_IN-1:0]             HRESP_S,
  output logic [DATA_W-1:0]             HRDATA,
  output logic                          HREADY,
  output logic                          HRESP
);

  logic [SEL_W-1:0] dp_sel;

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn)    dp_sel <= SEL_W'(NUM_SLAVES);
    else if (HREADY) dp_sel <= mux_sel;
  end

  always_comb begin
    HRDATA = '0;
    HREADY = 1'b1;
    HRESP  = HRESP_OKAY;
    for (int i = 0; i < NUM_IN; i++) begin
      if (dp_sel == SEL_W'(i)) begin
        HRDATA = HRDATA_S[i];
        HREADY = HREADYOUT_S[i];
        HRESP  = HRESP_S[i];
      end
    end
  end

  // The data-phase select only changes when the bus is ready.
  a_sel_hold: assert property (@(posedge HCLK) disable iff (!HRESETn)
    !HREADY |=> $stable(dp_sel));

endmodule
