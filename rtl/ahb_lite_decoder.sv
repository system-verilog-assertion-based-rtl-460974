// AHB-Lite address decoder.
//
// One central decoder looks at the address of every transfer and selects the
// one slave whose address range holds it. The default map is the three-slave
// map of the reference system: slave 0 answers 0x00-0x40, slave 1 0x41-0x60,
// slave 2 0x61-0x99 (inclusive byte addresses). An address outside every
// range selects no slave; HSELDEF then selects the default slave, which
// answers with ERROR, so every transfer gets a response. The three ranges
// follow the reference system; the default slave is this design's addition.
//
// The decoder is purely combinational. mux_sel is the index of the selected
// responder (NUM_SLAVES for the default slave) and goes to the slave-to-master
// multiplexer, which registers it for the data phase. The ranges are
// parameters; they must not overlap, and the lowest-numbered matching slave
// wins if they do.
module ahb_lite_decoder
  import ahb_lite_pkg::*;
#(
  parameter int unsigned NUM_SLAVES = 3,
  parameter logic [NUM_SLAVES-1:0][ADDR_W-1:0] ADDR_LO = {32'h0000_0061, 32'h0000_0041, 32'h0000_0000},
  parameter logic [NUM_SLAVES-1:0][ADDR_W-1:0] ADDR_HI = {32'h0000_0099, 32'h0000_0060, 32'h0000_0040},
  localparam int unsigned SEL_W = $clog2(NUM_SLAVES + 1)
) (
  input  logic [ADDR_W-1:0]     HADDR,
  output logic [NUM_SLAVES-1:0] HSEL,
  output logic                  HSELDEF,
  output logic [SEL_W-1:0]      mux_sel
);

  always_comb begin
    HSEL    = '0;
    mux_sel = SEL_W'(NUM_SLAVES);
    for (int i = NUM_SLAVES - 1; i >= 0; i--) begin
      if (HADDR >= ADDR_LO[i] && HADDR <= ADDR_HI[i]) begin
        mux_sel = SEL_W'(i);
      end
    end
    if (mux_sel != SEL_W'(NUM_SLAVES)) HSEL[mux_sel] = 1'b1;
    HSELDEF = (mux_sel == SEL_W'(NUM_SLAVES));
    // exactly one responder is selected for every address
    a_one_select: assert ($onehot({HSEL, HSELDEF}));
  end

endmodule
