// AHB-Lite interconnect: one master, three memory slaves, a central address
// decoder and a slave-to-master multiplexer.
//
// The master drives address, control and write data to every slave at once;
// there is no arbitration and no master-to-slave multiplexer. The decoder
// looks at HADDR and raises the HSEL of exactly one slave (slave 0 for
// 0x00-0x40, slave 1 for 0x41-0x60, slave 2 for 0x61-0x99); the other slaves
// stay inactive. The same decode steers the multiplexer, which one cycle later
// (in the data phase) returns that slave's HRDATA, HREADYOUT and HRESP to the
// master. The routed HREADYOUT is the bus HREADY seen by the master and by all
// slaves. Addresses outside the three ranges reach a default slave that
// answers ERROR.
//
// The structure (one master, a decoder, a multiplexer, three slaves) and the
// address map follow the reference system's block diagram; the command port,
// the default slave and the observation ports are this design's own.
//
// The user side is the master's command port: one burst per command (SINGLE,
// INCR of cmd_len beats, or 4/8/16-beat incrementing or wrapping), write data
// one word per write beat on wr_data/wr_pop, and one response per completed
// beat on rsp_*. pause inserts BUSY cycles in a burst. The bus itself is
// brought out read-only so that slave selection and wait states can be
// watched. WAIT_S0..WAIT_S2 give each slave's wait states per transfer.
module ahb_lite_top
  import ahb_lite_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 64,
  parameter int unsigned WAIT_S0   = 0,
  parameter int unsigned WAIT_S1   = 0,
  parameter int unsigned WAIT_S2   = 0
) (
  input  logic                HCLK,
  input  logic                HRESETn,
  // command side of the master
  input  logic                cmd_valid,
  output logic                cmd_ready,
  input  logic                cmd_write,
  input  logic [ADDR_W-1:0]   cmd_addr,
  input  hsize_t              cmd_size,
  input  hburst_t             cmd_burst,
  input  logic [7:0]          cmd_len,
  input  logic                pause,
  input  logic [DATA_W-1:0]   wr_data,
  output logic                wr_pop,
  output logic                rsp_valid,
  output logic                rsp_write,
  output logic                rsp_error,
  output logic [DATA_W-1:0]   rsp_rdata,
  // bus observation
  output logic [ADDR_W-1:0]   HADDR,
  output htrans_t             HTRANS,
  output logic                HWRITE,
  output logic                HREADY,
  output logic                HRESP,
  output logic [2:0]          HSEL,
  output logic                HSELDEF
);

  localparam int unsigned NUM_SLAVES = 3;
  localparam int unsigned SEL_W      = $clog2(NUM_SLAVES + 1);

  hsize_t                          HSIZE;
  hburst_t                         HBURST;
  logic [DATA_W-1:0]               HWDATA;
  logic [DATA_W-1:0]               HRDATA;
  logic [SEL_W-1:0]                mux_sel;
  logic [NUM_SLAVES:0][DATA_W-1:0] hrdata_s;
  logic [NUM_SLAVES:0]             hreadyout_s;
  logic [NUM_SLAVES:0]             hresp_s;

  ahb_lite_master u_master (
    .HCLK, .HRESETn,
    .HREADY, .HRESP, .HRDATA,
    .HADDR, .HWRITE, .HSIZE, .HBURST, .HTRANS, .HWDATA,
    .cmd_valid, .cmd_ready, .cmd_write, .cmd_addr, .cmd_size, .cmd_burst, .cmd_len,
    .pause, .wr_data, .wr_pop,
    .rsp_valid, .rsp_write, .rsp_error, .rsp_rdata
  );

  ahb_lite_decoder #(.NUM_SLAVES(NUM_SLAVES)) u_decoder (
    .HADDR, .HSEL, .HSELDEF, .mux_sel
  );

  ahb_lite_slave #(.MEM_WORDS(MEM_WORDS), .WAIT_STATES(WAIT_S0)) u_slave0 (
    .HCLK, .HRESETn, .HSEL(HSEL[0]), .HADDR, .HWRITE, .HSIZE, .HBURST, .HTRANS, .HWDATA,
    .HREADY, .HREADYOUT(hreadyout_s[0]), .HRESP(hresp_s[0]), .HRDATA(hrdata_s[0])
  );

  ahb_lite_slave #(.MEM_WORDS(MEM_WORDS), .WAIT_STATES(WAIT_S1)) u_slave1 (
    .HCLK, .HRESETn, .HSEL(HSEL[1]), .HADDR, .HWRITE, .HSIZE, .HBURST, .HTRANS, .HWDATA,
    .HREADY, .HREADYOUT(hreadyout_s[1]), .HRESP(hresp_s[1]), .HRDATA(hrdata_s[1])
  );

  ahb_lite_slave #(.MEM_WORDS(MEM_WORDS), .WAIT_STATES(WAIT_S2)) u_slave2 (
    .HCLK, .HRESETn, .HSEL(HSEL[2]), .HADDR, .HWRITE, .HSIZE, .HBURST, .HTRANS, .HWDATA,
    .HREADY, .HREADYOUT(hreadyout_s[2]), .HRESP(hresp_s[2]), .HRDATA(hrdata_s[2])
  );

  ahb_lite_default_slave u_default (
    .HCLK, .HRESETn, .HSEL(HSELDEF), .HTRANS, .HREADY,
    .HREADYOUT(hreadyout_s[NUM_SLAVES]), .HRESP(hresp_s[NUM_SLAVES])
  );
  assign hrdata_s[NUM_SLAVES] = '0;

  ahb_lite_mux #(.NUM_SLAVES(NUM_SLAVES)) u_mux (
    .HCLK, .HRESETn, .mux_sel,
    .HRDATA_S(hrdata_s), .HREADYOUT_S(hreadyout_s), .HRESP_S(hresp_s),
    .HRDATA, .HREADY, .HRESP
  );

endmodule
