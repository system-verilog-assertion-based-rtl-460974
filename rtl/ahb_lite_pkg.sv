// Types and constants shared by the AHB-Lite master, slaves, decoder and
// multiplexer.
//
// The encodings are those of the AMBA 3 AHB-Lite bus: HTRANS selects IDLE,
// BUSY, NONSEQ or SEQ; HBURST selects SINGLE, INCR or a fixed-length
// incrementing or wrapping burst of 4, 8 or 16 beats; HSIZE gives the number of
// bytes per beat as a power of two; HRESP is OKAY or ERROR (AHB-Lite has no
// SPLIT or RETRY). The data bus is 32 bits wide, the widest a microcontroller
// system of this kind uses, and the address bus is 32 bits wide.
//
// burst_beats() and next_beat_addr() hold the burst address arithmetic: a
// wrapping burst wraps at a boundary equal to (beats x bytes per beat), so a
// 4-beat word burst starting at 0x34 visits 0x34, 0x38, 0x3C, 0x30.
package ahb_lite_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;

  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_t;

  typedef enum logic [2:0] {
    HBURST_SINGLE = 3'b000,
    HBURST_INCR   = 3'b001,
    HBURST_WRAP4  = 3'b010,
    HBURST_INCR4  = 3'b011,
    HBURST_WRAP8  = 3'b100,
    HBURST_INCR8  = 3'b101,
    HBURST_WRAP16 = 3'b110,
    HBURST_INCR16 = 3'b111
  } hburst_t;

  typedef enum logic [2:0] {
    HSIZE_BYTE  = 3'b000,
    HSIZE_HALF  = 3'b001,
    HSIZE_WORD  = 3'b010
  } hsize_t;

  localparam logic HRESP_OKAY  = 1'b0;
  localparam logic HRESP_ERROR = 1'b1;

  // Number of beats of a burst; an undefined-length INCR burst takes its
  // length from the caller (0 is read as 1).
  function automatic logic [7:0] burst_beats(input hburst_t burst, input logic [7:0] incr_len);
    unique case (burst)
      HBURST_SINGLE:                return 8'd1;
      HBURST_INCR:                  return (incr_len == 8'd0) ? 8'd1 : incr_len;
      HBURST_WRAP4,  HBURST_INCR4:  return 8'd4;
      HBURST_WRAP8,  HBURST_INCR8:  return 8'd8;
      default:                      return 8'd16;
    endcase
  endfunction

  function automatic logic is_wrap(input hburst_t burst);
    return (burst == HBURST_WRAP4) || (burst == HBURST_WRAP8) || (burst == HBURST_WRAP16);
  endfunction

  // Address of the beat after 'addr'. Incrementing bursts add the beat size;
  // wrapping bursts keep the bits above the wrap boundary and let only the
  // bits below it count.
  function automatic logic [ADDR_W-1:0] next_beat_addr(input logic [ADDR_W-1:0] addr,
                                                       input hsize_t size,
                                                       input hburst_t burst);
    logic [ADDR_W-1:0] step, bound, sum;
    step  = ADDR_W'(1) << size;
    bound = ADDR_W'(burst_beats(burst, 8'd1)) << size;
    sum   = addr + step;
    if (is_wrap(burst)) return (addr & ~(bound - 1)) | (sum & (bound - 1));
    return sum;
  endfunction

endpackage
