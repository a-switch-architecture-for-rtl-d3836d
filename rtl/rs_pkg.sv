// Shared types and constants of the switching element and its port controller.
//
// A flit is 40 bits: an 8-bit identification (4-bit virtual channel number and
// 4-bit type) followed by 32 bits of data. On a link it travels over an 8-bit
// forward path in five phases (identification first, then the data bytes, most
// significant byte first), while a 4-bit status word for the flit's virtual
// channel comes back one bit per data phase on a 1-bit reverse path.
//
// The flit layout, the phase count, the 16 virtual channels, the 3 links and the
// 4-bit status are the document's. The type codes, the status bit layout and the
// status codes are this design's own choice.
package rs_pkg;

  localparam int unsigned NUM_LINKS = 3;   // links per switching element
  localparam int unsigned NUM_VC    = 16;  // virtual channels (flit buffers) per link
  localparam int unsigned VC_W      = 4;   // virtual channel number width
  localparam int unsigned TYPE_W    = 4;   // flit type width
  localparam int unsigned DATA_W    = 32;  // flit data width
  localparam int unsigned STAT_W    = 4;   // status word width
  localparam int unsigned PHASES    = 5;   // phases per flit on the 8-bit path
  localparam int unsigned ITERS     = 4;   // scheduling iterations per flit cycle

  typedef logic [2:0] phase_t;
  localparam phase_t LAST_PHASE = 3'd4;  // phase that ends a flit cycle

  // Flit types. IDLE marks an empty slot on the link.
  typedef enum logic [TYPE_W-1:0] {
    FT_IDLE    = 4'h0,
    FT_DATA    = 4'h1,
    FT_CLAIM   = 4'h2,
    FT_RELEASE = 4'h3
  } flit_type_e;

  typedef struct packed {
    logic [VC_W-1:0]   vc;
    logic [TYPE_W-1:0] ftype;
    logic [DATA_W-1:0] data;
  } flit_t;

  // Buffered part of a flit (the virtual channel number is the buffer index).
  typedef struct packed {
    logic [TYPE_W-1:0] ftype;
    logic [DATA_W-1:0] data;
  } slot_t;

  // Status word: bit 0 (sent first) tells the sender that the receiving flit
  // buffer was still occupied and the flit was refused; bits 3:1 carry a code
  // that rides back towards the source.
  typedef enum logic [2:0] {
    SC_NONE        = 3'd0,
    SC_ROUTE_ERROR = 3'd1,  // claim unit found no free channel / no such link
    SC_NO_CONN     = 3'd2   // flit arrived on a channel that has no connection
  } stat_code_e;

  typedef struct packed {
    logic [2:0] code;
    logic       refused;
  } status_t;

  // Mapping table entry: outlink and the channel number used at the next element.
  typedef struct packed {
    logic            valid;
    logic [1:0]      link;
    logic [VC_W-1:0] vc;
  } map_entry_t;

  function automatic logic [7:0] flit_byte(flit_t f, phase_t p);
    case (p)
      3'd0:    return {f.vc, f.ftype};
      3'd1:    return f.data[31:24];
      3'd2:    return f.data[23:16];
      3'd3:    return f.data[15:8];
      default: return f.data[7:0];
    endcase
  endfunction

endpackage
