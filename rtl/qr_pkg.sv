// qr_pkg: types and constants shared by the QuickRing controller model, the
// Address Conversion Decoder and the system top.
//
// Client port symbols carry a 3-bit type code (directed head, multicast head,
// data, data-tail, frame, frame-tail, no-symbol) and a 32-bit word. Head words
// have the field layouts of the QuickRing transmit port: multicast heads hold
// ACC[31:30], CONN[29:28], SRC[27:24], GROUP[23:16] and a 16-bit multicast
// mask[15:0]; directed heads hold SRC, TRGT, HOP1..HOP4 and HCNT in 4-bit fields.
//
// A ring symbol is 42 bits: 2 type bits, a frame bit, 32 data bits and a 7-bit
// error-detection code. Sent most significant bit first in 6-bit slices, this
// order is exactly the QuickRing channel map: sub-symbol 1 carries the type
// bits, the frame bit and data[31:29], sub-symbols 2..5 carry data[28:5],
// sub-symbol 6 carries data[4:0] and EDC bit 7, sub-symbol 7 EDC bits 6..1.
// The EDC code itself and the ring type encoding below are this design's own
// choices; the field positions follow the QuickRing tables.
//
// The control-message layout of the first payload word (message type, task ID,
// and the per-type fields) is also defined here so that hosts and testbenches
// build messages the same way.
package qr_pkg;

  // ---------------- client port type codes (TxT/RxT) ----------------
  typedef enum logic [2:0] {
    CT_DIR_HEAD   = 3'd0,
    CT_MC_HEAD    = 3'd1,
    CT_DATA       = 3'd2,
    CT_DATA_TAIL  = 3'd3,
    CT_FRAME      = 3'd4,
    CT_FRAME_TAIL = 3'd5,
    CT_RESERVED   = 3'd6,
    CT_NULL       = 3'd7
  } ctype_t;

  typedef struct packed {
    ctype_t      t;
    logic [31:0] s;
  } client_sym_t;

  localparam int unsigned MAX_PAYLOAD = 20;  // payload symbols per ring packet
  localparam int unsigned PKT_SYMS    = MAX_PAYLOAD + 1;

  function automatic logic is_head(ctype_t t);
    return (t == CT_DIR_HEAD) || (t == CT_MC_HEAD);
  endfunction

  function automatic logic is_payload(ctype_t t);
    return (t == CT_DATA) || (t == CT_DATA_TAIL) || (t == CT_FRAME) || (t == CT_FRAME_TAIL);
  endfunction

  function automatic logic is_tail(ctype_t t);
    return (t == CT_DATA_TAIL) || (t == CT_FRAME_TAIL);
  endfunction

  function automatic logic is_frame(ctype_t t);
    return (t == CT_FRAME) || (t == CT_FRAME_TAIL);
  endfunction

  // ---------------- head field layouts ----------------
  typedef struct packed {
    logic [1:0]  acc;
    logic [1:0]  conn;
    logic [3:0]  src;
    logic [7:0]  group;
    logic [15:0] mcast;
  } mc_head_t;

  typedef struct packed {
    logic [1:0] acc;
    logic [1:0] conn;
    logic [3:0] src;
    logic [3:0] trgt;
    logic [3:0] hop1;
    logic [3:0] hop2;
    logic [3:0] hop3;
    logic [3:0] hop4;
    logic [3:0] hcnt;
  } dir_head_t;

  // ---------------- ring symbols ----------------
  // Ring type field: heads 00 (frame bit 1 = multicast head, 0 = directed head),
  // payload 01, payload tail 10, access 11 (frame bit 1 with ACC=3 is a null).
  typedef enum logic [1:0] {
    RT_HEAD    = 2'b00,
    RT_PAYLOAD = 2'b01,
    RT_TAIL    = 2'b10,
    RT_ACCESS  = 2'b11
  } rtype_t;

  typedef struct packed {
    rtype_t      typ;
    logic        frame;
    logic [31:0] data;
  } ring_sym_t;

  localparam ring_sym_t RING_NULL = '{typ: RT_ACCESS, frame: 1'b1, data: 32'hC000_0000};

  function automatic logic ring_is_null(ring_sym_t r);
    return (r.typ == RT_ACCESS) && r.frame && (r.data[31:30] == 2'b11);
  endfunction

  // 7-bit interleaved parity: EDC bit i covers every symbol bit j with j mod 7 == i.
  // Any error burst of up to 7 adjacent bits is detected.
  function automatic logic [6:0] edc7(ring_sym_t r);
    logic [34:0] v;
    logic [6:0]  e;
    v = r;
    e = '0;
    for (int j = 0; j < 35; j++) e[j % 7] = e[j % 7] ^ v[j];
    return e;
  endfunction

  // ring <-> client type conversion
  function automatic ring_sym_t client_to_ring(client_sym_t c);
    ring_sym_t r;
    r.data  = c.s;
    r.frame = is_head(c.t) ? (c.t == CT_MC_HEAD) : is_frame(c.t);
    r.typ   = is_head(c.t) ? RT_HEAD : (is_tail(c.t) ? RT_TAIL : RT_PAYLOAD);
    return r;
  endfunction

  function automatic ctype_t ring_to_ctype(ring_sym_t r);
    unique case (r.typ)
      RT_HEAD:    return r.frame ? CT_MC_HEAD : CT_DIR_HEAD;
      RT_PAYLOAD: return r.frame ? CT_FRAME : CT_DATA;
      RT_TAIL:    return r.frame ? CT_FRAME_TAIL : CT_DATA_TAIL;
      default:    return CT_NULL;
    endcase
  endfunction

  // ---------------- control messages (first payload word) ----------------
  typedef enum logic [2:0] {
    MSG_INSTR      = 3'd1,  // deliver instruction
    MSG_INSTR_DATA = 3'd2,  // deliver instruction followed by data
    MSG_DATA       = 3'd3,  // deliver data
    MSG_CONTROL    = 3'd4,  // instruction control (control key)
    MSG_STATUS     = 3'd5   // status report (task status, PID, NAB)
  } msg_type_t;

  typedef struct packed {
    msg_type_t   mtype;   // [31:29]
    logic [4:0]  tid;     // [28:24]
    logic [23:0] body;    // operation ID / control key / status fields
  } msg_word0_t;

  typedef struct packed {
    msg_type_t   mtype;   // [31:29]
    logic [4:0]  tid;     // [28:24]
    logic [2:0]  status;  // [23:21]
    logic [16:0] pid;     // [20:4]
    logic [3:0]  nab;     // [3:0]
  } msg_status_t;

endpackage
