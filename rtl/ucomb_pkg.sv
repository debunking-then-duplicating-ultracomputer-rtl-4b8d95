// Shared types and sizes of the combining network.
//
// A forward message (request) travels from a processor (PE) towards a memory
// module (MM); a reverse message (response) travels back. Requests are either
// fetch-and-add, which the switches may combine (a load is a fetch-and-add
// with a zero addend), or store, which is never combined. The PE number and a
// per-PE tag identify a request; the response carries the same identity, which
// steers it back through the network and finds its wait-buffer entry when it
// was combined.
//
// Field widths are not given by the design description and are chosen here:
// the PE field is wide enough for the largest simulated system (2048 PEs),
// the tag allows 16 outstanding requests per PE, data words are 32 bits.
package ucomb_pkg;

  localparam int unsigned DATA_W = 32;   // data word / addend width
  localparam int unsigned ADDR_W = 24;   // word address; low LOG2_N bits select the MM
  localparam int unsigned PE_W   = 11;   // PE number, up to 2048 PEs
  localparam int unsigned TAG_W  = 4;    // per-PE request tag

  typedef enum logic [0:0] {
    OP_FAA   = 1'b0,  // fetch-and-add: returns old value, adds data (combinable)
    OP_STORE = 1'b1   // store: returns old value, writes data (not combinable)
  } op_e;

  // Identity of a request: who issued it.
  typedef struct packed {
    logic [PE_W-1:0]  pe;
    logic [TAG_W-1:0] tag;
  } msg_id_t;

  typedef struct packed {
    op_e               op;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;
    msg_id_t           id;
  } req_t;

  typedef struct packed {
    logic [DATA_W-1:0] data;
    msg_id_t           id;
  } rsp_t;

  // Decombining record written when two requests merge: the response that
  // arrives for `key` is answered as is, and a second response with value
  // (returned value + addend) is made for `second`.
  typedef struct packed {
    msg_id_t           key;
    msg_id_t           second;
    logic [DATA_W-1:0] addend;
  } wb_entry_t;

endpackage
