// mem_msg_pkg: memory request and response message formats.
//
// A request carries a 3-bit type, an 8-bit opaque tag that the memory
// returns unchanged, a 32-bit byte address, a 2-bit length (0 means four
// bytes, 1 one byte, 2 two bytes) and 32 bits of data. A response carries
// the type, the opaque tag, a 2-bit test field, the length and the data.
// Bit positions follow the message layouts: request type [76:74],
// opaque [73:66], addr [65:34], len [33:32], data [31:0]; response type
// [46:44], opaque [43:36], test [35:34], len [33:32], data [31:0].
// The numeric type codes (read 0, write 1) are this design's choice.
package mem_msg_pkg;

  typedef enum logic [2:0] {
    MEM_READ  = 3'd0,
    MEM_WRITE = 3'd1
  } mem_type_e;

  typedef struct packed {
    mem_type_e   typ;
    logic [7:0]  opaque;
    logic [31:0] addr;
    logic [1:0]  len;
    logic [31:0] data;
  } mem_req_t;

  typedef struct packed {
    mem_type_e   typ;
    logic [7:0]  opaque;
    logic [1:0]  test;
    logic [1:0]  len;
    logic [31:0] data;
  } mem_resp_t;

  localparam int unsigned MEM_REQ_BITS  = $bits(mem_req_t);   // 77
  localparam int unsigned MEM_RESP_BITS = $bits(mem_resp_t);  // 47

endpackage
